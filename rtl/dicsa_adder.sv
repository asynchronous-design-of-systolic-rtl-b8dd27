// dicsa_adder: N-bit bit-level pipelined systolic DICSA adder built from
// dicsa_systole, carry rippling from bit 0 to bit N-1.
//
// Wiring of each systole i: REQI = its own ACKO; REQO = ACKO of systole i+1,
// or req_msb from the receiver of the carry out for the top systole.
// acki[i] (1 = DATA wanted, 0 = NULL wanted) acknowledges the operand bits
// a[i], b[i]; acko[0] acknowledges the carry in. Sums and carry out are
// dual-rail; a receiver reads s[i] once it is DATA. The array wiring follows
// the source design; N = 8 is the largest bit length it evaluates at gate
// level.
module dicsa_adder
  import ncl_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] step,
  input  dr_t  [N-1:0] a,
  input  dr_t  [N-1:0] b,
  input  dr_t          cin,
  input  logic         req_msb,
  output dr_t  [N-1:0] s,
  output dr_t          cout,
  output logic [N-1:0] acki,
  output logic [N-1:0] acko
);

  dr_t  [N:0] c;     // c[i] is the carry into bit i
  logic [N:1] rq;    // rq[i] is the output-stage request into bit i-1

  assign c[0]  = cin;
  assign cout  = c[N];
  assign rq[N] = req_msb;
  if (N > 1) begin : g_rq
    assign rq[N-1:1] = acko[N-1:1];
  end

  for (genvar i = 0; i < N; i++) begin : g_bit
    dicsa_systole u_sys (
      .clk, .rst, .step(step[i]),
      .a(a[i]), .b(b[i]), .cin(c[i]),
      .reqi(acko[i]), .reqo(rq[i+1]),
      .acki(acki[i]), .acko(acko[i]),
      .cout(c[i+1]), .s(s[i]));
  end

endmodule
