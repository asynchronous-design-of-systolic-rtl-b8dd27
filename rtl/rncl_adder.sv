// rncl_adder: N-bit bit-level pipelined systolic adder built from
// rncl_systole, carry rippling from bit 0 to bit N-1.
//
// Each systole's REQ input is the ACK of the next more significant systole;
// the most significant systole's REQ comes from the receiver of the carry out
// (req_msb). ack[i] acknowledges bit i's operands a[i], b[i]; ack[0] also
// acknowledges the carry in. ack[i] = 1 asks for DATA, 0 asks for NULL.
// Sums and carry out are dual-rail; a receiver reads s[i] once it is DATA.
// The array wiring follows the source design; N = 8 is the largest bit length
// the source evaluates at gate level.
module rncl_adder
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
  output logic [N-1:0] ack
);

  dr_t  [N:0] c;     // c[i] is the carry into bit i
  logic [N:1] rq;    // rq[i] is the request into bit i-1: ack[i], or req_msb

  assign c[0]  = cin;
  assign cout  = c[N];
  assign rq[N] = req_msb;
  if (N > 1) begin : g_rq
    assign rq[N-1:1] = ack[N-1:1];
  end

  for (genvar i = 0; i < N; i++) begin : g_bit
    rncl_systole u_sys (
      .clk, .rst, .step(step[i]),
      .a(a[i]), .b(b[i]), .cin(c[i]), .req(rq[i+1]),
      .cout(c[i+1]), .s(s[i]), .ack(ack[i]));
  end

endmodule
