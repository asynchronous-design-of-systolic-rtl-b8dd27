// rncl_systole: one bit of the bit-level pipelined reduced-NCL adder, with
// the delayed-request (REQE) fix that keeps it delay-insensitive.
//
// Carry, one gate level, gated by the request:
//   cout.r1 = (a1 b1 + a1 c1 + b1 c1) . REQE     cout.r0 likewise on the 0 rails
// The carry is *early* when a == b (generate or kill: c_in is not needed) and
// *late* when a != b (propagate: it waits for c_in).
// Sum, second gate level, th34w2 with the opposite-rail carry weighted 2:
//   s.r1 = a1 b1 c1 + (a1 + b1 + c1) . cout.r0   s.r0 likewise
// Completion: ACK = NOT th22( th12(s.r1,s.r0), th12(cout.r1,cout.r0) ), so
// ACK = 1 requests DATA and ACK = 0 requests NULL. ACK goes to the previous
// systole's REQ input and to whoever supplies this bit's a and b.
// Fix: REQE = th22(ACK, REQ) with REQ = ACK of the next systole, so a request
// from the next systole only reaches the carry gates once this systole's own
// ACK agrees. That stops a NULL wave from overtaking a late sum.
//
// From the source design: the carry/sum/ACK equations, the th34w2 sum gates,
// the th12/th12/th22 completion tree and the th22 REQE gate. Own choices:
// the carry gate is a weighted threshold gate (REQE weight 2, threshold 4) so
// the carry is fully gated by REQE as the equations state; the figure of the
// systole labels that gate th34, which would let a = b = c pass with REQE low.
// All gates use the ncl_thgate tick model; step enables every gate of this
// systole on a tick (tie it high; a testbench varies it to skew speeds).
module rncl_systole
  import ncl_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic step,
  input  dr_t  a,
  input  dr_t  b,
  input  dr_t  cin,
  input  logic req,     // ACK of the next (more significant) systole
  output dr_t  cout,
  output dr_t  s,
  output logic ack
);

  logic reqe, sv, cov, done;

  // carry: inputs {REQE, c, b, a}, weights {2,1,1,1}, threshold 4
  ncl_thgate #(.N(4), .M(4), .W({4'd2, 4'd1, 4'd1, 4'd1})) u_c1 (
    .clk, .rst, .en(step), .x({reqe, cin.r1, b.r1, a.r1}), .z(cout.r1));
  ncl_thgate #(.N(4), .M(4), .W({4'd2, 4'd1, 4'd1, 4'd1})) u_c0 (
    .clk, .rst, .en(step), .x({reqe, cin.r0, b.r0, a.r0}), .z(cout.r0));

  // sum: th34w2, inputs {cout other rail (w2), c, b, a}
  ncl_thgate #(.N(4), .M(3), .W({4'd2, 4'd1, 4'd1, 4'd1})) u_s1 (
    .clk, .rst, .en(step), .x({cout.r0, cin.r1, b.r1, a.r1}), .z(s.r1));
  ncl_thgate #(.N(4), .M(3), .W({4'd2, 4'd1, 4'd1, 4'd1})) u_s0 (
    .clk, .rst, .en(step), .x({cout.r1, cin.r0, b.r0, a.r0}), .z(s.r0));

  // completion detection
  ncl_thgate #(.N(2), .M(1)) u_sv (
    .clk, .rst, .en(step), .x({s.r1, s.r0}), .z(sv));
  ncl_thgate #(.N(2), .M(1)) u_cov (
    .clk, .rst, .en(step), .x({cout.r1, cout.r0}), .z(cov));
  ncl_thgate #(.N(2), .M(2)) u_done (
    .clk, .rst, .en(step), .x({sv, cov}), .z(done));
  assign ack = ~done;

  // delayed request: th22 of own ACK and next systole's ACK; starts requesting DATA
  ncl_thgate #(.N(2), .M(2), .INIT(1'b1)) u_reqe (
    .clk, .rst, .en(step), .x({ack, req}), .z(reqe));

  // A dual-rail output must never have both rails high.
  a_cout_legal: assert property (@(posedge clk) disable iff (rst) !(cout.r1 && cout.r0));
  a_s_legal:    assert property (@(posedge clk) disable iff (rst) !(s.r1 && s.r0));

endmodule
