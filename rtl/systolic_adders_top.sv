// systolic_adders_top: the two delay-insensitive bit-level pipelined systolic
// adders side by side, each behind its own synchronous operand/result port.
//
//  * rNCL path:  ncl_adder_env -> rncl_adder  (reduced-NCL systoles, one
//    handshake per bit, one gate level for the early/late carry)
//  * DICSA path: ncl_adder_env -> dicsa_adder (two-stage Manchester carry
//    systoles with separate input and output handshakes)
// Both adders carry the delayed-request th22 fix in every systole. Each path
// has its own skew input selecting word-wise or bit-skewed operand
// application, and its own step vector enabling the gates of each systole on
// a tick (tie all ones for normal use; holding a bit low slows that systole,
// which exercises the self-timed handshakes under uneven delays). A result
// appears a data-dependent number of ticks after its operands: the carry
// ripples only through runs of propagate bits. N = 8 is the largest bit
// length the source design evaluates at gate level; DEPTH is this design's
// choice of how many words may be in flight in bit-skewed mode.
// Only acko[0] of the DICSA leaves the array (it acknowledges the carry in);
// acko[N-1:1] are used inside the array as requests, so a lint tool reports
// those bits of d_acko as unused here.
module systolic_adders_top
  import ncl_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst,
  // reduced-NCL adder
  input  logic         r_skew,
  input  logic [N-1:0] r_step,
  input  logic         r_op_valid,
  output logic         r_op_ready,
  input  logic [N-1:0] r_op_a,
  input  logic [N-1:0] r_op_b,
  input  logic         r_op_cin,
  output logic         r_res_valid,
  input  logic         r_res_ready,
  output logic [N-1:0] r_res_sum,
  output logic         r_res_cout,
  // DICSA adder
  input  logic         d_skew,
  input  logic [N-1:0] d_step,
  input  logic         d_op_valid,
  output logic         d_op_ready,
  input  logic [N-1:0] d_op_a,
  input  logic [N-1:0] d_op_b,
  input  logic         d_op_cin,
  output logic         d_res_valid,
  input  logic         d_res_ready,
  output logic [N-1:0] d_res_sum,
  output logic         d_res_cout
);

  // ---- reduced-NCL path ----------------------------------------------------
  dr_t  [N-1:0] r_a, r_b, r_s;
  dr_t          r_cin, r_cout;
  logic [N-1:0] r_ack;
  logic         r_req_msb;

  ncl_adder_env #(.N(N), .DEPTH(DEPTH)) u_r_env (
    .clk, .rst, .skew(r_skew),
    .op_valid(r_op_valid), .op_ready(r_op_ready),
    .op_a(r_op_a), .op_b(r_op_b), .op_cin(r_op_cin),
    .res_valid(r_res_valid), .res_ready(r_res_ready),
    .res_sum(r_res_sum), .res_cout(r_res_cout),
    .a_dr(r_a), .b_dr(r_b), .cin_dr(r_cin), .req_msb(r_req_msb),
    .op_ack(r_ack), .cin_ack(r_ack[0]), .s_dr(r_s), .cout_dr(r_cout));

  rncl_adder #(.N(N)) u_r_add (
    .clk, .rst, .step(r_step),
    .a(r_a), .b(r_b), .cin(r_cin), .req_msb(r_req_msb),
    .s(r_s), .cout(r_cout), .ack(r_ack));

  // ---- DICSA path ----------------------------------------------------------
  dr_t  [N-1:0] d_a, d_b, d_s;
  dr_t          d_cin, d_cout;
  logic [N-1:0] d_acki, d_acko;
  logic         d_req_msb;

  ncl_adder_env #(.N(N), .DEPTH(DEPTH)) u_d_env (
    .clk, .rst, .skew(d_skew),
    .op_valid(d_op_valid), .op_ready(d_op_ready),
    .op_a(d_op_a), .op_b(d_op_b), .op_cin(d_op_cin),
    .res_valid(d_res_valid), .res_ready(d_res_ready),
    .res_sum(d_res_sum), .res_cout(d_res_cout),
    .a_dr(d_a), .b_dr(d_b), .cin_dr(d_cin), .req_msb(d_req_msb),
    .op_ack(d_acki), .cin_ack(d_acko[0]), .s_dr(d_s), .cout_dr(d_cout));

  dicsa_adder #(.N(N)) u_d_add (
    .clk, .rst, .step(d_step),
    .a(d_a), .b(d_b), .cin(d_cin), .req_msb(d_req_msb),
    .s(d_s), .cout(d_cout), .acki(d_acki), .acko(d_acko));

endmodule
