// dicsa_systole: one bit of the bit-level pipelined delay-insensitive
// Manchester carry-save adder (DICSA), with the delayed-request (REQOE) fix.
//
// Two stages, each with its own handshake:
//  * Input stage, gated by REQI: carry generate g = a1 b1, kill k = a0 b0 and
//    the dual-rail propagate p (true rail a0 b1 + a1 b0, false rail g + k).
//    ACKI = NOT(p + p_n) acknowledges the operand bits a, b.
//  * Output stage, gated by REQOE:
//      cout.r1 = g + p c1           cout.r0 = k + p c0
//      s.r1    = (g+k) c1 + p c0    s.r0    = (g+k) c0 + p c1
//    ACKO = NOT( valid(s) . valid(cout) . valid(cin) ) acknowledges the
//    carry input and, through the array, the previous systole's outputs.
// The carry is early for generate/kill (c_in not needed) and late for
// propagate. REQOE = th22(ACKO, REQO) with REQO = ACKO of the next systole,
// so a request from the next systole only acts once this systole has
// completed. In the array REQI is wired to this systole's own ACKO.
//
// From the source design: the stage equations above (including the REQI/REQO
// gating and both acknowledge functions), the ACKI/ACKO/REQI/REQO ports and
// the th22 REQOE gate. The gate netlist of the systolic DICSA is this design's
// own: th33 gates (operand rails plus REQI) for g, k and the two propagate
// minterms, th12 for p and p_n, a th33 + th22 + th12 tree per output rail and
// a th33 of three th12 validity gates for ACKO, all on the ncl_thgate tick
// model. step enables every gate of the systole on a tick (tie high).
module dicsa_systole
  import ncl_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic step,
  input  dr_t  a,
  input  dr_t  b,
  input  dr_t  cin,
  input  logic reqi,    // input-stage request (own ACKO in the array)
  input  logic reqo,    // output-stage request: ACKO of the next systole
  output logic acki,
  output logic acko,
  output dr_t  cout,
  output dr_t  s
);

  logic g, k, pab, pba, p, pn, pv;
  logic reqoe;
  logic cp1, cg, cp0, ck;
  logic sgk1, sp1, sgk0, sp0;
  logic sv, cov, civ, done;

  // ---- input stage ------------------------------------------------------
  ncl_thgate #(.N(3), .M(3)) u_g   (.clk, .rst, .en(step), .x({reqi, b.r1, a.r1}), .z(g));
  ncl_thgate #(.N(3), .M(3)) u_k   (.clk, .rst, .en(step), .x({reqi, b.r0, a.r0}), .z(k));
  ncl_thgate #(.N(3), .M(3)) u_pab (.clk, .rst, .en(step), .x({reqi, b.r1, a.r0}), .z(pab));
  ncl_thgate #(.N(3), .M(3)) u_pba (.clk, .rst, .en(step), .x({reqi, b.r0, a.r1}), .z(pba));
  ncl_thgate #(.N(2), .M(1)) u_p   (.clk, .rst, .en(step), .x({pba, pab}), .z(p));
  ncl_thgate #(.N(2), .M(1)) u_pn  (.clk, .rst, .en(step), .x({k, g}), .z(pn));
  ncl_thgate #(.N(2), .M(1)) u_pv  (.clk, .rst, .en(step), .x({pn, p}), .z(pv));
  assign acki = ~pv;

  // ---- output stage -----------------------------------------------------
  ncl_thgate #(.N(3), .M(3)) u_cp1 (.clk, .rst, .en(step), .x({reqoe, cin.r1, p}), .z(cp1));
  ncl_thgate #(.N(2), .M(2)) u_cg  (.clk, .rst, .en(step), .x({reqoe, g}), .z(cg));
  ncl_thgate #(.N(2), .M(1)) u_c1  (.clk, .rst, .en(step), .x({cg, cp1}), .z(cout.r1));
  ncl_thgate #(.N(3), .M(3)) u_cp0 (.clk, .rst, .en(step), .x({reqoe, cin.r0, p}), .z(cp0));
  ncl_thgate #(.N(2), .M(2)) u_ck  (.clk, .rst, .en(step), .x({reqoe, k}), .z(ck));
  ncl_thgate #(.N(2), .M(1)) u_c0  (.clk, .rst, .en(step), .x({ck, cp0}), .z(cout.r0));

  ncl_thgate #(.N(3), .M(3)) u_sgk1 (.clk, .rst, .en(step), .x({reqoe, cin.r1, pn}), .z(sgk1));
  ncl_thgate #(.N(3), .M(3)) u_sp1  (.clk, .rst, .en(step), .x({reqoe, cin.r0, p}), .z(sp1));
  ncl_thgate #(.N(2), .M(1)) u_s1   (.clk, .rst, .en(step), .x({sp1, sgk1}), .z(s.r1));
  ncl_thgate #(.N(3), .M(3)) u_sgk0 (.clk, .rst, .en(step), .x({reqoe, cin.r0, pn}), .z(sgk0));
  ncl_thgate #(.N(3), .M(3)) u_sp0  (.clk, .rst, .en(step), .x({reqoe, cin.r1, p}), .z(sp0));
  ncl_thgate #(.N(2), .M(1)) u_s0   (.clk, .rst, .en(step), .x({sp0, sgk0}), .z(s.r0));

  // ---- completion detection and delayed request ---------------------------
  ncl_thgate #(.N(2), .M(1)) u_sv   (.clk, .rst, .en(step), .x({s.r1, s.r0}), .z(sv));
  ncl_thgate #(.N(2), .M(1)) u_cov  (.clk, .rst, .en(step), .x({cout.r1, cout.r0}), .z(cov));
  ncl_thgate #(.N(2), .M(1)) u_civ  (.clk, .rst, .en(step), .x({cin.r1, cin.r0}), .z(civ));
  ncl_thgate #(.N(3), .M(3)) u_done (.clk, .rst, .en(step), .x({civ, cov, sv}), .z(done));
  assign acko = ~done;

  ncl_thgate #(.N(2), .M(2), .INIT(1'b1)) u_reqoe (
    .clk, .rst, .en(step), .x({acko, reqo}), .z(reqoe));

  a_cout_legal: assert property (@(posedge clk) disable iff (rst) !(cout.r1 && cout.r0));
  a_s_legal:    assert property (@(posedge clk) disable iff (rst) !(s.r1 && s.r0));

endmodule
