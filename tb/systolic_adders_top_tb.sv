// systolic_adders_top_tb: end-to-end test of the whole design at its default
// size (N = 8 bits, DEPTH = 4 words), both adders running at the same time.
// For each adder and each operand application mode (word-wise, then
// bit-skewed) it sends back-to-back random words with every systole enabled
// on every tick, then words under random result back-pressure, then words
// with a random per-systole step. Every result is checked in order against
// a + b + cin. Some words are all-propagate (a = ~b) so the carry ripples
// through all eight systoles.
// Mechanism counters (each must be non-zero): early carries (carry out DATA
// while the carry in is still NULL), late carries (propagate bits), the
// delayed request holding a systole open after the next systole already asked
// for NULL, full-length carry chains, several words on the wires in
// bit-skewed mode, operand-port stalls and result back-pressure. It also
// checks that bit-skewed application finishes the back-to-back phase in
// fewer ticks than word-wise application, for both adders.
module systolic_adders_top_tb;
  import ncl_pkg::*;
  localparam int N = 8;
  localparam int WORDS = 200;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         r_skew, d_skew;
  logic [N-1:0] r_step, d_step;
  logic         r_op_valid, r_op_ready, r_op_cin, r_res_valid, r_res_ready, r_res_cout;
  logic [N-1:0] r_op_a, r_op_b, r_res_sum;
  logic         d_op_valid, d_op_ready, d_op_cin, d_res_valid, d_res_ready, d_res_cout;
  logic [N-1:0] d_op_a, d_op_b, d_res_sum;

  systolic_adders_top dut (.*);

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------------------
  // mechanism counters, probing the adders
  int r_early, r_late, r_hold, d_early, d_late, d_hold, r_full, d_full;
  int r_stall, d_stall, r_bp, d_bp;
  dr_t [N-1:0] r_cout_q, d_cout_q;
  dr_t  [N-1:0] r_cout_w, d_cout_w, r_cin_w, d_cin_w;
  logic [N-1:0] r_prop_w, d_prop_w, r_hold_w, d_hold_w;

  for (genvar i = 0; i < N; i++) begin : g_probe
    assign r_cout_w[i] = dut.u_r_add.g_bit[i].u_sys.cout;
    assign d_cout_w[i] = dut.u_d_add.g_bit[i].u_sys.cout;
    assign r_cin_w[i]  = dut.u_r_add.g_bit[i].u_sys.cin;
    assign d_cin_w[i]  = dut.u_d_add.g_bit[i].u_sys.cin;
    assign r_prop_w[i] = dut.u_r_add.g_bit[i].u_sys.a != dut.u_r_add.g_bit[i].u_sys.b;
    assign d_prop_w[i] = dut.u_d_add.g_bit[i].u_sys.p;
    assign r_hold_w[i] = dut.u_r_add.g_bit[i].u_sys.reqe && !dut.u_r_add.g_bit[i].u_sys.req &&
                         dut.u_r_add.g_bit[i].u_sys.ack;
    assign d_hold_w[i] = dut.u_d_add.g_bit[i].u_sys.reqoe && !dut.u_d_add.g_bit[i].u_sys.reqo &&
                         dut.u_d_add.g_bit[i].u_sys.acko;
  end

  always @(posedge clk) begin
    if (rst) begin
      r_cout_q <= '0; d_cout_q <= '0;
    end else begin
      #1;
      for (int i = 0; i < N; i++) begin
        if (dr_is_null(r_cout_q[i]) && dr_is_data(r_cout_w[i])) begin
          if (dr_is_null(r_cin_w[i])) r_early++;
          if (r_prop_w[i]) r_late++;
        end
        if (dr_is_null(d_cout_q[i]) && dr_is_data(d_cout_w[i])) begin
          if (dr_is_null(d_cin_w[i])) d_early++;
          if (d_prop_w[i]) d_late++;
        end
        if (r_hold_w[i]) r_hold++;
        if (d_hold_w[i]) d_hold++;
      end
      r_cout_q <= r_cout_w;
      d_cout_q <= d_cout_w;
      if (r_op_valid && !r_op_ready) r_stall++;
      if (d_op_valid && !d_op_ready) d_stall++;
      if (r_res_valid && !r_res_ready) r_bp++;
      if (d_res_valid && !d_res_ready) d_bp++;
    end
  end

  // ---------------------------------------------------------------------------
  // scoreboards
  logic [N:0] r_q[$], d_q[$];
  int r_sent, r_recv, d_sent, d_recv;

  always @(posedge clk) begin
    if (!rst) begin
      if (r_op_valid && r_op_ready) begin
        r_q.push_back((N+1)'(r_op_a) + (N+1)'(r_op_b) + (N+1)'(r_op_cin));
        if ((r_op_a ^ r_op_b) == '1) r_full++;
        r_sent++;
      end
      if (d_op_valid && d_op_ready) begin
        d_q.push_back((N+1)'(d_op_a) + (N+1)'(d_op_b) + (N+1)'(d_op_cin));
        if ((d_op_a ^ d_op_b) == '1) d_full++;
        d_sent++;
      end
      if (r_res_valid && r_res_ready) begin
        logic [N:0] e;
        check(r_q.size() > 0, "rNCL result without operand");
        if (r_q.size() > 0) begin
          e = r_q.pop_front();
          check({r_res_cout, r_res_sum} == e, $sformatf("rNCL result %h expected %h", {r_res_cout, r_res_sum}, e));
        end
        r_recv++;
      end
      if (d_res_valid && d_res_ready) begin
        logic [N:0] e;
        check(d_q.size() > 0, "DICSA result without operand");
        if (d_q.size() > 0) begin
          e = d_q.pop_front();
          check({d_res_cout, d_res_sum} == e, $sformatf("DICSA result %h expected %h", {d_res_cout, d_res_sum}, e));
        end
        d_recv++;
      end
    end
  end

  // ---------------------------------------------------------------------------
  // stimulus
  int phase;
  always @(posedge clk) begin
    #1;
    r_res_ready <= (phase == 1) ? ($urandom_range(0, 3) == 0) : 1'b1;
    d_res_ready <= (phase == 1) ? ($urandom_range(0, 3) == 0) : 1'b1;
    r_step      <= (phase == 2) ? (N'($urandom) | N'($urandom)) : '1;
    d_step      <= (phase == 2) ? (N'($urandom) | N'($urandom)) : '1;
  end

  function automatic logic [2*N:0] new_word(input int k);
    logic [N-1:0] x, y;
    x = N'($urandom);
    y = (k % 16 == 5) ? ~x : N'($urandom);
    return {x, y, 1'($urandom)};
  endfunction

  task automatic run_mode(input logic sk, output int r_t, output int d_t);
    r_skew = sk; d_skew = sk;
    for (int ph = 0; ph < 3; ph++) begin
      int t = 0, r_target, d_target, k = 0;
      bit r_done = 0, d_done = 0;
      phase = ph;
      r_target = r_sent + WORDS; d_target = d_sent + WORDS;
      {r_op_a, r_op_b, r_op_cin} = new_word(k);
      {d_op_a, d_op_b, d_op_cin} = new_word(k);
      r_op_valid = 1'b1; d_op_valid = 1'b1;
      while (!(r_done && d_done)) begin
        @(posedge clk); #2; t++; k++;
        if (r_sent >= r_target) r_op_valid = 1'b0;
        else {r_op_a, r_op_b, r_op_cin} = new_word(k);
        if (d_sent >= d_target) d_op_valid = 1'b0;
        else {d_op_a, d_op_b, d_op_cin} = new_word(k + 3);
        if (!r_done && r_sent >= r_target && r_recv == r_sent) begin
          r_done = 1; if (ph == 0) r_t = t;
        end
        if (!d_done && d_sent >= d_target && d_recv == d_sent) begin
          d_done = 1; if (ph == 0) d_t = t;
        end
      end
      repeat (20) @(posedge clk);
      #2;
    end
  endtask

  int r_tw, d_tw, r_ts, d_ts;
  int r_span, d_span;

  // words on the wires in each path (issued at least partly, not yet received)
  function automatic int span_r();
    int hi = 0, lo = 1 << 20;
    for (int j = 0; j <= N; j++) begin
      int iss, rcv;
      iss = int'(3'(dut.u_r_env.icnt[j] - dut.u_r_env.hcnt)) + int'(dut.u_r_env.iph[j]);
      rcv = int'(3'(dut.u_r_env.ocnt[j] - dut.u_r_env.hcnt));
      if (iss > hi) hi = iss;
      if (rcv < lo) lo = rcv;
    end
    return hi - lo;
  endfunction
  function automatic int span_d();
    int hi = 0, lo = 1 << 20;
    for (int j = 0; j <= N; j++) begin
      int iss, rcv;
      iss = int'(3'(dut.u_d_env.icnt[j] - dut.u_d_env.hcnt)) + int'(dut.u_d_env.iph[j]);
      rcv = int'(3'(dut.u_d_env.ocnt[j] - dut.u_d_env.hcnt));
      if (iss > hi) hi = iss;
      if (rcv < lo) lo = rcv;
    end
    return hi - lo;
  endfunction
  int r_span_w, d_span_w;
  always @(posedge clk) if (!rst) begin
    if (r_skew) begin if (span_r() > r_span) r_span = span_r(); end
    else if (span_r() > r_span_w) r_span_w = span_r();
    if (d_skew) begin if (span_d() > d_span) d_span = span_d(); end
    else if (span_d() > d_span_w) d_span_w = span_d();
  end

  initial begin
    rst = 1'b1; phase = 0;
    r_skew = 0; d_skew = 0; r_op_valid = 0; d_op_valid = 0;
    r_op_a = '0; r_op_b = '0; r_op_cin = 0; d_op_a = '0; d_op_b = '0; d_op_cin = 0;
    {r_early, r_late, r_hold, d_early, d_late, d_hold, r_full, d_full} = '0;
    {r_stall, d_stall, r_bp, d_bp, r_sent, r_recv, d_sent, d_recv} = '0;
    r_span = 0; d_span = 0; r_span_w = 0; d_span_w = 0;
    repeat (4) @(posedge clk);
    #2;
    rst = 1'b0;
    run_mode(1'b0, r_tw, d_tw);
    run_mode(1'b1, r_ts, d_ts);
    check(r_recv == 6 * WORDS && d_recv == 6 * WORDS, "all results returned");
    check(r_early > 0 && d_early > 0, "early carry never happened");
    check(r_late > 0 && d_late > 0, "late carry never happened");
    check(r_hold > 0 && d_hold > 0, "delayed request never held a systole open");
    check(r_full > 0 && d_full > 0, "no full-length carry chain");
    check(r_span >= 2 && d_span >= 2, "bit-skewed mode never overlapped words");
    check(r_span_w <= 1 && d_span_w <= 1, "word-wise mode overlapped words");
    check(r_stall > 0 && d_stall > 0, "operand port never stalled");
    check(r_bp > 0 && d_bp > 0, "result back-pressure never happened");
    check(r_ts < r_tw, "rNCL: bit-skewed not faster than word-wise");
    check(d_ts < d_tw, "DICSA: bit-skewed not faster than word-wise");
    $display("rNCL : early %0d late %0d REQE-hold %0d full-chain %0d stalls %0d back-pressure %0d",
             r_early, r_late, r_hold, r_full, r_stall, r_bp);
    $display("DICSA: early %0d late %0d REQOE-hold %0d full-chain %0d stalls %0d back-pressure %0d",
             d_early, d_late, d_hold, d_full, d_stall, d_bp);
    $display("%0d back-to-back words, ticks word-wise / bit-skewed: rNCL %0d / %0d (%0d%%), DICSA %0d / %0d (%0d%%)",
             WORDS, r_tw, r_ts, 100 * (r_tw - r_ts) / r_tw, d_tw, d_ts, 100 * (d_tw - d_ts) / d_tw);
    $display("max words on the wires in bit-skewed mode: rNCL %0d, DICSA %0d", r_span, d_span);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
