// ncl_adder_env_tb: the operand/result interface in front of a reduced-NCL
// systolic adder (N = 8, DEPTH = 4), in both operand application modes.
// Random operands go in through the valid/ready port; every result must
// come out in order and equal a + b + cin (scoreboard queue). Each mode runs
// three phases: back-to-back words with all systoles enabled every tick (to
// measure throughput), then random result back-pressure, then random per-
// systole step. Checks that the bit-skewed mode really keeps several words
// in flight and finishes the back-to-back phase in fewer ticks than the
// word-wise mode, and that back-pressure stalls the operand port.
module ncl_adder_env_tb;
  import ncl_pkg::*;
  localparam int N = 8;
  localparam int DEPTH = 4;
  localparam int WORDS = 300;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         skew;
  logic [N-1:0] step;
  logic         op_valid, op_ready, op_cin, res_valid, res_ready, res_cout;
  logic [N-1:0] op_a, op_b, res_sum;
  dr_t  [N-1:0] a_dr, b_dr, s_dr;
  dr_t          cin_dr, cout_dr;
  logic         req_msb;
  logic [N-1:0] ack;

  ncl_adder_env #(.N(N), .DEPTH(DEPTH)) dut (
    .clk, .rst, .skew, .op_valid, .op_ready, .op_a, .op_b, .op_cin,
    .res_valid, .res_ready, .res_sum, .res_cout,
    .a_dr, .b_dr, .cin_dr, .req_msb, .op_ack(ack), .cin_ack(ack[0]),
    .s_dr, .cout_dr);

  rncl_adder #(.N(N)) u_add (.clk, .rst, .step, .a(a_dr), .b(b_dr), .cin(cin_dr),
                             .req_msb, .s(s_dr), .cout(cout_dr), .ack);

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N:0] expq[$];
  int n_sent, n_recv, stalls, max_inflight;
  int phase;            // 0 back-to-back, 1 back-pressure, 2 random step

  // scoreboard and result side
  always @(posedge clk) begin
    if (!rst) begin
      if (res_valid && res_ready) begin
        logic [N:0] e;
        check(expq.size() > 0, "result without operand");
        if (expq.size() > 0) begin
          e = expq.pop_front();
          check({res_cout, res_sum} == e, $sformatf("result %h expected %h", {res_cout, res_sum}, e));
        end
        n_recv++;
      end
      if (op_valid && op_ready) begin
        expq.push_back((N+1)'(op_a) + (N+1)'(op_b) + (N+1)'(op_cin));
        n_sent++;
      end
      if (op_valid && !op_ready) stalls++;
      begin
        // words on the wires: issued (at least partly) but not fully received
        int hi = 0, lo = 1 << 20, span;
        for (int j = 0; j <= N; j++) begin
          int iss, rcv;
          iss = int'(3'(dut.icnt[j] - dut.hcnt)) + int'(dut.iph[j]);
          rcv = int'(3'(dut.ocnt[j] - dut.hcnt));
          if (iss > hi) hi = iss;
          if (rcv < lo) lo = rcv;
        end
        span = hi - lo;
        if (span > max_inflight) max_inflight = span;
      end
    end
  end

  // randomised drivers
  always @(posedge clk) begin
    #1;
    res_ready <= (phase == 1) ? ($urandom_range(0, 3) == 0) : 1'b1;
    step      <= (phase == 2) ? (N'($urandom) | N'($urandom)) : '1;
  end

  task automatic run_mode(input logic sk, output int ticks_b2b, output int inflight);
    skew = sk;
    for (int ph = 0; ph < 3; ph++) begin
      int t0, target;
      phase = ph;
      max_inflight = 0;
      t0 = 0;
      target = n_sent + WORDS;
      op_valid = 1'b1;
      op_a = N'($urandom); op_b = N'($urandom); op_cin = 1'($urandom);
      while (n_sent < target) begin
        @(posedge clk); #2;
        t0++;
        if (n_sent < target) begin
          op_a = N'($urandom); op_b = N'($urandom); op_cin = 1'($urandom);
        end
        if (n_sent >= target) op_valid = 1'b0;
      end
      op_valid = 1'b0;
      while (n_recv < n_sent) begin @(posedge clk); #2; t0++; end
      if (ph == 0) begin ticks_b2b = t0; inflight = max_inflight; end
      // let the adder settle to NULL before a mode change
      repeat (20) @(posedge clk);
      #2;
    end
  endtask

  int t_word, t_skew, if_word, if_skew;

  initial begin
    rst = 1'b1; skew = 1'b0; op_valid = 1'b0; op_a = '0; op_b = '0; op_cin = 1'b0;
    n_sent = 0; n_recv = 0; stalls = 0; phase = 0; max_inflight = 0;
    repeat (4) @(posedge clk);
    #2;
    rst = 1'b0;
    run_mode(1'b0, t_word, if_word);
    run_mode(1'b1, t_skew, if_skew);
    check(n_recv == 6 * WORDS, "all results returned");
    check(if_word <= 1, "word-wise mode overlapped words");
    check(if_skew >= 2, "bit-skewed mode never had two words on the wires");
    check(t_skew < t_word, "bit-skewed mode not faster than word-wise mode");
    check(stalls > 0, "operand port never stalled");
    $display("back-to-back %0d words: word-wise %0d ticks, bit-skewed %0d ticks (%0d%% faster)",
             WORDS, t_word, t_skew, 100 * (t_word - t_skew) / t_word);
    $display("words on the wires at once: word-wise %0d, bit-skewed %0d; stall cycles %0d",
             if_word, if_skew, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
