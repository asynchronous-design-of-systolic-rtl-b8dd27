// rncl_adder_tb: N-bit reduced-NCL systolic adder driven word-wise by a
// testbench environment: all operand bits and the carry in are applied as
// DATA together, the word is complete when every ACK has fallen, then all
// inputs return to NULL and the test waits for every ACK to rise again.
// The carry-out receiver (req_msb) acknowledges after a random delay.
// Checks: every sum and carry out against a + b + cin; with all systoles
// enabled on every tick (step all ones) the number of ticks to completion
// must equal a timing reference built from the threshold-gate definition
// (each gate fires one tick after its weighted threshold is met), which
// makes the completion time follow the longest carry-propagate run instead
// of the word length. The second half randomises step per systole, so
// neighbouring systoles run at different speeds. Reports the average
// completion time and the longest carry chain seen.
module rncl_adder_tb;
  import ncl_pkg::*;
  localparam int N = 8;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [N-1:0] step;
  dr_t  [N-1:0] a, b, s;
  dr_t          cin, cout;
  logic         req_msb;
  logic [N-1:0] ack;

  rncl_adder #(.N(N)) dut (.clk, .rst, .step, .a, .b, .cin, .req_msb, .s, .cout, .ack);

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

  // carry-out receiver
  initial begin
    req_msb = 1'b1;
    forever begin
      @(posedge clk);
      if (!rst && req_msb && dr_is_data(cout)) begin
        repeat ($urandom_range(0, 3)) @(posedge clk);
        req_msb = 1'b0;
      end else if (!rst && !req_msb && dr_is_null(cout)) begin
        repeat ($urandom_range(0, 3)) @(posedge clk);
        req_msb = 1'b1;
      end
    end
  end

  // Threshold gate timing: inputs asserted at times t[] with weights w[];
  // the gate fires one tick after the weighted count first reaches m.
  function automatic int fire(input int m, input int t[4], input int w[4]);
    for (int tt = 0; tt < 1000; tt++) begin
      int acc = 0;
      for (int j = 0; j < 4; j++) if (w[j] > 0 && t[j] <= tt) acc += w[j];
      if (acc >= m) return tt + 1;
    end
    return 1 << 20;
  endfunction

  localparam int NEVER = 1 << 20;

  // expected ticks from DATA application to the last ACK falling
  function automatic int ref_ticks(input logic [N-1:0] va, input logic [N-1:0] vb, input logic vc);
    int tc_in, cval, worst;
    tc_in = 0; cval = vc; worst = 0;
    for (int i = 0; i < N; i++) begin
      int tc, ts, tsv, tcov, tdone, nc;
      int c1, c0;
      nc = (int'(va[i]) + int'(vb[i]) + cval) >= 2;
      // carry rail that asserts: majority of its rail's inputs, REQE open (time 0, weight 2)
      begin
        int t[4], w[4];
        t = '{0, 0, tc_in, 0};
        w = '{int'(nc ? va[i] : !va[i]), int'(nc ? vb[i] : !vb[i]), ((nc ? cval : 1 - cval) != 0) ? 1 : 0, 2};
        tc = fire(4, t, w);
      end
      // sum rail that asserts: its rail's a, b, c (weight 1) and the opposite carry rail (weight 2)
      begin
        int sv, t[4], w[4];
        sv = (int'(va[i]) + int'(vb[i]) + cval) % 2;
        t = '{0, 0, tc_in, tc};
        w = '{int'(sv ? va[i] : !va[i]), int'(sv ? vb[i] : !vb[i]),
              ((sv ? cval : 1 - cval) != 0) ? 1 : 0, (nc != sv) ? 2 : 0};
        ts = fire(3, t, w);
      end
      tsv = ts + 1; tcov = tc + 1;
      tdone = ((tsv > tcov) ? tsv : tcov) + 1;
      if (tdone > worst) worst = tdone;
      tc_in = tc; cval = nc;
    end
    return worst;
  endfunction

  function automatic int longest_chain(input logic [N-1:0] va, input logic [N-1:0] vb);
    int run = 0, best = 0;
    for (int i = 0; i < N; i++) begin
      if (va[i] != vb[i]) run++; else run = 0;
      if (run > best) best = run;
    end
    return best;
  endfunction

  int sum_ticks = 0, n_words = 0, max_chain = 0, n_timed = 0;

  initial begin
    rst = 1'b1; step = '1;
    a = '0; b = '0; cin = DR_NULL;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    for (int t = 0; t < 2000; t++) begin
      logic [N-1:0] va, vb;
      logic vc;
      logic [N:0] expect_sum;
      logic [N:0] got;
      int ticks, lim;
      bit rand_step;
      rand_step = (t >= 1000);
      va = N'($urandom); vb = N'($urandom); vc = 1'($urandom);
      if (t % 50 == 0) begin va = '1; vb = '0; end   // full-length carry propagation
      expect_sum = (N+1)'(va) + (N+1)'(vb) + (N+1)'(vc);
      // wait for the carry-out receiver to request DATA
      while (!req_msb) begin @(posedge clk); #1; end
      // let the delayed requests (one tick behind the ACKs) open
      @(posedge clk); #1;
      for (int i = 0; i < N; i++) begin a[i] = dr_data(va[i]); b[i] = dr_data(vb[i]); end
      cin = dr_data(vc);
      ticks = 0; lim = 400;
      while (ack !== '0 && ticks < lim) begin
        @(posedge clk); #1; ticks++;
        if (rand_step) step = N'($urandom) | N'($urandom);
      end
      step = '1;
      check(ack === '0, "word never completed");
      for (int i = 0; i < N; i++) got[i] = s[i].r1;
      got[N] = cout.r1;
      check(dr_is_data(cout), "carry out not DATA at completion");
      for (int i = 0; i < N; i++) check(dr_is_data(s[i]), "sum bit not DATA at completion");
      check(got == expect_sum, $sformatf("sum %h + %h + %0d: got %h", va, vb, vc, got));
      if (!rand_step) begin
        int r;
        r = ref_ticks(va, vb, vc);
        check(ticks == r, $sformatf("completion ticks %0d, reference %0d", ticks, r));
        sum_ticks += ticks; n_timed++;
      end
      if (longest_chain(va, vb) > max_chain) max_chain = longest_chain(va, vb);
      n_words++;
      a = '0; b = '0; cin = DR_NULL;
      ticks = 0;
      while (ack !== '1 && ticks < lim) begin @(posedge clk); #1; ticks++; end
      check(ack === '1, "NULL wave never completed");
      for (int i = 0; i < N; i++) check(dr_is_null(s[i]), "sum not NULL after NULL wave");
    end
    $display("words %0d, average completion %0d.%02d ticks (N=%0d), longest carry chain %0d",
             n_words, sum_ticks / n_timed, (100 * sum_ticks / n_timed) % 100, N, max_chain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
