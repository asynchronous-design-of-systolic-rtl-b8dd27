// dicsa_adder_tb: N-bit systolic DICSA adder driven word-wise by a
// testbench environment: all operand bits and the carry in are applied as
// DATA together, the word is complete when every ACKO and every ACKI has
// fallen, then all inputs return to NULL and the test waits for every
// acknowledge to rise again. The carry-out receiver (req_msb) acknowledges
// after a random delay.
// Checks: every sum and carry out against a + b + cin; with all systoles
// enabled on every tick the number of ticks to completion must equal a timing
// reference built from the stage equations (generate/kill carries are ready
// three ticks after the operands, each propagate bit adds two ticks to the
// carry chain), so the completion time follows the longest carry-propagate
// run. The second half randomises step per systole. Reports the average
// completion time.
module dicsa_adder_tb;
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
  logic [N-1:0] acki, acko;

  dicsa_adder #(.N(N)) dut (.clk, .rst, .step, .a, .b, .cin, .req_msb, .s, .cout, .acki, .acko);

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

  // expected ticks from DATA application to the last acknowledge falling
  function automatic int ref_ticks(input logic [N-1:0] va, input logic [N-1:0] vb, input logic vc);
    int tc_in, worst;
    tc_in = 0; worst = 3;                        // ACKI falls three ticks after the operands
    for (int i = 0; i < N; i++) begin
      int tc, ts, tdone, m;
      m = (tc_in > 2) ? tc_in : 2;               // p / p_n ready at 2, carry in at tc_in
      tc = (va[i] == vb[i]) ? 3 : m + 2;         // th22/th33 then th12
      ts = m + 2;                                // th33 then th12
      tdone = ts + 1;
      if (tc + 1 > tdone) tdone = tc + 1;
      if (tc_in + 1 > tdone) tdone = tc_in + 1;
      tdone = tdone + 1;                         // th33 of the three validity gates
      if (tdone > worst) worst = tdone;
      tc_in = tc;
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
      while ((acko !== '0 || acki !== '0) && ticks < lim) begin
        @(posedge clk); #1; ticks++;
        if (rand_step) step = N'($urandom) | N'($urandom);
      end
      step = '1;
      check(acko === '0 && acki === '0, "word never completed");
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
      while ((acko !== '1 || acki !== '1) && ticks < lim) begin @(posedge clk); #1; ticks++; end
      check(acko === '1 && acki === '1, "NULL wave never completed");
      for (int i = 0; i < N; i++) check(dr_is_null(s[i]), "sum not NULL after NULL wave");
    end
    $display("words %0d, average completion %0d.%02d ticks (N=%0d), longest carry chain %0d",
             n_words, sum_ticks / n_timed, (100 * sum_ticks / n_timed) % 100, N, max_chain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
