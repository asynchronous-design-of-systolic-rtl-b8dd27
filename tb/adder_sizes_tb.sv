// adder_sizes_tb: throughput of both systolic adders against operand length.
// One copy of systolic_adders_top is built for each length in SIZES: 1, 2, 4
// and 8 bits are the lengths evaluated at gate level for the reduced-NCL and
// DICSA adders, and 16, 32 and 64 bits extend the run to the top of the range
// covered by the software throughput estimates. Each copy streams its operand
// sequence back-to-back: for 1, 2 and 4 bits the maximal-length sequence (all
// 2^(2n+1) combinations of a, b and carry in, in counting order), for 8 bits
// and above 3000 pseudo-random words, the length used for the 8-bit gate-level
// runs (the 8-bit maximal-length sequence has 2^17 words). Each sequence is
// sent twice, first word-wise (all bits of a word applied
// together, the next word only after the whole word has returned to NULL),
// then bit-skewed (each bit takes its next operand as soon as its own
// systole has acknowledged). Every sum is checked against a + b + cin. The
// testbench prints the average ticks per word for each case and checks that
// bit-skewed application is faster than word-wise application for the 4-bit
// and 8-bit adders of both kinds, as the source design reports (roughly a
// quarter to a third fewer ticks), and that the word-wise time per word grows
// with the logarithm of the length rather than with the length: 64-bit words
// must take less than twice the ticks of 8-bit words (log2 64 / log2 8 = 2,
// while 64 / 8 = 8), and that bit-skewed throughput stays almost constant:
// 64-bit words must take less than 1.5 times the ticks of 8-bit words. All
// systoles are enabled on every tick.
module adder_sizes_tb;
  localparam int NS = 7;
  localparam int SIZES [NS] = '{1, 2, 4, 8, 16, 32, 64};
  localparam int PN_WORDS = 3000;

  function automatic int words_for(int n);
    return (n <= 4) ? 2 ** (2 * n + 1) : PN_WORDS;
  endfunction

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // ticks[size][adder][mode]: adder 0 = reduced NCL, 1 = DICSA; mode 0 = word, 1 = skew
  int ticks [NS][2][2];
  bit done  [NS][2];

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar k = 0; k < NS; k++) begin : g_size
    localparam int N = SIZES[k];
    localparam int WORDS = words_for(N);
    logic         skew [2];
    logic [N-1:0] step [2];
    logic         op_valid [2], op_ready [2], op_cin [2];
    logic [N-1:0] op_a [2], op_b [2];
    logic         res_valid [2], res_ready [2], res_cout [2];
    logic [N-1:0] res_sum [2];

    systolic_adders_top #(.N(N)) dut (
      .clk, .rst,
      .r_skew(skew[0]), .r_step(step[0]), .r_op_valid(op_valid[0]), .r_op_ready(op_ready[0]),
      .r_op_a(op_a[0]), .r_op_b(op_b[0]), .r_op_cin(op_cin[0]),
      .r_res_valid(res_valid[0]), .r_res_ready(res_ready[0]),
      .r_res_sum(res_sum[0]), .r_res_cout(res_cout[0]),
      .d_skew(skew[1]), .d_step(step[1]), .d_op_valid(op_valid[1]), .d_op_ready(op_ready[1]),
      .d_op_a(op_a[1]), .d_op_b(op_b[1]), .d_op_cin(op_cin[1]),
      .d_res_valid(res_valid[1]), .d_res_ready(res_ready[1]),
      .d_res_sum(res_sum[1]), .d_res_cout(res_cout[1]));

    for (genvar d = 0; d < 2; d++) begin : g_adder
      logic [N:0] expq [$];

      // operand side: the WORDS-long sequence once per mode, offered back-to-back
      initial begin
        skew[d] = 1'b0; step[d] = '1; op_valid[d] = 1'b0; res_ready[d] = 1'b1;
        op_a[d] = '0; op_b[d] = '0; op_cin[d] = 1'b0;
        wait (!rst);
        for (int m = 0; m < 2; m++) begin
          int t0;
          @(negedge clk);
          skew[d] = m[0];
          t0 = int'($time / 10);
          for (int w = 0; w < WORDS; w++) begin
            logic [N-1:0] a, b;
            logic c;
            if (N <= 4) begin
              a = N'(w);
              b = N'(w >> N);
              c = 1'(w >> (2 * N));
            end else begin
              a = N'({$urandom, $urandom});
              b = N'({$urandom, $urandom});
              c = 1'($urandom);
            end
            op_valid[d] = 1'b1; op_a[d] = a; op_b[d] = b; op_cin[d] = c;
            do @(posedge clk); while (!op_ready[d]);
            expq.push_back((N+1)'(a) + (N+1)'(b) + (N+1)'(c));
            @(negedge clk);
            op_valid[d] = 1'b0;
          end
          wait (expq.size() == 0);
          ticks[k][d][m] = int'($time / 10) - t0;
        end
        done[k][d] = 1'b1;
      end

      // result side: in-order scoreboard
      always @(posedge clk) begin
        if (!rst && res_valid[d] && res_ready[d]) begin
          logic [N:0] e;
          checks++;
          if (expq.size() == 0) begin
            failures++;
            $display("FAIL N=%0d adder %0d: result with no word outstanding", N, d);
          end else begin
            e = expq.pop_front();
            if ({res_cout[d], res_sum[d]} !== e) begin
              failures++;
              if (failures < 20)
                $display("FAIL N=%0d adder %0d: got %h expected %h", N, d,
                         {res_cout[d], res_sum[d]}, e);
            end
          end
        end
      end
    end
  end

  initial begin
    bit all;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    do begin
      @(posedge clk);
      all = 1'b1;
      foreach (done[k, d]) all &= done[k][d];
    end while (!all);
    $display("  bits | rNCL word  skew  gain | DICSA word  skew  gain   (ticks per word)");
    for (int k = 0; k < NS; k++) begin
      real g0, g1;
      g0 = 100.0 * (ticks[k][0][0] - ticks[k][0][1]) / ticks[k][0][0];
      g1 = 100.0 * (ticks[k][1][0] - ticks[k][1][1]) / ticks[k][1][0];
      $display("  %4d | %9.2f %5.2f %4.0f%% | %10.2f %5.2f %4.0f%%", SIZES[k],
               real'(ticks[k][0][0]) / words_for(SIZES[k]),
               real'(ticks[k][0][1]) / words_for(SIZES[k]), g0,
               real'(ticks[k][1][0]) / words_for(SIZES[k]),
               real'(ticks[k][1][1]) / words_for(SIZES[k]), g1);
      if (SIZES[k] == 4 || SIZES[k] == 8) begin
        for (int d = 0; d < 2; d++) begin
          checks++;
          if (ticks[k][d][1] >= ticks[k][d][0]) begin
            failures++;
            $display("FAIL N=%0d adder %0d: bit-skewed not faster than word-wise", SIZES[k], d);
          end
        end
      end
    end
    for (int d = 0; d < 2; d++) begin
      real r;
      r = (real'(ticks[NS-1][d][0]) / words_for(SIZES[NS-1])) /
          (real'(ticks[3][d][0]) / words_for(SIZES[3]));
      $display("  adder %0d: word-wise time per word, 64 bits / 8 bits = %0.2f", d, r);
      checks++;
      if (r >= 2.0) begin
        failures++;
        $display("FAIL adder %0d: word-wise time grows faster than log2 n", d);
      end
      r = (real'(ticks[NS-1][d][1]) / words_for(SIZES[NS-1])) /
          (real'(ticks[3][d][1]) / words_for(SIZES[3]));
      $display("  adder %0d: bit-skewed time per word, 64 bits / 8 bits = %0.2f", d, r);
      checks++;
      if (r >= 1.5) begin
        failures++;
        $display("FAIL adder %0d: bit-skewed throughput not near constant", d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
