// rncl_systole_tb: one reduced-NCL systole between a modelled previous stage
// (operands and carry in) and a modelled next systole (REQ).
// For random operands it applies a and b first and holds the carry in NULL:
// when a == b the carry out must appear without the carry in (early carry)
// within one tick, when a != b it must stay NULL (late carry). Then the carry
// in is applied and the sum, carry and ACK are checked against a + b + cin.
// A monitor checks the registration rules: the carry only turns DATA after
// the next systole requested DATA and only returns to NULL after it requested
// NULL, and the sum never turns DATA before the carry in is DATA.
// The second half randomises the systole's evaluation enable (step), and
// every other word there arrives complete before the next systole has asked
// for DATA, so the carry must wait for the request.
module rncl_systole_tb;
  import ncl_pkg::*;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_early = 0, n_late = 0;

  logic step, req, ack;
  dr_t  a, b, cin, cout, s;

  rncl_systole dut (.clk, .rst, .step, .a, .b, .cin, .req, .cout, .s, .ack);

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model of the next systole: acknowledge a DATA carry after a random delay,
  // then request DATA again once the carry is NULL
  bit req_seen_hi, req_seen_lo;
  initial begin
    req = 1'b1;
    forever begin
      // act between clock edges so the systole sees a stable request
      @(posedge clk); #2;
      if (!rst && req && dr_is_data(cout)) begin
        repeat ($urandom_range(0, 4)) begin @(posedge clk); #2; end
        req = 1'b0;
      end else if (!rst && !req && dr_is_null(cout)) begin
        repeat ($urandom_range(0, 4)) begin @(posedge clk); #2; end
        req = 1'b1;
      end
    end
  end

  // registration monitor
  dr_t  cout_q, s_q;
  logic req_hi_since_null, req_lo_since_data;
  logic req_edge;  // the request as the systole sampled it at this edge
  always @(posedge clk) req_edge <= req;
  always @(posedge clk) begin
    if (rst) begin
      cout_q <= DR_NULL;
      s_q    <= DR_NULL;
      req_hi_since_null <= 1'b1;
      req_lo_since_data <= 1'b0;
    end else begin
      #1;
      if (dr_is_null(cout_q) && dr_is_data(cout))
        check(req_hi_since_null || req_edge, "carry turned DATA without a DATA request");
      if (dr_is_data(cout_q) && dr_is_null(cout))
        check(req_lo_since_data || !req_edge, "carry returned to NULL without a NULL request");
      if (dr_is_null(s_q) && dr_is_data(s))
        check(dr_is_data(cin), "sum DATA before carry in");
      check(!dr_is_illegal(cout) && !dr_is_illegal(s), "illegal dual-rail code");
      if (dr_is_null(cout)) req_lo_since_data <= 1'b0;
      if (dr_is_data(cout)) req_hi_since_null <= 1'b0;
      if (req)  req_hi_since_null <= 1'b1;
      if (!req) req_lo_since_data <= 1'b1;
      cout_q <= cout;
      s_q    <= s;
    end
  end

  task automatic wait_for(input logic want_ack, input int lim, input string msg);
    int t = 0;
    while (ack !== want_ack && t < lim) begin
      @(posedge clk); #1; t++;
    end
    check(ack === want_ack, msg);
  endtask

  initial begin
    rst = 1'b1; step = 1'b1;
    a = DR_NULL; b = DR_NULL; cin = DR_NULL;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    for (int t = 0; t < 600; t++) begin
      logic va, vb, vc;
      logic [1:0] sum;
      bit rand_step;
      rand_step = (t >= 300);
      va = 1'($urandom); vb = 1'($urandom); vc = 1'($urandom);
      sum = 2'(va) + 2'(vb) + 2'(vc);
      // Usually wait until the next systole asks for DATA so REQE is open. In
      // the random half, every other word arrives complete (carry in too) as
      // early as possible: the carry must then wait for the request.
      if (rand_step && t % 2 == 1) begin
        a = dr_data(va); b = dr_data(vb); cin = dr_data(vc);
        wait_for(1'b0, 60, "no DATA acknowledge (early operands)");
        check(dr_is_data(s) && s.r1 == sum[0], "sum value (early operands)");
        check(dr_is_data(cout) && cout.r1 == sum[1], "carry value (early operands)");
        a = DR_NULL; b = DR_NULL; cin = DR_NULL;
        wait_for(1'b1, 60, "no NULL acknowledge (early operands)");
        continue;
      end
      while (!req) begin @(posedge clk); #1; end
      repeat (2) @(posedge clk);
      #1;
      a = dr_data(va); b = dr_data(vb);
      if (!rand_step) begin
        @(posedge clk); #1;
        if (va == vb) begin
          check(dr_is_data(cout) && cout.r1 == va, "early carry not produced in one tick");
          n_early++;
        end else begin
          n_late++;
        end
      end else begin
        step = 1'($urandom);
      end
      repeat (6) begin
        @(posedge clk); #1;
        if (rand_step) step = ($urandom_range(0, 2) != 0);
      end
      if (va == vb) check(dr_is_data(cout) && cout.r1 == va, "early carry missing");
      else          check(dr_is_null(cout), "late carry evaluated without carry in");
      check(dr_is_null(s), "sum evaluated without carry in");
      check(ack === 1'b1, "ACK fell before outputs complete");
      cin = dr_data(vc);
      step = 1'b1;
      wait_for(1'b0, 40, "no DATA acknowledge");
      check(dr_is_data(s) && s.r1 == sum[0], "sum value");
      check(dr_is_data(cout) && cout.r1 == sum[1], "carry value");
      a = DR_NULL; b = DR_NULL; cin = DR_NULL;
      wait_for(1'b1, 40, "no NULL acknowledge");
      check(dr_is_null(s) && dr_is_null(cout), "outputs not NULL after NULL wave");
    end
    check(n_early > 30 && n_late > 30, "both early and late carries exercised");
    $display("early carries %0d, late carries %0d", n_early, n_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
