// ncl_thgate_tb: checks threshold gates with hysteresis against a reference
// model written from the gate definition: assert when at least M (weighted)
// inputs are high, return to 0 only when all inputs are low, otherwise hold.
// Covers th33 (C-element), th13 (OR), th34w2 (weighted), a th22 that resets
// high, and the enable input freezing the state. Random input sequences.
module ncl_thgate_tb;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       en;
  logic [2:0] x3;
  logic [3:0] x4;
  logic [1:0] x2;
  logic z33, z13, z34w2, z22i;

  ncl_thgate #(.N(3), .M(3)) u33 (.clk, .rst, .en, .x(x3), .z(z33));
  ncl_thgate #(.N(3), .M(1)) u13 (.clk, .rst, .en, .x(x3), .z(z13));
  ncl_thgate #(.N(4), .M(3), .W({4'd2, 4'd1, 4'd1, 4'd1})) u34w2 (
    .clk, .rst, .en, .x(x4), .z(z34w2));
  ncl_thgate #(.N(2), .M(2), .INIT(1'b1)) u22i (.clk, .rst, .en, .x(x2), .z(z22i));

  // reference state
  logic r33, r13, r34w2, r22i;

  function automatic logic nxt(input logic cur, input int cnt, input int m, input logic allz);
    if (cnt >= m) return 1'b1;
    if (allz)     return 1'b0;
    return cur;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sets33 = 0, holds33 = 0;

  initial begin
    rst = 1'b1; en = 1'b1; x3 = '0; x4 = '0; x2 = '0;
    repeat (2) @(posedge clk);
    #1;
    // reset values
    checks += 2;
    if (z33 !== 1'b0) failures++;
    if (z22i !== 1'b1) failures++;
    rst = 1'b0;
    r33 = 0; r13 = 0; r34w2 = 0; r22i = 1;
    for (int t = 0; t < 4000; t++) begin
      // biased random inputs so that all-high and all-low both occur often
      x3 = ($urandom_range(0, 3) == 0) ? 3'b111 : ($urandom_range(0, 3) == 0) ? 3'b000 : 3'($urandom);
      x4 = 4'($urandom);
      x2 = 2'($urandom);
      en = ($urandom_range(0, 7) != 0);
      @(posedge clk);
      if (en) begin
        if (x3 == 3'b111 && !r33) sets33++;
        if (x3 != 3'b111 && x3 != 3'b000) holds33++;
        r33   = nxt(r33,   $countones(x3), 3, x3 == 0);
        r13   = nxt(r13,   $countones(x3), 1, x3 == 0);
        r34w2 = nxt(r34w2, $countones(x4[2:0]) + 2 * int'(x4[3]), 3, x4 == 0);
        r22i  = nxt(r22i,  $countones(x2), 2, x2 == 0);
      end
      #1;
      checks += 4;
      if (z33 !== r33)     begin failures++; $display("th33 mismatch t=%0d x=%b z=%b", t, x3, z33); end
      if (z13 !== r13)     begin failures++; $display("th13 mismatch t=%0d", t); end
      if (z34w2 !== r34w2) begin failures++; $display("th34w2 mismatch t=%0d x=%b", t, x4); end
      if (z22i !== r22i)   begin failures++; $display("th22 mismatch t=%0d", t); end
    end
    checks++;
    if (sets33 == 0 || holds33 == 0) failures++;
    $display("th33 set events %0d, hold cycles %0d", sets33, holds33);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
