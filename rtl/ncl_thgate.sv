// ncl_thgate: M-of-N threshold gate with hysteresis (NCL "thmn" / "thmnwk").
//
// The output asserts once the weighted count of asserted inputs reaches the
// threshold M, and returns to 0 only when every input is 0; in between it
// holds its value. With M = N it is an N-input Muller C-element, with M = 1 an
// N-input OR. Weights (one 4-bit field per input, input 0 in the lowest field)
// give the weighted gates such as th34w2.
//
// Timing model: this design keeps the self-timed netlist of the adders but
// evaluates it on a discrete tick. The gate's state is a flip-flop that takes
// the next value on each rising clk edge where en is high, so every gate has
// one tick of delay and en lets a testbench stretch the delay of chosen gates.
// The threshold/hysteresis function follows the standard gate definition;
// the tick model, the enable and the reset value INIT are choices of this
// implementation (rst puts the gate in INIT, normally NULL = 0).
module ncl_thgate #(
  parameter int unsigned N = 2,
  parameter int unsigned M = 2,
  parameter logic [N-1:0][3:0] W = {N{4'd1}},
  parameter bit INIT = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [N-1:0] x,
  output logic         z
);

  logic [7:0] wsum;
  logic       set_c, clr_c;

  always_comb begin
    wsum = '0;
    for (int i = 0; i < N; i++)
      if (x[i]) wsum = wsum + 8'(W[i]);
  end

  assign set_c = (wsum >= 8'(M));
  assign clr_c = (x == '0);

  always_ff @(posedge clk) begin
    if (rst)        z <= INIT;
    else if (en) begin
      if (set_c)      z <= 1'b1;
      else if (clr_c) z <= 1'b0;
    end
  end

endmodule
