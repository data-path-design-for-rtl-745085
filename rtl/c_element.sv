// Muller C-element with reset, W independent copies side by side.
//
// Each output bit z follows its two inputs when they agree (both 0 -> 0,
// both 1 -> 1) and keeps its previous value when they differ; rst_n forces
// every output to 0. This is the state-holding element of the whole core.
//
// Timing model: the element is written as a unit-delay cell. Its output is
// updated on the rising edge of clk, which stands for one gate delay and
// is not a clock of the design's own: the surrounding circuits are
// quasi-delay-insensitive, so their behaviour must not depend on how long
// the delay is. This makes every C-element loop synthesizable and free of
// combinational feedback. Reset value 0 follows the C-element with reset
// of the design; the sampling tick is this implementation's choice.
module c_element #(
  parameter int W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] z
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) z <= '0;
    else        z <= (a & b) | (z & (a | b));
  end
endmodule
