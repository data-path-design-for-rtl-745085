// Completion detector for a W-bit dual-rail vector.
//
// Every bit's two rails are ORed, which tells whether that bit holds a
// value; an N-input C-element over these signals rises when all bits are
// valid and falls only when all bits are back to empty. Its output is the
// acknowledge a dual-rail pipeline stage returns to its sender.
// Latency: one C-element delay (one tick of clk) after the last bit.
module dr_completion #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d_t, d_f,
  output logic         done
);
  logic [W-1:0] bit_valid;
  assign bit_valid = d_t | d_f;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              done <= 1'b0;
    else if (&bit_valid)     done <= 1'b1;
    else if (~|bit_valid)    done <= 1'b0;
  end
endmodule
