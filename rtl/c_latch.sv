// Dual-rail pipeline latch (C-latch) with completion detection, W bits.
//
// Every rail is a C-element with reset whose inputs are the incoming rail
// and the inverted acknowledge of the next stage, as in a Muller pipeline.
// A valid word is captured when the next stage has returned its
// acknowledge to 0 and is held until the next stage acknowledges it and
// the input has returned to empty; an empty spacer is then passed on. The
// completion of the latch's own output is the acknowledge sent back to the
// previous stage (1: a valid word is held, 0: the latch is empty). In a
// full pipeline only every other latch holds a word (50 % utilisation).
//
// Timing: output one tick after the input, acknowledge one tick later.
module c_latch #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din_t, din_f,
  input  logic         ack_next,     // completion of the next stage
  output logic [W-1:0] dout_t, dout_f,
  output logic         ack_prev      // completion of this latch
);
  logic [W-1:0] en;
  assign en = {W{~ack_next}};

  c_element #(.W(W)) u_t (.clk, .rst_n, .a(din_t), .b(en), .z(dout_t));
  c_element #(.W(W)) u_f (.clk, .rst_n, .a(din_f), .b(en), .z(dout_f));

  dr_completion #(.W(W)) u_cd (.clk, .rst_n, .d_t(dout_t), .d_f(dout_f), .done(ack_prev));
endmodule
