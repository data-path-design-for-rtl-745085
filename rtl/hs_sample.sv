`include "dr_macros.svh"
// Sampling handshake stage (helper).
//
// Sits between a dual-rail input channel and the C-latch of the next stage
// where the stage's result depends on state that changes under it (the
// register file, the lock queues, the accumulator). When the input is valid,
// the next stage is empty (ack_next = 0) and cond holds, the stage takes a
// snapshot of `value`, drives it as a valid dual-rail word and raises
// ack_prev; `fire` pulses for that one tick so the parent can update its
// state. The word returns to empty once the next stage acknowledges it,
// and ack_prev returns to 0 once the input is empty. Both sides thus see a
// four-phase handshake and the word never changes while it is valid.
// Timing: output and ack_prev one tick after the input became valid.
module hs_sample #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_empty,
  input  logic         cond,
  input  logic [W-1:0] value,
  input  logic         ack_next,
  output logic [W-1:0] dout_t, dout_f,
  output logic         ack_prev,
  output logic         fire
);
  logic         out_v;
  logic [W-1:0] held;

  assign fire   = in_valid && !ack_prev && !out_v && !ack_next && cond;
  assign dout_t = `DR_ENC_T(out_v, held);
  assign dout_f = `DR_ENC_F(out_v, held);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_v    <= 1'b0;
      ack_prev <= 1'b0;
      held     <= '0;
    end else begin
      if (fire) begin
        held     <= value;
        out_v    <= 1'b1;
        ack_prev <= 1'b1;
      end else begin
        if (out_v && ack_next)    out_v    <= 1'b0;
        if (ack_prev && in_empty) ack_prev <= 1'b0;
      end
    end
  end

  // a snapshot is only taken from a fully valid input
  a_fire_valid: assert property (@(posedge clk) disable iff (!rst_n) fire |-> !in_empty);
endmodule
