`include "dr_macros.svh"
// Instruction dispatch (DP) stage: packet decompression and branch stall.
//
// Input: the PF latch, a packet {pc, first instruction [63:32], second
// [31:0]}. If the first instruction's P bit is 1 the two instructions issue
// together, the first to the MAC path (B), the second to the LDST path
// (A). If it is 0 they issue one after the other from the same packet,
// each alone with a NOP in the other slot; an instruction issued alone
// goes to the LDST path if it is a load or store and to the MAC path
// otherwise. Packets whose PC is not the one expected next (fetched down
// a path abandoned by a branch) are acknowledged and dropped.
// After issuing a branch (BEQ, BNEQ, CALL, RETURN) the stage stalls until
// EX1 of the MAC path reports the outcome (br_evt). A taken branch sets the
// expected PC to the target and drops the rest of the current packet.
// Handshakes: four-phase with the PF latch (ack_prev is this stage's own
// acknowledge) and with the DP latch (dout is held until ack_next rises;
// a new word is sent only after ack_next falls).
module dispatch
  import avliw_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [$bits(pf_bundle_t)-1:0] din_t, din_f,
  output logic                          ack_prev,
  output logic [$bits(dp_bundle_t)-1:0] dout_t, dout_f,
  input  logic                          ack_next,
  input  logic                          br_evt,
  input  logic                          br_taken,
  input  logic [PCW-1:0]                br_target,
  // event pulses for observation
  output logic                          evt_issue,
  output logic                          evt_split,    // packet issued as two
  output logic                          evt_drop,     // wrong-path packet dropped
  output logic                          evt_br_stall  // waiting for a branch
);
  pf_bundle_t     pf;
  dp_bundle_t     dp, nxt;
  logic           in_valid, in_empty, out_v, half, br_wait, last, has_br;
  logic [PCW-1:0] exp_pc;
  logic [31:0]    i0, i1, alone;

  assign pf       = pf_bundle_t'(din_t);
  assign in_valid = `DR_VALID(din_t, din_f);
  assign in_empty = `DR_EMPTY(din_t, din_f);
  assign i0       = pf.packet[63:32];
  assign i1       = pf.packet[31:0];
  assign dout_t   = `DR_ENC_T(out_v, dp);
  assign dout_f   = `DR_ENC_F(out_v, dp);

  // what the next issue would be
  always_comb begin
    nxt    = '0;
    nxt.pc = pf.pc;
    last   = 1'b1;
    alone  = half ? i1 : i0;
    if (f_p(i0)) begin
      nxt.inst_b = i0;
      nxt.inst_a = i1;
    end else begin
      last = half;
      if (is_ldst_only(alone)) nxt.inst_a = alone;
      else                     nxt.inst_b = alone;
    end
    has_br = is_branch(nxt.inst_b);
  end

  logic can_take;
  assign can_take     = in_valid && !ack_prev && !out_v && !ack_next && !br_evt;
  assign evt_issue    = can_take && pf.pc == exp_pc && !br_wait;
  assign evt_drop     = can_take && pf.pc != exp_pc;
  assign evt_split    = evt_issue && !f_p(i0) && !half;
  assign evt_br_stall = in_valid && br_wait && !br_evt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_prev <= 1'b0;
      out_v    <= 1'b0;
      dp       <= '0;
      half     <= 1'b0;
      br_wait  <= 1'b0;
      exp_pc   <= '0;
    end else begin
      if (ack_prev && in_empty) ack_prev <= 1'b0;
      if (out_v && ack_next)    out_v    <= 1'b0;
      if (br_evt) begin
        br_wait <= 1'b0;
        if (br_taken) begin
          exp_pc <= br_target;
          if (half) begin
            half     <= 1'b0;
            ack_prev <= 1'b1;
          end
        end
      end else if (evt_drop) begin
        ack_prev <= 1'b1;
      end else if (evt_issue) begin
        dp    <= nxt;
        out_v <= 1'b1;
        if (has_br) br_wait <= 1'b1;
        if (last) begin
          half     <= 1'b0;
          ack_prev <= 1'b1;
          exp_pc   <= pf.pc + 1'b1;
        end else begin
          half <= 1'b1;
        end
      end
    end
  end

  a_br_only_when_waiting: assert property (@(posedge clk) disable iff (!rst_n) br_evt |-> br_wait);
endmodule
