`include "dr_macros.svh"
// Instruction Decode / Operand Fetch (ID/OF) stage of both datapaths.
//
// Two instruction decoders (one per slot) produce the control words and
// the source register numbers; the four source operands are read from the
// shared register bank. The lock module is asked whether any used source
// register is still awaiting a write-back in either datapath's lock queue;
// if so the packet stalls here (evt_stall). Otherwise the stage samples
// {control, PC, operand a, operand b, immediate} of both slots into a
// dual-rail word for the ID latch and, in the same tick, pushes both
// destination registers into the lock queues: the push comes after the
// operand read, never before.
// Each slot passes a DeMUX/MERGE pair first, as the original design has:
// a NOP (opcode 0) takes the bypass line and becomes an all-zero bundle
// without touching its decoder or register read ports; any other
// instruction takes the common line through decoder and register bank.
// The stage samples only when both merged slot bundles and the PC are
// valid, and releases its acknowledge only when all of them are empty.
// Output layout: {MAC path (B) bundle, LDST path (A) bundle}.
// Timing: the DeMUX adds one tick; the sample is taken one tick after the
// merged word is complete and no hazard is reported.
module id_stage
  import avliw_pkg::*;
(
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [$bits(dp_bundle_t)-1:0]    din_t, din_f,
  output logic                             ack_prev,
  output logic [2*$bits(id_bundle_t)-1:0]  dout_t, dout_f,
  input  logic                             ack_next,
  // register bank read ports: [0] a.ra [1] a.rb [2] b.ra [3] b.rb
  output logic [3:0][4:0]                  rf_idx,
  input  logic [3:0][31:0]                 rf_data,
  // lock module
  output logic [3:0]                       lk_use,
  input  logic                             lk_hazard,
  input  logic                             lk_full,
  output logic                             lk_push,
  output logic [1:0][4:0]                  lk_dst,
  output logic                             evt_stall,
  output logic                             evt_nop_bypass   // a packet left with a NOP slot bypassed
);
  dp_bundle_t  dp, dpf;
  ctrl_t       ca, cb;
  logic [31:0] imm_a, imm_b;
  logic        in_valid, in_empty;
  id_bundle_t  ba, bb;

  assign dp  = dp_bundle_t'(din_t);
  assign dpf = dp_bundle_t'(din_f);

  // per slot: DeMUX way 0 = common line, way 1 = NOP bypass line
  logic [1:0][31:0]       it, i_f;          // slot instruction rails [0] A, [1] B
  logic [1:0][1:0]        sel;
  logic [1:0][1:0][31:0]  w_t, w_f;
  logic [1:0][31:0]       ci;               // common-line instruction (0 when idle)
  logic [1:0]             cv, bv;           // way valid
  assign it[0] = dp.inst_a;  assign i_f[0] = dpf.inst_a;
  assign it[1] = dp.inst_b;  assign i_f[1] = dpf.inst_b;
  for (genvar k = 0; k < 2; k++) begin : g_slot
    assign sel[k] = !`DR_VALID(it[k], i_f[k]) ? 2'b00 :
                    (f_op(it[k]) == OP_NOP) ? 2'b10 : 2'b01;
    dr_demux #(.W(32), .N(2)) u_nop_demux (.clk, .rst_n, .din_t(it[k]), .din_f(i_f[k]),
                                            .sel(sel[k]), .dout_t(w_t[k]), .dout_f(w_f[k]));
    assign cv[k] = `DR_VALID(w_t[k][0], w_f[k][0]);
    assign bv[k] = `DR_VALID(w_t[k][1], w_f[k][1]);
    assign ci[k] = w_t[k][0];
  end

  inst_decoder u_dec_a (.inst(ci[0]), .ctrl(ca), .ra(rf_idx[0]), .rb(rf_idx[1]),
                        .ra_used(lk_use[0]), .rb_used(lk_use[1]), .imm(imm_a));
  inst_decoder u_dec_b (.inst(ci[1]), .ctrl(cb), .ra(rf_idx[2]), .rb(rf_idx[3]),
                        .ra_used(lk_use[2]), .rb_used(lk_use[3]), .imm(imm_b));

  localparam int SW = $bits(id_bundle_t) - PCW;   // slot bundle without the PC
  logic [SW-1:0] com_a, com_b;
  logic [1:0][1:0][SW-1:0] m_t, m_f;
  logic [1:0][SW-1:0]      s_t, s_f;
  always_comb begin
    com_a = {ca, rf_data[0], rf_data[1], imm_a};
    com_b = {cb, rf_data[2], rf_data[3], imm_b};
  end
  assign m_t[0][0] = `DR_ENC_T(cv[0], com_a);  assign m_f[0][0] = `DR_ENC_F(cv[0], com_a);
  assign m_t[1][0] = `DR_ENC_T(cv[1], com_b);  assign m_f[1][0] = `DR_ENC_F(cv[1], com_b);
  for (genvar k = 0; k < 2; k++) begin : g_bypass
    assign m_t[k][1] = '0;
    assign m_f[k][1] = {SW{bv[k]}};
    dr_merge #(.W(SW), .N(2)) u_nop_merge (.din_t(m_t[k]), .din_f(m_f[k]),
                                           .dout_t(s_t[k]), .dout_f(s_f[k]));
  end

  assign in_valid = `DR_VALID(s_t, s_f) && `DR_VALID(dp.pc, dpf.pc);
  assign in_empty = `DR_EMPTY(s_t, s_f) && `DR_EMPTY(dp.pc, dpf.pc);

  // the bundle layout is {ctrl, pc, a, b, imm}: put the PC back in place
  always_comb begin
    ba = {s_t[0][SW-1 -: $bits(ctrl_t)], dp.pc, s_t[0][SW-$bits(ctrl_t)-1:0]};
    bb = {s_t[1][SW-1 -: $bits(ctrl_t)], dp.pc, s_t[1][SW-$bits(ctrl_t)-1:0]};
  end

  assign lk_dst[0] = ca.wr ? ca.dst : 5'd0;
  assign lk_dst[1] = cb.wr ? cb.dst : 5'd0;

  hs_sample #(.W(2 * $bits(id_bundle_t))) u_hs (
    .clk, .rst_n, .in_valid, .in_empty,
    .cond(!lk_hazard && !lk_full), .value({bb, ba}), .ack_next,
    .dout_t, .dout_f, .ack_prev, .fire(lk_push));

  assign evt_stall      = in_valid && !ack_prev && lk_hazard;
  assign evt_nop_bypass = lk_push && (bv[0] || bv[1]);
endmodule
