`include "dr_macros.svh"
// MAC function unit: EX1 and EX2 of datapath B, with the 40-bit
// accumulator.
//
// EX1 (fu_ex1 with the address generator): ALU, dual-rail logic gates,
// barrel shifter, multiplier (also forms the MAC product Rs.L x Rt.L),
// divider, pack/unpack and branch resolution. When a branch's word reaches
// the address generator the unit reports it once to dispatch and the PC
// (br_evt with taken/target). The EX1 latch follows.
// EX2: reads the accumulator. MAC produces Acc + product (product
// sign-extended to 40 bits) to be written into the accumulator in WB;
// ACCLDH returns Acc[39:32] (zero-extended) and ACCLDL Acc[31:0] for a
// register write; every other instruction passes its EX1 result. Because
// the accumulator changes under it, EX2 samples its result (hs_sample):
// the four-phase latches guarantee that the previous packet has been
// written back before the next one is sampled here.
// The accumulator register itself is written from WB (acc_we/acc_wdata).
module mac_fu
  import avliw_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [$bits(id_bundle_t)-1:0] din_t, din_f,
  output logic                          ack_prev,
  output logic [$bits(wb_bundle_t)-1:0] dout_t, dout_f,
  input  logic                          ack_next,
  // accumulator write from WB
  input  logic                          acc_we,
  input  logic [ACCW-1:0]               acc_wdata,
  output logic [ACCW-1:0]               acc,
  // branch resolution, one pulse per branch
  output logic                          br_evt,
  output logic                          br_taken,
  output logic [PCW-1:0]                br_target
);
  localparam int EW = $bits(ex_bundle_t);

  logic [EW-1:0] e1_t, e1_f, l1_t, l1_f;
  logic [$bits(br_res_t)-1:0] br_t, br_f;

  fu_ex1 #(.HAS_BRANCH(1'b1)) u_ex1 (.clk, .rst_n, .din_t, .din_f,
    .dout_t(e1_t), .dout_f(e1_f), .br_t, .br_f);

  // branch report
  logic    br_v, br_seen;
  br_res_t br;
  assign br_v      = `DR_VALID(br_t, br_f);
  assign br        = br_res_t'(br_t);
  assign br_evt    = br_v && !br_seen;
  assign br_taken  = br.taken;
  assign br_target = br.target;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 br_seen <= 1'b0;
    else if (br_evt)            br_seen <= 1'b1;
    else if (`DR_EMPTY(br_t, br_f)) br_seen <= 1'b0;
  end

  logic ex2_ack;
  c_latch #(.W(EW)) u_l1 (.clk, .rst_n, .din_t(e1_t), .din_f(e1_f), .ack_next(ex2_ack),
                          .dout_t(l1_t), .dout_f(l1_f), .ack_prev);

  // ---- EX2 ----
  ex_bundle_t x;
  wb_bundle_t w;
  assign x = ex_bundle_t'(l1_t);
  always_comb begin
    w        = '0;
    w.wr     = x.ctrl.wr;
    w.dst    = x.ctrl.dst;
    w.val    = x.res;
    unique case (x.ctrl.mac)
      C_MAC: begin
        w.acc_we = 1'b1;
        w.acc    = acc + {{(ACCW-32){x.res[31]}}, x.res};
      end
      C_LDH:   w.val = 32'(acc[ACCW-1:32]);
      C_LDL:   w.val = acc[31:0];
      default: ;
    endcase
  end

  hs_sample #(.W($bits(wb_bundle_t))) u_hs (
    .clk, .rst_n, .in_valid(`DR_VALID(l1_t, l1_f)), .in_empty(`DR_EMPTY(l1_t, l1_f)),
    .cond(1'b1), .value(w), .ack_next, .dout_t, .dout_f, .ack_prev(ex2_ack), .fire());

  // 40-bit accumulator register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      acc <= '0;
    else if (acc_we) acc <= acc_wdata;
  end
endmodule
