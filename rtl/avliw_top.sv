`include "dr_macros.svh"
// Asynchronous two-way VLIW core: six-stage four-phase dual-rail pipeline.
//
//   PF   pc_module drives a fetch token; the instruction-memory interface
//        reads the 64-bit packet from synchronous memory  -> PF latch
//   DP   dispatch: decompression of packets (P bit), routing of the two
//        slots to the MAC path (B) and LDST path (A), branch stall -> DP latch
//   ID/OF two decoders, four register reads, lock-queue RAW check  -> ID latch
//   EX1  per path: DeMUX -> ALU / gates / shifter / mul / div / pack /
//        unpack (/ address generator on B) -> MERGE -> EX1 latch (per path)
//   EX2  A: data pass or load/store through the data-memory interface;
//        B: accumulator read, MAC sum, ACCLDH/ACCLDL            -> WB latch
//   WB   both paths write the register bank (one port each) and B the
//        accumulator; the lock queues are popped.
// Every stage boundary is a dual-rail C-latch; stages exchange four-phase
// request (data valid / empty) and acknowledge signals only. The two paths
// fork after the ID latch and join through a C-element on their
// acknowledges and again in the shared WB latch. Taken branches are
// reported from EX1 of path B to dispatch and the PC.
//
// clk is the evaluation tick of the C-elements and sampling elements (one
// gate delay); it is the timing reference of the synchronous memories too.
// The load port (imem_*) and the data-memory port (dmem_*) let a host load
// a program and data and read results while, or after, the core runs;
// keep rst_n low while loading the program. The evt_* outputs pulse once
// per event and exist for observation.
module avliw_top
  import avliw_pkg::*;
#(
  parameter int IAW    = 10,   // instruction memory: 2**IAW packets of 64 bits
  parameter int DAW    = 10,   // data memory: 2**DAW words of 32 bits
  parameter int DELAY1 = 2,    // memory-interface read delay (ticks)
  parameter int DELAY2 = 1,    // memory-interface write delay (ticks)
  parameter int LQ_DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // instruction memory load port
  input  logic             imem_we,
  input  logic [IAW-1:0]   imem_addr,
  input  logic [63:0]      imem_wdata,
  // data memory host port
  input  logic             dmem_we,
  input  logic [DAW-1:0]   dmem_addr,
  input  logic [31:0]      dmem_wdata,
  output logic [31:0]      dmem_rdata,
  // observation
  input  logic [4:0]       dbg_reg_idx,
  output logic [31:0]      dbg_reg_val,
  output logic [ACCW-1:0]  acc_val,
  output logic             evt_fetch,
  output logic             evt_issue,
  output logic             evt_split,
  output logic             evt_drop,
  output logic             evt_br_stall,
  output logic             evt_lock_stall,
  output logic             evt_nop_bypass,
  output logic             evt_br_taken,
  output logic             evt_br_not_taken,
  output logic             evt_retire,
  output logic             evt_mac,
  output logic             evt_load,
  output logic             evt_store
);
  localparam int PFW = $bits(pf_bundle_t);
  localparam int DPW = $bits(dp_bundle_t);
  localparam int IDW = $bits(id_bundle_t);
  localparam int WBW = $bits(wb_bundle_t);

  // ---------------- PF ----------------
  logic [PCW-1:0] pc_t, pc_f;
  logic           fr_t, fr_f, pf_ack;
  logic           br_evt, br_taken;
  logic [PCW-1:0] br_target;

  pc_module u_pc (.clk, .rst_n, .ack(pf_ack), .redirect(br_evt && br_taken),
                  .redirect_pc(br_target), .pc_t, .pc_f, .rreq_t(fr_t), .rreq_f(fr_f));

  logic [63:0]    ip_t, ip_f;
  logic           iwd_t, iwd_f;
  logic           im_re, im_we;
  logic [IAW-1:0] im_addr;
  logic [63:0]    im_wdata, im_rdata, im_ext_rdata;
  mem_if #(.AW(IAW), .DW(64), .DELAY1(DELAY1), .DELAY2(DELAY2)) u_imif (
    .clk, .rst_n, .rreq_t(fr_t), .rreq_f(fr_f),
    .addr_t(pc_t[IAW-1:0]), .addr_f(pc_f[IAW-1:0]),
    .wdata_t('0), .wdata_f('0), .rdata_t(ip_t), .rdata_f(ip_f),
    .wdone_t(iwd_t), .wdone_f(iwd_f),
    .m_re(im_re), .m_we(im_we), .m_addr(im_addr), .m_wdata(im_wdata), .m_rdata(im_rdata));
  sync_mem #(.DW(64), .AW(IAW)) u_imem (
    .clk, .re(im_re), .we(im_we), .addr(im_addr), .wdata(im_wdata), .rdata(im_rdata),
    .ext_we(imem_we), .ext_addr(imem_addr), .ext_wdata(imem_wdata), .ext_rdata(im_ext_rdata));

  logic [PFW-1:0] lpf_t, lpf_f;
  logic           dp_ack_prev;
  c_latch #(.W(PFW)) u_lpf (.clk, .rst_n, .din_t({pc_t, ip_t}), .din_f({pc_f, ip_f}),
                            .ack_next(dp_ack_prev), .dout_t(lpf_t), .dout_f(lpf_f),
                            .ack_prev(pf_ack));

  // ---------------- DP ----------------
  logic [DPW-1:0] dp_t, dp_f, ldp_t, ldp_f;
  logic           ldp_ack, id_ack_prev;
  dispatch u_dp (.clk, .rst_n, .din_t(lpf_t), .din_f(lpf_f), .ack_prev(dp_ack_prev),
                 .dout_t(dp_t), .dout_f(dp_f), .ack_next(ldp_ack),
                 .br_evt, .br_taken, .br_target,
                 .evt_issue, .evt_split, .evt_drop, .evt_br_stall);
  c_latch #(.W(DPW)) u_ldp (.clk, .rst_n, .din_t(dp_t), .din_f(dp_f),
                            .ack_next(id_ack_prev), .dout_t(ldp_t), .dout_f(ldp_f),
                            .ack_prev(ldp_ack));

  // ---------------- ID/OF ----------------
  logic [3:0][4:0]  rf_ridx;
  logic [3:0][31:0] rf_rdata;
  logic [3:0]       lk_use;
  logic             lk_hazard, lk_full, lk_push, lk_pop;
  logic [1:0][4:0]  lk_dst;
  logic [2*IDW-1:0] id_t, id_f, lid_t, lid_f;
  logic             lid_ack, ex_join_ack;

  id_stage u_id (.clk, .rst_n, .din_t(ldp_t), .din_f(ldp_f), .ack_prev(id_ack_prev),
                 .dout_t(id_t), .dout_f(id_f), .ack_next(lid_ack),
                 .rf_idx(rf_ridx), .rf_data(rf_rdata),
                 .lk_use, .lk_hazard, .lk_full, .lk_push, .lk_dst, .evt_stall(evt_lock_stall),
                 .evt_nop_bypass);

  logic [1:0]       rf_we;
  logic [1:0][4:0]  rf_widx;
  logic [1:0][31:0] rf_wdata;
  regbank u_rf (.clk, .rst_n, .rd_idx(rf_ridx), .rd_data(rf_rdata),
                .we(rf_we), .wr_idx(rf_widx), .wr_data(rf_wdata),
                .dbg_idx(dbg_reg_idx), .dbg_data(dbg_reg_val));

  lock_module #(.DEPTH(LQ_DEPTH)) u_lock (.clk, .rst_n,
    .chk_idx(rf_ridx), .chk_use(lk_use), .hazard(lk_hazard),
    .push(lk_push), .push_dst(lk_dst), .pop(lk_pop), .full(lk_full));

  c_latch #(.W(2*IDW)) u_lid (.clk, .rst_n, .din_t(id_t), .din_f(id_f),
                              .ack_next(ex_join_ack), .dout_t(lid_t), .dout_f(lid_f),
                              .ack_prev(lid_ack));

  // ---------------- EX1 / EX2 (fork) ----------------
  logic             a_ack, b_ack, lwb_ack;
  logic [WBW-1:0]   wa_t, wa_f, wbb_t, wbb_f;
  logic             acc_we;
  logic [ACCW-1:0]  acc_wdata;
  logic [DAW-1:0]   dm_addr;
  logic             dm_re, dm_we;
  logic [31:0]      dm_wdata, dm_rdata;

  ldst_fu #(.DAW(DAW), .DELAY1(DELAY1), .DELAY2(DELAY2)) u_ldst (
    .clk, .rst_n, .din_t(lid_t[IDW-1:0]), .din_f(lid_f[IDW-1:0]), .ack_prev(a_ack),
    .dout_t(wa_t), .dout_f(wa_f), .ack_next(lwb_ack),
    .m_re(dm_re), .m_we(dm_we), .m_addr(dm_addr), .m_wdata(dm_wdata), .m_rdata(dm_rdata));

  mac_fu u_mac (
    .clk, .rst_n, .din_t(lid_t[2*IDW-1:IDW]), .din_f(lid_f[2*IDW-1:IDW]), .ack_prev(b_ack),
    .dout_t(wbb_t), .dout_f(wbb_f), .ack_next(lwb_ack),
    .acc_we, .acc_wdata, .acc(acc_val), .br_evt, .br_taken, .br_target);

  // join of the two paths' acknowledges
  c_element #(.W(1)) u_join (.clk, .rst_n, .a(a_ack), .b(b_ack), .z(ex_join_ack));

  sync_mem #(.DW(32), .AW(DAW)) u_dmem (
    .clk, .re(dm_re), .we(dm_we), .addr(dm_addr), .wdata(dm_wdata), .rdata(dm_rdata),
    .ext_we(dmem_we), .ext_addr(dmem_addr), .ext_wdata(dmem_wdata), .ext_rdata(dmem_rdata));

  // ---------------- WB (join) ----------------
  logic [2*WBW-1:0] lwb_t, lwb_f;
  logic             wb_ack;
  c_latch #(.W(2*WBW)) u_lwb (.clk, .rst_n, .din_t({wbb_t, wa_t}), .din_f({wbb_f, wa_f}),
                              .ack_next(wb_ack), .dout_t(lwb_t), .dout_f(lwb_f),
                              .ack_prev(lwb_ack));

  wb_stage u_wb (.clk, .rst_n, .din_t(lwb_t), .din_f(lwb_f), .ack(wb_ack),
                 .rf_we, .rf_idx(rf_widx), .rf_data(rf_wdata),
                 .acc_we, .acc_wdata, .lk_pop);

  // ---------------- observation ----------------
  logic fetch_seen;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       fetch_seen <= 1'b0;
    else if (pf_ack)  fetch_seen <= 1'b1;
    else              fetch_seen <= 1'b0;
  end
  assign evt_fetch        = pf_ack && !fetch_seen;
  assign evt_br_taken     = br_evt && br_taken;
  assign evt_br_not_taken = br_evt && !br_taken;
  assign evt_retire       = lk_pop;
  assign evt_mac          = acc_we;
  logic dm_re_q, dm_we_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dm_re_q <= 1'b0;
      dm_we_q <= 1'b0;
    end else begin
      dm_re_q <= dm_re;
      dm_we_q <= dm_we;
    end
  end
  assign evt_load  = dm_re && !dm_re_q;
  assign evt_store = dm_we && !dm_we_q;
endmodule
