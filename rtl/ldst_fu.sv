`include "dr_macros.svh"
// LDST function unit: EX1 and EX2 of datapath A.
//
// EX1 (fu_ex1 without branch unit): ALU, dual-rail logic gates, barrel
// shifter, multiplier, divider, pack/unpack; the ALU also forms the
// load/store address Rs + imm. The EX1 latch (C-latch) follows.
// EX2: a three-way DeMUX steers the word by its memory kind:
//   data pass  - no memory access, the EX1 result goes on unchanged
//   load       - Read_Req.t with the address; the read data is the result
//   store      - Read_Req.f with the address and store data; done when
//                W_Done rises, nothing is written back
// through the memory interface to the synchronous data memory, and a MERGE
// collects the write-back word {wr, dst, value, acc_we = 0} for the WB
// latch. Data addresses are word addresses (low DAW bits of Rs + imm).
// ack_prev is the completion of the EX1 latch; ack_next the completion of
// the shared WB latch. The EX2 acknowledge to the EX1 latch is a C-element
// of ack_next and "EX1 latch not empty": EX2 sees its input as gone as
// soon as one bit empties, but the EX1 result bits from the gate units
// empty a few ticks after the pass-through fields, so the acknowledge must
// stay high until the whole latch is empty or a late bit would be held.
module ldst_fu
  import avliw_pkg::*;
#(
  parameter int DAW    = 10,
  parameter int DELAY1 = 2,
  parameter int DELAY2 = 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [$bits(id_bundle_t)-1:0] din_t, din_f,
  output logic                          ack_prev,
  output logic [$bits(wb_bundle_t)-1:0] dout_t, dout_f,
  input  logic                          ack_next,
  // synchronous data memory
  output logic                          m_re,
  output logic                          m_we,
  output logic [DAW-1:0]                m_addr,
  output logic [31:0]                   m_wdata,
  input  logic [31:0]                   m_rdata
);
  localparam int EW = $bits(ex_bundle_t);

  logic [EW-1:0] e1_t, e1_f, l1_t, l1_f;
  logic [$bits(br_res_t)-1:0] unused_br_t, unused_br_f;

  fu_ex1 #(.HAS_BRANCH(1'b0)) u_ex1 (.clk, .rst_n, .din_t, .din_f,
    .dout_t(e1_t), .dout_f(e1_f), .br_t(unused_br_t), .br_f(unused_br_f));

  logic ex2_ack;
  c_latch #(.W(EW)) u_l1 (.clk, .rst_n, .din_t(e1_t), .din_f(e1_f), .ack_next(ex2_ack),
                          .dout_t(l1_t), .dout_f(l1_f), .ack_prev);
  c_element #(.W(1)) u_ex2_ack (.clk, .rst_n, .a(ack_next), .b(!`DR_EMPTY(l1_t, l1_f)), .z(ex2_ack));

  // ---- EX2 ----
  ex_bundle_t x;
  logic       x_valid;
  logic [2:0] sel;
  assign x       = ex_bundle_t'(l1_t);
  assign x_valid = `DR_VALID(l1_t, l1_f);
  always_comb begin
    sel = '0;
    if (x_valid) begin
      unique case (x.ctrl.mem)
        M_LOAD:  sel[1] = 1'b1;
        M_STORE: sel[2] = 1'b1;
        default: sel[0] = 1'b1;
      endcase
    end
  end

  logic [2:0][EW-1:0] d_t, d_f;
  dr_demux #(.W(EW), .N(3)) u_demux (.clk, .rst_n, .din_t(l1_t), .din_f(l1_f), .sel,
                                     .dout_t(d_t), .dout_f(d_f));

  logic [2:0] dv;
  ex_bundle_t pass_w, ld_w, ld_f, st_t, st_f;
  assign dv[0]  = `DR_VALID(d_t[0], d_f[0]);
  assign dv[1]  = `DR_VALID(d_t[1], d_f[1]);
  assign dv[2]  = `DR_VALID(d_t[2], d_f[2]);
  assign pass_w = ex_bundle_t'(d_t[0]);
  assign ld_w   = ex_bundle_t'(d_t[1]);
  assign ld_f   = ex_bundle_t'(d_f[1]);
  assign st_t   = ex_bundle_t'(d_t[2]);
  assign st_f   = ex_bundle_t'(d_f[2]);

  // memory interface: the address rails of the load and store ways are
  // merged (only one of them is ever non-empty)
  logic [31:0] rd_t, rd_f;
  logic        wdone_t, wdone_f;
  mem_if #(.AW(DAW), .DW(32), .DELAY1(DELAY1), .DELAY2(DELAY2)) u_mif (
    .clk, .rst_n,
    .rreq_t(dv[1]), .rreq_f(dv[2]),
    .addr_t(ld_w.res[DAW-1:0] | st_t.res[DAW-1:0]),
    .addr_f(ld_f.res[DAW-1:0] | st_f.res[DAW-1:0]),
    .wdata_t(st_t.aux), .wdata_f(st_f.aux),
    .rdata_t(rd_t), .rdata_f(rd_f), .wdone_t, .wdone_f,
    .m_re, .m_we, .m_addr, .m_wdata, .m_rdata);

  wb_bundle_t w_pass, w_ld;
  logic       ld_ok;
  assign w_pass = '{wr: pass_w.ctrl.wr, dst: pass_w.ctrl.dst, val: pass_w.res, acc_we: 1'b0, acc: '0};
  assign w_ld   = '{wr: ld_w.ctrl.wr, dst: ld_w.ctrl.dst, val: rd_t, acc_we: 1'b0, acc: '0};
  assign ld_ok  = dv[1] && `DR_VALID(rd_t, rd_f);

  logic [2:0][$bits(wb_bundle_t)-1:0] o_t, o_f;
  assign o_t[0] = `DR_ENC_T(dv[0], w_pass);
  assign o_f[0] = `DR_ENC_F(dv[0], w_pass);
  assign o_t[1] = `DR_ENC_T(ld_ok, w_ld);
  assign o_f[1] = `DR_ENC_F(ld_ok, w_ld);
  assign o_t[2] = '0;
  assign o_f[2] = {$bits(wb_bundle_t){dv[2] && wdone_t}};

  dr_merge #(.W($bits(wb_bundle_t)), .N(3)) u_merge (.din_t(o_t), .din_f(o_f),
                                                      .dout_t, .dout_f);
endmodule
