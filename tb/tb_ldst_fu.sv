// LDST path test: random operations (ALU, logic gate, shift, multiply,
// NOP, load, store) enter the path four-phase and leave as write-back
// words; a synchronous memory sits on the data port. Results are compared
// in order with a reference computed here, memory included.
`include "dr_macros.svh"
`include "tb_util.svh"
module tb_ldst_fu;
  import avliw_pkg::*;
  `TB_CLOCK
  localparam int IW = $bits(id_bundle_t), OW = $bits(wb_bundle_t), DAW = 10;
  logic [IW-1:0] din_t, din_f;
  logic [OW-1:0] dout_t, dout_f;
  logic ack_prev, ack_next, m_re, m_we, ext_we;
  logic [DAW-1:0] m_addr, ext_addr;
  logic [31:0] m_wdata, m_rdata, ext_wdata, ext_rdata;
  logic [31:0] model [2**DAW];

  ldst_fu dut (.clk, .rst_n, .din_t, .din_f, .ack_prev, .dout_t, .dout_f, .ack_next,
               .m_re, .m_we, .m_addr, .m_wdata, .m_rdata);
  sync_mem #(.DW(32), .AW(DAW)) mem (.clk, .re(m_re), .we(m_we), .addr(m_addr), .wdata(m_wdata),
    .rdata(m_rdata), .ext_we, .ext_addr, .ext_wdata, .ext_rdata);
  `TB_WATCHDOG(400000)

  wb_bundle_t expq [$];
  int n_out, n_ld, n_st;

  initial begin
    ack_next = 0;
    forever begin
      @(negedge clk);
      if (`DR_VALID(dout_t, dout_f) && !ack_next) begin
        wb_bundle_t got, ex;
        got = wb_bundle_t'(dout_t);
        ex = expq.pop_front();
        `CHECK(got == ex, $sformatf("result %0d got %p exp %p", n_out, got, ex))
        n_out++;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        ack_next = 1;
      end else if (`DR_EMPTY(dout_t, dout_f) && ack_next) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        ack_next = 0;
      end
    end
  end

  initial begin
    din_t = '0; din_f = '0; ext_we = 0; ext_addr = '0; ext_wdata = '0;
    n_out = 0; n_ld = 0; n_st = 0;
    #20 rst_n = 1'b1;
    for (int i = 0; i < 2**DAW; i++) begin
      @(negedge clk); ext_we = 1; ext_addr = DAW'(i); ext_wdata = $urandom; model[i] = ext_wdata;
    end
    @(negedge clk); ext_we = 0;
    for (int i = 0; i < 2000; i++) begin
      id_bundle_t in;
      wb_bundle_t ex;
      int k;
      logic [DAW-1:0] ad;
      in = '0; ex = '0;
      in.pc = PCW'(i); in.a = $urandom; in.b = $urandom; in.imm = 32'($signed(16'($urandom)));
      in.ctrl.dst = 5'($urandom_range(1, 31)); in.ctrl.wr = 1;
      in.ctrl.shamt = 5'($urandom);
      k = $urandom_range(0, 7);
      case (k)
        0: begin in.ctrl.unit = U_ALU; in.ctrl.alu = A_ADD; ex.val = in.a + in.b; end
        1: begin in.ctrl.unit = U_ALU; in.ctrl.alu = A_SUB; in.ctrl.use_imm = 1; ex.val = in.a - in.imm; end
        2: begin in.ctrl.unit = U_AND; ex.val = in.a & in.b; end
        3: begin in.ctrl.unit = U_SHIFT; in.ctrl.alu = A_SRL; ex.val = in.a >> in.ctrl.shamt; end
        4: begin in.ctrl.unit = U_MUL; ex.val = 32'($signed(in.a[15:0]) * $signed(in.b[15:0])); end
        5: begin in.ctrl.unit = U_NONE; in.ctrl.wr = 0; in.ctrl.dst = 0; ex.val = 0; end
        6: begin  // load
          in.ctrl.unit = U_ALU; in.ctrl.alu = A_ADD; in.ctrl.use_imm = 1; in.ctrl.mem = M_LOAD;
          ad = DAW'(in.a + in.imm); ex.val = model[ad]; n_ld++;
        end
        default: begin  // store: the data comes from Rd (b), nothing is written back
          in.ctrl.unit = U_ALU; in.ctrl.alu = A_ADD; in.ctrl.use_imm = 1; in.ctrl.mem = M_STORE;
          in.ctrl.wr = 0; in.ctrl.dst = 0;
          ad = DAW'(in.a + in.imm); model[ad] = in.b; ex.val = 0; n_st++;
        end
      endcase
      ex.wr = in.ctrl.wr; ex.dst = in.ctrl.dst;
      if (in.ctrl.mem == M_STORE) ex = '0;
      expq.push_back(ex);
      @(negedge clk);
      din_t = in; din_f = ~in;
      while (!ack_prev) @(negedge clk);
      repeat ($urandom_range(0, 2)) @(negedge clk);
      din_t = '0; din_f = '0;
      while (ack_prev) @(negedge clk);
    end
    while (expq.size() > 0) @(negedge clk);
    for (int i = 0; i < 2**DAW; i++) begin
      @(negedge clk); ext_addr = DAW'(i);
      @(negedge clk);
      `CHECK(ext_rdata == model[i], $sformatf("memory word %0d", i))
    end
    `CHECK(n_out == 2000 && n_ld > 100 && n_st > 100, "all operations completed")
    `TB_DONE
  end
endmodule
