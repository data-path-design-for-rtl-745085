// ID/OF stage test. A register-file model answers the read ports and its
// contents change at random, and the lock-module inputs (hazard, full) are
// driven at random. Every packet must leave exactly once, with the operand
// values that the register file held in the cycle the stage took its
// snapshot (the cycle of the lock push), and never while hazard or full
// was high. NOPs (opcode 0, other bits random) appear in either slot and
// must come out as all-zero bundles without using register ports or lock
// entries.
`include "dr_macros.svh"
`include "tb_util.svh"
module tb_id_stage;
  import avliw_pkg::*;
  `TB_CLOCK
  localparam int IW = $bits(dp_bundle_t), OW = 2 * $bits(id_bundle_t);
  logic [IW-1:0] din_t, din_f;
  logic [OW-1:0] dout_t, dout_f;
  logic ack_prev, ack_next, lk_hazard, lk_full, lk_push, evt_stall, evt_nop_bypass;
  logic [3:0][4:0] rf_idx;
  logic [3:0][31:0] rf_data;
  logic [3:0] lk_use;
  logic [1:0][4:0] lk_dst;
  logic [31:0] regs [32];

  id_stage dut (.clk, .rst_n, .din_t, .din_f, .ack_prev, .dout_t, .dout_f, .ack_next,
                .rf_idx, .rf_data, .lk_use, .lk_hazard, .lk_full, .lk_push, .lk_dst, .evt_stall, .evt_nop_bypass);
  `TB_WATCHDOG(300000)

  always_comb for (int p = 0; p < 4; p++) rf_data[p] = regs[rf_idx[p]];

  dp_bundle_t cur;
  id_bundle_t exp_a, exp_b;
  int n_push, n_stall, n_nop;
  logic nop_a, nop_b;
  always @(posedge clk) if (rst_n) begin
    if (evt_stall) n_stall++;
    if (lk_push) begin
      n_push++;
      `CHECK(evt_nop_bypass == (nop_a || nop_b), "NOP bypass event")
      `CHECK(!lk_hazard && !lk_full, "snapshot only without hazard")
      // reference operands: R-type ADD in slot B reads Rs, Rt; ADDI in slot A reads Rs
      exp_b.a = nop_b ? 0 : regs[f_rs(cur.inst_b)]; exp_b.b = nop_b ? 0 : regs[f_rt(cur.inst_b)];
      exp_a.a = nop_a ? 0 : regs[f_rs(cur.inst_a)];
      `CHECK(lk_dst[1] == ((!nop_b && f_rd(cur.inst_b) != 0) ? f_rd(cur.inst_b) : 5'd0), "lock entry B")
      `CHECK(lk_dst[0] == ((!nop_a && f_rd(cur.inst_a) != 0) ? f_rd(cur.inst_a) : 5'd0), "lock entry A")
      `CHECK(lk_use == {{2{!nop_b}}, 1'b0, !nop_a}, "used sources: A.rs, B.rs, B.rt")
    end
  end

  // register contents and lock inputs change at random
  always @(negedge clk) begin
    regs[5'($urandom_range(1, 31))] = $urandom;
    lk_hazard = ($urandom_range(0, 3) == 0);
    lk_full   = ($urandom_range(0, 7) == 0);
  end

  // output side
  initial begin
    ack_next = 0;
    forever begin
      @(negedge clk);
      if (`DR_VALID(dout_t, dout_f) && !ack_next) begin
        id_bundle_t ga, gb;
        {gb, ga} = dout_t;
        `CHECK(gb.a == exp_b.a && gb.b == exp_b.b && gb.pc == cur.pc && ga.pc == cur.pc, "slot B operands")
        if (nop_a) `CHECK(ga.ctrl == '0 && ga.a == 0 && ga.b == 0 && ga.imm == 0, "slot A NOP bypass")
        else `CHECK(ga.a == exp_a.a && ga.imm == {{16{cur.inst_a[16]}}, cur.inst_a[16:1]} && ga.ctrl.use_imm, "slot A operand and immediate")
        if (nop_b) `CHECK(gb.ctrl == '0, "slot B NOP bypass")
        else `CHECK(gb.ctrl.unit == U_ALU && gb.ctrl.dst == f_rd(cur.inst_b), "decoded control")
        repeat ($urandom_range(0, 3)) @(negedge clk);
        ack_next = 1;
      end else if (`DR_EMPTY(dout_t, dout_f) && ack_next) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        ack_next = 0;
      end
    end
  end

  initial begin
    din_t = '0; din_f = '0; n_push = 0; n_stall = 0; n_nop = 0;
    for (int r = 0; r < 32; r++) regs[r] = r * 32'h01010101;
    regs[0] = 0;
    #20 rst_n = 1'b1;
    for (int i = 0; i < 800; i++) begin
      int e;
      @(negedge clk);
      cur.pc = PCW'(i);
      cur.inst_b = enc_r(5'($urandom), 5'($urandom), 5'($urandom), F_ADD);
      cur.inst_a = enc_i(OP_ADDI, 5'($urandom), 5'($urandom), 16'($urandom));
      nop_a = ($urandom_range(0, 3) == 0); nop_b = ($urandom_range(0, 3) == 0);
      if (nop_a) cur.inst_a = {OP_NOP, 27'($urandom)};
      if (nop_b) cur.inst_b = {OP_NOP, 27'($urandom)};
      n_nop += nop_a + nop_b;
      e = n_push + 1;
      din_t = cur; din_f = ~cur;
      while (!ack_prev) @(negedge clk);
      din_t = '0; din_f = '0;
      while (ack_prev) @(negedge clk);
      `CHECK(n_push == e, "one lock push per packet")
    end
    `CHECK(n_nop > 100, $sformatf("NOP slots %0d", n_nop))
    `CHECK(n_stall > 50, $sformatf("stall cycles %0d", n_stall))
    `TB_DONE
  end
endmodule
