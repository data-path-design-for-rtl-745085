// Dispatch stage test. A fetch model sends packets of a random program in
// PC order and, after a taken branch, keeps sending a few wrong-path
// packets before it jumps, as the real PC prefetch does. A branch-unit
// model answers every issued branch with a random outcome after a random
// delay, and the output latch model acknowledges with random delays.
// Every issued word is compared with a reference walk of the program that
// applies the P-bit, routing and branch rules, and no word may issue while
// a branch is unresolved.
`include "dr_macros.svh"
`include "tb_util.svh"
module tb_dispatch;
  import avliw_pkg::*;
  `TB_CLOCK
  localparam int PW = $bits(pf_bundle_t), DW = $bits(dp_bundle_t);
  logic [PW-1:0] din_t, din_f;
  logic [DW-1:0] dout_t, dout_f;
  logic ack_prev, ack_next, br_evt, br_taken;
  logic [PCW-1:0] br_target;
  logic evt_issue, evt_split, evt_drop, evt_br_stall;

  dispatch dut (.clk, .rst_n, .din_t, .din_f, .ack_prev, .dout_t, .dout_f, .ack_next,
                .br_evt, .br_taken, .br_target, .evt_issue, .evt_split, .evt_drop, .evt_br_stall);
  `TB_WATCHDOG(400000)

  logic [63:0] prog [256];
  int n_split, n_drop, n_stall, n_words, n_taken;

  function automatic logic [31:0] rnd_inst(input int kind);
    logic [4:0] d, s, t;
    d = 5'($urandom); s = 5'($urandom); t = 5'($urandom);
    case (kind)
      0: return enc_i($urandom_range(0, 1) ? OP_BEQ : OP_BNEQ, d, s, 16'($urandom));
      1: return enc_i($urandom_range(0, 1) ? OP_LW : OP_SW, d, s, 16'($urandom));
      2: return enc_m(d, s, t, F_MAC);
      default: return enc_r(d, s, t, F_ADD);
    endcase
  endfunction

  // ---------------- fetch model ----------------
  logic redir_req; logic [PCW-1:0] redir_pc;
  int lag;
  logic pend; logic [PCW-1:0] pend_pc;
  always @(negedge clk) #1 if (redir_req) begin pend = 1; pend_pc = redir_pc; lag = $urandom_range(0, 2); end
  initial begin
    logic [PCW-1:0] fpc;
    pf_bundle_t pf;
    din_t = '0; din_f = '0; fpc = '0; pend = 0; lag = 0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      pf.pc = fpc; pf.packet = prog[fpc[7:0]];
      din_t = pf; din_f = ~pf;
      while (!ack_prev) @(negedge clk);
      repeat ($urandom_range(0, 2)) @(negedge clk);
      din_t = '0; din_f = '0;
      while (ack_prev) @(negedge clk);
      if (pend && lag == 0) begin fpc = pend_pc; pend = 0; end
      else begin fpc++; if (pend) lag--; end
    end
  end

  // ---------------- output latch model ----------------
  initial begin
    ack_next = 0;
    forever begin
      @(negedge clk);
      if (`DR_VALID(dout_t, dout_f) && !ack_next) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        ack_next = 1;
      end else if (`DR_EMPTY(dout_t, dout_f) && ack_next) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        ack_next = 0;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (evt_split) n_split++;
    if (evt_drop) n_drop++;
    if (evt_br_stall) n_stall++;
  end

  // ---------------- reference walk, checker and branch model ----------------
  logic [PCW-1:0] m_pc; logic m_half, m_wait, out_q;
  initial begin
    br_evt = 0; br_taken = 0; br_target = '0; redir_req = 0;
    m_pc = '0; m_half = 0; m_wait = 0; out_q = 0;
    n_split = 0; n_drop = 0; n_stall = 0; n_words = 0; n_taken = 0;
    for (int i = 0; i < 256; i++) begin
      logic p; logic [31:0] i0, i1;
      p = 1'($urandom);
      if (p) begin
        i0 = rnd_inst($urandom_range(0, 1) ? 0 : 2 + $urandom_range(0, 1));
        i1 = rnd_inst(1 + 2 * $urandom_range(0, 1));
      end else begin
        i0 = rnd_inst($urandom_range(0, 3));
        i1 = rnd_inst($urandom_range(0, 3));
      end
      i0[0] = p;
      prog[i] = {i0, i1};
    end
    #20 rst_n = 1'b1;
    while (n_words < 3000) begin
      @(negedge clk);
      if (`DR_VALID(dout_t, dout_f) && !out_q) begin
        dp_bundle_t got, exp_w;
        logic [63:0] pkt; logic [31:0] i0, i1, alone;
        got = dp_bundle_t'(dout_t);
        `CHECK(!m_wait, "no issue while a branch is unresolved")
        pkt = prog[m_pc[7:0]]; i0 = pkt[63:32]; i1 = pkt[31:0];
        exp_w = '0; exp_w.pc = m_pc;
        if (i0[0]) begin
          exp_w.inst_b = i0; exp_w.inst_a = i1; m_pc++;
        end else begin
          alone = m_half ? i1 : i0;
          if (alone[31:27] == OP_LW || alone[31:27] == OP_SW) exp_w.inst_a = alone;
          else exp_w.inst_b = alone;
          if (m_half) m_pc++;
          m_half = !m_half;
        end
        `CHECK(got == exp_w, $sformatf("word %0d got %h exp %h", n_words, got, exp_w))
        n_words++;
        if (exp_w.inst_b[31:27] inside {OP_BEQ, OP_BNEQ}) begin
          // resolve this branch after a while
          m_wait = 1;
          fork begin
            logic tk; logic [PCW-1:0] tg;
            tk = 1'($urandom); tg = PCW'($urandom_range(0, 255));
            repeat ($urandom_range(1, 8)) @(negedge clk);
            br_evt = 1; br_taken = tk; br_target = tg;
            redir_req = tk; redir_pc = tg;
            if (tk) begin m_pc = tg; m_half = 0; n_taken++; end
            m_wait = 0;
            @(negedge clk);
            br_evt = 0; br_taken = 0; redir_req = 0;
          end join_none
        end
      end
      out_q = `DR_VALID(dout_t, dout_f);
    end
    `CHECK(n_split > 100, $sformatf("split packets %0d", n_split))
    `CHECK(n_drop > 20, $sformatf("dropped packets %0d", n_drop))
    `CHECK(n_stall > 100, $sformatf("branch stall cycles %0d", n_stall))
    `CHECK(n_taken > 50, $sformatf("taken branches %0d", n_taken))
    `TB_DONE
  end
endmodule
