// PC module test: a model of the PF latch acknowledges each PC token after
// a random delay while random redirects arrive. Each new token must carry
// the PC after the previous one, or the target of the latest redirect seen
// since the previous token was issued.
`include "dr_macros.svh"
`include "tb_util.svh"
module tb_pc_module;
  import avliw_pkg::*;
  `TB_CLOCK
  logic ack, redirect, rreq_t, rreq_f;
  logic [PCW-1:0] redirect_pc, pc_t, pc_f;
  pc_module #(.RESET_PC(16'h0100)) dut (.clk, .rst_n, .ack, .redirect, .redirect_pc, .pc_t, .pc_f, .rreq_t, .rreq_f);
  `TB_WATCHDOG(200000)

  logic           tok_q, pend;
  logic [PCW-1:0] prev, pend_pc;
  int             n_tok, n_redir;
  logic           first;

  // checker: runs on every clock edge with the values just before it
  always @(posedge clk) if (rst_n) begin
    logic tok_now;
    if (redirect) begin pend = 1; pend_pc = redirect_pc; n_redir++; end
    #1;
    tok_now = `DR_VALID(pc_t, pc_f);
    `CHECK(tok_now || `DR_EMPTY(pc_t, pc_f), "pc rails valid or empty")
    `CHECK(rreq_t == tok_now && !rreq_f, "read request follows the token")
    if (tok_now && !tok_q) begin
      if (pend)       `CHECK(pc_t == pend_pc, $sformatf("redirected token %h exp %h", pc_t, pend_pc))
      else if (first) `CHECK(pc_t == 16'h0100, "first token is the reset PC")
      else            `CHECK(pc_t == prev + 1'b1, $sformatf("sequential token %h after %h", pc_t, prev))
      first = 0; pend = 0; prev = pc_t; n_tok++;
    end
    tok_q = tok_now;
  end

  // PF latch model
  initial begin
    ack = 0;
    forever begin
      @(negedge clk);
      if (rst_n && `DR_VALID(pc_t, pc_f) && !ack) begin
        repeat ($urandom_range(0, 4)) @(negedge clk);
        ack = 1;
      end else if (rst_n && `DR_EMPTY(pc_t, pc_f) && ack) begin
        repeat ($urandom_range(0, 4)) @(negedge clk);
        ack = 0;
      end
    end
  end

  initial begin
    redirect = 0; redirect_pc = '0; tok_q = 0; pend = 0; first = 1; n_tok = 0; n_redir = 0;
    #20 rst_n = 1'b1;
    repeat (6000) begin
      @(negedge clk);
      redirect = ($urandom_range(0, 9) == 0);
      redirect_pc = PCW'($urandom);
    end
    @(negedge clk) redirect = 0;
    repeat (20) @(negedge clk);
    `CHECK(n_tok > 500 && n_redir > 300, $sformatf("tokens %0d redirects %0d", n_tok, n_redir))
    `TB_DONE
  end
endmodule
