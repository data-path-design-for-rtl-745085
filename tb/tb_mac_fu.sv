// MAC path test: random operations (ALU, XOR gate, divide, MAC, ACCLDH,
// ACCLDL, BEQ, BNEQ, CALL, RETURN) enter four-phase. A write-back model
// acknowledges results with random delays and writes the accumulator when
// a word asks for it. Results are compared in order with a reference that
// keeps its own accumulator; each branch must raise exactly one br_evt
// with the right outcome and target.
`include "dr_macros.svh"
`include "tb_util.svh"
module tb_mac_fu;
  import avliw_pkg::*;
  `TB_CLOCK
  localparam int IW = $bits(id_bundle_t), OW = $bits(wb_bundle_t);
  logic [IW-1:0] din_t, din_f;
  logic [OW-1:0] dout_t, dout_f;
  logic ack_prev, ack_next, acc_we, br_evt, br_taken;
  logic [ACCW-1:0] acc_wdata, acc;
  logic [PCW-1:0] br_target;

  mac_fu dut (.clk, .rst_n, .din_t, .din_f, .ack_prev, .dout_t, .dout_f, .ack_next,
              .acc_we, .acc_wdata, .acc, .br_evt, .br_taken, .br_target);
  `TB_WATCHDOG(400000)

  id_bundle_t inq [$];
  br_res_t    brq [$];
  logic [ACCW-1:0] m_acc;
  int n_out, n_br, n_mac, n_ld;

  always @(posedge clk) if (rst_n && br_evt) begin
    br_res_t e;
    n_br++;
    if (brq.size() == 0) `CHECK(0, "unexpected branch event")
    else begin
      e = brq.pop_front();
      `CHECK(br_taken == e.taken && br_target == e.target,
             $sformatf("branch taken %b->%h exp %b->%h", br_taken, br_target, e.taken, e.target))
    end
  end

  // write-back model and result checker
  initial begin
    ack_next = 0; acc_we = 0; acc_wdata = '0; m_acc = '0;
    forever begin
      @(negedge clk);
      acc_we = 0;
      if (`DR_VALID(dout_t, dout_f) && !ack_next) begin
        wb_bundle_t got, ex;
        id_bundle_t in;
        logic [31:0] p;
        got = wb_bundle_t'(dout_t);
        in = inq.pop_front();
        ex = '0; ex.wr = in.ctrl.wr; ex.dst = in.ctrl.dst;
        p = 32'($signed(in.a[15:0]) * $signed(in.b[15:0]));
        case (in.ctrl.unit)
          U_ALU:    ex.val = in.a + in.b;
          U_XOR:    ex.val = in.a ^ in.imm;
          U_DIV:    ex.val = in.a / in.b;
          U_MUL:    begin ex.val = p; ex.acc_we = 1; ex.acc = m_acc + ACCW'($signed(p)); end
          U_BRANCH: ex.val = 32'(in.pc + 1'b1);
          default:  ex.val = 0;
        endcase
        if (in.ctrl.mac == C_LDH) ex.val = 32'(m_acc[ACCW-1:32]);
        if (in.ctrl.mac == C_LDL) ex.val = m_acc[31:0];
        `CHECK(got == ex, $sformatf("result %0d unit %s got %p exp %p", n_out, in.ctrl.unit.name(), got, ex))
        n_out++;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        if (got.acc_we) begin acc_we = 1; acc_wdata = got.acc; m_acc = got.acc; end
        ack_next = 1;
      end else if (`DR_EMPTY(dout_t, dout_f) && ack_next) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        ack_next = 0;
      end
    end
  end

  initial begin
    din_t = '0; din_f = '0; n_out = 0; n_br = 0; n_mac = 0; n_ld = 0;
    #20 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      id_bundle_t in;
      br_res_t br;
      int k;
      in = '0;
      in.pc = PCW'($urandom); in.a = $urandom; in.b = $urandom; in.imm = {16'd0, 16'($urandom)};
      in.ctrl.wr = 1; in.ctrl.dst = 5'($urandom_range(1, 31));
      k = $urandom_range(0, 9);
      if (k == 6 && $urandom_range(0, 1)) in.b = in.a;   // some BEQ taken
      case (k)
        0: in.ctrl.unit = U_ALU;
        1: begin in.ctrl.unit = U_XOR; in.ctrl.use_imm = 1; end
        2: begin in.ctrl.unit = U_DIV; if (in.b == 0) in.b = 1; end
        3, 4: begin in.ctrl.unit = U_MUL; in.ctrl.mac = C_MAC; in.ctrl.wr = 0; in.ctrl.dst = 0; n_mac++; end
        5: begin in.ctrl.mac = (i % 2) ? C_LDH : C_LDL; n_ld++; end
        6: begin in.ctrl.unit = U_BRANCH; in.ctrl.br = B_BEQ;  in.ctrl.wr = 0; in.ctrl.dst = 0; end
        7: begin in.ctrl.unit = U_BRANCH; in.ctrl.br = B_BNEQ; in.ctrl.wr = 0; in.ctrl.dst = 0; end
        8: begin in.ctrl.unit = U_BRANCH; in.ctrl.br = B_CALL; in.ctrl.dst = REG_RA; end
        default: begin in.ctrl.unit = U_BRANCH; in.ctrl.br = B_RET; in.ctrl.wr = 0; in.ctrl.dst = 0; end
      endcase
      if (in.ctrl.unit == U_BRANCH) begin
        case (in.ctrl.br)
          B_BEQ:  br.taken = (in.a == in.b);
          B_BNEQ: br.taken = (in.a != in.b);
          default: br.taken = 1;
        endcase
        case (in.ctrl.br)
          B_CALL: br.target = in.imm[PCW-1:0];
          B_RET:  br.target = in.a[PCW-1:0];
          default: br.target = br.taken ? in.pc + in.imm[PCW-1:0] : in.pc + 1'b1;
        endcase
        brq.push_back(br);
      end
      inq.push_back(in);
      @(negedge clk);
      din_t = in; din_f = ~in;
      while (!ack_prev) @(negedge clk);
      repeat ($urandom_range(0, 2)) @(negedge clk);
      din_t = '0; din_f = '0;
      while (ack_prev) @(negedge clk);
    end
    while (inq.size() > 0) @(negedge clk);
    repeat (10) @(negedge clk);
    `CHECK(acc == m_acc, "final accumulator")
    `CHECK(brq.size() == 0 && n_br > 300, $sformatf("branch events %0d", n_br))
    `CHECK(n_out == 2000 && n_mac > 200 && n_ld > 100, "all operations completed")
    `TB_DONE
  end
endmodule
