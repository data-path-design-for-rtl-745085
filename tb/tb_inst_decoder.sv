// Instruction decoder test: a table of instructions of every class with
// the expected unit, operation, destination, operand registers and
// immediate, filled with random register numbers.
`include "tb_util.svh"
module tb_inst_decoder;
  import avliw_pkg::*;
  `TB_CLOCK
  logic [31:0] inst, imm;
  ctrl_t ctrl;
  logic [4:0] ra, rb;
  logic ra_used, rb_used;
  inst_decoder dut (.inst, .ctrl, .ra, .rb, .ra_used, .rb_used, .imm);
  `TB_WATCHDOG(100000)

  task automatic expect_r(input logic [5:0] fn, input unit_e u, input alu_op_e a);
    logic [4:0] d, s, t;
    d = 5'($urandom_range(1, 31)); s = 5'($urandom); t = 5'($urandom);
    inst = enc_r(d, s, t, fn); #1;
    `CHECK(ctrl.unit == u && ctrl.wr && ctrl.dst == d && ra == s && ra_used && rb_used && !ctrl.use_imm,
           $sformatf("R-type funct %b unit %s", fn, ctrl.unit.name()))
    if (u == U_ALU || u == U_SHIFT) `CHECK(ctrl.alu == a, $sformatf("funct %b alu %s", fn, ctrl.alu.name()))
    if (fn == F_MOVL || fn == F_MOVH) `CHECK(rb == d, "MOVL/MOVH merge the old Rd")
    else `CHECK(rb == t, "rb is Rt")
  endtask

  initial begin
    logic [4:0] d, s, t;
    logic [15:0] k;
    for (int rep = 0; rep < 20; rep++) begin
      expect_r(F_ADD, U_ALU, A_ADD);   expect_r(F_ADDU, U_ALU, A_ADD);
      expect_r(F_SUB, U_ALU, A_SUB);   expect_r(F_ADDD, U_ALU, A_ADDD);
      expect_r(F_SUBD, U_ALU, A_SUBD); expect_r(F_MOV, U_ALU, A_MOV);
      expect_r(F_MOVL, U_ALU, A_MOVL); expect_r(F_MOVH, U_ALU, A_MOVH);
      expect_r(F_MIN, U_ALU, A_MIN);   expect_r(F_MAXD, U_ALU, A_MAXD);
      expect_r(F_ABS, U_ALU, A_ABS);   expect_r(F_SLT, U_ALU, A_SLT);
      expect_r(F_NOT, U_ALU, A_NOT);   expect_r(F_AND, U_AND, A_ADD);
      expect_r(F_OR, U_OR, A_ADD);     expect_r(F_XOR, U_XOR, A_ADD);
      expect_r(F_SRL, U_SHIFT, A_SRL); expect_r(F_SRA, U_SHIFT, A_SRA);
      expect_r(F_MUL, U_MUL, A_ADD);   expect_r(F_DIVU, U_DIV, A_ADD);

      d = 5'($urandom_range(1, 31)); s = 5'($urandom); t = 5'($urandom); k = 16'($urandom);
      inst = enc_i(OP_ADDI, d, s, k); #1;
      `CHECK(ctrl.unit == U_ALU && ctrl.use_imm && imm == {{16{k[15]}}, k} && ctrl.dst == d && !rb_used, "ADDI")
      inst = enc_i(OP_ADDIU, d, s, k); #1;
      `CHECK(imm == {16'd0, k}, "ADDIU zero-extends")
      inst = enc_i(OP_XORI, d, s, k); #1;
      `CHECK(ctrl.unit == U_XOR && imm == {16'd0, k}, "XORI")
      inst = enc_i(OP_LW, d, s, k); #1;
      `CHECK(ctrl.mem == M_LOAD && ctrl.wr && ctrl.dst == d && ra == s, "LW")
      inst = enc_i(OP_SW, d, s, k); #1;
      `CHECK(ctrl.mem == M_STORE && !ctrl.wr && rb == d && ra == s, "SW reads data from Rd")
      inst = enc_i(OP_BEQ, d, s, k); #1;
      `CHECK(ctrl.unit == U_BRANCH && ctrl.br == B_BEQ && !ctrl.wr && ra == s && rb == d && rb_used, "BEQ")
      inst = enc_i(OP_CALL, 0, 0, k); #1;
      `CHECK(ctrl.br == B_CALL && ctrl.wr && ctrl.dst == REG_RA && imm == {16'd0, k} && !ra_used, "CALL links to $ra")
      inst = enc_i(OP_RETURN, 0, REG_RA, 0); #1;
      `CHECK(ctrl.br == B_RET && ra == REG_RA && ra_used && !rb_used && !ctrl.wr, "RETURN")
      inst = enc_m(d, s, t, F_MAC); #1;
      `CHECK(ctrl.unit == U_MUL && ctrl.mac == C_MAC && !ctrl.wr, "MAC")
      inst = enc_m(d, 0, 0, F_ACCLDH); #1;
      `CHECK(ctrl.unit == U_NONE && ctrl.mac == C_LDH && ctrl.wr && ctrl.dst == d, "ACCLDH")
      inst = enc_r(d, s, t, 6'b100101); inst[31:27] = OP_PACK; #1;
      `CHECK(ctrl.unit == U_PACK && ctrl.dst == d, "PACK")
      inst = enc_r(d, s, t, 6'b000011); inst[31:27] = OP_UNPACK; #1;
      `CHECK(ctrl.unit == U_UNPACK && ra == d && rb == t && ctrl.dst == t, "UNPACK into Rt")
      inst = enc_r(d, s, t, 6'b000010); inst[31:27] = OP_UNPACK; #1;
      `CHECK(ctrl.unit == U_UNPACK && rb == s && ctrl.dst == s, "UNPACK into Rs")
      inst = enc_r(0, s, t, F_ADD); #1;
      `CHECK(!ctrl.wr, "write to $0 dropped")
      inst = '0; #1;
      `CHECK(ctrl.unit == U_NONE && !ctrl.wr && !ra_used && ctrl.mem == M_NONE, "NOP")
    end
    `TB_DONE
  end
endmodule
