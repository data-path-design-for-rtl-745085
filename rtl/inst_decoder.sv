// Instruction decoder of one VLIW slot (one per datapath, in ID/OF).
//
// Turns a 32-bit instruction into the control word carried down the
// pipeline (unit select, ALU operation, memory, MAC and branch kind,
// destination) and the two register numbers to read:
//   ra: Rs for most instructions; Rd for UNPACK (the word being unpacked)
//   rb: Rt for R-type; Rd for SW (store data), BEQ/BNEQ (compared with
//       Rs), MOV.l/MOV.h (the half that is kept); for UNPACK the target,
//       Rs or Rt by funct bit 0
// Immediates are sign-extended for ADDI, SUBI, MOVI, LW, SW, BEQ and BNEQ
// and zero-extended for ADDIU, ANDI, ORI, XORI and CALL. CALL writes the
// return address to $ra. Undefined opcodes and functs decode as NOP.
// Purely combinational.
module inst_decoder
  import avliw_pkg::*;
(
  input  logic [31:0] inst,
  output ctrl_t       ctrl,
  output logic [4:0]  ra,
  output logic [4:0]  rb,
  output logic        ra_used,   // ra is a real source operand
  output logic        rb_used,   // rb is a real source operand
  output logic [31:0] imm
);
  logic [4:0]  op, rd, rs, rt;
  logic [5:0]  fn;
  logic [15:0] imm16;
  assign op    = inst[31:27];
  assign rd    = inst[26:22];
  assign rs    = inst[21:17];
  assign rt    = inst[16:12];
  assign fn    = inst[6:1];
  assign imm16 = inst[16:1];

  always_comb begin
    ctrl         = '0;
    ctrl.unit    = U_NONE;
    ctrl.alu     = A_ADD;
    ctrl.mem     = M_NONE;
    ctrl.mac     = C_NONE;
    ctrl.br      = B_NONE;
    ctrl.shamt   = inst[11:7];
    ctrl.funct   = fn;
    ra           = rs;
    rb           = rt;
    imm          = {{16{imm16[15]}}, imm16};

    unique case (op)
      OP_RTYPE: begin
        ctrl.wr   = 1'b1;
        ctrl.dst  = rd;
        ctrl.unit = U_ALU;
        unique case (fn)
          F_ADD, F_ADDU:   ctrl.alu = A_ADD;
          F_SUB, F_SUBU:   ctrl.alu = A_SUB;
          F_ADDD, F_ADDUD: ctrl.alu = A_ADDD;
          F_SUBD, F_SUBUD: ctrl.alu = A_SUBD;
          F_MOV:           ctrl.alu = A_MOV;
          F_MOVL:          begin ctrl.alu = A_MOVL; rb = rd; end
          F_MOVH:          begin ctrl.alu = A_MOVH; rb = rd; end
          F_MIN:           ctrl.alu = A_MIN;
          F_MAX:           ctrl.alu = A_MAX;
          F_MIND:          ctrl.alu = A_MIND;
          F_MAXD:          ctrl.alu = A_MAXD;
          F_ABS:           ctrl.alu = A_ABS;
          F_ABSD:          ctrl.alu = A_ABSD;
          F_SLT:           ctrl.alu = A_SLT;
          F_NOT:           ctrl.alu = A_NOT;
          F_AND:           ctrl.unit = U_AND;
          F_OR:            ctrl.unit = U_OR;
          F_XOR:           ctrl.unit = U_XOR;
          F_SRL:           begin ctrl.unit = U_SHIFT; ctrl.alu = A_SRL; end
          F_SRA:           begin ctrl.unit = U_SHIFT; ctrl.alu = A_SRA; end
          F_MUL:           ctrl.unit = U_MUL;
          F_DIVU:          ctrl.unit = U_DIV;
          default:         begin ctrl.unit = U_NONE; ctrl.wr = 1'b0; ctrl.dst = '0; end
        endcase
      end
      OP_ADDI, OP_MOVI: begin
        ctrl.unit = U_ALU; ctrl.alu = A_ADD; ctrl.use_imm = 1'b1;
        ctrl.wr = 1'b1; ctrl.dst = rd;
      end
      OP_SUBI: begin
        ctrl.unit = U_ALU; ctrl.alu = A_SUB; ctrl.use_imm = 1'b1;
        ctrl.wr = 1'b1; ctrl.dst = rd;
      end
      OP_ADDIU: begin
        ctrl.unit = U_ALU; ctrl.alu = A_ADD; ctrl.use_imm = 1'b1;
        ctrl.wr = 1'b1; ctrl.dst = rd; imm = {16'd0, imm16};
      end
      OP_ANDI, OP_ORI, OP_XORI: begin
        ctrl.unit = (op == OP_ANDI) ? U_AND : (op == OP_ORI) ? U_OR : U_XOR;
        ctrl.use_imm = 1'b1; ctrl.wr = 1'b1; ctrl.dst = rd; imm = {16'd0, imm16};
      end
      OP_MACOP: begin
        unique case (fn)
          F_MAC:    begin ctrl.unit = U_MUL; ctrl.mac = C_MAC; end
          F_ACCLDH: begin ctrl.mac = C_LDH; ctrl.wr = 1'b1; ctrl.dst = rd; end
          F_ACCLDL: begin ctrl.mac = C_LDL; ctrl.wr = 1'b1; ctrl.dst = rd; end
          default:  ;
        endcase
      end
      OP_LW: begin
        ctrl.unit = U_ALU; ctrl.alu = A_ADD; ctrl.use_imm = 1'b1;
        ctrl.mem = M_LOAD; ctrl.wr = 1'b1; ctrl.dst = rd;
      end
      OP_SW: begin
        ctrl.unit = U_ALU; ctrl.alu = A_ADD; ctrl.use_imm = 1'b1;
        ctrl.mem = M_STORE; rb = rd;
      end
      OP_BEQ, OP_BNEQ: begin
        ctrl.unit = U_BRANCH; ctrl.br = (op == OP_BEQ) ? B_BEQ : B_BNEQ; rb = rd;
      end
      OP_CALL: begin
        ctrl.unit = U_BRANCH; ctrl.br = B_CALL; ctrl.wr = 1'b1; ctrl.dst = REG_RA;
        imm = {16'd0, imm16};
      end
      OP_RETURN: begin
        ctrl.unit = U_BRANCH; ctrl.br = B_RET;
      end
      OP_PACK: begin
        ctrl.unit = U_PACK; ctrl.wr = 1'b1; ctrl.dst = rd;
      end
      OP_UNPACK: begin
        ctrl.unit = U_UNPACK; ctrl.wr = 1'b1;
        ra = rd;
        rb = fn[0] ? rt : rs;
        ctrl.dst = rb;
      end
      default: ;
    endcase
    ra_used = (op != OP_NOP) && (op != OP_CALL) && (ctrl.unit != U_NONE || ctrl.mac != C_NONE);
    rb_used = ra_used && !ctrl.use_imm && (op != OP_RETURN);
    // writes to the zero register are dropped
    if (ctrl.dst == REG_ZERO) ctrl.wr = 1'b0;
  end
endmodule
