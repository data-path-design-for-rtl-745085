// Shared types and constants of the asynchronous two-way VLIW core.
//
// Instruction word (32 bits, MIPS-like):
//   [31:27] opcode  [26:22] Rd  [21:17] Rs  [16:12] Rt  [11:7] shamt
//   [6:1] funct     [0] P bit (1: may issue in parallel with the other slot)
// I-type instructions hold a 16-bit immediate in [16:1].
// An instruction packet is 64 bits: [63:32] is the first instruction
// (MAC path B), [31:0] the second (LDST path A).
//
// Opcode and funct values follow the instruction table of the design; MUL
// and DIVU have no listed encoding and use funct codes chosen here
// (011100 and 011110). Every other value is decoded as a NOP.
package avliw_pkg;

  localparam int XLEN = 32;
  localparam int ACCW = 40;          // MAC accumulator width
  localparam int NREG = 32;
  localparam int PCW  = 16;          // program counter width (packet address)

  // system register numbers (register file order: $0 $sp $rp $ra $bb)
  localparam logic [4:0] REG_ZERO = 5'd0;
  localparam logic [4:0] REG_SP   = 5'd1;
  localparam logic [4:0] REG_RP   = 5'd2;
  localparam logic [4:0] REG_RA   = 5'd3;
  localparam logic [4:0] REG_BB   = 5'd4;

  // opcodes
  localparam logic [4:0] OP_NOP    = 5'b00000;
  localparam logic [4:0] OP_RTYPE  = 5'b00001;
  localparam logic [4:0] OP_ADDI   = 5'b00010;
  localparam logic [4:0] OP_ADDIU  = 5'b00011;
  localparam logic [4:0] OP_SUBI   = 5'b00100;
  localparam logic [4:0] OP_RETURN = 5'b01010;
  localparam logic [4:0] OP_CALL   = 5'b01011;
  localparam logic [4:0] OP_BEQ    = 5'b01100;
  localparam logic [4:0] OP_BNEQ   = 5'b01101;
  localparam logic [4:0] OP_MOVI   = 5'b01110;
  localparam logic [4:0] OP_ANDI   = 5'b10000;
  localparam logic [4:0] OP_ORI    = 5'b10001;
  localparam logic [4:0] OP_XORI   = 5'b10010;
  localparam logic [4:0] OP_MACOP  = 5'b10011;
  localparam logic [4:0] OP_PACK   = 5'b10100;
  localparam logic [4:0] OP_UNPACK = 5'b10101;
  localparam logic [4:0] OP_LW     = 5'b11000;
  localparam logic [4:0] OP_SW     = 5'b11100;

  // funct codes of R-type (opcode 00001)
  localparam logic [5:0] F_ADD   = 6'b000000;
  localparam logic [5:0] F_ADDU  = 6'b000001;
  localparam logic [5:0] F_ADDD  = 6'b000010;
  localparam logic [5:0] F_ADDUD = 6'b000011;
  localparam logic [5:0] F_MOV   = 6'b000100;
  localparam logic [5:0] F_MOVL  = 6'b000101;
  localparam logic [5:0] F_MOVH  = 6'b000110;
  localparam logic [5:0] F_SUB   = 6'b001000;
  localparam logic [5:0] F_SUBU  = 6'b001001;
  localparam logic [5:0] F_SUBD  = 6'b001010;
  localparam logic [5:0] F_SUBUD = 6'b001011;
  localparam logic [5:0] F_AND   = 6'b010000;
  localparam logic [5:0] F_OR    = 6'b010001;
  localparam logic [5:0] F_XOR   = 6'b010010;
  localparam logic [5:0] F_SRL   = 6'b011000;
  localparam logic [5:0] F_SRA   = 6'b011001;
  localparam logic [5:0] F_MUL   = 6'b011100;  // encoding chosen here
  localparam logic [5:0] F_DIVU  = 6'b011110;  // encoding chosen here
  localparam logic [5:0] F_SLT   = 6'b100000;
  localparam logic [5:0] F_MIN   = 6'b101000;
  localparam logic [5:0] F_MIND  = 6'b101001;
  localparam logic [5:0] F_MAX   = 6'b110000;
  localparam logic [5:0] F_MAXD  = 6'b110001;
  localparam logic [5:0] F_ABS   = 6'b111000;
  localparam logic [5:0] F_ABSD  = 6'b111001;
  localparam logic [5:0] F_NOT   = 6'b111010;
  // funct codes of the MAC group (opcode 10011)
  localparam logic [5:0] F_MAC    = 6'b010000;
  localparam logic [5:0] F_ACCLDH = 6'b010001;
  localparam logic [5:0] F_ACCLDL = 6'b010010;

  // execution unit selected by the EX1 DeMUX (one rail per unit)
  typedef enum logic [3:0] {
    U_NONE   = 4'd0,   // bypass line: NOP, ACCLDH/ACCLDL
    U_ALU    = 4'd1,
    U_AND    = 4'd2,   // dual-rail gate units
    U_OR     = 4'd3,
    U_XOR    = 4'd4,
    U_SHIFT  = 4'd5,
    U_MUL    = 4'd6,
    U_DIV    = 4'd7,
    U_PACK   = 4'd8,
    U_UNPACK = 4'd9,
    U_BRANCH = 4'd10
  } unit_e;
  localparam int NUNITS = 11;

  typedef enum logic [4:0] {
    A_ADD, A_SUB, A_MIN, A_MAX, A_ABS, A_SLT, A_NOT, A_MOV, A_MOVL, A_MOVH,
    A_ADDD, A_SUBD, A_MIND, A_MAXD, A_ABSD, A_SRL, A_SRA
  } alu_op_e;

  typedef enum logic [1:0] {M_NONE, M_LOAD, M_STORE} mem_e;
  typedef enum logic [1:0] {C_NONE, C_MAC, C_LDH, C_LDL} mac_e;
  typedef enum logic [2:0] {B_NONE, B_BEQ, B_BNEQ, B_CALL, B_RET} br_e;

  // decoded control of one instruction, carried stage to stage
  typedef struct packed {
    unit_e      unit;
    alu_op_e    alu;
    mem_e       mem;
    mac_e       mac;
    br_e        br;
    logic       use_imm;
    logic [4:0] shamt;
    logic [5:0] funct;
    logic       wr;      // writes Rd in WB
    logic [4:0] dst;
  } ctrl_t;

  // PF -> DP
  typedef struct packed {
    logic [PCW-1:0] pc;
    logic [63:0]    packet;
  } pf_bundle_t;

  // DP -> ID/OF
  typedef struct packed {
    logic [PCW-1:0] pc;
    logic [31:0]    inst_b;   // MAC path
    logic [31:0]    inst_a;   // LDST path
  } dp_bundle_t;

  // ID/OF -> EX1 (one path)
  typedef struct packed {
    ctrl_t          ctrl;
    logic [PCW-1:0] pc;
    logic [31:0]    a;
    logic [31:0]    b;
    logic [31:0]    imm;
  } id_bundle_t;

  // EX1 -> EX2 (one path)
  typedef struct packed {
    ctrl_t       ctrl;
    logic [31:0] res;
    logic [31:0] aux;      // store data
  } ex_bundle_t;

  // EX2 -> WB (one path)
  typedef struct packed {
    logic            wr;
    logic [4:0]      dst;
    logic [31:0]     val;
    logic            acc_we;
    logic [ACCW-1:0] acc;
  } wb_bundle_t;

  // branch resolution sent from EX1 of the MAC path to DP and PC
  typedef struct packed {
    logic           taken;
    logic [PCW-1:0] target;
  } br_res_t;

  function automatic logic [4:0] f_op(input logic [31:0] i);  return i[31:27]; endfunction
  function automatic logic [4:0] f_rd(input logic [31:0] i);  return i[26:22]; endfunction
  function automatic logic [4:0] f_rs(input logic [31:0] i);  return i[21:17]; endfunction
  function automatic logic [4:0] f_rt(input logic [31:0] i);  return i[16:12]; endfunction
  function automatic logic       f_p (input logic [31:0] i);  return i[0];     endfunction

  // only the LDST path reaches data memory
  function automatic logic is_ldst_only(input logic [31:0] i);
    return (i[31:27] == OP_LW) || (i[31:27] == OP_SW);
  endfunction

  // branch, call, return and the MAC group run only on the MAC path
  function automatic logic is_mac_only(input logic [31:0] i);
    logic [4:0] op;
    op = i[31:27];
    return (op == OP_BEQ) || (op == OP_BNEQ) || (op == OP_CALL) ||
           (op == OP_RETURN) || (op == OP_MACOP);
  endfunction

  function automatic logic is_branch(input logic [31:0] i);
    logic [4:0] op;
    op = i[31:27];
    return (op == OP_BEQ) || (op == OP_BNEQ) || (op == OP_CALL) || (op == OP_RETURN);
  endfunction

  // instruction encoders, used by testbenches to build programs
  function automatic logic [31:0] enc_r(input logic [4:0] rd, rs, rt, input logic [5:0] fn,
                                        input logic p = 1'b0, input logic [4:0] sh = 5'd0);
    return {OP_RTYPE, rd, rs, rt, sh, fn, p};
  endfunction
  function automatic logic [31:0] enc_i(input logic [4:0] op, rd, rs, input logic [15:0] imm,
                                        input logic p = 1'b0);
    return {op, rd, rs, imm, p};
  endfunction
  function automatic logic [31:0] enc_m(input logic [4:0] rd, rs, rt, input logic [5:0] fn,
                                        input logic p = 1'b0);
    return {OP_MACOP, rd, rs, rt, 5'd0, fn, p};
  endfunction

endpackage
