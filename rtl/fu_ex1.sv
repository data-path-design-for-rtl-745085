`include "dr_macros.svh"
// EX1 stage of one function unit (helper of ldst_fu and mac_fu).
//
// The dual-rail operand bundle from the ID latch is steered by a DeMUX,
// whose 1-of-N select comes from the decoded unit field, to exactly one of
// the execution blocks; the others receive nothing and stay idle. Blocks:
// bypass line (NOP, ACCLDH/ACCLDL: result 0), ALU, dual-rail AND, OR and
// XOR gate arrays, barrel shifter, multiplier (Rs.L x Rt.L, also the MAC
// product), divider, pack unit, unpack unit and, with HAS_BRANCH, the
// address generator of the MAC path (branch condition and target). The
// single-rail blocks present their result on dual rails once their input
// word is complete. A MERGE (OR of the rails) collects the one result.
// Output: {control, result, store data} for the EX1 latch, and on the MAC
// path the branch resolution {taken, target} (valid while the branch's
// word is in the address generator).
// Branch rules: BEQ/BNEQ compare Rs with Rd and go to PC + imm; CALL goes
// to imm and returns PC + 1 as its result (written to $ra); RETURN goes to
// the value of the register in its Rs field ($ra).
module fu_ex1
  import avliw_pkg::*;
#(
  parameter bit HAS_BRANCH = 1'b0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [$bits(id_bundle_t)-1:0] din_t, din_f,
  output logic [$bits(ex_bundle_t)-1:0] dout_t, dout_f,
  output logic [$bits(br_res_t)-1:0]    br_t, br_f
);
  // word steered to the execution blocks
  typedef struct packed {
    alu_op_e        alu;
    logic [4:0]     shamt;
    logic [5:0]     funct;
    br_e            br;
    logic [PCW-1:0] pc;
    logic [31:0]    a;
    logic [31:0]    b;     // Rt/Rd or the immediate
    logic [31:0]    imm;
  } op_word_t;
  localparam int OW = $bits(op_word_t);

  id_bundle_t         in;
  logic               in_valid;
  op_word_t           ow;
  logic [NUNITS-1:0]  sel;
  unit_e              unit;

  assign in       = id_bundle_t'(din_t);
  assign in_valid = `DR_VALID(din_t, din_f);
  assign unit     = (!HAS_BRANCH && in.ctrl.unit == U_BRANCH) ? U_NONE : in.ctrl.unit;
  assign sel      = in_valid ? (NUNITS'(1) << unit) : '0;

  always_comb begin
    ow       = '0;
    ow.alu   = in.ctrl.alu;
    ow.shamt = in.ctrl.shamt;
    ow.funct = in.ctrl.funct;
    ow.br    = in.ctrl.br;
    ow.pc    = in.pc;
    ow.a     = in.a;
    ow.b     = in.ctrl.use_imm ? in.imm : in.b;
    ow.imm   = in.imm;
  end

  logic [NUNITS-1:0][OW-1:0] w_t, w_f;
  dr_demux #(.W(OW), .N(NUNITS)) u_demux (
    .clk, .rst_n, .din_t(`DR_ENC_T(in_valid, ow)), .din_f(`DR_ENC_F(in_valid, ow)),
    .sel, .dout_t(w_t), .dout_f(w_f));

  logic [NUNITS-1:0]        wv;
  op_word_t                 wo [NUNITS];
  logic [NUNITS-1:0][31:0]  r_t, r_f;
  for (genvar k = 0; k < NUNITS; k++) begin : g_way
    assign wv[k] = `DR_VALID(w_t[k], w_f[k]);
    assign wo[k] = op_word_t'(w_t[k]);
  end

  // bypass line
  assign r_t[U_NONE] = '0;
  assign r_f[U_NONE] = {32{wv[U_NONE]}};

  // ALU
  logic [31:0] y_alu;
  alu u_alu (.op(wo[U_ALU].alu), .a(wo[U_ALU].a), .b(wo[U_ALU].b), .y(y_alu));
  assign r_t[U_ALU] = `DR_ENC_T(wv[U_ALU], y_alu);
  assign r_f[U_ALU] = `DR_ENC_F(wv[U_ALU], y_alu);

  // dual-rail logic gates, fed straight from the DeMUX rails
  op_word_t gt_and, gf_and, gt_or, gf_or, gt_xor, gf_xor;
  assign gt_and = op_word_t'(w_t[U_AND]);  assign gf_and = op_word_t'(w_f[U_AND]);
  assign gt_or  = op_word_t'(w_t[U_OR]);   assign gf_or  = op_word_t'(w_f[U_OR]);
  assign gt_xor = op_word_t'(w_t[U_XOR]);  assign gf_xor = op_word_t'(w_f[U_XOR]);
  dr_gate2 #(.W(32), .OP("AND")) u_and (.clk, .rst_n, .a_t(gt_and.a), .a_f(gf_and.a),
    .b_t(gt_and.b), .b_f(gf_and.b), .y_t(r_t[U_AND]), .y_f(r_f[U_AND]));
  dr_gate2 #(.W(32), .OP("OR")) u_or (.clk, .rst_n, .a_t(gt_or.a), .a_f(gf_or.a),
    .b_t(gt_or.b), .b_f(gf_or.b), .y_t(r_t[U_OR]), .y_f(r_f[U_OR]));
  dr_gate2 #(.W(32), .OP("XOR")) u_xor (.clk, .rst_n, .a_t(gt_xor.a), .a_f(gf_xor.a),
    .b_t(gt_xor.b), .b_f(gf_xor.b), .y_t(r_t[U_XOR]), .y_f(r_f[U_XOR]));

  // barrel shifter
  logic [31:0] y_sh;
  barrel_shifter u_sh (.a(wo[U_SHIFT].a), .shamt(wo[U_SHIFT].shamt),
                       .arith(wo[U_SHIFT].alu == A_SRA), .y(y_sh));
  assign r_t[U_SHIFT] = `DR_ENC_T(wv[U_SHIFT], y_sh);
  assign r_f[U_SHIFT] = `DR_ENC_F(wv[U_SHIFT], y_sh);

  // multiplier
  logic [31:0] y_mul;
  multiplier u_mul (.a(wo[U_MUL].a[15:0]), .b(wo[U_MUL].b[15:0]), .p(y_mul));
  assign r_t[U_MUL] = `DR_ENC_T(wv[U_MUL], y_mul);
  assign r_f[U_MUL] = `DR_ENC_F(wv[U_MUL], y_mul);

  // divider
  logic [31:0] y_div, y_rem;
  divider u_div (.n(wo[U_DIV].a), .d(wo[U_DIV].b), .q(y_div), .r(y_rem));
  assign r_t[U_DIV] = `DR_ENC_T(wv[U_DIV], y_div);
  assign r_f[U_DIV] = `DR_ENC_F(wv[U_DIV], y_div);

  // pack unit: first half of funct selects the Rs half, last half the Rt half
  logic [31:0] y_pk;
  pack_unit u_pk (.rs(wo[U_PACK].a), .rt(wo[U_PACK].b),
                  .sel_s(wo[U_PACK].funct[5]), .sel_t(wo[U_PACK].funct[2]), .rd(y_pk));
  assign r_t[U_PACK] = `DR_ENC_T(wv[U_PACK], y_pk);
  assign r_f[U_PACK] = `DR_ENC_F(wv[U_PACK], y_pk);

  // unpack unit: funct[0] picks the target (0: Rs, 1: Rt) and which
  // funct half (first or last) holds {put_h, src_h}
  logic [31:0] y_up;
  logic [5:0]  fu;
  assign fu = wo[U_UNPACK].funct;
  unpack_unit u_up (.rd(wo[U_UNPACK].a), .tgt(wo[U_UNPACK].b),
                    .put_h(fu[0] ? fu[2] : fu[5]), .src_h(fu[0] ? fu[1] : fu[4]), .y(y_up));
  assign r_t[U_UNPACK] = `DR_ENC_T(wv[U_UNPACK], y_up);
  assign r_f[U_UNPACK] = `DR_ENC_F(wv[U_UNPACK], y_up);

  // address generator (branch unit)
  br_res_t     br;
  logic [31:0] y_br;
  op_word_t    wb;
  assign wb = wo[U_BRANCH];
  always_comb begin
    br.taken  = 1'b0;
    br.target = wb.pc + PCW'(wb.imm);
    unique case (wb.br)
      B_BEQ:  br.taken = (wb.a == wb.b);
      B_BNEQ: br.taken = (wb.a != wb.b);
      B_CALL: begin br.taken = 1'b1; br.target = PCW'(wb.imm); end
      B_RET:  begin br.taken = 1'b1; br.target = PCW'(wb.a);   end
      default: ;
    endcase
    if (!br.taken) br.target = wb.pc + 1'b1;
    y_br = 32'(wb.pc + 1'b1);
  end
  logic br_v;
  assign br_v = HAS_BRANCH && wv[U_BRANCH];
  assign r_t[U_BRANCH] = `DR_ENC_T(br_v, y_br);
  assign r_f[U_BRANCH] = `DR_ENC_F(br_v, y_br);
  assign br_t = `DR_ENC_T(br_v, br);
  assign br_f = `DR_ENC_F(br_v, br);

  // MERGE
  logic [31:0] res_t, res_f;
  dr_merge #(.W(32), .N(NUNITS)) u_merge (.din_t(r_t), .din_f(r_f), .dout_t(res_t), .dout_f(res_f));

  // control and store data travel next to the result
  ex_bundle_t pass;
  assign pass = '{ctrl: in.ctrl, res: 32'd0, aux: in.b};
  ex_bundle_t pt, pf;
  always_comb begin
    pt     = ex_bundle_t'(`DR_ENC_T(in_valid, pass));
    pf     = ex_bundle_t'(`DR_ENC_F(in_valid, pass));
    pt.res = res_t;
    pf.res = res_f;
  end
  assign dout_t = pt;
  assign dout_f = pf;

  a_onehot_way: assert property (@(posedge clk) disable iff (!rst_n) $countones(wv) <= 1);
endmodule
