// Arithmetic unit of both function units (single-rail core).
//
// Computes one 32-bit result from operands a (Rs) and b (Rt, the
// immediate, or the old Rd for MOV.l/MOV.h) for the arithmetic, move and
// SIMD operations of the instruction set:
//   A_ADD/A_SUB        a + b, a - b (also ADDU/SUBU, ADDI, SUBI, MOVI and
//                      the LW/SW address); no overflow trap or saturation,
//                      so the signed and unsigned forms give the same bits
//   A_MIN/A_MAX/A_SLT  signed compare
//   A_ABS, A_NOT       |a|, ~a
//   A_MOV/MOVL/MOVH    a; {b.H, a.L}; {a.H, b.L}
//   A_ADDD/SUBD/MIND/MAXD/ABSD  the same on both 16-bit halves at once
// AND/OR/XOR are not here: they run in the dual-rail gate units.
// Purely combinational; the dual-rail wrapper around it in fu_ex1 gives it
// its handshake.
module alu
  import avliw_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  function automatic logic [15:0] smin16(input logic [15:0] x, z);
    return ($signed(x) < $signed(z)) ? x : z;
  endfunction
  function automatic logic [15:0] smax16(input logic [15:0] x, z);
    return ($signed(x) > $signed(z)) ? x : z;
  endfunction
  function automatic logic [15:0] abs16(input logic [15:0] x);
    return x[15] ? 16'(-x) : x;
  endfunction

  always_comb begin
    unique case (op)
      A_ADD:  y = a + b;
      A_SUB:  y = a - b;
      A_MIN:  y = ($signed(a) < $signed(b)) ? a : b;
      A_MAX:  y = ($signed(a) > $signed(b)) ? a : b;
      A_ABS:  y = a[31] ? 32'(-a) : a;
      A_SLT:  y = {31'd0, $signed(a) < $signed(b)};
      A_NOT:  y = ~a;
      A_MOV:  y = a;
      A_MOVL: y = {b[31:16], a[15:0]};
      A_MOVH: y = {a[31:16], b[15:0]};
      A_ADDD: y = {16'(a[31:16] + b[31:16]), 16'(a[15:0] + b[15:0])};
      A_SUBD: y = {16'(a[31:16] - b[31:16]), 16'(a[15:0] - b[15:0])};
      A_MIND: y = {smin16(a[31:16], b[31:16]), smin16(a[15:0], b[15:0])};
      A_MAXD: y = {smax16(a[31:16], b[31:16]), smax16(a[15:0], b[15:0])};
      A_ABSD: y = {abs16(a[31:16]), abs16(a[15:0])};
      default: y = a + b;
    endcase
  end
endmodule
