// ALU test: random operands for every operation, compared with a reference
// written independently here from the instruction definitions.
`include "tb_util.svh"
module tb_alu;
  import avliw_pkg::*;
  `TB_CLOCK
  alu_op_e op;
  logic [31:0] a, b, y;
  alu dut (.op, .a, .b, .y);
  `TB_WATCHDOG(100000)

  function automatic logic [15:0] h(input logic [31:0] x, input bit hi); return hi ? x[31:16] : x[15:0]; endfunction
  function automatic logic [31:0] ref_y(input alu_op_e o, input logic [31:0] x, z);
    int sx, sz;
    sx = x; sz = z;
    case (o)
      A_ADD:  return x + z;
      A_SUB:  return x - z;
      A_MIN:  return (sx < sz) ? x : z;
      A_MAX:  return (sx > sz) ? x : z;
      A_ABS:  return (sx < 0) ? -x : x;
      A_SLT:  return (sx < sz) ? 1 : 0;
      A_NOT:  return ~x;
      A_MOV:  return x;
      A_MOVL: return {z[31:16], x[15:0]};
      A_MOVH: return {x[31:16], z[15:0]};
      default: begin
        logic [15:0] r [2];
        for (int k = 0; k < 2; k++) begin
          shortint p, q;
          p = h(x, k == 1); q = h(z, k == 1);
          case (o)
            A_ADDD: r[k] = p + q;
            A_SUBD: r[k] = p - q;
            A_MIND: r[k] = (p < q) ? p : q;
            A_MAXD: r[k] = (p > q) ? p : q;
            A_ABSD: r[k] = (p < 0) ? -p : p;
            default: r[k] = 'x;
          endcase
        end
        return {r[1], r[0]};
      end
    endcase
  endfunction

  initial begin
    alu_op_e ops [15] = '{A_ADD, A_SUB, A_MIN, A_MAX, A_ABS, A_SLT, A_NOT, A_MOV, A_MOVL, A_MOVH,
                          A_ADDD, A_SUBD, A_MIND, A_MAXD, A_ABSD};
    for (int i = 0; i < 3000; i++) begin
      op = ops[i % 15];
      a = $urandom; b = $urandom;
      if (i % 7 == 0) b = a;
      #1;
      `CHECK(y == ref_y(op, a, b), $sformatf("%s a=%h b=%h y=%h", op.name(), a, b, y))
    end
    // a few worked examples
    op = A_ADDD; a = 32'h7FFF_0001; b = 32'h0001_FFFF; #1;
    `CHECK(y == 32'h8000_0000, "ADD.D halves wrap independently")
    op = A_ABSD; a = 32'hFFFE_0005; #1;
    `CHECK(y == 32'h0002_0005, "ABS.D")
    `TB_DONE
  end
endmodule
