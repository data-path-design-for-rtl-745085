// Barrel shifter: logical (SRL) or arithmetic (SRA) right shift of a by
// 0..31 places, built as five stages of 1, 2, 4, 8 and 16 places.
// Only right shifts appear in the instruction set, so only they are built.
// Purely combinational.
module barrel_shifter (
  input  logic [31:0] a,
  input  logic [4:0]  shamt,
  input  logic        arith,     // 1: SRA (sign fill), 0: SRL (zero fill)
  output logic [31:0] y
);
  logic [5:0][31:0] s;
  logic             fill;
  assign fill = arith & a[31];
  assign s[0] = a;
  for (genvar k = 0; k < 5; k++) begin : g_stage
    assign s[k+1] = shamt[k] ? {{(1 << k){fill}}, s[k][31:(1 << k)]} : s[k];
  end
  assign y = s[5];
endmodule
