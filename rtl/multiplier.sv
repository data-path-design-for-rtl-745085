// Signed 16 x 16 -> 32-bit multiplier, shift-and-add array.
//
// Each row is an (n+1)-bit adder (n = 16): it adds the multiplicand,
// sign-extended by one bit, to the running partial sum when bit i of the
// multiplier is 1, and subtracts it in the row of the multiplier's sign
// bit (two's-complement weight -2^15). The row's lowest sum bit is product
// bit i; the remaining bits, shifted down one place with the sign carried
// along in the top two positions, go on to the next row. No operand is
// widened to 32 bits. The original design groups these rows into four
// ripple-carry-save adders; this RTL writes them as sixteen ripple rows,
// which gives the same product.
// Used for MUL and for the MAC product Rs.L * Rt.L. Purely combinational.
module multiplier (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);
  always_comb begin
    logic [16:0] s;      // running partial sum, n+1 bits, two's complement
    logic [16:0] pp;     // partial product row, n+1 bits
    logic [17:0] sum;    // row result with one guard bit
    s = '0;
    p = '0;
    for (int i = 0; i < 16; i++) begin
      pp  = b[i] ? {a[15], a} : 17'd0;
      sum = (i == 15) ? {s[16], s} - {pp[16], pp} : {s[16], s} + {pp[16], pp};
      p[i] = sum[0];
      s    = sum[17:1];
    end
    p[31:16] = s[15:0];
  end
endmodule
