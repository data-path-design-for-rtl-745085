// Unsigned 32 / 32-bit divider, restoring array.
//
// Thirty-two rows each shift one dividend bit into the partial remainder,
// try to subtract the divisor and keep the difference when it does not
// borrow; the row's quotient bit is 1 when it was kept. Division by zero
// gives an all-ones quotient and the dividend as remainder (this
// implementation's choice). Purely combinational.
module divider (
  input  logic [31:0] n,
  input  logic [31:0] d,
  output logic [31:0] q,
  output logic [31:0] r
);
  always_comb begin
    logic [32:0] rem;
    logic [32:0] diff;
    rem = '0;
    for (int i = 31; i >= 0; i--) begin
      rem  = {rem[31:0], n[i]};
      diff = rem - {1'b0, d};
      q[i] = ~diff[32];
      if (!diff[32]) rem = diff;
    end
    r = rem[31:0];
  end
endmodule
