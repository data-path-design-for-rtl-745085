// Dual-rail MERGE of N inputs, W bits.
//
// Each output rail is the OR of the matching rails of all inputs. It is
// correct because at most one function block behind a DeMUX carries a
// valid word at a time; all others are empty.
// Purely combinational.
module dr_merge #(
  parameter int W = 32,
  parameter int N = 2
) (
  input  logic [N-1:0][W-1:0] din_t, din_f,
  output logic [W-1:0]        dout_t, dout_f
);
  always_comb begin
    dout_t = '0;
    dout_f = '0;
    for (int k = 0; k < N; k++) begin
      dout_t |= din_t[k];
      dout_f |= din_f[k];
    end
  end
endmodule
