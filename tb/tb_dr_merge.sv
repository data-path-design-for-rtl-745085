// MERGE test: with one input valid and the rest empty the output equals
// the valid input; with all empty the output is empty.
`include "tb_util.svh"
module tb_dr_merge;
  `TB_CLOCK
  localparam int W = 8, N = 4;
  logic [N-1:0][W-1:0] i_t, i_f;
  logic [W-1:0] o_t, o_f;
  dr_merge #(.W(W), .N(N)) dut (.din_t(i_t), .din_f(i_f), .dout_t(o_t), .dout_f(o_f));
  `TB_WATCHDOG(20000)
  initial begin
    logic [W-1:0] v;
    int k;
    for (int i = 0; i < 200; i++) begin
      v = W'($urandom); k = $urandom_range(0, N - 1);
      i_t = '0; i_f = '0;
      @(negedge clk);
      `CHECK(o_t == '0 && o_f == '0, "empty")
      i_t[k] = v; i_f[k] = ~v;
      @(negedge clk);
      `CHECK(o_t == v && o_f == ~v, $sformatf("input %0d passed", k))
    end
    `TB_DONE
  end
endmodule
