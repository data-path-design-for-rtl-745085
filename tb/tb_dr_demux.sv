// DeMUX test: a valid word with a 1-of-3 select appears on the selected
// output only; the others stay empty; all return to empty with the spacer.
`include "tb_util.svh"
module tb_dr_demux;
  `TB_CLOCK
  localparam int W = 8, N = 3;
  logic [W-1:0] d_t = '0, d_f = '0;
  logic [N-1:0] sel = '0;
  logic [N-1:0][W-1:0] o_t, o_f;
  dr_demux #(.W(W), .N(N)) dut (.clk, .rst_n, .din_t(d_t), .din_f(d_f), .sel, .dout_t(o_t), .dout_f(o_f));
  `TB_WATCHDOG(20000)
  initial begin
    logic [W-1:0] v;
    int k;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 150; i++) begin
      v = W'($urandom); k = $urandom_range(0, N - 1);
      @(negedge clk); d_t = v; d_f = ~v; sel = N'(1) << k;
      @(negedge clk); @(negedge clk);
      for (int j = 0; j < N; j++)
        if (j == k) `CHECK(o_t[j] == v && o_f[j] == ~v, "selected output carries word")
        else        `CHECK((o_t[j] | o_f[j]) == '0, "other outputs empty")
      d_t = '0; d_f = '0; sel = '0;
      @(negedge clk); @(negedge clk);
      `CHECK((o_t | o_f) == '0, "all empty")
    end
    `TB_DONE
  end
endmodule
