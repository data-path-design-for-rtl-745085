// Completion detector test: done rises only when every bit is valid, stays
// up while some bits are empty again, falls only when all are empty.
`include "tb_util.svh"
module tb_dr_completion;
  `TB_CLOCK
  localparam int W = 12;
  logic [W-1:0] d_t = '0, d_f = '0;
  logic done;
  dr_completion #(.W(W)) dut (.clk, .rst_n, .d_t, .d_f, .done);
  `TB_WATCHDOG(50000)
  initial begin
    logic [W-1:0] v, order;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 100; i++) begin
      v = W'($urandom);
      // bits arrive one at a time
      for (int k = 0; k < W; k++) begin
        d_t[k] = v[k]; d_f[k] = ~v[k];
        @(negedge clk);
        `CHECK(done == (k == W - 1), $sformatf("done after %0d bits", k + 1))
      end
      for (int k = 0; k < W; k++) begin
        d_t[k] = 1'b0; d_f[k] = 1'b0;
        @(negedge clk);
        `CHECK(done == (k != W - 1), $sformatf("done with %0d bits empty", k + 1))
      end
    end
    `TB_DONE
  end
endmodule
