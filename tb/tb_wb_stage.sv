// Write-back stage test: random pairs of result words arrive four-phase.
// For each pair the stage must pulse the register writes, the accumulator
// write and the lock-queue pop exactly once with the word's contents, and
// complete the handshake.
`include "dr_macros.svh"
`include "tb_util.svh"
module tb_wb_stage;
  import avliw_pkg::*;
  `TB_CLOCK
  localparam int W = 2 * $bits(wb_bundle_t);
  logic [W-1:0] din_t, din_f;
  logic ack, acc_we, lk_pop;
  logic [1:0] rf_we;
  logic [1:0][4:0] rf_idx;
  logic [1:0][31:0] rf_data;
  logic [ACCW-1:0] acc_wdata;
  wb_stage dut (.clk, .rst_n, .din_t, .din_f, .ack, .rf_we, .rf_idx, .rf_data, .acc_we, .acc_wdata, .lk_pop);
  `TB_WATCHDOG(200000)

  wb_bundle_t cur_a, cur_b;
  int n_pop, n_we0, n_we1, n_acc;
  always @(posedge clk) if (rst_n) begin
    if (lk_pop) n_pop++;
    if (rf_we[0]) begin n_we0++; `CHECK(rf_idx[0] == cur_a.dst && rf_data[0] == cur_a.val, "LDST write") end
    if (rf_we[1]) begin n_we1++; `CHECK(rf_idx[1] == cur_b.dst && rf_data[1] == cur_b.val, "MAC write") end
    if (acc_we)   begin n_acc++; `CHECK(acc_wdata == cur_b.acc, "accumulator write") end
  end

  initial begin
    din_t = '0; din_f = '0; n_pop = 0; n_we0 = 0; n_we1 = 0; n_acc = 0;
    #20 rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      int e_pop, e0, e1, ea;
      cur_a = '{wr: 1'($urandom), dst: 5'($urandom), val: $urandom, acc_we: 1'b0, acc: '0};
      cur_b = '{wr: 1'($urandom), dst: 5'($urandom), val: $urandom, acc_we: 1'($urandom),
                acc: {8'($urandom), 32'($urandom)}};
      e_pop = n_pop + 1; e0 = n_we0 + cur_a.wr; e1 = n_we1 + cur_b.wr; ea = n_acc + cur_b.acc_we;
      @(negedge clk);
      din_t = {cur_b, cur_a}; din_f = ~{cur_b, cur_a};
      while (!ack) @(negedge clk);
      repeat ($urandom_range(0, 3)) @(negedge clk);
      din_t = '0; din_f = '0;
      while (ack) @(negedge clk);
      `CHECK(n_pop == e_pop && n_we0 == e0 && n_we1 == e1 && n_acc == ea, "one write pulse per word")
    end
    `TB_DONE
  end
endmodule
