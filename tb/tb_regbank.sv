// Register bank test: random reads on four ports and writes on two ports
// against an array model; $0 stays zero and port 1 wins a double write.
`include "tb_util.svh"
module tb_regbank;
  `TB_CLOCK
  logic [3:0][4:0] rd_idx;
  logic [3:0][31:0] rd_data;
  logic [1:0] we;
  logic [1:0][4:0] wr_idx;
  logic [1:0][31:0] wr_data;
  logic [4:0] dbg_idx;
  logic [31:0] dbg_data;
  logic [31:0] model [32];
  regbank dut (.clk, .rst_n, .rd_idx, .rd_data, .we, .wr_idx, .wr_data, .dbg_idx, .dbg_data);
  `TB_WATCHDOG(100000)
  initial begin
    we = 0; rd_idx = '0; wr_idx = '0; wr_data = '0; dbg_idx = '0;
    for (int r = 0; r < 32; r++) model[r] = 0;
    #20 rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      for (int p = 0; p < 4; p++) rd_idx[p] = 5'($urandom);
      dbg_idx = 5'($urandom);
      #1;
      for (int p = 0; p < 4; p++) `CHECK(rd_data[p] == model[rd_idx[p]], $sformatf("read port %0d r%0d", p, rd_idx[p]))
      `CHECK(dbg_data == model[dbg_idx], "debug read")
      we = 2'($urandom);
      wr_idx[0] = 5'($urandom); wr_idx[1] = (i % 5 == 0) ? wr_idx[0] : 5'($urandom);
      wr_data[0] = $urandom; wr_data[1] = $urandom;
      @(posedge clk);
      for (int p = 0; p < 2; p++) if (we[p] && wr_idx[p] != 0) model[wr_idx[p]] = wr_data[p];
      #1 we = 0;
    end
    `TB_DONE
  end
endmodule
