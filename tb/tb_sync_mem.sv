// Synchronous memory test: random writes and reads on both ports against
// an array model; a read returns the data one clock after re.
`include "tb_util.svh"
module tb_sync_mem;
  `TB_CLOCK
  localparam int AW = 6;
  logic re, we, ext_we;
  logic [AW-1:0] addr, ext_addr;
  logic [31:0] wdata, rdata, ext_wdata, ext_rdata;
  logic [31:0] model [2**AW];
  sync_mem #(.DW(32), .AW(AW)) dut (.clk, .re, .we, .addr, .wdata, .rdata, .ext_we, .ext_addr, .ext_wdata, .ext_rdata);
  `TB_WATCHDOG(100000)
  initial begin
    re = 0; we = 0; ext_we = 0; addr = 0; ext_addr = 0; wdata = 0; ext_wdata = 0;
    #20 rst_n = 1'b1;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk); ext_we = 1; ext_addr = AW'(i); ext_wdata = $urandom; model[i] = ext_wdata;
    end
    @(negedge clk); ext_we = 0;
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] exp_d, exp_e;
      @(negedge clk);
      addr = AW'($urandom); ext_addr = AW'($urandom);
      re = 0; we = 0;
      if ($urandom_range(0, 1)) begin
        we = 1; wdata = $urandom;
      end else re = 1;
      exp_d = model[addr];
      exp_e = model[ext_addr];
      @(posedge clk);
      if (we) model[addr] = wdata;
      #1 if (re) `CHECK(rdata == exp_d, $sformatf("core read %h", addr))
      `CHECK(ext_rdata == exp_e, "ext port read")
    end
    `TB_DONE
  end
endmodule
