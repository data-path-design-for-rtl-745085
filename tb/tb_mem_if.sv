// Memory interface test: dual-rail read and write requests are sent through
// the interface to a synchronous memory. Checks the returned data, the
// write done rail, the DELAY1/DELAY2 latencies and the return to empty.
`include "tb_util.svh"
module tb_mem_if;
  `TB_CLOCK
  localparam int AW = 6, D1 = 2, D2 = 1;
  logic rreq_t, rreq_f, wdone_t, wdone_f, m_re, m_we, ext_we;
  logic [AW-1:0] addr_t, addr_f, m_addr, ext_addr;
  logic [31:0] wdata_t, wdata_f, rdata_t, rdata_f, m_wdata, m_rdata, ext_wdata, ext_rdata;
  logic [31:0] model [2**AW];

  mem_if #(.AW(AW), .DW(32), .DELAY1(D1), .DELAY2(D2)) dut (
    .clk, .rst_n, .rreq_t, .rreq_f, .addr_t, .addr_f, .wdata_t, .wdata_f,
    .rdata_t, .rdata_f, .wdone_t, .wdone_f, .m_re, .m_we, .m_addr, .m_wdata, .m_rdata);
  sync_mem #(.DW(32), .AW(AW)) mem (
    .clk, .re(m_re), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata),
    .ext_we, .ext_addr, .ext_wdata, .ext_rdata);
  `TB_WATCHDOG(200000)

  task automatic go_empty();
    @(negedge clk);
    rreq_t = 0; rreq_f = 0; addr_t = '0; addr_f = '0; wdata_t = '0; wdata_f = '0;
    #1 `CHECK(rdata_t == '0 && rdata_f == '0 && !wdone_t && !wdone_f, "outputs return to empty")
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  initial begin
    int n;
    rreq_t = 0; rreq_f = 0; addr_t = '0; addr_f = '0; wdata_t = '0; wdata_f = '0;
    ext_we = 0; ext_addr = '0; ext_wdata = '0;
    #20 rst_n = 1'b1;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk); ext_we = 1; ext_addr = AW'(i); ext_wdata = $urandom; model[i] = ext_wdata;
    end
    @(negedge clk); ext_we = 0;
    for (int i = 0; i < 600; i++) begin
      logic [AW-1:0] a;
      logic [31:0] w;
      a = AW'($urandom); w = $urandom;
      @(negedge clk);
      addr_t = a; addr_f = ~a;
      if ($urandom_range(0, 1)) begin
        rreq_t = 1;
        n = 0;
        while (!(|(rdata_t | rdata_f)) && n < 20) begin @(negedge clk); n++; end
        `CHECK(n == D1, $sformatf("read latency %0d", n))
        `CHECK((rdata_t | rdata_f) == '1 && (rdata_t & rdata_f) == '0, "read data fully dual-rail")
        `CHECK(rdata_t == model[a], $sformatf("read data @%h", a))
      end else begin
        wdata_t = w; wdata_f = ~w; rreq_f = 1;
        n = 0;
        while (!wdone_t && n < 20) begin @(negedge clk); n++; end
        `CHECK(n == D2, $sformatf("write latency %0d", n))
        model[a] = w;
      end
      go_empty();
    end
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk); ext_addr = AW'(i);
      @(negedge clk);
      `CHECK(ext_rdata == model[i], "memory contents after writes")
    end
    `TB_DONE
  end
endmodule
