`include "dr_macros.svh"
// Memory interface between a dual-rail pipeline stage and a synchronous
// memory.
//
// The stage side is dual-rail: Read_Req (t: read, f: write), the address,
// the write data, the read data returned and W_Done. The memory side is
// single-rail: Read_REQ, Write_REQ, Addr, Write_data, Read_data.
// A read starts when Read_Req.t and every address bit are valid: Read_REQ
// is raised with the address taken from the true rails, and after DELAY1
// ticks (the matched delay "Delay 1" covering the memory's access time) the
// memory's word is returned on the dual-rail read-data lines. A write
// starts when Read_Req.f, the address and all write-data bits are valid:
// Write_REQ is held until, DELAY2 ticks later ("Delay 2"), W_Done.t rises.
// W_Done is returned on its true rail only (W_Done.f stays 0). When the
// request returns to empty, the read data and W_Done return to empty on
// the next evaluation. Reads and writes are never active together.
module mem_if #(
  parameter int AW     = 10,
  parameter int DW     = 32,
  parameter int DELAY1 = 2,
  parameter int DELAY2 = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // dual-rail stage side
  input  logic          rreq_t, rreq_f,
  input  logic [AW-1:0] addr_t, addr_f,
  input  logic [DW-1:0] wdata_t, wdata_f,
  output logic [DW-1:0] rdata_t, rdata_f,
  output logic          wdone_t, wdone_f,
  // synchronous memory side
  output logic          m_re,
  output logic          m_we,
  output logic [AW-1:0] m_addr,
  output logic [DW-1:0] m_wdata,
  input  logic [DW-1:0] m_rdata
);
  localparam int CW = $clog2(((DELAY1 > DELAY2) ? DELAY1 : DELAY2) + 2);

  logic          addr_ok, wdata_ok, read_go, write_go, r_done, w_done;
  logic [CW-1:0] cnt;

  assign addr_ok  = `DR_VALID(addr_t, addr_f);
  assign wdata_ok = `DR_VALID(wdata_t, wdata_f);
  assign read_go  = rreq_t && addr_ok;
  assign write_go = rreq_f && addr_ok && wdata_ok;
  assign r_done   = read_go  && (cnt >= CW'(DELAY1));
  assign w_done   = write_go && (cnt >= CW'(DELAY2));

  assign m_addr  = addr_t;
  assign m_wdata = wdata_t;
  assign m_re    = read_go;
  assign m_we    = write_go && !w_done;

  assign rdata_t = `DR_ENC_T(r_done, m_rdata);
  assign rdata_f = `DR_ENC_F(r_done, m_rdata);
  assign wdone_t = w_done;
  assign wdone_f = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       cnt <= '0;
    else if (!(read_go || write_go))  cnt <= '0;
    else if (cnt != '1)               cnt <= cnt + 1'b1;
  end

  a_not_both: assert property (@(posedge clk) disable iff (!rst_n) !(rreq_t && rreq_f));
endmodule
