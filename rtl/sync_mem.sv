// Synchronous single-clock memory with a core port and a load/debug port.
//
// Stands for the ordinary synchronous SRAM the core talks to through its
// memory interface (instruction memory: 64-bit words; data memory: 32-bit
// words). Port 1 (core) reads with one cycle of latency when re is high
// and writes when we is high. Port 2 (ext) lets the outside world load
// programs and data and read results, also with one cycle of read latency.
// The contents are not reset. If both ports write the same word in one
// cycle, the core port wins.
module sync_mem #(
  parameter int DW = 32,
  parameter int AW = 10
) (
  input  logic          clk,
  // core port
  input  logic          re,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata,
  // load / debug port
  input  logic          ext_we,
  input  logic [AW-1:0] ext_addr,
  input  logic [DW-1:0] ext_wdata,
  output logic [DW-1:0] ext_rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (ext_we) mem[ext_addr] <= ext_wdata;
    if (we)     mem[addr]     <= wdata;
    if (re)     rdata         <= mem[addr];
    ext_rdata <= mem[ext_addr];
  end
endmodule
