`include "dr_macros.svh"
// Write-back (WB) stage, the sink of the pipeline.
//
// When the WB latch holds a complete word for both datapaths (the path
// that finished early has waited here for the other), the stage writes
// each path's result into the register bank through that path's write
// port, writes the MAC result into the accumulator, pops one entry from
// both lock queues and raises its acknowledge. The acknowledge falls
// again when the latch has returned to empty. One tick per phase.
// Input layout: {MAC path (B) word, LDST path (A) word}.
module wb_stage
  import avliw_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [2*$bits(wb_bundle_t)-1:0] din_t, din_f,
  output logic                            ack,
  output logic [1:0]                      rf_we,    // [0] LDST, [1] MAC
  output logic [1:0][4:0]                 rf_idx,
  output logic [1:0][31:0]                rf_data,
  output logic                            acc_we,
  output logic [ACCW-1:0]                 acc_wdata,
  output logic                            lk_pop
);
  wb_bundle_t wa, wb;
  logic       fire;
  assign {wb, wa} = din_t;
  assign fire     = `DR_VALID(din_t, din_f) && !ack;

  assign rf_we[0]   = fire && wa.wr;
  assign rf_we[1]   = fire && wb.wr;
  assign rf_idx[0]  = wa.dst;
  assign rf_idx[1]  = wb.dst;
  assign rf_data[0] = wa.val;
  assign rf_data[1] = wb.val;
  assign acc_we     = fire && wb.acc_we;
  assign acc_wdata  = wb.acc;
  assign lk_pop     = fire;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  ack <= 1'b0;
    else if (fire)                               ack <= 1'b1;
    else if (ack && `DR_EMPTY(din_t, din_f))     ack <= 1'b0;
  end
endmodule
