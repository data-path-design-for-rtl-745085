// Register bank shared by the two datapaths.
//
// 32 x 32-bit registers: $0 (reads as zero, writes ignored), $sp, $rp,
// $ra, $bb, twelve SIMD registers $sd0..$sd11 (each usable as two 16-bit
// halves) and fifteen general-purpose registers $g0..$g14. The register
// number alone decides the role; the hardware treats all non-zero
// registers alike. Four read ports (two per datapath, read
// combinationally by ID/OF) and two write ports (one per datapath, written
// by WB). If both write ports name the same register, the MAC path's
// write (port 1) wins. All registers reset to 0.
module regbank
  import avliw_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [3:0][4:0] rd_idx,
  output logic [3:0][31:0] rd_data,
  input  logic [1:0]      we,
  input  logic [1:0][4:0] wr_idx,
  input  logic [1:0][31:0] wr_data,
  input  logic [4:0]      dbg_idx,
  output logic [31:0]     dbg_data
);
  logic [31:0] r [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) r[i] <= '0;
    end else begin
      for (int p = 0; p < 2; p++)
        if (we[p] && wr_idx[p] != REG_ZERO) r[wr_idx[p]] <= wr_data[p];
    end
  end

  always_comb begin
    for (int p = 0; p < 4; p++)
      rd_data[p] = (rd_idx[p] == REG_ZERO) ? 32'd0 : r[rd_idx[p]];
    dbg_data = (dbg_idx == REG_ZERO) ? 32'd0 : r[dbg_idx];
  end
endmodule
