// Lock module: RAW hazard detection with one lock queue per datapath.
//
// Each queue is a FIFO of destination register numbers of instructions
// that have read their operands in ID/OF but not yet written back. A
// packet pushes one entry into each queue (0 when the slot writes
// nothing) after its operands have been fetched, and WB pops the oldest
// entry of both queues when that packet writes back. `hazard` is raised
// when any used source register of either slot (non-zero) matches an entry
// of either queue, so one datapath can be stalled by the other. Pushing
// only after the operand read avoids the self-deadlock of an instruction
// such as ADD $g3, $g3, $g1. DEPTH bounds the packets in flight between
// ID/OF and WB; with four-phase latches there can be at most three.
module lock_module #(
  parameter int DEPTH = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [3:0][4:0] chk_idx,
  input  logic [3:0]      chk_use,
  output logic            hazard,
  input  logic            push,
  input  logic [1:0][4:0] push_dst,  // [0]: LDST path, [1]: MAC path
  input  logic            pop,
  output logic            full
);
  localparam int CW = $clog2(DEPTH + 1);

  logic [1:0][DEPTH-1:0][4:0] q;
  logic [CW-1:0]              cnt;

  assign full = (cnt == CW'(DEPTH));

  always_comb begin
    hazard = 1'b0;
    for (int s = 0; s < 4; s++)
      for (int l = 0; l < 2; l++)
        for (int e = 0; e < DEPTH; e++)
          if (chk_use[s] && chk_idx[s] != 5'd0 && CW'(e) < cnt && q[l][e] == chk_idx[s])
            hazard = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      q   <= '0;
    end else begin
      if (pop && cnt != '0) begin
        for (int l = 0; l < 2; l++)
          for (int e = 0; e < DEPTH - 1; e++) q[l][e] <= q[l][e+1];
      end
      if (push) begin
        for (int l = 0; l < 2; l++)
          q[l][(pop && cnt != '0) ? cnt - 1'b1 : cnt] <= push_dst[l];
      end
      cnt <= cnt + CW'(push) - CW'(pop && cnt != '0);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
endmodule
