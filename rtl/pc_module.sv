`include "dr_macros.svh"
// Program Counter module and fetch request source of the PF stage.
//
// Holds the address of the next 64-bit instruction packet. When the PF
// latch is empty (ack = 0) it drives a fetch token: the PC on dual-rail
// lines together with a read request (Read_Req.t) for the instruction
// memory interface. When the PF latch acknowledges the fetched packet it
// withdraws the token and steps the PC with its increment unit (PC + 1),
// or, if a taken branch has been reported since the last step, loads the
// branch target instead. A redirect that arrives while no token is out is
// applied at once. Fetching is speculative: packets fetched from the old
// path carry their own PC and are dropped by the dispatch stage.
module pc_module
  import avliw_pkg::*;
#(
  parameter logic [PCW-1:0] RESET_PC = '0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ack,          // completion of the PF latch
  input  logic           redirect,     // taken branch, one-tick pulse
  input  logic [PCW-1:0] redirect_pc,
  output logic [PCW-1:0] pc_t, pc_f,
  output logic           rreq_t, rreq_f
);
  logic           tok, pend;
  logic [PCW-1:0] pc, pend_pc;

  assign pc_t   = `DR_ENC_T(tok, pc);
  assign pc_f   = `DR_ENC_F(tok, pc);
  assign rreq_t = tok;
  assign rreq_f = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok     <= 1'b0;
      pend    <= 1'b0;
      pc      <= RESET_PC;
      pend_pc <= '0;
    end else begin
      if (!tok && !ack) begin
        if (redirect) pc <= redirect_pc;
        tok <= 1'b1;
      end else if (tok && ack) begin
        tok  <= 1'b0;
        pend <= 1'b0;
        if (redirect)  pc <= redirect_pc;
        else if (pend) pc <= pend_pc;
        else           pc <= pc + 1'b1;
      end else if (redirect) begin
        if (tok) begin
          pend    <= 1'b1;
          pend_pc <= redirect_pc;
        end else begin
          pc <= redirect_pc;
        end
      end
    end
  end
endmodule
