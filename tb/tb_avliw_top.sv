// End-to-end test of the two-way VLIW core at its default sizes.
//
// Loads a program that computes a 4-element dot product with MAC in a
// counted loop (loads, lock-queue stalls, a backward branch taken three
// times and not taken once), moves the accumulator to registers and
// stores it, calls a subroutine that exercises PACK, ADD.D, UNPACK, MUL,
// DIVU, shifts, logic gates and MAX, returns, stores a result and a
// completion marker and parks in a branch-to-self loop. Then compares
// registers, data memory and the accumulator with values worked out by
// hand, and checks that every pipeline mechanism occurred: parallel and
// split issue, lock stall, branch stall, taken and not-taken branches,
// wrong-path packet drops, MAC, loads and stores.
module tb_avliw_top;
  import avliw_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic        imem_we = 1'b0;
  logic [9:0]  imem_addr = '0;
  logic [63:0] imem_wdata = '0;
  logic        dmem_we = 1'b0;
  logic [9:0]  dmem_addr = '0;
  logic [31:0] dmem_wdata = '0, dmem_rdata;
  logic [4:0]  dbg_reg_idx = '0;
  logic [31:0] dbg_reg_val;
  logic [39:0] acc_val;
  logic evt_fetch, evt_issue, evt_split, evt_drop, evt_br_stall, evt_lock_stall, evt_nop_bypass,
        evt_br_taken, evt_br_not_taken, evt_retire, evt_mac, evt_load, evt_store;

  avliw_top dut (.*);

  int checks = 0, failures = 0;
  int n_fetch, n_issue, n_split, n_drop, n_brst, n_lock, n_tk, n_nt, n_ret, n_mac, n_ld, n_st, n_nop;
  longint ticks;

  always @(posedge clk) if (rst_n) begin
    ticks++;
    n_fetch += int'(evt_fetch);   n_issue += int'(evt_issue);   n_split += int'(evt_split);
    n_drop  += int'(evt_drop);    n_brst  += int'(evt_br_stall); n_lock += int'(evt_lock_stall);
    n_tk    += int'(evt_br_taken); n_nt   += int'(evt_br_not_taken); n_ret += int'(evt_retire);
    n_mac   += int'(evt_mac);     n_ld    += int'(evt_load);     n_st    += int'(evt_store);
    n_nop   += int'(evt_nop_bypass);
  end

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // register numbers
  localparam logic [4:0] Z = 5'd0, RA = 5'd3;
  localparam logic [4:0] SD0 = 5'd5, SD1 = 5'd6, SD2 = 5'd7;
  function automatic logic [4:0] G(input int n); return 5'(17 + n); endfunction

  localparam logic [31:0] NOP = 32'd0;
  function automatic logic [63:0] pk(input logic [31:0] b, input logic [31:0] a, input logic par);
    return {b[31:1], par, a};
  endfunction

  logic [63:0] prog [17];
  initial begin
    prog[0]  = pk(enc_i(OP_ADDI, G(1), Z, 16'd4),       enc_i(OP_ADDI, G(0), Z, 16'd0), 1);
    prog[1]  = pk(NOP,                                  enc_i(OP_LW, G(2), G(0), 16'd0), 1);
    prog[2]  = pk(NOP,                                  enc_i(OP_LW, G(3), G(0), 16'd4), 1);
    prog[3]  = pk(enc_m(Z, G(2), G(3), F_MAC),          enc_i(OP_ADDI, G(0), G(0), 16'd1), 1);
    prog[4]  = pk(enc_i(OP_SUBI, G(1), G(1), 16'd1),    NOP, 1);
    prog[5]  = pk(enc_i(OP_BNEQ, G(1), Z, 16'hFFFC),    NOP, 1);
    prog[6]  = pk(enc_m(G(4), Z, Z, F_ACCLDL),          enc_i(OP_SW, G(4), Z, 16'd8), 0);
    prog[7]  = pk(enc_m(G(5), Z, Z, F_ACCLDH),          enc_i(OP_ORI, G(6), Z, 16'h1234), 1);
    prog[8]  = pk(enc_i(OP_CALL, Z, Z, 16'd12),         enc_i(OP_ORI, G(7), Z, 16'h00FF), 1);
    prog[9]  = pk(enc_i(OP_ADDI, G(9), G(10), 16'd1),   NOP, 1);
    prog[10] = pk(enc_i(OP_ADDI, G(11), Z, 16'h0D0E),   enc_i(OP_SW, G(9), Z, 16'd9), 1);
    prog[11] = pk(enc_i(OP_BEQ, Z, Z, 16'd0),           enc_i(OP_SW, G(11), Z, 16'd10), 1);
    prog[12] = pk(enc_i(OP_PACK, SD0, G(6), 16'd0),     enc_i(OP_XORI, G(12), G(6), 16'hFFFF), 1);
    prog[12][31+32:0+32] = {OP_PACK, SD0, G(6), G(7), 5'd0, 6'b000000, 1'b1};
    prog[13] = pk(enc_r(SD1, SD0, SD0, F_ADDD),         enc_r(G(13), G(12), Z, F_SRL, 1'b0, 5'd4), 1);
    prog[14] = pk(enc_r(G(14), G(6), G(7), F_MUL),      enc_r(G(10), G(12), G(7), F_DIVU), 1);
    prog[15] = pk({OP_UNPACK, SD1, SD2, Z, 5'd0, 6'b100000, 1'b1}, enc_r(G(8), G(12), G(13), F_MAX), 1);
    prog[16] = pk(enc_i(OP_RETURN, Z, RA, 16'd0),       enc_r(G(2), G(6), G(7), F_AND), 1);
  end

  logic [31:0] data [8] = '{32'd3, -32'sd5, 32'd7, 32'd2, 32'd4, 32'd6, -32'sd1, 32'd9};

  task automatic rd_reg(input logic [4:0] r, output logic [31:0] v);
    dbg_reg_idx = r; #1; v = dbg_reg_val;
  endtask
  task automatic rd_mem(input int a, output logic [31:0] v);
    @(negedge clk); dmem_addr = 10'(a); @(negedge clk); @(negedge clk); v = dmem_rdata;
  endtask

  // watchdog
  initial begin
    #400000;
    failures++;
    $display("FAIL watchdog: program did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    // load program and data while in reset
    for (int i = 0; i < 17; i++) begin
      @(negedge clk); imem_we = 1'b1; imem_addr = 10'(i); imem_wdata = prog[i];
    end
    for (int i = 17; i < 32; i++) begin
      @(negedge clk); imem_addr = 10'(i); imem_wdata = '0;
    end
    @(negedge clk); imem_we = 1'b0;
    for (int i = 0; i < 12; i++) begin
      @(negedge clk); dmem_we = 1'b1; dmem_addr = 10'(i); dmem_wdata = (i < 8) ? data[i] : 32'd0;
    end
    @(negedge clk); dmem_we = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    // wait for the completion marker
    do rd_mem(10, v); while (v != 32'h0D0E);
    repeat (200) @(negedge clk);

    rd_reg(G(0), v);  check("g0 pointer", 64'(v), 64'(32'd4));
    rd_reg(G(1), v);  check("g1 counter", 64'(v), 64'(32'd0));
    rd_reg(G(3), v);  check("g3 last load", 64'(v), 64'(32'd9));
    rd_reg(G(4), v);  check("g4 ACCLDL", 64'(v), 64'(32'hFFFF_FFF9));
    rd_reg(G(5), v);  check("g5 ACCLDH", 64'(v), 64'(32'h0000_00FF));
    rd_reg(G(6), v);  check("g6 ORI", 64'(v), 64'(32'h1234));
    rd_reg(G(7), v);  check("g7 ORI", 64'(v), 64'(32'h00FF));
    rd_reg(SD0, v);   check("sd0 PACK", 64'(v), 64'(32'h1234_00FF));
    rd_reg(SD1, v);   check("sd1 ADD.D", 64'(v), 64'(32'h2468_01FE));
    rd_reg(SD2, v);   check("sd2 UNPACK", 64'(v), 64'(32'h01FE_0000));
    rd_reg(G(12), v); check("g12 XORI", 64'(v), 64'(32'h0000_EDCB));
    rd_reg(G(13), v); check("g13 SRL", 64'(v), 64'(32'h0000_0EDC));
    rd_reg(G(14), v); check("g14 MUL", 64'(v), 64'(32'h0012_21CC));
    rd_reg(G(10), v); check("g10 DIVU", 64'(v), 64'(32'd238));
    rd_reg(G(8), v);  check("g8 MAX", 64'(v), 64'(32'h0000_EDCB));
    rd_reg(G(2), v);  check("g2 AND", 64'(v), 64'(32'h34));
    rd_reg(RA, v);    check("ra CALL", 64'(v), 64'(32'd9));
    rd_reg(G(9), v);  check("g9 after RETURN", 64'(v), 64'(32'd239));
    rd_reg(G(11), v); check("g11 marker", 64'(v), 64'(32'h0D0E));
    check("accumulator", 64'(acc_val), 64'h00_FF_FFFF_FFF9);
    rd_mem(8, v);  check("mem[8] dot product", 64'(v), 64'(32'hFFFF_FFF9));
    rd_mem(9, v);  check("mem[9]", 64'(v), 64'(32'd239));
    rd_mem(0, v);  check("mem[0] untouched", 64'(v), 64'(32'd3));

    $display("events: fetch=%0d issue=%0d split=%0d drop=%0d br_stall=%0d lock_stall=%0d taken=%0d not_taken=%0d retire=%0d mac=%0d load=%0d store=%0d nop_bypass=%0d ticks=%0d",
             n_fetch, n_issue, n_split, n_drop, n_brst, n_lock, n_tk, n_nt, n_ret, n_mac, n_ld, n_st, n_nop, ticks);
    check("split issue happened", 64'(n_split >= 1), 64'd1);
    check("lock stall happened", 64'(n_lock >= 1), 64'd1);
    check("branch stall happened", 64'(n_brst >= 1), 64'd1);
    check("taken branches (3 loop + call + return + park)", 64'(n_tk >= 6), 64'd1);
    check("one not-taken branch", 64'(n_nt), 64'd1);
    check("wrong-path packets dropped", 64'(n_drop >= 1), 64'd1);
    check("four MACs", 64'(n_mac), 64'd4);
    check("eight loads", 64'(n_ld), 64'd8);
    check("NOP slots bypassed in ID/OF", 64'(n_nop >= 1), 64'd1);
    check("stores happened", 64'(n_st >= 3), 64'd1);
    check("every issued packet retired or is in flight", 64'(n_issue - n_ret <= 3), 64'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
