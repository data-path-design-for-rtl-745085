// Dual-rail gate test: AND, OR and XOR arrays get random valid operands;
// the output must stay empty while only one operand is valid, give the
// Boolean result once both are, hold it while only one returns to empty,
// and return to empty when both are empty (Table 3.4 for AND).
`include "tb_util.svh"
module tb_dr_gate2;
  `TB_CLOCK
  localparam int W = 8;
  logic [W-1:0] a_t = '0, a_f = '0, b_t = '0, b_f = '0;
  logic [W-1:0] and_t, and_f, or_t, or_f, xor_t, xor_f;
  dr_gate2 #(.W(W), .OP("AND")) u_and (.clk, .rst_n, .a_t, .a_f, .b_t, .b_f, .y_t(and_t), .y_f(and_f));
  dr_gate2 #(.W(W), .OP("OR"))  u_or  (.clk, .rst_n, .a_t, .a_f, .b_t, .b_f, .y_t(or_t),  .y_f(or_f));
  dr_gate2 #(.W(W), .OP("XOR")) u_xor (.clk, .rst_n, .a_t, .a_f, .b_t, .b_f, .y_t(xor_t), .y_f(xor_f));
  `TB_WATCHDOG(20000)
  initial begin
    logic [W-1:0] a, b;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      a = W'($urandom); b = W'($urandom);
      @(negedge clk); a_t = a; a_f = ~a;
      @(negedge clk); @(negedge clk);
      `CHECK((and_t | and_f | or_t | or_f | xor_t | xor_f) == '0, "empty with one operand")
      b_t = b; b_f = ~b;
      @(negedge clk); @(negedge clk);
      `CHECK(and_t == (a & b) && and_f == ~(a & b), "AND")
      `CHECK(or_t  == (a | b) && or_f  == ~(a | b), "OR")
      `CHECK(xor_t == (a ^ b) && xor_f == ~(a ^ b), "XOR")
      a_t = '0; a_f = '0;
      @(negedge clk); @(negedge clk);
      `CHECK(and_t == (a & b) && xor_t == (a ^ b), "holds while one operand empty")
      b_t = '0; b_f = '0;
      @(negedge clk); @(negedge clk);
      `CHECK((and_t | and_f | or_t | or_f | xor_t | xor_f) == '0, "empty after both empty")
    end
    `TB_DONE
  end
endmodule
