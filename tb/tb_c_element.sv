// C-element test: random input pairs on 4 independent bits, compared with
// Table 2.2 of the C-element (agree -> follow, differ -> hold); reset clears.
`include "tb_util.svh"
module tb_c_element;
  `TB_CLOCK
  logic [3:0] a = '0, b = '0, z, model;
  c_element #(.W(4)) dut (.clk, .rst_n, .a, .b, .z);
  `TB_WATCHDOG(5000)
  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    `CHECK(z == 4'b0, "reset value")
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      a = 4'($urandom); b = 4'($urandom);
      for (int k = 0; k < 4; k++)
        if (a[k] == b[k]) model[k] = a[k];
      @(negedge clk);
      `CHECK(z == model, $sformatf("z=%b model=%b", z, model))
    end
    // explicit hold cases
    @(negedge clk); a = 4'hF; b = 4'hF; @(negedge clk); @(negedge clk);
    a = 4'h0; @(negedge clk); @(negedge clk);
    `CHECK(z == 4'hF, "holds 1 when inputs differ")
    b = 4'h0; @(negedge clk); @(negedge clk);
    `CHECK(z == 4'h0, "falls when both 0")
    `TB_DONE
  end
endmodule
