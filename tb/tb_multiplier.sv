// Multiplier test: random and corner 16-bit signed operands against the
// simulator's signed product.
`include "tb_util.svh"
module tb_multiplier;
  `TB_CLOCK
  logic [15:0] a, b;
  logic [31:0] p;
  multiplier dut (.a, .b, .p);
  `TB_WATCHDOG(100000)
  initial begin
    logic [15:0] corner [5] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF};
    for (int i = 0; i < 25; i++) begin
      a = corner[i / 5]; b = corner[i % 5]; #1;
      `CHECK($signed(p) == $signed(a) * $signed(b), $sformatf("%h*%h", a, b))
    end
    for (int i = 0; i < 3000; i++) begin
      a = 16'($urandom); b = 16'($urandom); #1;
      `CHECK($signed(p) == $signed(a) * $signed(b), $sformatf("%h*%h=%h", a, b, p))
    end
    `TB_DONE
  end
endmodule
