// Barrel shifter test: random values and amounts against >> and >>>.
`include "tb_util.svh"
module tb_barrel_shifter;
  `TB_CLOCK
  logic [31:0] a, y;
  logic [4:0] sh;
  logic ar;
  barrel_shifter dut (.a, .shamt(sh), .arith(ar), .y);
  `TB_WATCHDOG(100000)
  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = $urandom; sh = 5'($urandom); ar = 1'($urandom);
      #1;
      `CHECK(y == (ar ? 32'($signed(a) >>> sh) : (a >> sh)), $sformatf("a=%h sh=%0d ar=%b", a, sh, ar))
    end
    `TB_DONE
  end
endmodule
