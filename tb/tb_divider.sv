// Divider test: random unsigned operands against / and %, small divisors
// included, and the chosen divide-by-zero result.
`include "tb_util.svh"
module tb_divider;
  `TB_CLOCK
  logic [31:0] n, d, q, r;
  divider dut (.n, .d, .q, .r);
  `TB_WATCHDOG(100000)
  initial begin
    for (int i = 0; i < 3000; i++) begin
      n = $urandom; d = (i % 3 == 0) ? 32'($urandom_range(1, 300)) : $urandom;
      if (d == 0) d = 1;
      #1;
      `CHECK(q == n / d && r == n % d, $sformatf("%h/%h", n, d))
    end
    n = 32'd1234; d = 0; #1;
    `CHECK(q == 32'hFFFF_FFFF && r == 32'd1234, "divide by zero")
    `TB_DONE
  end
endmodule
