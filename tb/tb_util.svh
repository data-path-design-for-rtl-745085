// Common testbench scaffolding: a 10-time-unit clock, check counters, a
// CHECK macro and the closing TB_RESULT line.
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH
`define TB_CLOCK \
  logic clk = 1'b0; \
  logic rst_n = 1'b0; \
  always #5 clk = ~clk; \
  int checks = 0; \
  int failures = 0;
`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      $display("FAIL %s (line %0d)", msg, `__LINE__); \
    end \
  end
`define TB_DONE \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end
`define TB_WATCHDOG(n) \
  initial begin \
    repeat (n) @(posedge clk); \
    failures++; \
    $display("FAIL watchdog"); \
    `TB_DONE \
  end
`endif
