// Unpack unit test: for each placement and source half, the chosen half of
// Rd lands in the chosen half of the target and the other half is kept.
`include "tb_util.svh"
module tb_unpack_unit;
  `TB_CLOCK
  logic [31:0] rd, tg, y;
  logic ph, sh;
  unpack_unit dut (.rd, .tgt(tg), .put_h(ph), .src_h(sh), .y);
  `TB_WATCHDOG(100000)
  initial begin
    logic [15:0] half;
    for (int i = 0; i < 400; i++) begin
      rd = $urandom; tg = $urandom; ph = i[0]; sh = i[1]; #1;
      half = sh ? rd[31:16] : rd[15:0];
      if (ph) `CHECK(y == {half, tg[15:0]}, "into high half")
      else    `CHECK(y == {tg[31:16], half}, "into low half")
    end
    `TB_DONE
  end
endmodule
