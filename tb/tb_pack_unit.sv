// Pack unit test: every select combination with random words.
`include "tb_util.svh"
module tb_pack_unit;
  `TB_CLOCK
  logic [31:0] rs, rt, rd;
  logic ss, st;
  pack_unit dut (.rs, .rt, .sel_s(ss), .sel_t(st), .rd);
  `TB_WATCHDOG(100000)
  initial begin
    for (int i = 0; i < 400; i++) begin
      rs = $urandom; rt = $urandom; ss = i[0]; st = i[1]; #1;
      `CHECK(rd[31:16] == (ss ? rs[31:16] : rs[15:0]), "Rd.H")
      `CHECK(rd[15:0]  == (st ? rt[31:16] : rt[15:0]), "Rd.L")
    end
    `TB_DONE
  end
endmodule
