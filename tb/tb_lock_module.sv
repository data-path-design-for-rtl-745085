// Lock module test: random push / pop traffic against a queue model, with
// the hazard output compared for random source registers each cycle.
`include "tb_util.svh"
module tb_lock_module;
  `TB_CLOCK
  localparam int DEPTH = 4;
  logic [3:0][4:0] chk_idx;
  logic [3:0] chk_use;
  logic hazard, push, pop, full;
  logic [1:0][4:0] push_dst;
  logic [1:0][4:0] model [$];
  int n_haz;
  lock_module #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .chk_idx, .chk_use, .hazard, .push, .push_dst, .pop, .full);
  `TB_WATCHDOG(100000)

  function automatic bit ref_hazard();
    foreach (model[e])
      for (int s = 0; s < 4; s++)
        for (int l = 0; l < 2; l++)
          if (chk_use[s] && chk_idx[s] != 0 && model[e][l] == chk_idx[s]) return 1;
    return 0;
  endfunction

  initial begin
    push = 0; pop = 0; chk_idx = '0; chk_use = '0; push_dst = '0; n_haz = 0;
    #20 rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // small register numbers so that matches are frequent
      for (int s = 0; s < 4; s++) chk_idx[s] = 5'($urandom_range(0, 7));
      chk_use = 4'($urandom);
      push_dst[0] = 5'($urandom_range(0, 7)); push_dst[1] = 5'($urandom_range(0, 7));
      pop  = (model.size() > 0) && ($urandom_range(0, 2) == 0);
      push = (model.size() < DEPTH || pop) && ($urandom_range(0, 2) == 0);
      #1;
      `CHECK(hazard == ref_hazard(), $sformatf("hazard, %0d entries", model.size()))
      `CHECK(full == (model.size() == DEPTH), "full flag")
      if (hazard) n_haz++;
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(push_dst);
    end
    `CHECK(n_haz > 100, "hazards were exercised")
    `TB_DONE
  end
endmodule
