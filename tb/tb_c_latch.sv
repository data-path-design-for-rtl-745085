// C-latch test: a three-latch Muller pipeline between a four-phase source
// and a sink that acknowledges with random extra delay. Checks that every
// word arrives once, in order and intact, that the source's handshake
// never sees a change before its acknowledge, and that while the sink
// stalls the three latches take only two distinct words (a full Muller
// pipeline holds a word in every other latch).
`include "tb_util.svh"
module tb_c_latch;
  `TB_CLOCK
  localparam int W = 16;
  logic [W-1:0] s_t = '0, s_f = '0;
  logic [2:0][W-1:0] q_t, q_f;
  logic [2:0] ack;
  logic sink_ack = 1'b0;

  c_latch #(.W(W)) l0 (.clk, .rst_n, .din_t(s_t), .din_f(s_f), .ack_next(ack[1]),
                       .dout_t(q_t[0]), .dout_f(q_f[0]), .ack_prev(ack[0]));
  c_latch #(.W(W)) l1 (.clk, .rst_n, .din_t(q_t[0]), .din_f(q_f[0]), .ack_next(ack[2]),
                       .dout_t(q_t[1]), .dout_f(q_f[1]), .ack_prev(ack[1]));
  c_latch #(.W(W)) l2 (.clk, .rst_n, .din_t(q_t[1]), .din_f(q_f[1]), .ack_next(sink_ack),
                       .dout_t(q_t[2]), .dout_f(q_f[2]), .ack_prev(ack[2]));

  localparam int N = 60;
  logic [W-1:0] sent [N];
  int n_rx = 0, n_tx = 0;
  logic sink_en = 1'b0;
  `TB_WATCHDOG(40000)

  // sink
  initial begin
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (sink_en && !sink_ack && (&(q_t[2] | q_f[2]))) begin
        `CHECK(q_t[2] == sent[n_rx] && q_f[2] == ~sent[n_rx], $sformatf("word %0d", n_rx))
        n_rx++;
        repeat ($urandom_range(0, 4)) @(negedge clk);
        sink_ack = 1'b1;
      end else if (sink_ack && ~|(q_t[2] | q_f[2])) begin
        sink_ack = 1'b0;
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    fork
      begin
        repeat (60) @(negedge clk);
        `CHECK(n_tx == 2, $sformatf("stalled pipeline of 3 latches took %0d words", n_tx))
        sink_en = 1'b1;
      end
    join_none
    for (int i = 0; i < N; i++) begin
      sent[i] = W'($urandom);
      @(negedge clk); s_t = sent[i]; s_f = ~sent[i];
      while (!ack[0]) @(negedge clk);
      n_tx++;
      s_t = '0; s_f = '0;
      while (ack[0]) @(negedge clk);
    end
    while (n_rx < N) @(negedge clk);
    `CHECK(n_rx == N, "all words received")
    `TB_DONE
  end
endmodule
