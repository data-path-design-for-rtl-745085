// Dual-rail DeMUX with N outputs, W bits.
//
// Output k is a C-element per rail between the incoming rail and select
// rail sel[k]. The select is 1-of-N coded: exactly one rail rises with a
// valid word and all fall with the spacer. The selected output copies the
// word; every other output stays empty, so the function blocks behind it
// stay idle. With N = 2 and sel = {sel.f, sel.t} this is the two-C-element
// DeMUX of the design.
// Latency: one C-element delay (one tick of clk).
module dr_demux #(
  parameter int W = 32,
  parameter int N = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [W-1:0]        din_t, din_f,
  input  logic [N-1:0]        sel,
  output logic [N-1:0][W-1:0] dout_t, dout_f
);
  for (genvar k = 0; k < N; k++) begin : g_way
    c_element #(.W(W)) u_t (.clk, .rst_n, .a(din_t), .b({W{sel[k]}}), .z(dout_t[k]));
    c_element #(.W(W)) u_f (.clk, .rst_n, .a(din_f), .b({W{sel[k]}}), .z(dout_f[k]));
  end
endmodule
