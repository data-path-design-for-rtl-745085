// Two-input dual-rail logic gate, W bits wide (OP = "AND", "OR" or "XOR").
//
// Each output rail is the OR of C-elements that recognise the input
// minterms giving that output, so the output stays empty until both inputs
// are valid and returns to empty only when both inputs are empty. For AND
// this is the structure of four C-elements and one OR gate of the design:
//   out.t = C(a.t, b.t)
//   out.f = C(a.f, b.f) | C(a.f, b.t) | C(a.t, b.f)
// OR and XOR are built "with the same concept" from the same four
// minterm C-elements, only the grouping onto the rails differs.
// Latency: one C-element delay (one tick of clk).
module dr_gate2 #(
  parameter int    W  = 32,
  parameter string OP = "AND"
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a_t, a_f,
  input  logic [W-1:0] b_t, b_f,
  output logic [W-1:0] y_t, y_f
);
  logic [W-1:0] m_tt, m_tf, m_ft, m_ff;   // minterm detectors
  c_element #(.W(W)) u_tt (.clk, .rst_n, .a(a_t), .b(b_t), .z(m_tt));
  c_element #(.W(W)) u_tf (.clk, .rst_n, .a(a_t), .b(b_f), .z(m_tf));
  c_element #(.W(W)) u_ft (.clk, .rst_n, .a(a_f), .b(b_t), .z(m_ft));
  c_element #(.W(W)) u_ff (.clk, .rst_n, .a(a_f), .b(b_f), .z(m_ff));

  always_comb begin
    if (OP == "OR") begin
      y_t = m_tt | m_tf | m_ft;
      y_f = m_ff;
    end else if (OP == "XOR") begin
      y_t = m_tf | m_ft;
      y_f = m_tt | m_ff;
    end else begin
      y_t = m_tt;
      y_f = m_ff | m_ft | m_tf;
    end
  end
endmodule
