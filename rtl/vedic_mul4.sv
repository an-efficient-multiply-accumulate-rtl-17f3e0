// vedic_mul4: 4x4 unsigned Vedic multiplier, p = a * b.
//
// Both operands are cut into halves of 2 bits. Four 2x2 multipliers
// (vedic_mul2) form the partial products in parallel, low half by low half (q0),
// high a by low b (q1), low a by high b (q2) and high by high (q3), and the
// 4-bit addition tree (vedic_add_tree) adds them into the 8-bit
// product. This hierarchical split is the document's; the module is purely
// combinational, so its delay is that of the whole tree.
module vedic_mul4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;

  vedic_mul2 u_q0 (.a(a[1:0]), .b(b[1:0]), .p(q0));
  vedic_mul2 u_q1 (.a(a[3:2]), .b(b[1:0]), .p(q1));
  vedic_mul2 u_q2 (.a(a[1:0]), .b(b[3:2]), .p(q2));
  vedic_mul2 u_q3 (.a(a[3:2]), .b(b[3:2]), .p(q3));

  vedic_add_tree #(.N(4)) u_tree (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
endmodule
