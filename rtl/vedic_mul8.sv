// vedic_mul8: 8x8 unsigned Vedic multiplier, p = a * b.
//
// Both operands are cut into halves of 4 bits. Four 4x4 multipliers
// (vedic_mul4) form the partial products in parallel, low half by low half (q0),
// high a by low b (q1), low a by high b (q2) and high by high (q3), and the
// 8-bit addition tree (vedic_add_tree) adds them into the 16-bit
// product. This hierarchical split is the document's; the module is purely
// combinational, so its delay is that of the whole tree.
module vedic_mul8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [15:0] p
);
  logic [7:0] q0, q1, q2, q3;

  vedic_mul4 u_q0 (.a(a[3:0]), .b(b[3:0]), .p(q0));
  vedic_mul4 u_q1 (.a(a[7:4]), .b(b[3:0]), .p(q1));
  vedic_mul4 u_q2 (.a(a[3:0]), .b(b[7:4]), .p(q2));
  vedic_mul4 u_q3 (.a(a[7:4]), .b(b[7:4]), .p(q3));

  vedic_add_tree #(.N(8)) u_tree (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
endmodule
