// vedic_mul16: 16x16 unsigned Vedic multiplier, p = a * b.
//
// Both operands are cut into halves of 8 bits. Four 8x8 multipliers
// (vedic_mul8) form the partial products in parallel, low half by low half (q0),
// high a by low b (q1), low a by high b (q2) and high by high (q3), and the
// 16-bit addition tree (vedic_add_tree) adds them into the 32-bit
// product. This hierarchical split is the document's; the module is purely
// combinational, so its delay is that of the whole tree.
module vedic_mul16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);
  logic [15:0] q0, q1, q2, q3;

  vedic_mul8 u_q0 (.a(a[7:0]), .b(b[7:0]), .p(q0));
  vedic_mul8 u_q1 (.a(a[15:8]), .b(b[7:0]), .p(q1));
  vedic_mul8 u_q2 (.a(a[7:0]), .b(b[15:8]), .p(q2));
  vedic_mul8 u_q3 (.a(a[15:8]), .b(b[15:8]), .p(q3));

  vedic_add_tree #(.N(16)) u_tree (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
endmodule
