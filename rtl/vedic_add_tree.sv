// vedic_add_tree: addition tree that joins the four partial products of an
// NxN Vedic multiplier into the 2N-bit product.
//
// The operands are split into halves of H = N/2 bits (low half 0, high
// half 1) and the four HxH multipliers give N-bit partial products
//   q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH.
// The product is built as follows:
//   * p[H-1:0]      = q0[H-1:0]                       (passes straight down)
//   * Adder 1       : q2 + q1                         -> sum1, carry c1
//   * Adder 2       : sum1 + {q3[H-1:0], q0[N-1:H]}   -> p[N+H-1:H], carry c2
//   * half adder    : c1 + c2                         -> (hc, hs)
//   * Adder 3       : q3[N-1:H] + {0.., hc, hs}       -> p[2N-1:N+H]
// The second input of Adder 3 is {hc, hs} padded with N/2-2 zeros at the
// top (none for N = 4, two for N = 8, six for N = 16). Adder 3's carry out
// is always zero, because the product of two N-bit numbers fits in 2N bits;
// it is left unused. All adders are cla_adder instances.
//
// The structure is the one of the document; the generic parameter N is this
// design's way of using one module for the 4-, 8- and 16-bit trees.
// Purely combinational.
module vedic_add_tree #(
  parameter int unsigned N = 16   // operand width of the multiplier served (>= 4, power of 2)
) (
  input  logic [N-1:0]   q0,
  input  logic [N-1:0]   q1,
  input  logic [N-1:0]   q2,
  input  logic [N-1:0]   q3,
  output logic [2*N-1:0] p
);
  localparam int unsigned H = N / 2;

  logic [N-1:0] sum1, sum2, add2_b;
  logic         c1, c2, hc, hs;
  logic [H-1:0] add3_b, sum3;
  logic         c3_unused;   // cannot be set: the product fits in 2N bits

  assign add2_b = {q3[H-1:0], q0[N-1:H]};

  always_comb begin
    add3_b      = '0;
    add3_b[1:0] = {hc, hs};
  end

  cla_adder #(.W(N)) u_adder1 (.a(q2),        .b(q1),     .cin(1'b0), .sum(sum1), .cout(c1));
  cla_adder #(.W(N)) u_adder2 (.a(sum1),      .b(add2_b), .cin(1'b0), .sum(sum2), .cout(c2));
  half_adder         u_ha     (.a(c1),        .b(c2),     .sum(hs),   .carry(hc));
  cla_adder #(.W(H)) u_adder3 (.a(q3[N-1:H]), .b(add3_b), .cin(1'b0), .sum(sum3), .cout(c3_unused));

  assign p = {sum3, sum2, q0[H-1:0]};
endmodule
