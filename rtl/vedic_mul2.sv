// vedic_mul2: 2x2 unsigned multiplier, the leaf of the Vedic multiplier tree.
//
// Following the vertical-and-crosswise scheme, the four bit products are
// a0b0, a0b1, a1b0 and a1b1. a0b0 is product bit s0. The two crosswise
// products are added by a half adder: its sum is s1 and its carry is added
// to a1b1 by a second half adder, whose sum and carry are s2 and s3.
// Bit products are formed with AND. Purely combinational.
module vedic_mul2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic a0b0, a0b1, a1b0, a1b1;
  logic cross_c;

  always_comb begin
    a0b0 = a[0] & b[0];
    a0b1 = a[0] & b[1];
    a1b0 = a[1] & b[0];
    a1b1 = a[1] & b[1];
  end

  assign p[0] = a0b0;

  half_adder u_ha_cross (.a(a0b1), .b(a1b0),    .sum(p[1]), .carry(cross_c));
  half_adder u_ha_high  (.a(a1b1), .b(cross_c), .sum(p[2]), .carry(p[3]));
endmodule
