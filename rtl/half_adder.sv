// half_adder: one-bit half adder.
//
// sum = a XOR b, carry = a AND b. It is the small adder used inside the 2x2
// Vedic multiplier (to add the crosswise products and then the carry into
// a1*b1) and in the addition tree (to add the carries of Adder 1 and
// Adder 2). Purely combinational, no clock.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end
endmodule
