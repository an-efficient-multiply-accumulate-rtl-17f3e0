// cla_adder: W-bit carry look-ahead adder, {cout, sum} = a + b + cin.
//
// Each bit forms a generate (a & b) and a propagate (a ^ b) signal. The
// carries are then looked ahead in log2(W) levels of a parallel-prefix
// network: at level d every bit i merges its (G, P) pair with that of bit
// i-d, so after the last level G[i] is the carry out of bit i. The carry-in
// is folded into the generate of bit 0. The prefix arrangement (one merge
// per bit and level) is this design's choice; the document asks only for
// carry look-ahead adders. It also asks for them to be pipelined; this adder
// is purely combinational so that the multiplier stays a single-cycle block
// between the MAC's registers.
//
// Used as Adders 1, 2 and 3 of every addition tree and as the accumulator
// adder of the MAC unit. Combinational, no clock.
module cla_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W-1:0] prop;      // bitwise propagate, also the half sum
  logic [W-1:0] grp_g;     // after the prefix network: carry out of each bit

  always_comb begin
    logic [W-1:0] g, p, g_next, p_next;
    prop = a ^ b;
    g    = a & b;
    p    = prop;
    g[0] = g[0] | (p[0] & cin);
    for (int unsigned d = 1; d < W; d = d * 2) begin
      g_next = g;
      p_next = p;
      for (int unsigned i = d; i < W; i++) begin
        g_next[i] = g[i] | (p[i] & g[i-d]);
        p_next[i] = p[i] & p[i-d];
      end
      g = g_next;
      p = p_next;
    end
    grp_g = g;
  end

  always_comb begin
    sum[0] = prop[0] ^ cin;
    for (int unsigned i = 1; i < W; i++) sum[i] = prop[i] ^ grp_g[i-1];
    cout = grp_g[W-1];
  end
endmodule
