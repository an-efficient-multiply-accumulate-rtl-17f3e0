// data_reg: W-bit data register of the MAC datapath.
//
// Loads d on every rising clock edge; a synchronous active-high reset
// clears it to zero. The MAC uses three of them: the 16-bit Data A and
// Data B registers in front of the multiplier and the 32-bit Multiply out
// register behind it. Latency is one clock. The registers themselves are
// the document's; reset and its polarity are this design's choice.
module data_reg #(
  parameter int unsigned W = vedic_pkg::MUL_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= d;
  end
endmodule
