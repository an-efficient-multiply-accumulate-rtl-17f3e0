// vedic_mac16: 16-bit multiply-accumulate unit built on a Vedic multiplier.
//
// data_out accumulates the products data_a * data_b, one per clock.
// Datapath (one register stage each):
//   data_a, data_b -> Data A / Data B registers (16 bit)
//                  -> 16x16 Vedic multiplier (vedic_mul16)
//                  -> Multiply out register (32 bit)
//                  -> adder + Data out register (64 bit, fed back)
// A pair of operands presented before clock edge k is in the operand
// registers after edge k, its product is in the Multiply out register after
// edge k+1 and is included in data_out after edge k+2. A new pair can be
// presented every clock. Synchronous active-high rst clears all four
// registers, so data_out starts from zero; the reset is this design's
// choice, the registers, widths and feedback follow the document.
module vedic_mac16 #(
  parameter int unsigned ACC_W = vedic_pkg::ACC_W
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [vedic_pkg::MUL_W-1:0] data_a,
  input  logic [vedic_pkg::MUL_W-1:0] data_b,
  output logic [ACC_W-1:0]           data_out
);
  import vedic_pkg::*;

  logic [MUL_W-1:0]  a_q, b_q;
  logic [PROD_W-1:0] prod, prod_q;

  data_reg #(.W(MUL_W))  u_data_a   (.clk(clk), .rst(rst), .d(data_a), .q(a_q));
  data_reg #(.W(MUL_W))  u_data_b   (.clk(clk), .rst(rst), .d(data_b), .q(b_q));
  vedic_mul16            u_mul      (.a(a_q), .b(b_q), .p(prod));
  data_reg #(.W(PROD_W)) u_mul_out  (.clk(clk), .rst(rst), .d(prod), .q(prod_q));
  mac_accumulator #(.IN_W(PROD_W), .ACC_W(ACC_W)) u_acc (
    .clk(clk), .rst(rst), .prod(prod_q), .acc(data_out)
  );
endmodule
