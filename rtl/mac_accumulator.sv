// mac_accumulator: accumulate stage of the MAC unit (adder + Data out register).
//
// On every rising clock edge the IN_W-bit input (the Multiply out register)
// is zero-extended and added to the ACC_W-bit Data out register, and the
// sum is written back: acc <= acc + prod. The addition is a cla_adder of
// ACC_W bits, so the accumulator wraps modulo 2**ACC_W. A synchronous
// active-high reset sets the accumulator to zero, which is the "adder set
// to zero initially" of the document. One result per clock; acc shows a new
// product one clock after it enters. Adder width: the block diagram labels
// the adder 32 bit but the register it feeds 64 bit; the adder here is
// ACC_W (64) bits wide so the running sum can pass 32 bits.
module mac_accumulator #(
  parameter int unsigned IN_W  = vedic_pkg::PROD_W,
  parameter int unsigned ACC_W = vedic_pkg::ACC_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [IN_W-1:0]  prod,
  output logic [ACC_W-1:0] acc
);
  logic [ACC_W-1:0] prod_ext, acc_next;
  logic             carry_unused;   // the accumulator wraps; the carry out is dropped

  assign prod_ext = ACC_W'(prod);

  cla_adder #(.W(ACC_W)) u_adder (
    .a(acc), .b(prod_ext), .cin(1'b0), .sum(acc_next), .cout(carry_unused)
  );

  always_ff @(posedge clk) begin
    if (rst) acc <= '0;
    else     acc <= acc_next;
  end
endmodule
