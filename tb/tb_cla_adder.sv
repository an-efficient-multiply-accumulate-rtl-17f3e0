// tb_cla_adder: self-check of the carry look-ahead adder at the widths the
// design uses (2, 8, 16 and 64 bits). Corner cases (all ones, carry chains
// through every bit) and random operands are compared with the built-in
// addition, carry-in and carry-out included.
module tb_cla_adder;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  logic [15:0] a16, b16, s16;  logic ci16, co16;
  logic [63:0] a64, b64, s64;  logic ci64, co64;
  logic [7:0]  a8,  b8,  s8;   logic ci8,  co8;
  logic [1:0]  a2,  b2,  s2;   logic ci2,  co2;

  cla_adder              dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  cla_adder #(.W(64))    dut64 (.a(a64), .b(b64), .cin(ci64), .sum(s64), .cout(co64));
  cla_adder #(.W(8))     dut8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  cla_adder #(.W(2))     dut2  (.a(a2),  .b(b2),  .cin(ci2),  .sum(s2),  .cout(co2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic c);
    logic [16:0] exp;
    a16 = x; b16 = y; ci16 = c;
    #1;
    exp = 17'(x) + 17'(y) + 17'(c);
    checks++;
    if ({co16, s16} != exp) begin
      failures++;
      $display("FAIL16 %h+%h+%0b got %h exp %h", x, y, c, {co16, s16}, exp);
    end
  endtask

  task automatic check64(input logic [63:0] x, input logic [63:0] y, input logic c);
    logic [64:0] exp;
    a64 = x; b64 = y; ci64 = c;
    #1;
    exp = 65'(x) + 65'(y) + 65'(c);
    checks++;
    if ({co64, s64} != exp) begin
      failures++;
      $display("FAIL64 %h+%h+%0b got %h exp %h", x, y, c, {co64, s64}, exp);
    end
  endtask

  initial begin
    // exhaustive at 2 and 8 bits
    for (int i = 0; i < 32; i++) begin
      a2 = i[1:0]; b2 = i[3:2]; ci2 = i[4];
      #1;
      checks++;
      if ({co2, s2} != 3'(i[1:0]) + 3'(i[3:2]) + 3'(i[4])) begin
        failures++;
        $display("FAIL2 %0d", i);
      end
    end
    for (int i = 0; i < 131072; i++) begin
      a8 = i[7:0]; b8 = i[15:8]; ci8 = i[16];
      #1;
      checks++;
      if ({co8, s8} != 9'(i[7:0]) + 9'(i[15:8]) + 9'(i[16])) begin
        failures++;
        if (failures < 10) $display("FAIL8 %0d", i);
      end
    end
    // corners
    check16(16'hffff, 16'h0000, 1'b1);
    check16(16'hffff, 16'hffff, 1'b1);
    check16(16'h8000, 16'h8000, 1'b0);
    check16(16'h0000, 16'h0000, 1'b0);
    check64('1, 64'd0, 1'b1);
    check64('1, '1, 1'b1);
    check64(64'h7fff_ffff_ffff_ffff, 64'd1, 1'b0);
    for (int i = 0; i < 20000; i++) begin
      check16(16'($urandom), 16'($urandom), 1'($urandom));
      check64({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
