// tb_vedic_mul16: self-check of the 16x16 Vedic multiplier. Checks the
// worst-case operands ffff x ffff = fffe0001, other corners, every operand
// whose halves are 00 or ff, and 200000 random pairs against a * b.
module tb_vedic_mul16;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  logic [15:0] a, b;
  logic [31:0] p;

  vedic_mul16 dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    a = x;
    b = y;
    #1;
    checks++;
    if (p != 32'(x) * 32'(y)) begin
      failures++;
      if (failures < 10) $display("FAIL %h*%h got %h exp %h", x, y, p, 32'(x) * 32'(y));
    end
  endtask

  initial begin
    check(16'hffff, 16'hffff);
    checks++;
    if (p != 32'hfffe_0001) begin
      failures++;
      $display("FAIL ffff*ffff got %h", p);
    end
    for (int i = 0; i < 16; i++)
      check({{8{i[0]}}, {8{i[1]}}}, {{8{i[2]}}, {8{i[3]}}});
    for (int i = 0; i < 16; i++) begin
      check(16'(1) << i, 16'hffff);
      check(16'hffff, 16'(1) << i);
    end
    for (int i = 0; i < 200000; i++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
