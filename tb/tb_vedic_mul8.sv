// tb_vedic_mul8: exhaustive self-check of the 8x8 Vedic multiplier: all
// 65536 operand pairs, product compared with a * b.
module tb_vedic_mul8;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  logic [7:0]  a, b;
  logic [15:0] p;

  vedic_mul8 dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      a = i[7:0];
      b = i[15:8];
      #1;
      checks++;
      if (p != 16'(i[7:0]) * 16'(i[15:8])) begin
        failures++;
        if (failures < 10) $display("FAIL %0d*%0d got %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
