// tb_vedic_mul2: exhaustive self-check of the 2x2 Vedic multiplier: all 16
// operand pairs, product compared with a * b.
module tb_vedic_mul2;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  logic [1:0] a, b;
  logic [3:0] p;

  vedic_mul2 dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      a = i[1:0];
      b = i[3:2];
      #1;
      checks++;
      if (p != 4'(i[1:0]) * 4'(i[3:2])) begin
        failures++;
        $display("FAIL %0d*%0d got %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
