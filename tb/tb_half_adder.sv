// tb_half_adder: exhaustive self-check of the one-bit half adder.
// All four input pairs are applied and {carry, sum} is compared with a + b.
module tb_half_adder;
  logic a, b, sum, carry;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      a = i[0];
      b = i[1];
      #1;
      checks++;
      if ({carry, sum} != 2'(i[0] + i[1])) begin
        failures++;
        $display("FAIL a=%0b b=%0b got c=%0b s=%0b", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
