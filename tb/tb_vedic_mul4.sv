// tb_vedic_mul4: self-check of the 4x4 Vedic multiplier. Runs the worked
// example 1101 x 1010 and checks its four partial products (q0 = 0010,
// q1 = 0110, q2 = 0010, q3 = 0110) and the product 1000_0010, then all 256
// operand pairs against a * b.
module tb_vedic_mul4;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  logic [3:0] a, b;
  logic [7:0] p;

  vedic_mul4 dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 4'b1101;
    b = 4'b1010;
    #1;
    checks += 5;
    if (dut.q0 != 4'b0010) begin failures++; $display("FAIL q0=%b", dut.q0); end
    if (dut.q1 != 4'b0110) begin failures++; $display("FAIL q1=%b", dut.q1); end
    if (dut.q2 != 4'b0010) begin failures++; $display("FAIL q2=%b", dut.q2); end
    if (dut.q3 != 4'b0110) begin failures++; $display("FAIL q3=%b", dut.q3); end
    if (p != 8'b1000_0010) begin failures++; $display("FAIL p=%b", p); end
    for (int i = 0; i < 256; i++) begin
      a = i[3:0];
      b = i[7:4];
      #1;
      checks++;
      if (p != 8'(i[3:0]) * 8'(i[7:4])) begin
        failures++;
        $display("FAIL %0d*%0d got %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
