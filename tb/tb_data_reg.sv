// tb_data_reg: self-check of the data register. Checks that reset clears it,
// that it loads the input one clock after it is applied and holds it through
// the cycle, at 16 bits (operand registers) and 32 bits (product register).
module tb_data_reg;
  logic clk = 1'b0;
  logic rst;
  int checks = 0, failures = 0;
  logic [15:0] d16, q16;
  logic [31:0] d32, q32;

  data_reg              dut16 (.clk(clk), .rst(rst), .d(d16), .q(q16));
  data_reg #(.W(32))    dut32 (.clk(clk), .rst(rst), .d(d32), .q(q32));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] e16;
    logic [31:0] e32;
    logic [15:0] p16 = '0;
    logic [31:0] p32 = '0;
    rst = 1'b1;
    d16 = 16'hbeef;
    d32 = 32'hdead_beef;
    @(posedge clk);
    @(negedge clk);
    checks++;
    if (q16 != '0 || q32 != '0) begin failures++; $display("FAIL reset q16=%h q32=%h", q16, q32); end
    rst = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      e16 = 16'($urandom);
      e32 = $urandom;
      d16 = e16;
      d32 = e32;
      #1;
      checks++;   // before the edge the register still holds the previous value
      if (q16 != p16 || q32 != p32) begin
        failures++;
        if (failures < 10) $display("FAIL early q16=%h exp %h", q16, p16);
      end
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (q16 != e16 || q32 != e32) begin
        failures++;
        if (failures < 10) $display("FAIL load q16=%h exp %h q32=%h exp %h", q16, e16, q32, e32);
      end
      p16 = e16;
      p32 = e32;
    end
    rst = 1'b1;
    @(posedge clk);
    @(negedge clk);
    checks++;
    if (q16 != '0 || q32 != '0) begin failures++; $display("FAIL second reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
