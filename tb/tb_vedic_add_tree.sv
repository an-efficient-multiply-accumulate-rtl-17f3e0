// tb_vedic_add_tree: self-check of the addition tree at N = 4, 8 and 16.
// The testbench forms the four partial products of random operand pairs
// itself (q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH) and checks that
// the tree returns a * b. N = 4 is checked exhaustively; it also checks the
// worked 4-bit example (q = 0010, 0110, 0010, 0110 gives 1000_0010).
module tb_vedic_add_tree;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  logic [3:0]  q4  [4];  logic [7:0]  p4;
  logic [7:0]  q8  [4];  logic [15:0] p8;
  logic [15:0] q16 [4];  logic [31:0] p16;

  vedic_add_tree #(.N(4)) dut4  (.q0(q4[0]),  .q1(q4[1]),  .q2(q4[2]),  .q3(q4[3]),  .p(p4));
  vedic_add_tree #(.N(8)) dut8  (.q0(q8[0]),  .q1(q8[1]),  .q2(q8[2]),  .q3(q8[3]),  .p(p8));
  vedic_add_tree          dut16 (.q0(q16[0]), .q1(q16[1]), .q2(q16[2]), .q3(q16[3]), .p(p16));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0]  a4, b4;
    logic [7:0]  a8, b8;
    logic [15:0] a16, b16;
    q4[0] = 4'b0010; q4[1] = 4'b0110; q4[2] = 4'b0010; q4[3] = 4'b0110;
    #1;
    checks++;
    if (p4 != 8'b1000_0010) begin failures++; $display("FAIL example p4=%b", p4); end
    for (int i = 0; i < 256; i++) begin
      a4 = i[3:0]; b4 = i[7:4];
      q4[0] = 4'(a4[1:0]) * 4'(b4[1:0]);
      q4[1] = 4'(a4[3:2]) * 4'(b4[1:0]);
      q4[2] = 4'(a4[1:0]) * 4'(b4[3:2]);
      q4[3] = 4'(a4[3:2]) * 4'(b4[3:2]);
      #1;
      checks++;
      if (p4 != 8'(a4) * 8'(b4)) begin failures++; $display("FAIL4 %h*%h got %h", a4, b4, p4); end
    end
    for (int i = 0; i < 20000; i++) begin
      a8 = 8'($urandom); b8 = 8'($urandom);
      if (i == 0) begin a8 = '1; b8 = '1; end
      q8[0] = 8'(a8[3:0]) * 8'(b8[3:0]);
      q8[1] = 8'(a8[7:4]) * 8'(b8[3:0]);
      q8[2] = 8'(a8[3:0]) * 8'(b8[7:4]);
      q8[3] = 8'(a8[7:4]) * 8'(b8[7:4]);
      a16 = 16'($urandom); b16 = 16'($urandom);
      if (i == 0) begin a16 = '1; b16 = '1; end
      q16[0] = 16'(a16[7:0])  * 16'(b16[7:0]);
      q16[1] = 16'(a16[15:8]) * 16'(b16[7:0]);
      q16[2] = 16'(a16[7:0])  * 16'(b16[15:8]);
      q16[3] = 16'(a16[15:8]) * 16'(b16[15:8]);
      #1;
      checks += 2;
      if (p8 != 16'(a8) * 16'(b8)) begin
        failures++;
        if (failures < 10) $display("FAIL8 %h*%h got %h", a8, b8, p8);
      end
      if (p16 != 32'(a16) * 32'(b16)) begin
        failures++;
        if (failures < 10) $display("FAIL16 %h*%h got %h", a16, b16, p16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
