// tb_mac_accumulator: self-check of the accumulate stage.
// The default instance (32-bit input, 64-bit accumulator) is reset, then fed
// the worst-case product fffe0001 for three clocks (expecting
// 00000000fffe0001, 00000001fffc0002, 00000002fffa0003 after each edge) and
// then random products, each checked one clock after it is applied against
// a running sum kept by the testbench. A mid-run reset must return it to
// zero. A small instance (8-bit input, 10-bit accumulator) is driven past
// its range to check that the sum wraps modulo 2**ACC_W.
module tb_mac_accumulator;
  logic clk = 1'b0;
  logic rst;
  int checks = 0, failures = 0;
  int wraps = 0;

  logic [31:0] prod;
  logic [63:0] acc, model;
  logic [7:0]  prod_s;
  logic [9:0]  acc_s, model_s;

  mac_accumulator                         dut   (.clk(clk), .rst(rst), .prod(prod),   .acc(acc));
  mac_accumulator #(.IN_W(8), .ACC_W(10)) dut_s (.clk(clk), .rst(rst), .prod(prod_s), .acc(acc_s));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic [31:0] x, input logic [7:0] xs);
    prod   = x;
    prod_s = xs;
    @(posedge clk);
    @(negedge clk);
    model   = model + 64'(x);
    if (11'(model_s) + 11'(xs) > 11'd1023) wraps++;
    model_s = model_s + 10'(xs);
    checks += 2;
    if (acc != model) begin
      failures++;
      if (failures < 10) $display("FAIL acc=%h exp %h", acc, model);
    end
    if (acc_s != model_s) begin
      failures++;
      if (failures < 10) $display("FAIL small acc=%h exp %h", acc_s, model_s);
    end
  endtask

  initial begin
    rst    = 1'b1;
    prod   = 32'hffff_ffff;
    prod_s = 8'hff;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (acc != '0 || acc_s != '0) begin failures++; $display("FAIL reset"); end
    rst     = 1'b0;
    model   = '0;
    model_s = '0;
    step(32'hfffe_0001, 8'hff);
    checks++;
    if (acc != 64'h0000_0000_fffe_0001) begin failures++; $display("FAIL worst 1"); end
    step(32'hfffe_0001, 8'hff);
    checks++;
    if (acc != 64'h0000_0001_fffc_0002) begin failures++; $display("FAIL worst 2"); end
    step(32'hfffe_0001, 8'hff);
    checks++;
    if (acc != 64'h0000_0002_fffa_0003) begin failures++; $display("FAIL worst 3"); end
    for (int i = 0; i < 2000; i++) step($urandom, 8'($urandom));
    rst = 1'b1;
    @(posedge clk);
    @(negedge clk);
    rst     = 1'b0;
    model   = '0;
    model_s = '0;
    checks++;
    if (acc != '0 || acc_s != '0) begin failures++; $display("FAIL mid-run reset"); end
    for (int i = 0; i < 100; i++) step($urandom, 8'($urandom));
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap-around exercised"); end
    $display("wraps=%0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
