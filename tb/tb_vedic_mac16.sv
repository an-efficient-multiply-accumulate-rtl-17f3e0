// tb_vedic_mac16: end-to-end self-check of the 16-bit Vedic MAC unit at its
// default sizes (16-bit operands, 64-bit accumulator).
//
// Phases:
//   1. reset, then ffff x ffff applied every clock: data_out must read
//      00000000fffe0001, 00000001fffc0002, 00000002fffa0003, ... one step
//      per clock, the first product appearing three clock edges after the
//      operands are applied (operand register, product register, accumulator);
//   2. random operands every clock, data_out compared each clock with a
//      reference pipeline model (a * b computed by the testbench);
//   3. a reset in the middle of a stream, which must clear data_out and the
//      products still in flight;
//   4. a single product after a run of zero operands, checking the latency.
// Each mechanism is counted and must have happened at least once.
module tb_vedic_mac16;
  logic        clk = 1'b0;
  logic        rst;
  logic [15:0] data_a, data_b;
  logic [63:0] data_out;
  int checks = 0, failures = 0;
  int n_accumulate = 0, n_reset_clear = 0, n_latency = 0, n_worst_case = 0;

  vedic_mac16 dut (.clk(clk), .rst(rst), .data_a(data_a), .data_b(data_b), .data_out(data_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model of the pipeline, advanced at each rising edge.
  logic [15:0] m_a, m_b;
  logic [31:0] m_p;
  logic [63:0] m_acc;
  always_ff @(posedge clk) begin
    if (rst) begin
      m_a <= '0; m_b <= '0; m_p <= '0; m_acc <= '0;
    end else begin
      m_a   <= data_a;
      m_b   <= data_b;
      m_p   <= 32'(m_a) * 32'(m_b);
      m_acc <= m_acc + 64'(m_p);
    end
  end

  task automatic compare(input string what);
    checks++;
    if (data_out != m_acc) begin
      failures++;
      if (failures < 10) $display("FAIL %s: data_out=%h exp %h", what, data_out, m_acc);
    end
  endtask

  initial begin
    logic [63:0] expect_worst;
    rst    = 1'b1;
    data_a = 16'hffff;
    data_b = 16'hffff;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (data_out != '0) failures++;
    else n_reset_clear++;

    // Phase 1: worst-case operands every clock.
    rst = 1'b0;
    for (int k = 1; k <= 8; k++) begin
      @(posedge clk);
      @(negedge clk);
      // after edge k the first k-2 products are in the accumulator
      expect_worst = (k >= 3) ? 64'(k - 2) * 64'h0000_0000_fffe_0001 : 64'd0;
      checks++;
      if (data_out != expect_worst) begin
        failures++;
        $display("FAIL worst case edge %0d: data_out=%h exp %h", k, data_out, expect_worst);
      end else if (k >= 3) n_worst_case++;
      if (k == 3 && data_out == 64'h0000_0000_fffe_0001) n_latency++;
      compare("worst");
    end
    checks++;
    if (data_out != 64'h0000_0005_fff4_0006) begin
      failures++;
      $display("FAIL after six worst-case products: %h", data_out);
    end

    // Phase 2: random operands.
    for (int i = 0; i < 5000; i++) begin
      data_a = 16'($urandom);
      data_b = 16'($urandom);
      if (i % 97 == 0) data_a = 16'hffff;
      @(posedge clk);
      @(negedge clk);
      compare("random");
      if (m_p != 0) n_accumulate++;
    end

    // Phase 3: reset in the middle of the stream.
    rst = 1'b1;
    @(posedge clk);
    @(negedge clk);
    rst    = 1'b0;
    data_a = '0;
    data_b = '0;
    checks++;
    if (data_out != '0) begin
      failures++;
      $display("FAIL mid-stream reset left %h", data_out);
    end else n_reset_clear++;
    repeat (4) begin
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (data_out != '0) begin failures++; $display("FAIL stale product after reset"); end
    end

    // Phase 4: one product, latency of three clock edges.
    data_a = 16'd1234;
    data_b = 16'd4321;
    @(posedge clk);
    @(negedge clk);
    data_a = '0;
    data_b = '0;
    for (int k = 2; k <= 4; k++) begin
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (k < 3 && data_out != '0) begin failures++; $display("FAIL early result at edge %0d", k); end
      if (k >= 3) begin
        if (data_out != 64'(1234 * 4321)) begin
          failures++;
          $display("FAIL latency: edge %0d data_out=%0d", k, data_out);
        end else if (k == 3) n_latency++;
      end
    end

    $display("accumulate=%0d reset_clear=%0d latency=%0d worst_case=%0d",
             n_accumulate, n_reset_clear, n_latency, n_worst_case);
    checks += 4;
    if (n_accumulate == 0) failures++;
    if (n_reset_clear < 2) failures++;
    if (n_latency < 2) failures++;
    if (n_worst_case == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
