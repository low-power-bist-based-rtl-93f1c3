// bist_multiplier_tb: end-to-end test of the BIST multiplier at its default
// parameters.
//
//   1. Normal mode: the operand pairs of the reference waveforms and 200
//      random pairs; product_AB must be the integer product and test_result
//      low.
//   2. Switch to self-test with enable low: patterns and products are 0.
//   3. Enable high for 12 clocks: tb_A must follow 1100 0110 1011 0001,
//      one word per clock, tb_B must be tb_A rotated left, and product_AB
//      and tb_AB must run 108 72 77 2 with test_result low.
//   4. Enable low again: the generator returns to 0000.
//   5. A fault flips one bit of the multiplier's A operand: test_result must rise
//      in test mode and stay low in normal mode.
// Each mechanism (normal multiply, mode switch, pattern step, enable-low
// clear, fault detection) is counted; one that never happens is a failure.
module bist_multiplier_tb;
  logic       clock = 1'b0;
  logic       reset, enable, test_mode;
  logic [3:0] data_A, data_B, tb_A, tb_B;
  logic [7:0] product_AB, tb_AB;
  logic       test_result;
  int checks = 0, failures = 0;
  int cycles = 0;
  int n_normal = 0, n_switch = 0, n_pattern = 0, n_clear = 0, n_fault = 0;

  localparam logic [3:0] SEQ [4] = '{4'b1100, 4'b0110, 4'b1011, 4'b0001};
  localparam int         PROD [4] = '{108, 72, 77, 2};
  localparam logic [7:0] KNOWN [8][2] = '{
    '{8'h13, 8'd3},  '{8'h4e, 8'd56}, '{8'h5c, 8'd60}, '{8'h6b, 8'd66},
    '{8'h7b, 8'd77}, '{8'h8c, 8'd96}, '{8'h1a, 8'd10}, '{8'h31, 8'd3}
  };

  bist_multiplier dut (
    .clock(clock), .reset(reset), .enable(enable), .test_mode(test_mode),
    .data_A(data_A), .data_B(data_B), .product_AB(product_AB),
    .tb_A(tb_A), .tb_B(tb_B), .tb_AB(tb_AB), .test_result(test_result)
  );

  always #5 clock = ~clock;

  always @(posedge clock) begin
    cycles++;
    if (cycles > 2000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: expected %0d got %0d", what, exp, got);
    end
  endtask

  task automatic normal_op(input logic [3:0] a, input logic [3:0] b);
    data_A = a;
    data_B = b;
    @(posedge clock);
    #1;
    expect_eq("normal product", int'(product_AB), int'(a) * int'(b));
    expect_eq("normal test_result", int'(test_result), 0);
    n_normal++;
  endtask

  initial begin
    int start_cycle, idx;
    logic [3:0] force_a;
    reset = 1'b1;
    enable = 1'b0;
    test_mode = 1'b0;
    data_A = '0;
    data_B = '0;
    repeat (3) @(posedge clock);
    #1;
    reset = 1'b0;
    expect_eq("tb_A after reset", int'(tb_A), 0);

    // 1. normal mode; the generator must stay idle even with enable high
    enable = 1'b1;
    foreach (KNOWN[k]) begin
      normal_op(KNOWN[k][0][7:4], KNOWN[k][0][3:0]);
      expect_eq("known product", int'(product_AB), int'(KNOWN[k][1]));
    end
    for (int k = 0; k < 200; k++) normal_op(4'($urandom), 4'($urandom));
    expect_eq("generator idle in normal mode", int'(tb_A), 0);

    // 2. switch to self-test with enable low
    enable = 1'b0;
    test_mode = 1'b1;
    n_switch++;
    @(posedge clock);
    #1;
    expect_eq("test mode, enable low: tb_A", int'(tb_A), 0);
    expect_eq("test mode, enable low: product", int'(product_AB), 0);
    expect_eq("test mode, enable low: test_result", int'(test_result), 0);

    // 3. run the pattern sequence
    enable = 1'b1;
    start_cycle = cycles;
    for (int k = 0; k < 12; k++) begin
      @(posedge clock);
      #1;
      idx = k % 4;
      expect_eq("pattern tb_A", int'(tb_A), int'(SEQ[idx]));
      expect_eq("pattern tb_B", int'(tb_B), int'({SEQ[idx][2:0], SEQ[idx][3]}));
      expect_eq("pattern product_AB", int'(product_AB), PROD[idx]);
      expect_eq("pattern tb_AB", int'(tb_AB), PROD[idx]);
      expect_eq("pattern test_result", int'(test_result), 0);
      n_pattern++;
    end
    expect_eq("one pattern per clock", cycles - start_cycle, 12);

    // 4. enable low clears the generator
    enable = 1'b0;
    @(posedge clock);
    #1;
    expect_eq("enable low: tb_A", int'(tb_A), 0);
    expect_eq("enable low: product", int'(product_AB), 0);
    if (tb_A == 0) n_clear++;

    // 5. fault on the multiplier output
    enable = 1'b1;
    for (int k = 0; k < 8; k++) begin
      @(posedge clock);
      #1;
      // corrupt one bit of the multiplier's A operand
      force_a = tb_A ^ 4'(1 << (k % 4));
      force dut.op_a = force_a;
      #1;
      expect_eq("fault detected", int'(test_result), 1);
      if (test_result) n_fault++;
      release dut.op_a;
      #1;
      expect_eq("fault released", int'(test_result), 0);
    end
    test_mode = 1'b0;
    n_switch++;
    data_A = 4'd5;
    data_B = 4'd3;
    #1;
    force_a = 4'd4;
    force dut.op_a = force_a;
    #1;
    expect_eq("faulty product in normal mode", int'(product_AB), 12);
    expect_eq("no verdict in normal mode", int'(test_result), 0);
    release dut.op_a;
    @(posedge clock);
    #1;
    expect_eq("back to normal: product", int'(product_AB), 15);
    expect_eq("back to normal: generator idle", int'(tb_A), 0);

    $display("mechanisms: normal=%0d mode_switch=%0d pattern=%0d enable_clear=%0d fault_detect=%0d",
             n_normal, n_switch, n_pattern, n_clear, n_fault);
    if (n_normal == 0 || n_switch == 0 || n_pattern == 0 || n_clear == 0 || n_fault == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
