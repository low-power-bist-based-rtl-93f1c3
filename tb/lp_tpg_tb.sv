// lp_tpg_tb: checks the low-power test pattern generator.
//
// The expected words are worked out by a separate model of the three
// flip-flop chain (W1 <= Enable ^ feedback, W2 <= W1, W3 <= W2,
// T0 = W1 ^ W2). The default generator must also reproduce the four-word
// cycle 1100 0110 1011 0001 written out as literals, advance one word per
// clock, read 0000 while Enable is low and after reset, and a second
// instance with feedback from W3 must follow its six-word cycle.
module lp_tpg_tb;
  logic clk = 1'b0;
  logic rst, en;
  logic [3:0] t2, t3;
  int checks = 0, failures = 0;
  int cycles = 0;

  localparam logic [3:0] SEQ4 [4] = '{4'b1100, 4'b0110, 4'b1011, 4'b0001};
  localparam logic [3:0] SEQ6 [6] = '{4'b1100, 4'b0110, 4'b0111, 4'b1011, 4'b0001, 4'b0000};

  lp_tpg dut (.clk(clk), .rst(rst), .en(en), .t(t2));
  lp_tpg #(.FB_TAP(3)) dut3 (.clk(clk), .rst(rst), .en(en), .t(t3));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 500) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // reference model state
  logic [2:0] m2, m3;  // {W1, W2, W3}

  function automatic logic [3:0] word(input logic [2:0] w);
    return {w[2] ^ w[1], w[2], w[1], w[0]};
  endfunction

  task automatic check(input string what, input logic [3:0] got, input logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: expected %b got %b", what, exp, got);
    end
  endtask

  task automatic step_model();
    if (rst || !en) begin
      m2 = '0;
      m3 = '0;
    end else begin
      m2 = {en ^ m2[1], m2[2], m2[1]};
      m3 = {en ^ m3[0], m3[2], m3[1]};
    end
  endtask

  initial begin
    rst = 1'b1;
    en  = 1'b0;
    m2  = '0;
    m3  = '0;
    repeat (2) @(posedge clk);
    #1;
    check("after reset", t2, 4'b0000);
    rst = 1'b0;
    en  = 1'b1;
    #1;
    check("enable raised, before edge", t2, 4'b0000);
    // 12 clocks with Enable high: literal sequence and model
    for (int k = 0; k < 12; k++) begin
      @(posedge clk);
      step_model();
      #1;
      check("tap2 literal", t2, SEQ4[k % 4]);
      check("tap2 model", t2, word(m2));
      check("tap3 literal", t3, SEQ6[k % 6]);
      check("tap3 model", t3, word(m3));
    end
    // Enable low clears the word
    en = 1'b0;
    @(posedge clk);
    step_model();
    #1;
    check("enable low", t2, 4'b0000);
    check("enable low tap3", t3, 4'b0000);
    repeat (3) @(posedge clk);
    #1;
    check("enable low held", t2, 4'b0000);
    // random Enable and reset against the model
    for (int k = 0; k < 100; k++) begin
      en  = ($urandom % 4) != 0;
      rst = ($urandom % 16) == 0;
      @(posedge clk);
      step_model();
      #1;
      check("random tap2", t2, word(m2));
      check("random tap3", t3, word(m3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
