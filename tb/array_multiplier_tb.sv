// array_multiplier_tb: checks the 4 x 4 array multiplier.
//
// First the operand pairs of the reference multiplier waveform (3*1,
// 4*14, 5*12, 6*11, 7*11, 8*12) against their known products, then all
// 256 operand pairs against an integer product, then a 6 x 6 instance on
// random operands to exercise the generic array.
module array_multiplier_tb;
  logic [3:0] a, b;
  logic [7:0] p;
  logic [5:0] a6, b6;
  logic [11:0] p6;
  int checks = 0, failures = 0;

  typedef struct packed {
    logic [3:0] a;
    logic [3:0] b;
    logic [7:0] p;
  } vec_t;

  localparam vec_t KNOWN [6] = '{
    '{4'b0011, 4'b0001, 8'b0000_0011},
    '{4'b0100, 4'b1110, 8'b0011_1000},
    '{4'b0101, 4'b1100, 8'b0011_1100},
    '{4'b0110, 4'b1011, 8'b0100_0010},
    '{4'b0111, 4'b1011, 8'b0100_1101},
    '{4'b1000, 4'b1100, 8'b0110_0000}
  };

  array_multiplier dut (.a(a), .b(b), .p(p));
  array_multiplier #(.N(6)) dut6 (.a(a6), .b(b6), .p(p6));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (KNOWN[k]) begin
      a = KNOWN[k].a;
      b = KNOWN[k].b;
      #1;
      checks++;
      if (p != KNOWN[k].p) begin
        failures++;
        $display("FAIL known %0d*%0d = %0d, got %0d", a, b, KNOWN[k].p, p);
      end
    end
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          $display("FAIL %0d*%0d = %0d, got %0d", i, j, i * j, p);
        end
      end
    end
    for (int k = 0; k < 200; k++) begin
      a6 = 6'($urandom);
      b6 = 6'($urandom);
      #1;
      checks++;
      if (int'(p6) != int'(a6) * int'(b6)) begin
        failures++;
        $display("FAIL N=6 %0d*%0d, got %0d", a6, b6, p6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
