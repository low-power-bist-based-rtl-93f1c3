// bist_comparator_tb: expected product and mismatch flag.
//
// For every test operand pair the expected product must equal the integer
// product; the flag must stay low for a correct multiplier output, rise
// for a wrong one (a random single-bit error) and stay low when comparing
// is disabled.
module bist_comparator_tb;
  logic       cmp_en, fail;
  logic [3:0] ta, tb;
  logic [7:0] dut_p, exp_p;
  int checks = 0, failures = 0;

  bist_comparator dut (.cmp_en(cmp_en), .test_a(ta), .test_b(tb),
                       .dut_p(dut_p), .exp_p(exp_p), .fail(fail));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        ta = 4'(i);
        tb = 4'(j);
        cmp_en = 1'b1;
        dut_p = 8'(i * j);
        #1;
        checks += 2;
        if (int'(exp_p) != i * j) begin
          failures++;
          $display("FAIL expected product %0d*%0d, got %0d", i, j, exp_p);
        end
        if (fail) begin
          failures++;
          $display("FAIL flag raised for correct product %0d*%0d", i, j);
        end
        dut_p = 8'(i * j) ^ (8'd1 << ($urandom % 8));
        #1;
        checks++;
        if (!fail) begin
          failures++;
          $display("FAIL wrong product %0d for %0d*%0d not flagged", dut_p, i, j);
        end
        cmp_en = 1'b0;
        #1;
        checks++;
        if (fail) begin
          failures++;
          $display("FAIL flag raised while comparing disabled");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
