// bist_controller_tb: all four combinations of test_mode and enable
// against the expected control lines.
module bist_controller_tb;
  import bist_pkg::*;
  logic test_mode, enable, tpg_en, cmp_en;
  bist_mode_e sel;
  int checks = 0, failures = 0;

  bist_controller dut (.test_mode(test_mode), .enable(enable), .sel(sel),
                       .tpg_en(tpg_en), .cmp_en(cmp_en));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {test_mode, enable} = 2'(i);
      #1;
      checks += 3;
      if (sel != (i >= 2 ? MODE_TEST : MODE_NORMAL)) begin
        failures++;
        $display("FAIL sel for test_mode=%0b", test_mode);
      end
      if (tpg_en != (i == 3)) begin
        failures++;
        $display("FAIL tpg_en for test_mode=%0b enable=%0b", test_mode, enable);
      end
      if (cmp_en != (i >= 2)) begin
        failures++;
        $display("FAIL cmp_en for test_mode=%0b", test_mode);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
