// operand_selector_tb: random operands in both modes; the selected pair
// must be the external pair in normal mode and the test pair in test mode.
module operand_selector_tb;
  import bist_pkg::*;
  bist_mode_e sel;
  logic [3:0] da, db, ta, tb, oa, ob;
  int checks = 0, failures = 0;

  operand_selector dut (.sel(sel), .data_a(da), .data_b(db), .test_a(ta),
                        .test_b(tb), .op_a(oa), .op_b(ob));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      sel = (($urandom % 2) != 0) ? MODE_TEST : MODE_NORMAL;
      da = 4'($urandom);
      db = 4'($urandom);
      ta = 4'($urandom);
      tb = 4'($urandom);
      #1;
      checks++;
      if (sel == MODE_TEST ? (oa != ta || ob != tb) : (oa != da || ob != db)) begin
        failures++;
        $display("FAIL sel=%s a=%0d b=%0d", sel.name(), oa, ob);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
