// bist_controller: decodes the BIST control inputs into the three control
// lines of the self-test structure.
//
//   sel    -> operand selector: MODE_TEST while test_mode is high
//   tpg_en -> test pattern generator: runs only in test mode with enable
//             high, so the generator stays at 0000 (and does not switch)
//             during normal operation
//   cmp_en -> output comparator: compares only in test mode
//
// Purely combinational; the registers of the self-test live in the pattern
// generator.
//
// The source design shows a BIST controller driving the selector, the
// generator and the comparator from a BIST control input, without giving
// its logic. The decode above is the simplest one that does that job and
// is this implementation's choice.
module bist_controller
  import bist_pkg::*;
(
  input  logic       test_mode,
  input  logic       enable,
  output bist_mode_e sel,
  output logic       tpg_en,
  output logic       cmp_en
);

  always_comb begin
    sel    = test_mode ? MODE_TEST : MODE_NORMAL;
    tpg_en = test_mode & enable;
    cmp_en = test_mode;
  end

endmodule
