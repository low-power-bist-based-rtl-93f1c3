// bist_pkg: constants and types shared by the BIST multiplier blocks.
//
// OP_W is the operand width of the multiplier under test and of the test
// pattern generator word (4 bits, as in the design this RTL follows).
// bist_mode_e names the two operating modes selected by the BIST control
// input: normal operation on external data, or self-test on generated
// patterns. The encoding (test = 1) is this implementation's choice and
// matches the polarity of the test_mode pin.
package bist_pkg;

  localparam int unsigned OP_W = 4;

  typedef enum logic {
    MODE_NORMAL = 1'b0,
    MODE_TEST   = 1'b1
  } bist_mode_e;

endpackage
