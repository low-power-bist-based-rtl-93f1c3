// operand_selector: the operation input selector in front of the multiplier.
//
// In normal mode the multiplier sees the external operands data_a and
// data_b; in test mode it sees the test patterns test_a and test_b. A pair
// of N-bit 2:1 multiplexers, purely combinational.
//
// The selector and its role follow the source design's BIST block diagram;
// its width parameter and the mode encoding (bist_pkg::bist_mode_e) are
// this implementation's.
module operand_selector
  import bist_pkg::*;
#(
  parameter int unsigned N = OP_W
) (
  input  bist_mode_e   sel,
  input  logic [N-1:0] data_a,
  input  logic [N-1:0] data_b,
  input  logic [N-1:0] test_a,
  input  logic [N-1:0] test_b,
  output logic [N-1:0] op_a,
  output logic [N-1:0] op_b
);

  always_comb begin
    unique case (sel)
      MODE_TEST: begin
        op_a = test_a;
        op_b = test_b;
      end
      default: begin
        op_a = data_a;
        op_b = data_b;
      end
    endcase
  end

endmodule
