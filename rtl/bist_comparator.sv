// bist_comparator: test output comparator and analyzer.
//
// Works out the expected product of the two test operands with a
// behavioural multiply (independent of the gate-level array under test),
// presents it as exp_p, and raises fail when comparing is enabled and the
// multiplier's output dut_p differs from it. A high fail marks a fault in
// the multiplier for the current test pattern.
//
// Purely combinational: fail is valid once the operands have settled
// through both the array and the reference multiply.
//
// The comparator, the active-high mismatch output and the exposed expected
// value follow the source design; forming the expected value with a
// reference multiplier rather than a stored table is this implementation's
// choice, as is the name of every port.
module bist_comparator #(
  parameter int unsigned N = bist_pkg::OP_W
) (
  input  logic           cmp_en,
  input  logic [N-1:0]   test_a,
  input  logic [N-1:0]   test_b,
  input  logic [2*N-1:0] dut_p,
  output logic [2*N-1:0] exp_p,
  output logic           fail
);

  always_comb begin
    exp_p = (2*N)'(test_a) * (2*N)'(test_b);
    fail  = cmp_en && (dut_p != exp_p);
  end

endmodule
