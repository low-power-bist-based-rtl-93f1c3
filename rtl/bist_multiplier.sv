// bist_multiplier: 4 x 4 unsigned multiplier with built-in self-test.
//
// Normal mode (test_mode = 0): the gate-level array multiplier computes
// product_AB = data_A * data_B.
//
// Self-test mode (test_mode = 1): the operand selector feeds the multiplier
// from the low-power test pattern generator instead. With enable high the
// generator steps through 1100, 0110, 1011, 0001 (repeating). Operand A
// (tb_A) is the pattern word and operand B (tb_B) is the same word rotated
// left by one bit, so the test products are 12*9 = 108, 6*12 = 72,
// 11*7 = 77 and 1*2 = 2. The comparator forms the expected product tb_AB
// independently of the array and drives test_result high on any mismatch.
// With enable low the generator sits at 0000 and the expected and actual
// products are both 0.
//
//   clock, reset  rising-edge clock; synchronous, active-high reset
//   enable        runs the pattern generator (in test mode)
//   test_mode     BIST control input: 0 normal, 1 self-test
//   data_A/B      external operands (4 bits)
//   product_AB    product of the selected operands (8 bits)
//   tb_A/B        current test operands (4 bits)
//   tb_AB         expected product of the test operands (8 bits)
//   test_result   1 = multiplier output wrong for the current pattern
//
// Timing: the multiplier, selector, controller and comparator are
// combinational; the only state is the generator's three flip-flops. In
// test mode a new pattern, and with it a new product and verdict, appears
// after each rising clock edge while enable is high.
//
// The port list, the split into selector, generator, multiplier,
// controller and comparator, and the test products above follow the
// source design. Deriving tb_B by rotating the pattern word reproduces the
// products the source reports for self-test; the wiring itself is not
// published and is this implementation's reading.
module bist_multiplier
  import bist_pkg::*;
#(
  parameter int unsigned FB_TAP = 2
) (
  input  logic                clock,
  input  logic                reset,
  input  logic                enable,
  input  logic                test_mode,
  input  logic [OP_W-1:0]     data_A,
  input  logic [OP_W-1:0]     data_B,
  output logic [2*OP_W-1:0]   product_AB,
  output logic [OP_W-1:0]     tb_A,
  output logic [OP_W-1:0]     tb_B,
  output logic [2*OP_W-1:0]   tb_AB,
  output logic                test_result
);

  bist_mode_e            sel;
  logic                  tpg_en;
  logic                  cmp_en;
  logic [3:0]            pattern;
  logic [OP_W-1:0]       op_a, op_b;
  logic [2*OP_W-1:0]     mult_p;

  bist_controller u_ctrl (
    .test_mode (test_mode),
    .enable    (enable),
    .sel       (sel),
    .tpg_en    (tpg_en),
    .cmp_en    (cmp_en)
  );

  lp_tpg #(.FB_TAP(FB_TAP)) u_tpg (
    .clk (clock),
    .rst (reset),
    .en  (tpg_en),
    .t   (pattern)
  );

  assign tb_A = pattern;
  assign tb_B = {pattern[2:0], pattern[3]};

  operand_selector #(.N(OP_W)) u_sel (
    .sel    (sel),
    .data_a (data_A),
    .data_b (data_B),
    .test_a (tb_A),
    .test_b (tb_B),
    .op_a   (op_a),
    .op_b   (op_b)
  );

  array_multiplier #(.N(OP_W)) u_mult (
    .a (op_a),
    .b (op_b),
    .p (mult_p)
  );

  bist_comparator #(.N(OP_W)) u_cmp (
    .cmp_en (cmp_en),
    .test_a (tb_A),
    .test_b (tb_B),
    .dut_p  (mult_p),
    .exp_p  (tb_AB),
    .fail   (test_result)
  );

  assign product_AB = mult_p;

endmodule
