// half_adder: one-bit half adder written at gate level.
//
// s = a XOR b, c = a AND b. Purely combinational, no clock. The multiplier
// array uses it in the positions where only two bits have to be added, as
// the gate-level multiplier this RTL follows builds its rows from half and
// full adders.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  assign s = a ^ b;
  assign c = a & b;

endmodule
