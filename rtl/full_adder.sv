// full_adder: one-bit full adder written at gate level.
//
// s = a XOR b XOR cin; cout is the majority of the three inputs, formed as
// (a AND b) OR (cin AND (a XOR b)). Purely combinational, no clock. The
// gate network is the textbook one; the source design states only that its
// full adder is built from gates.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  logic axb;

  assign axb  = a ^ b;
  assign s    = axb ^ cin;
  assign cout = (a & b) | (cin & axb);

endmodule
