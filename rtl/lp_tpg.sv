// lp_tpg: low-power test pattern generator, 4-bit words from 3 flip-flops.
//
// Three D flip-flops W1 -> W2 -> W3 form a shift chain. W1 loads the XOR of
// the Enable input with a feedback flip-flop; the fourth output bit is the
// XOR of W1 and W2. The outputs are T0 = W1 ^ W2, T1 = W1, T2 = W2, T3 = W3,
// so four pattern bits cost only three registers (register-to-bit ratio
// 3:4), which is where the low switching power comes from.
//
// The word is presented as t = {T0, T1, T2, T3}, i.e. T0 is the most
// significant bit, the order in which the patterns are written out below.
// With the default feedback from W2 (FB_TAP = 2) and Enable high, the
// generator leaves 0000 and then repeats four patterns:
//     0000 -> 1100 -> 0110 -> 1011 -> 0001 -> 1100 -> ...
// FB_TAP = 3 takes the feedback from the last flip-flop W3 instead, which
// makes a six-pattern cycle (1100 0110 0111 1011 0001 0000).
//
// While Enable is low the three flip-flops are cleared, so the output is
// 0000 and nothing toggles. Reset is synchronous and active high.
//
// Timing: t is registered; it advances one pattern per rising clock edge
// while en is high. The first pattern after en rises appears one clock
// edge later.
//
// What follows the source design: three flip-flops, the Enable XOR at the
// input of the first one, T0 as the XOR of the first two, the output
// 0000 for Enable low and the printed four-pattern sequence. The source
// describes the feedback as coming from the last flip-flop but prints a
// four-pattern cycle that only feedback from the second one produces; the
// default follows the printed sequence and FB_TAP = 3 gives the other
// reading. Clearing the flip-flops when Enable is low, and the synchronous
// reset, are this implementation's choices.
module lp_tpg #(
  parameter int unsigned FB_TAP = 2
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  output logic [3:0] t
);

  logic w1, w2, w3;
  logic fb;

  assign fb = (FB_TAP == 3) ? w3 : w2;

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      w1 <= 1'b0;
      w2 <= 1'b0;
      w3 <= 1'b0;
    end else begin
      w1 <= en ^ fb;
      w2 <= w1;
      w3 <= w2;
    end
  end

  assign t = {w1 ^ w2, w1, w2, w3};

  initial begin
    assert (FB_TAP == 2 || FB_TAP == 3)
      else $error("lp_tpg: FB_TAP must be 2 or 3");
  end

endmodule
