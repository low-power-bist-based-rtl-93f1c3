# BIST 4 x 4 multiplier with a three-flip-flop pattern generator

A 4-bit unsigned array multiplier that can test itself. In normal operation
it multiplies two external operands. In self-test mode a small test pattern
generator (TPG) drives the multiplier, and a comparator checks every product
against an independently computed expected value, raising `test_result` on a
mismatch.

The design is meant for low power. The TPG makes 4-bit patterns from only
**three** flip-flops (a register-to-bit ratio of 3:4 instead of the usual
1:1). It is gated off completely outside self-test, and the rest of the
design is combinational.

```
              data_A,data_B ─┐
                             ▼
 test_mode ─► bist_controller ─sel─► operand_selector ─op_a,op_b─► array_multiplier ─► product_AB
 enable    ─►        │                     ▲                              │
                     ├─tpg_en─► lp_tpg ─tb_A, tb_B (rotated)              ▼
                     └─cmp_en──────────────────────────────────► bist_comparator ─► tb_AB, test_result
```

## Top level: `bist_multiplier`

| port | dir | width | meaning |
|---|---|---|---|
| `clock` | in | 1 | rising-edge clock (only the TPG uses it) |
| `reset` | in | 1 | synchronous, active high |
| `enable` | in | 1 | runs the TPG while in self-test |
| `test_mode` | in | 1 | 0 normal operation, 1 self-test |
| `data_A`, `data_B` | in | 4 | operands in normal mode |
| `product_AB` | out | 8 | product of whichever operands are selected |
| `tb_A`, `tb_B` | out | 4 | current test operands |
| `tb_AB` | out | 8 | expected product of `tb_A * tb_B` |
| `test_result` | out | 1 | 1 = the multiplier got the current test pattern wrong |

Parameter `FB_TAP` (default 2) selects the TPG feedback; see below.

Timing: everything except the TPG is combinational. In self-test, each rising
clock edge with `enable` high moves the TPG to the next pattern, and a new
product and a new verdict follow within the same cycle. The test operands,
expected product and verdict are always visible on the ports, so a whole
test run can be watched from outside.

## The test pattern generator (`lp_tpg`)

This is the least conventional part of the design.

```
 EN ──┐
      XOR ──► W1 ──► W2 ──► W3
      ▲              │       (W3 = T3)
      └── feedback ──┘  (FB_TAP = 2: from W2;  FB_TAP = 3: from W3)

 T0 = W1 ^ W2   T1 = W1   T2 = W2   T3 = W3
```

The three flip-flops form a shift chain. The first one loads `EN XOR
feedback`, and a fourth output bit is made for free by XOR-ing the first two
flip-flops. The output word is `t = {T0, T1, T2, T3}`, with T0 as the MSB.

With `enable` high and the default feedback from W2, the generator leaves
0000 and then cycles through four patterns:

```
0000 ─► 1100 ─► 0110 ─► 1011 ─► 0001 ─► 1100 ─► ...
```

While `enable` is low the flip-flops are held clear, so the output is 0000
and nothing switches.

**Feedback tap.** The original description of this generator is not
consistent. One statement puts the feedback on the *last* flip-flop (W3). The
pattern list and the self-test results, however, are a four-word cycle, and
only feedback from W2 produces that. Feedback from W3 turns the chain into a
twisted-ring counter with a six-word cycle (1100 0110 0111 1011 0001 0000).
The default `FB_TAP = 2` reproduces the published patterns and products;
`FB_TAP = 3` builds the other reading. Both are tested.

## Forming the two test operands

One pattern word has to feed both multiplier inputs. Here operand A is the
pattern itself and operand B is the same word rotated left by one bit:

| tb_A | tb_B | product (tb_AB) |
|---|---|---|
| 1100 (12) | 1001 (9) | 108 |
| 0110 (6) | 1100 (12) | 72 |
| 1011 (11) | 0111 (7) | 77 |
| 0001 (1) | 0010 (2) | 2 |

This wiring is a reconstruction. It was chosen because it gives exactly the
self-test products 108, 72, 77, 2 that the reference simulation of this
design reports. Four patterns are a functional smoke test, not a
fault-coverage-grade test: they do not reach every stuck-at fault in the
array.

## The multiplier under test (`array_multiplier`, `half_adder`, `full_adder`)

A standard unsigned array multiplier written at gate level. Its N×N AND
gates form the partial products. Row 0 goes straight in. Every later row
adds its partial product to the upper N bits of the running sum through a
ripple chain: a half adder in bit 0 and full adders above it. In row 1 the
top position is a half adder too, because row 0 has no carry yet. For N = 4
that is 16 AND gates, 4 half adders and 8 full adders, all combinational.
`N` is a parameter (at least 2); the testbench also checks N = 6.

The half adder is XOR/AND. The full adder is XOR/XOR for the sum and
`(a&b) | (cin&(a^b))` for the carry. The exact adder arrangement of the
original is not published; only its use of gate-level half and full adders
is known.

## Control, selection and comparison

- `bist_controller`: `sel = test_mode`, `tpg_en = test_mode & enable`,
  `cmp_en = test_mode`. The original shows a controller driving these three
  lines but not its logic. This is the simplest decode that does that job.
  Keeping the TPG idle in normal mode is a deliberate low-power choice.
- `operand_selector`: two 4-bit 2:1 multiplexers, driven by the
  `bist_pkg::bist_mode_e` enum (`MODE_NORMAL`, `MODE_TEST`).
- `bist_comparator`: computes `tb_AB` with a behavioural `*` that is
  independent of the gate-level array. It drives `fail` (`test_result`) high
  when comparing is enabled and the array's product differs. The flag is per
  pattern, not sticky. The original also calls this block an "analyzer" but
  describes no analysis beyond the mismatch flag.

Shared constants and types are in `bist_pkg` (`OP_W = 4`, `bist_mode_e`).

## Where this RTL departs from, or fills in, the original design

- TPG feedback from W2 by default (see above). The original text says W3.
- TPG cleared while `enable` is low. The original only says the output is
  then 0000.
- `tb_B` is the rotated pattern word (see above).
- Synchronous active-high reset. The reset style is not specified.
- `enable` acts on the TPG only. `product_AB` is not registered and follows
  the selected operands at all times.
- The original also suggests chaining several such generators in series or
  parallel for longer sequences. It gives no design for that, so it is not
  built.
- Power figures for specific FPGA devices are outside what RTL simulation can
  reproduce.

## Files

`rtl/`: `bist_pkg.sv`, `half_adder.sv`, `full_adder.sv`,
`array_multiplier.sv`, `lp_tpg.sv`, `operand_selector.sv`,
`bist_controller.sv`, `bist_comparator.sv`, `bist_multiplier.sv` (top).

`tb/`: one self-checking testbench per module, `<module>_tb.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `array_multiplier_tb`: all 256 operand pairs.
- `lp_tpg_tb`: both feedback taps against a separate model and the literal
  sequences.
- `bist_multiplier_tb`: runs the whole design at its default parameters. It
  covers normal mode, mode switching, 12 pattern steps at one per clock,
  enable-low clearing, and injected operand faults that `test_result` must
  catch.

## Simulating

With Verilator 5, from the folder above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bist_pkg.sv \
    tb/bist_multiplier_tb.sv --top-module bist_multiplier_tb -Mdir obj
./obj/Vbist_multiplier_tb
```

Replace `bist_multiplier` with any other module name to run its testbench.
Every testbench finishes in well under a second.
