# Digit-serial binary comparator with early termination

This is a magnitude comparator for two unsigned N-bit numbers. It tells
whether A > B, A < B or A = B. It does not compare all bits at once. It
splits the operands into small *digits* (2 bits by default) and looks at
them one at a time, starting at the most significant end. The first digit
pair that differs settles the answer, so the search stops there and the
less significant digits are never looked at. Only that one digit pair goes
to the greater-than logic. This logic is the carry-generate equation of a
carry-lookahead adder. So the only long chain left is the digit-by-digit
scan itself, not a carry chain across the whole word.

The design was proposed as a comparator for quantum-dot cellular automata
(QCA), a logic family whose basic gate is the three-input majority gate. The
RTL here is ordinary synchronous logic. The majority gate is kept as a
module (`maj3`), and the greater-than logic builds its AND and OR terms from
it.

Default size: N = 16, digit width DW = 2. The design was also evaluated at
N = 4 and N = 8, and both run unchanged with a parameter override.

## Data path

```
        a, b (start)
           |
   +-------v--------+      shift_en      +----------------+
   |  input_buffer  |<-------------------|  digit_counter |<--- res (= s)
   | 2 x N-bit, MSB |                    | bit count,     |
   |  first, <<1    |                    | digit count    |---> busy, done
   +-------+--------+                    +----------------+
           | a_msb, b_msb                        ^
   +-------v--------+                            |
   |   set_buffer   |  2 x DW-bit shift regs     |
   +-------+--------+                            |
           | a_digit, b_digit                    |
   +-------v--------+                            |
   |  precomp_unit  |  XOR per bit, OR of all ---+-- s = "digits differ"
   +-------+--------+
           |                 en = done & s
   +-------v--------+
   | tristate_buffer|
   +-------+--------+
           |
   +-------v--------+
   |  adder_block   |---> bbiga (B > A), abigb (A > B)
   +----------------+
                         aeqb = done & ~s
```

* **input_buffer** holds both operands. On each counter tick it shifts both
  left by one bit, so the set buffer receives one bit of A and one of B per
  cycle, most significant first.
* **digit_counter** is loaded with the digit size at `start`. It counts
  down on every shift. When it reaches 0, a whole digit sits in the set
  buffer. In that cycle it samples `res`, the "digits differ" line from the
  equality check. If `res` is high, or this was the last digit, the counter
  stops. Otherwise it shifts in the first bit of the next digit in the same
  cycle and reloads with DW-1. A second down-counter tracks how many digits
  are left.
* **set_buffer** (the digit buffer) holds a pair of DW-bit shift registers.
  Once the counter stops, the contents stay frozen. So the digit that
  decided the comparison stays on the adder block's inputs for as long as
  the result is shown.
* **precomp_unit** XORs the two digits bit by bit and ORs the results into
  `s`. `s` = 0 means equal, `s` = 1 means different.
* **tristate_buffer** passes the frozen digit pair to the adder block only
  when the search has stopped on an unequal digit. A two-state model cannot
  float a bus, so the released state is zero data plus a `valid` flag.
* **adder_block** decides which of the two unequal digits is larger (next
  section).

## The greater-than equation

For one bit position i, define

* generate `G_i = ~A_i & B_i`: B has a 1 where A has a 0;
* propagate `P_i = ~(A_i ^ B_i)`: the bits are equal, so the decision is
  handed down to the next lower bit.

For a 2-bit digit, B > A exactly when

```
BbigA = G_1 | (P_1 & G_0)
```

This is the carry-out formula `Cout = G + P*Cin` of a lookahead adder, with
`G_0` as the incoming carry. For wider digits the module applies the same
recurrence bit by bit: `c_0 = G_0`, `c_i = G_i | (P_i & c_(i-1))`, and
`BbigA = c_(DW-1)`. The 2-bit case is the one given for this design; the
wider case is a straightforward generalisation. Every AND is a `maj3` with
one input tied to 0, and every OR is a `maj3` with one input tied to 1.

The adder block is only consulted for digits that are known to differ. So
`abigb` is simply the complement of `BbigA` while `valid` is high, and both
outputs are 0 otherwise.

The propagate term must be an XNOR. With an AND in its place, A = 10,
B = 11 would report "B not greater".

## Timing

Edges are counted after the clock edge that samples `start`. Digits are
numbered k = 0 (most significant) to N/DW - 1.

| event                                 | edges after start |
|---------------------------------------|-------------------|
| digit k is complete in the set buffer | DW*(k+1)          |
| `done` rises, result valid            | DW*(k+1) + 1      |
| `done` for equal operands             | N + 1             |

With the defaults, that is 3 edges when the top 2 bits already differ and
17 edges for equal 16-bit operands. The first differing bit decides the
latency: if it lies in bit position h, then k = (N-1-h)/DW. The published
description gives no cycle counts, so these figures belong to this
implementation.

## Interface (`qca_comparator`)

| port    | dir | width | meaning |
|---------|-----|-------|---------|
| clk     | in  | 1 | clock |
| rst_n   | in  | 1 | asynchronous active-low reset |
| start   | in  | 1 | one-cycle pulse; `a` and `b` are sampled on this edge only |
| a, b    | in  | N | unsigned operands |
| busy    | out | 1 | digits are being examined |
| done    | out | 1 | result valid; stays high until the next `start` |
| aeqb    | out | 1 | A = B |
| abigb   | out | 1 | A > B |
| bbiga   | out | 1 | B > A |

While `done` is low, all three result flags are 0. While `done` is high,
exactly one of them is 1, and an assertion in the top checks this. A
`start` while busy abandons the current search and begins a new one.

Parameters: `N` (operand width, default 16) and `DW` (digit width, default
2). N must be a multiple of DW; `digit_counter` stops elaboration otherwise.
The defaults live in `qca_cmp_pkg`.

## Where this RTL departs from the original description, or fills gaps

* **No gated clock.** The block diagram clocks the input buffer with the
  counter output ANDed with the clock. Here the counter drives a synchronous
  shift enable.
* **Bit-serial shifting.** One bit of each operand moves per cycle. The
  description only says that bits are shifted on each counter tick until
  the counter reaches 0.
* **The "EQ" label.** The diagram puts the label S (EQ) on the OR output,
  which is 1 when the digits *differ*. The text defines EQ as 1 when every
  digit is equal. The text is followed: `aeqb = done & ~s`.
* **The released tristate state** is modelled as zero data plus `valid`.
* **Added control:** the `start`/`busy`/`done` handshake, the reset, a
  digit counter to detect the last digit, and clearing the set buffer at
  `start`. None of these is described in the source.
* **"Encoder block" and "adder block"** are two names for the same unit.
  It is `adder_block` here.
* **QCA physics are not modelled.** Cell layout, polarisation and QCA clock
  zones are outside the RTL. Only the majority gate's logic function is
  kept. The XOR, OR and NOT gates are plain operators.
* The original work reports power, delay and gate-count figures from its
  own tools. They are not reproduced here and cannot be derived from this
  RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a
line `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_maj3` | all 8 input combinations; AND/OR with a tied input |
| `tb_precomp_unit` | all digit pairs for DW = 2 and DW = 4 |
| `tb_tristate_buffer` | random data, enable on and off |
| `tb_adder_block` | every unequal digit pair for DW = 2 and DW = 4 against integer compare |
| `tb_set_buffer` | random shift/clear sequences against a reference model |
| `tb_input_buffer` | MSB-first order with random pauses |
| `tb_digit_counter` | ready/done edge counts and tick counts for a stop at every digit and for none |
| `tb_qca_comparator` | full default size (N = 16, DW = 2): the operand pairs of the published waveforms, a difference placed in every digit, equal operands, 500 random pairs, a restart while busy; checks flags, latency and that the result holds |
| `tb_qca_comparator_widths` | N = 4 and N = 8, every operand pair (256 and 65536), flags and latency |

`tb_qca_comparator` also counts four cases: stops at the first digit,
early stops at an inner digit, decisions at the last digit, and all-equal
runs. A run in which any case never occurs is a failure.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/qca_cmp_pkg.sv tb/tb_qca_comparator.sv --top-module tb_qca_comparator
./obj_dir/Vtb_qca_comparator
```

Replace the testbench name to run any other test. Each one runs in well
under a second. To build a different size, override `N` and/or `DW` on
`qca_comparator`. The latency formula above holds for any legal pair.
