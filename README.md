# Carry-select multiply-accumulate unit with Feynman-gate adders

This is an unsigned multiply-accumulate (MAC) unit. It computes F = Σ aᵢ·bᵢ over a
stream of operand pairs, one pair per clock. By default it takes 32-bit operands,
forms a 64-bit product and keeps a 66-bit running sum. Every long addition in
it uses a **carry-select adder (CSLA)**:

- the final adder of the multiplier;
- the accumulator adder.

The XOR path of every full adder, and the fan-out of the accumulated sum, use
**Feynman gates**. These are reversible two-in, two-out gates.

## Structure

```
 a_i[N]   b_i[N]
    │        │
 ┌──▼────────▼──┐
 │ array mult.  │  carry-save array + CSLA final adder   (combinational)
 └──────┬───────┘
        │ 2N
 ┌──────▼───────┐
 │ product reg  │  2N+1 bits, with valid/first flags      (stage 1)
 └──────┬───────┘
        │
 ┌──────▼───────┐      ┌──────────────┐
 │ CSLA adder   │◄─────┤ feedback reg │  2N+2 bits
 └──────┬───────┘      └──────▲───────┘
        │                     │
 Feynman copy gates ──────────┘
        │
 ┌──────▼───────┐
 │ accum. reg   │  2N+2 bits                               (stage 2)
 └──────┬───────┘
        ▼ acc_o
```

With N = 8 the registers are 17 bits (product) and 18 bits (accumulator and
feedback), which is the sizing of the published 8-bit version of this
architecture. The widths grow as 2N+1 and 2N+2, so the 32-bit default has a
65-bit product register and 66-bit accumulator registers.

| module             | role |
|--------------------|------|
| `mac_top`          | the MAC: multiplier, product register, accumulation stage |
| `array_multiplier` | N×N unsigned array multiplier |
| `mac_accumulator`  | CSLA accumulator adder, accumulator register, feedback register |
| `csla`             | W-bit carry-select adder, groups of BLK bits |
| `ripple_adder`     | ripple-carry adder used inside each CSLA group |
| `rev_full_adder`   | full adder: two Feynman gates for the sum, AND/OR for the carry |
| `feynman_gate`     | P = A, Q = A ⊕ B |

## The array multiplier

Partial product i is `a & {N{b[i]}}`. The partial products are reduced in a
carry-save array of N−1 rows, each with N full adders. Row i adds three
inputs:

- partial product i;
- the sum bits of row i−1, shifted down one place;
- the carry bits of row i−1.

No carry moves sideways inside a row, so each row costs one full-adder delay.
The lowest sum bit of each row is already final. It leaves the array as
product bit i−1, and the last row supplies bit N−1.

The last row leaves a sum vector and a carry vector. One N-bit CSLA adds them
to give product bits N…2N−1. Their total is the product divided by 2ᴺ, which
is always below 2ᴺ. That is why the N-bit sum is exact, and the adder's
carry-out is always 0 and left unconnected.

## The carry-select adder

`csla` cuts its operands into groups of `BLK` = 4 bits. The last group takes
any bits left over. The lowest group is a ripple adder fed by `cin`. Every
higher group holds two ripple adders that run in parallel. One assumes a
carry-in of 0, the other a carry-in of 1. When the real carry arrives from
below, a 2:1 multiplexer picks the matching sum and carry-out. The carry path
therefore crosses one multiplexer per group rather than four full adders. The
cost is roughly double the adder area in every group except the lowest.

## Reversible gates and where they are used

A Feynman gate maps (A, B) to (A, A ⊕ B). It is one-to-one, so the inputs can
be recovered from the outputs. It is used in two ways:

- **As an XOR.** `rev_full_adder` forms `a ⊕ b` with one gate and `a ⊕ b ⊕ cin`
  with a second one. A Feynman gate is linear and cannot form an AND, so the
  carry `(a & b) | (cin & (a ⊕ b))` is built from ordinary gates.
- **As a copying gate.** Reversible logic has no fan-out, so with B = 0 the
  gate yields two copies of A. `mac_accumulator` copies the adder result this
  way, bit by bit. One copy goes to the accumulator register (the output) and
  the other to the feedback register (the adder's second operand). Both
  registers therefore always hold the same value. An assertion
  (`a_copies_match`) checks this.

This is an RTL model. Synthesis reduces the Feynman gates to ordinary XOR
gates and wires, so the netlist gains no reversibility or power property from
them.

## Interface and timing (`mac_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous, active-low reset; clears every register |
| `valid_i` | in | 1 | `a_i`, `b_i` carry a pair to accumulate |
| `first_i` | in | 1 | this pair starts a new sum (ignored unless `valid_i`) |
| `a_i`, `b_i` | in | N | unsigned operands |
| `acc_o` | out | 2N+2 | running sum |
| `valid_o` | out | 1 | `acc_o` was updated by the last clock edge |

- **Latency.** The operands go straight into the multiplier, without an input
  register. A pair sampled at clock edge t lands in the product register at t.
  It is in `acc_o` after edge t+1, and `valid_o` is high in that cycle.
- **Throughput.** One pair per clock.
- **Idle cycles.** While `valid_i` is low the sum holds.
- **Starting a sum.** When `first_i` is high with `valid_i`, the stored sum is
  replaced by the new product. Without it, the product is added.
- **Overflow.** The sum wraps modulo 2^(2N+2) and no flag is raised. With
  full-scale operands that happens after about 4 terms.

The critical path runs from the operands through the N−1 carry-save rows and
the multiplier's CSLA into the product register. The accumulator stage has
only one 2N+2-bit CSLA between its registers.

## How this relates to the original design

These parts follow the published design:

- the block structure: multiplier, product register, accumulator adder,
  feedback register and accumulator register;
- the register widths;
- the 32-bit operand and 64-bit product size;
- an array multiplier;
- a carry-select adder as the final adder;
- the Feynman gate and its use for copying.

These parts are this implementation's choices:

- **Feedback register.** The original drawing takes the feedback register's
  input from the accumulator register's output. Taken literally, that gives a
  two-cycle loop that would interleave two separate sums. Here both registers
  load the same adder result, so the loop closes in one cycle.
- **Adder width.** The accumulator adder is 2N+2 bits wide, like the
  registers, not 2N+1, so that the fed-back sum is never truncated.
- **Internals.** The carry-save organisation of the array, the 4-bit CSLA
  groups and the AND/OR carry of the full adder.
- **Control and arithmetic.** Unsigned arithmetic, the `valid_i`/`first_i`
  handshake, the asynchronous reset and the wrap-around behaviour.
- **What is left out.** The original compares this MAC with versions whose
  final adder is a carry look-ahead or a carry-save adder. Those alternatives
  are not included.

The original reports area, delay and power figures from its own synthesis
flow. They are not reproduced here and nothing in this RTL depends on them.

## Verification

Each block has a self-checking testbench in `tb/` (the ripple adder and the
full adder are covered through `tb_csla` and `tb_array_multiplier`). Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself through a watchdog if it
hangs.

| testbench | what it checks |
|-----------|----------------|
| `tb_feynman_gate` | all four input combinations against the truth table |
| `tb_csla` | 32-bit/4-bit-group and 13-bit/5-bit-group adders: carries through every group, then 40 000 random sums |
| `tb_array_multiplier` | 8-bit multiplier over all 65 536 operand pairs; 32-bit multiplier with corner cases and 20 000 random pairs |
| `tb_mac_accumulator` | 66-bit accumulation stage against a model: restarts, idle cycles, wrap-around, one-cycle latency |
| `tb_mac_top` | full-size 32-bit MAC end to end, 20 000 cycles, against an integer model |
| `tb_mac_top_n8` | the same at N = 8 (17/18-bit registers) |

The two MAC testbenches compare `acc_o` and `valid_o` every cycle with the
model value from two edges earlier, which checks latency and throughput. They
also count how often each behaviour happened: accumulate, restart, idle,
wrap-around and all-ones operands. A behaviour that never happened counts as
a failure.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_mac_top.sv --top-module tb_mac_top -o sim
./obj_dir/sim
```

## Changing it

- **Operand width.** Set `N` on `mac_top`, for any N ≥ 2. The register widths
  follow as 2N+1 and 2N+2.
- **CSLA group size.** Set `BLK` on `csla`. It is not passed down from
  `mac_top`, so edit the default or the two instantiations.
- **Signed operands.** These would need a signed (for example Baugh-Wooley)
  array and a sign-extended product. Neither exists here.
