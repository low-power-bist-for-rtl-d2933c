# Low-power built-in self-test for an 8-bit ALU

This design is an 8-bit ALU with its own logic built-in self-test (BIST). When the chip
leaves reset, a small controller disconnects the ALU from its normal inputs. It feeds
the ALU 25 pseudo-random test patterns, catches each result and compares it with a
stored fault-free answer. It then reports pass or fail on a single `test` pin. On a
pass, the ALU goes back to its normal inputs and output.

The main idea is in the pattern generator. A plain linear feedback shift register
(LFSR) shifts every bit on every clock. As a result, nearly all of its flip-flops
toggle, and so do the ALU inputs they drive. Test mode then burns much more power
than normal operation. This design uses a **low-power LFSR (LP-LFSR)** instead. It
produces exactly the same pseudo-random bit sequence, but it never moves a bit: on
each step it writes only one flip-flop. So between two test patterns only one ALU
input bit can change.

Everything runs on one clock, with synchronous active-high reset. The RTL is
synthesizable SystemVerilog (IEEE 1800-2017).

## Block diagram

```
                 clk rst          test
                  |   |            ^
             +----v---v------------+--------------------------------+
             |            bist_controller (S1..S10)                 |<-- eq
             +--+--------+--------------+-------------+-------------+
        lclk,lrst  mux_sel        demux_sel      latch_clk      address
                |        |              |             |             |
          +-----v---+ +--v--------+ +---+ +-----------v--+     +----v------+
          | lp_lfsr |-> input_mux |->alu|->demux          |     | bist_rom  |
          | 21 stg  | |           | +---+ | normal  test  |     | 32 x 8    |
          +---------+ +--^--------+       +--+------+-----+     +----+------+
                         |                   |      |                | Dout
        nop1 nop2 nsel ncin                  y1   hold_latch --Qout--> comparator --> eq
```

| Module            | Role |
|-------------------|------|
| `lp_bist_alu`     | Top level: wires the blocks below together |
| `bist_controller` | Ten-state controller that sequences the test and drives `test` |
| `lp_lfsr`         | Low-power LFSR, the test pattern generator |
| `input_mux`       | Selects the normal inputs or the test pattern for the ALU |
| `alu`             | The circuit under test: 16 operations on 8-bit operands |
| `demux`           | Sends the ALU result to `y1` (normal mode) or to the latch (test mode) |
| `hold_latch`      | Holds one test response steady for the comparator |
| `bist_rom`        | Expected responses, one per pattern (`rtl/bist_rom.hex`) |
| `comparator`      | Equality check of the held response against the ROM word |
| `bist_pkg`        | Shared width constants, the ALU opcode enum and the ALU input struct |

## The low-power LFSR

The hardest part to follow is `lp_lfsr`.

**The conventional register it copies.** Take an N-stage Fibonacci LFSR with stages
1..N. On each step:

- every stage takes its left neighbour's value;
- stage 1 takes `XNOR(stage N, stage TAP)`;
- stage N is the serial output.

The XNOR form, an XOR with one input inverted, makes all-zeros a legal start state, so
the register resets to zero. The polynomial is x^N + x^TAP + 1. The defaults are:

| Use | N | TAP | Polynomial |
|-----|---|-----|------------|
| Module default | 7 | 6 | x^7 + x^6 + 1 |
| In the BIST | 21 | 19 | x^21 + x^19 + 1 |

Both polynomials are primitive, so the register runs through all 2^N - 1 nonzero
states.

**The circular buffer.** In a shift, only one value is really new: the feedback bit.
Every other value just moves over by one place. So the LP-LFSR keeps the bits where
they are and moves the point of view instead. Its N flip-flops `q[N-1:0]` form a ring.
A one-hot enable `en` marks the flip-flop that currently plays conventional stage N,
which is the oldest bit. The flip-flop one place above it plays stage 1, the next one
stage 2, and so on.

A step does two things:

1. The enabled flip-flop, stage N, is overwritten with the new feedback bit, so it
   becomes the new stage 1.
2. The enable moves one flip-flop down (`en[j] -> en[j-1]`, wrapping from 0 to
   N-1). The flip-flop below, which played stage N-1, becomes stage N.

All other flip-flops are disabled and keep their value. In silicon they are clock
gated; the RTL writes them as load enables.

**Per-stage feedback and output.** Each flip-flop j has a fixed feedback gate,
`XNOR(q[j], q[(j+TAP) mod N])`, and it is used only while `en[j]` is set. At that
moment `q[j]` is stage N, and `q[(j+TAP) mod N]` is stage TAP. The serial output
`u1 = |(q & en)` is a one-hot multiplexer on the enabled flip-flop, so it equals the
conventional register's stage N on every clock. To read the full conventional state,
start at the flip-flop just above the enabled one and go around the ring.

**What it saves, and what it costs.** Each step toggles at most one pattern
flip-flop, which is one ALU input. The one-hot enable ring, however, toggles two
flip-flops per step. The power saving therefore grows with run length and register
length. With the 21-stage generator driving the ALU, `tb_test_power` counts:

| Quantity | LP-LFSR | Conventional LFSR |
|----------|---------|-------------------|
| Pattern flip-flop toggles, 2000 patterns | 945, plus 4000 in the enable ring | 17143 |
| ALU output toggles, 2000 patterns | 1342 | 7694 |
| Pattern flip-flop toggles, 25-pattern test | 19, plus 50 in the enable ring | 31 |
| ALU output toggles, 25-pattern test | 38 | 34 |

These are toggle counts, not power figures.

## How a self-test runs

`bist_controller` is a Moore machine. Its outputs are decoded from the state.

| State | Action |
|-------|--------|
| S1 | Entered on reset. Everything off, `test` = 0, pattern count cleared. |
| S2 | Mux and demux switch to test mode, the LP-LFSR is reset, `test` = 1. |
| S3 | Wait. |
| S4 | `lclk`: the LP-LFSR takes one step, so a new pattern reaches the ALU. |
| S5 | `latch_clk`: the hold latch captures the ALU result. |
| S6 | The comparator output is checked and the count advances. On a mismatch, go to S8. |
| S7 | Back to S3 while fewer than `NUM_PATTERNS` patterns have been checked, otherwise S9. |
| S9 | Pass: normal mode, `test` = 0, stays here until reset. |
| S8 / S10 | Fail: alternate forever, so `test` toggles 0,1,0,1 every clock. The ALU stays in test mode, and `y1` stays 0. |

Resulting timing, counted from the first clock after reset is released:

- `test` goes to 1 at cycle 1.
- Each pattern takes 5 clocks.
- A passing ALU drops `test` for good at cycle 2 + 5 x 25 = **127**.
- From then on, `y1 = ALU(nop1, nop2, ncin, nsel)` combinationally.

The ROM has a registered read, addressed by the pattern count. The count is stable
from S7 to S6, so the word is ready when S6 compares it.

## The ALU

`alu` is combinational. `sel` is s(0)s(1)s(2)s(3), with s(0) as the MSB. Arithmetic
wraps modulo 256, and there is no carry out or flag output.

| sel | op | sel | op | sel | op | sel | op |
|---|---|---|---|---|---|---|---|
| 0 | a | 4 | b+1 | 8 | not a | C | a nand b |
| 1 | a+1 | 5 | b-1 | 9 | not b | D | a nor b |
| 2 | a-1 | 6 | a+b | A | a and b | E | a xor b |
| 3 | b | 7 | a+b+cin | B | a or b | F | not(a xor b) |

## Test patterns and expected responses

The 21 LP-LFSR flip-flops drive the 21 ALU inputs directly, through the packed struct
`bist_pkg::alu_in_t`:

| ALU input | LP-LFSR bits |
|-----------|--------------|
| `a` | `q[7:0]` |
| `b` | `q[15:8]` |
| `cin` | `q[16]` |
| `sel` | `q[20:17]` |

Pattern k (k = 0..24) is the LP-LFSR state after k+1 steps from reset:

- All stages start at 0, and the enable starts on stage 20.
- Each step sets `q[e] = ~(q[e] ^ q[(e+19) mod 21])`, then `e = (e-1) mod 21`.

ROM word k is the ALU result for pattern k. Words 25 to 31 are 0.
`rtl/bist_rom.hex` holds exactly this table. If you change the polynomial, the pattern
count or the bit assignment, regenerate the table with the same recurrence and the
ALU table above. `tb_bist_rom` recomputes it independently and reports any
difference.

**Limitation: test coverage.** With an all-zero start, only one bit changing per
pattern, and 25 patterns, the ALU sees only four operations: sel = 8, C, E and F.
Twenty-one of the 25 patterns use XNOR. The self-test does catch, for example, a
stuck-at-1 on ALU output bit 0, at pattern 2. But it is a short, low-coverage test.
Its fault coverage has not been measured.

## Interface of `lp_bist_alu`

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | Clock |
| `rst` | in | 1 | Synchronous, active high. Releasing it starts the self-test. |
| `nop1`, `nop2` | in | 8 | Normal operands a and b |
| `nsel` | in | 4 | Normal operation select |
| `ncin` | in | 1 | Normal carry in |
| `y1` | out | 8 | Normal-mode ALU result. 0 while in test mode. |
| `test` | out | 1 | 1 while testing, 0 after a pass, toggling after a fail |

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `NUM_PATTERNS` | 25 | Number of test patterns |
| `LFSR_TAP` | 19 | Second tap of the 21-stage LP-LFSR |
| `ROM_FILE` | `"rtl/bist_rom.hex"` | Expected responses. The path is relative to the directory the simulator or synthesis tool runs in. |

## What follows the source design and what is this design's own

These follow the source design:

- the block structure (LP-LFSR, input mux, ALU, demux, latch, ROM, comparator,
  controller);
- the ten controller states with their outputs, transitions and the count of 25;
- `test` toggling on a fault;
- the 16 ALU operations and the 8-bit width;
- the LP-LFSR principle: one enabled flip-flop per shift, a feedback gate per stage,
  an output multiplexer, and the same output sequence as a conventional LFSR;
- XNOR feedback with zero reset.

These are this design's own choices:

- the 21-stage length and both polynomials;
- the one-hot enable ring;
- the pattern-to-ALU bit assignment;
- the registered ROM and its file;
- keeping test mode (and `test` = 1) in the states whose outputs were left open;
- driving 0 instead of high impedance on the unused demux output;
- building the "latch" as an edge-triggered register with a load enable;
- starting the test from reset release rather than from a separate start input.

Where it departs from, or goes beyond, the source design:

- A fault makes `test` toggle. One sentence of the source says the status line goes
  high on a fault; the state machine, which toggles, was followed.
- The comparator compares the raw held response. The source mentions a "compacted"
  response but describes no compactor.
- A reference simulation of the original design shows the operation select stepping
  through 0, 1, 2, ... with both operands at 0, and the ROM address not moving. Here
  every ALU input comes from the LP-LFSR, and the ROM address follows the pattern
  count.
- Test partitioning into sub-circuits is mentioned as a general technique but not
  built.
- The conventional LFSR is not part of the design. It exists only as the testbench
  model `tb/conv_lfsr.sv`.

## Simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. Run from the repository root, so that the ROM
file is found. For example, for the whole design:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bist_pkg.sv tb/tb_lp_bist_alu.sv --top-module tb_lp_bist_alu -o sim
./obj_dir/sim
```

| Testbench | What it checks |
|-----------|----------------|
| `tb_lp_bist_alu` | The whole design at default parameters. <ul><li>Fault-free self-test: every pattern against a reference model, at most one input bit changing per pattern, `test` falling at cycle 127.</li><li>300 normal-mode operations.</li><li>A rerun with ALU output bit 0 forced to 1: `test` must toggle from pattern 2 on.</li><li>Counts each mechanism: LFSR step, latch load, match, mismatch, switch to normal mode, toggling.</li></ul> |
| `tb_lp_lfsr` | 7- and 21-stage LP-LFSRs against conventional LFSR models: serial output, unrotated state, one-hot enable, one change per step, period 127, hold and restart. |
| `tb_bist_controller` | Every output on every cycle for a passing run and for runs failing at patterns 0, 12 and 24. |
| `tb_test_power` | Toggle counts, LP-LFSR against conventional LFSR, both driving the ALU. |
| `tb_alu`, `tb_input_mux`, `tb_demux`, `tb_hold_latch`, `tb_comparator`, `tb_bist_rom` | The individual blocks against independently computed values. |

All of these pass. `tb_lp_bist_alu` uses `force`/`release` on an internal net to
inject the ALU fault.

After synthesis the top is about 156 word-level cells and 73 flip-flops. The
constant ROM folds into logic.
