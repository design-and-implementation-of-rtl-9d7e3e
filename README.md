# Low-transition LFSR built-in self-test of a compressor-based Vedic multiplier

A built-in self-test (BIST) applies pseudo-random patterns to a circuit at
full clock rate. Consecutive LFSR patterns differ in about half of their
bits, so the circuit under test toggles far more during test than in normal
operation. That extra switching can push the chip past its power limit.
This design keeps the LFSR's pattern set but spreads each pattern-to-pattern
change over four clocks. In any one clock only half of the inputs can move,
and every bit that has to change flips exactly once.

The circuit under test is an 8 x 8 multiplier that uses the Urdhva
Tiryakbhyam ("vertically and crosswise") method. Each product column is
summed by a 7:2 compressor. The test checks each product against the expected
one stored in a one-time-programmable memory, and flags every pattern good or
bad.

```
             +------------------------------+
   start --->| sequencer: pattern counter   |---- busy / done / fail
             +------------------------------+
                 | test_en, init        | address
                 v                      v
   +---------------------------+   +-----------+
   | LT-LFSR (16 bit)          |   | PROM      |<--- prog_en / prog_addr / prog_data
   |  bipartite LFSR, RI cells,|   | 256 x 16  |
   |  output muxes, step FSM   |   +-----------+
   +---------------------------+         | expected
      | O1..O8 = a   | O9..O16 = b       v
      v              v              +------------+
   +---------------------------+    | comparator |---> good / bad
   | Vedic 8x8 multiplier      |--->|            |
   | (7:2 compressor columns)  |    +------------+
   +---------------------------+ response
```

## The low-transition LFSR

### Two halves advanced in turn

The pattern source is a 16-bit Fibonacci LFSR. Flip-flop 1 takes the XOR of
the tapped flip-flops (16, 15, 13 and 4), and every other flip-flop k takes
flip-flop k-1. The register is cut into two halves, flip-flops 1..8 and
9..16, and each half has its own enable. A half advanced by itself gives the
same bits it would in the whole LFSR, with one exception: flip-flop 9 needs
the old value of flip-flop 8, which the first half has already shifted out by
the time the second half moves. A buffer flip-flop between the halves keeps
that bit. It loads when the first half advances, and flip-flop 9 takes its
input from it. So once both halves have advanced, the register holds exactly
the next state of the plain 16-bit LFSR. The sequence is therefore still
maximal-length: 65,535 states.

### Intermediate patterns by R-injection

Each flip-flop also feeds an R-injection (RI) cell. The cell sees the
flip-flop's present value (its output), its next value (its D input) and a
random bit R, which here is the LFSR's serial output (flip-flop 16):

* if the bit will not change, the cell passes it on;
* if it will change, the cell passes R.

Each half has one 2:1 multiplexer per output. The multiplexer passes either
the flip-flops (sel = 1) or the RI cells (sel = 0) to outputs O1..O16.

### The four steps

A small controller steps through the following table, one step per clock
while `test_en` is high:

| step | en1 en2 | sel1 sel2 | pattern shown | what changed since the previous pattern |
|------|---------|-----------|---------------|-----------------------------------------|
| 1    | 1 0     | 1 1       | T(i)          | first half: from its RI value to its new value |
| 2    | 0 0     | 1 0       | T(i)1         | second half: from its value to its RI value |
| 3    | 0 1     | 1 1       | T(i)2         | second half: from its RI value to its new value |
| 4    | 0 0     | 0 1       | T(i)3         | first half: from its value to its RI value |

Only one half can change between two consecutive patterns. Take a bit that
differs between T(i) and T(i+1). If R equals the bit's old value, the bit
holds in the RI step and flips in the next step. If R equals its new value,
the bit flips in the RI step and holds in the next step. Either way it flips
exactly once. Over one round, the total number of input toggles therefore
equals the Hamming distance between T(i) and T(i+1). Those toggles are now
spread over four clocks, with at most one half moving at a time.

**Timing of the enables.** The en1/en2 values of a step take effect on the
clock edge that *enters* that step. The controller drives the flip-flop
enables from the step it is about to enter, so the pattern shown during
step 1 already contains the advanced first half. This is the only reading of
the step table in which consecutive patterns never change in both halves.
`step` is a `lt_bist_pkg::step_t` (STEP1..STEP4 encoded 0..3).

**Measured effect.** `tb_lt_activity` drives one multiplier from the
LT-LFSR and a second from a conventional LFSR with the same taps and seed,
advanced once per clock. Over 16,384 clocks:

| | LT-LFSR | conventional LFSR |
|---|---|---|
| multiplier input toggles per clock | 2.05 | 8.03 |
| peak input toggles in one clock | 4 | 16 |
| product-bit toggles per clock | 5.92 | 7.23 |

The LT-LFSR covers the LFSR sequence four times more slowly in clocks: one
new LFSR state every four patterns. The intermediate patterns are extra test
vectors, not a replacement for LFSR states.

With `test_en` low, everything holds. `init` reloads the seed (all ones),
clears the buffer flip-flop and returns to step 1 on the next edge.

## The circuit under test: vertical-and-crosswise multiplication

Urdhva Tiryakbhyam multiplication forms each product column k from the
"vertical" and "crosswise" digit pairs whose indices add up to k, and forms
all columns at once. In binary these are the partial products `a[i] & b[k-i]`.
For 8 x 8 there are 15 columns, of at most 8 bits each.

### 4:2 and 7:2 compressors

* **4:2 compressor.** Adds four bits and a carry-in (X0..X3, Cin) and gives a
  3-bit count {Cout, C, S}, with weights 4, 2 and 1. Inside are two full
  adders and a half adder.
* **7:2 compressor.** Two 4:2 compressors take X0..X3 + Cin1 and X4..X7 + Cin2.
  The rest is wired by weight:
  * a half adder adds the two weight-1 bits into S and a carry;
  * a full adder adds the two weight-2 bits and that carry into C0 and a
    carry;
  * a second full adder adds the two weight-4 bits and that carry into C1
    and C2.

  The result {C2, C1, C0, S} is the exact count of the ten inputs (at most 10).
  Although the block is called 7:2, it has eight data inputs.

### The multiplier

`vedic_mult` gives each column its own 7:2 compressor, with the carry-ins tied
low. The compressor outputs form four rows of weight 2^k, 2^(k+1), 2^(k+2)
and 2^(k+3). A single carry-propagate adder adds the four rows into the
16-bit product. There is no ripple from column to column, and the multiplier
is purely combinational. N is a parameter, limited to 8, because one
compressor has eight data inputs.

## Stored responses and the verdict

The expected products are held in a fuse PROM, `prom`, of 256 x 16 bits.
Unprogrammed, every bit reads 1. Writing a word blows the fuses where the
written data is 0, so the stored word becomes `old & data`. A blown fuse never
reads 1 again. The PROM has no reset, and in simulation it starts at all ones.
The read is asynchronous.

`comparator` compares the multiplier's product with the stored word. When
`valid` is high, exactly one of `good` and `bad` is high.

## Running a test (`lt_bist_top`)

1. Program PROM word k with the expected product of pattern k, for k = 0..255:
   set `prog_en` high with `prog_addr` and `prog_data`, one word per clock.
2. Pulse `start` for one clock while no test is running. On that edge the
   LT-LFSR restarts from its seed and the pattern counter clears.
3. For the next 256 clocks, `busy` is high and one pattern per clock is
   applied and checked (test-per-clock). `pattern`, `response` and `expected`
   show the present values, and `good` or `bad` gives the verdict in the
   same cycle.
4. `done` rises exactly 256 clocks after the start edge and stays high.
   `fail` is set if any pattern of the run was bad. A new `start` repeats the
   test.

The reset, `reset_n`, is asynchronous and active low. The operands of the
multiplier are a = O1..O8 (`pattern[7:0]`) and b = O9..O16 (`pattern[15:8]`).

The expected products follow from the step table: the testbench
`tb_lt_bist_top` computes them with its own model of the LT-LFSR and an
integer multiply. The first patterns after the all-ones seed are
(b, a) = (255, 255), (255, 255), (254, 255), (254, 255), (254, 254),
(255, 254), (253, 254), and so on.

## Files

| file | content |
|------|---------|
| `rtl/lt_bist_pkg.sv` | step and sequencer enums, step table (`step_en`, `step_sel`), maximal-length tap table `lfsr_taps(n)` |
| `rtl/lt_bist_top.sv` | BIST top: sequencer, LT-LFSR, multiplier, PROM, comparator |
| `rtl/lt_lfsr.sv` | low-transition LFSR (parameters N, SEED, TAPS) |
| `rtl/lt_lfsr_fsm.sv` | four-step controller |
| `rtl/ri_cell.sv` | R-injection cell |
| `rtl/vedic_mult.sv` | N x N vertical-and-crosswise multiplier |
| `rtl/compressor_7_2.sv`, `rtl/compressor_4_2.sv` | compressors |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | adders |
| `rtl/prom.sv` | one-time-programmable fuse memory |
| `rtl/comparator.sv` | good/bad comparator |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_lt_activity.sv` | switching activity, LT-LFSR against a conventional LFSR |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
  rtl/lt_bist_pkg.sv tb/tb_lt_bist_top.sv --top-module tb_lt_bist_top -o sim
./obj_dir/sim
```

Change the testbench name to run another one. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/lt_bist_pkg.sv rtl/<module>.sv`.

What the testbenches establish:

* the adders, both compressors, the RI cell and the multiplier are checked
  exhaustively (all 65,536 operand pairs for the multiplier);
* `tb_lt_lfsr` runs the full 65,535-round period at 16 bits and checks
  against a model of the step table:
  * every pattern;
  * that only one half changes per clock;
  * that the toggles of each round equal the Hamming distance between
    consecutive step-1 patterns;
  * that after both halves advance, the state follows the plain LFSR;
* `tb_lt_bist_top` runs the whole BIST at its default size three times:
  * with correct PROM contents, where all 256 patterns must be good and done
    must come after exactly 256 clocks;
  * with one extra fuse blown, where exactly that pattern must be bad;
  * after an attempt to rewrite that word with ones, where it must still be
    bad.

  It also counts that every step, the intermediate patterns, both verdicts,
  done and restart all occurred.

## Choices this design makes, and where it departs from the method

What comes from the method:

* the halves with separate enables, and the buffer flip-flop between them;
* RI cells fed by each flip-flop's present and next value and R;
* the 0/1 output multiplexers and the four-step en/sel table;
* the BIST arrangement of pattern generator, circuit under test, stored
  responses and good/bad comparator;
* the vertical-and-crosswise column structure, and the 7:2 compressor made of
  two 4:2 compressors, two full adders and a half adder;
* the 8 x 8 size.

Choices of this design, where the method leaves them open:

* **RI rule.** Copy a stable bit, inject R for a toggling bit.
* **Source of R.** The LFSR's serial output.
* **LFSR.** 16 bits, taps 16, 15, 13 and 4, seed all ones.
* **Enable timing.** Enables act on entry to a step (see above).
* **Compressor weights.** The 4:2 compressor is an exact 3-bit counter, so
  that the 7:2 structure adds exactly.
* **Multiplier assembly.** Carry-ins tied low, with one final adder.
* **Test length and ports.** 256 patterns, PROM programming port, sequencer
  with start/busy/done/fail, no pipeline registers.

Not built:

* **Test-per-scan use.** The patterns could feed scan chains; the multiplier
  here has no scan chain, so the patterns are applied in parallel.
* **The conventional-LFSR BIST.** It is the baseline the design improves on.
* **Multipliers wider than 8 x 8.** The method says 16-bit and wider
  versions are possible. `vedic_mult` stops at N = 8, because a wider column
  would need more than one compressor per column.
* **Response compaction (MISR).** Responses are compared word by word
  against stored values instead.

The reported FPGA figures for the complete system (about 182 logic elements,
92.6 MHz, 82 mW total power on a Cyclone III) come from a different
implementation. They have not been reproduced for this RTL.
