# Radix-4 serial-parallel Booth multiplier with zero-digit skipping

This is a small sequential multiplier for two's complement numbers. The
multiplicand is held in parallel. The multiplier is consumed serially, two
bits per step, as radix-4 Booth digits. The point of the design is that the
adder only works when it has something to add. A Booth digit of zero needs no
addition, so the controller does not spend an add cycle on it. It shifts past
a whole run of zero digits in one cycle. The number of cycles a
multiplication takes therefore depends on the multiplier value, and the
adder and accumulator switch only for the nonzero digits.

The default size is 8 x 8 bits giving a 16-bit product (parameter `N_BITS`).

## Radix-4 Booth recoding

An `n`-bit two's complement multiplier `y` (n even) is rewritten as `n/2`
digits in {-2, -1, 0, +1, +2}:

    e_i = y[2i] + y[2i-1] - 2*y[2i+1]      with y[-1] = 0
    y   = sum_i e_i * 4^i

Each digit comes from an overlapping group of three bits:

| group {y[2i+1], y[2i], y[2i-1]} | digit | multiple added |
|---|---|---|
| 000, 111 | 0 | nothing |
| 001, 010 | +1 | +M |
| 011 | +2 | +2M |
| 100 | -2 | -2M |
| 101, 110 | -1 | -M |

`booth_encoder` maps a group to a digit. Digits travel as the packed struct
`booth_pkg::booth_digit_t` with three flags: `nz` (nonzero), `neg` and
`two`.

Worked example, used as the first test vector: 90 x -38. The multiplier
`11011010` recodes from the bottom as groups 100, 101, 011, 110. That gives
digits -2, -1, +2, -1, and -2 - 4 + 32 - 64 = -38. All four digits are
nonzero, so this multiplication takes four add cycles. The product is
`1111001010100100` = -3420.

## Datapath

```
  multiplicand --> [operand_buffer M] --> [pp_generator] --pp, cin--> [ripple_adder] --sum--+
                                               ^                          ^                 |
                                   cur_digit   |                          | A               v
  multiplier ----> [ A (N+2) | Q (N) | q-1 ]  acc_shift_register  <---------- add_en, shift_digits
                          |       |                                              ^
                          |       +--> Booth encoders (all digits) --> [shift_add_ctrl]
                          v
              product = {A[N-1:0], Q}
```

* **Multiplicand buffer** (`operand_buffer`): a register that loads on
  `start` and keeps M steady for the whole multiplication.
* **A | Q | q[-1] register** (`acc_shift_register`): a single
  `2N+3`-bit shift register. It holds the accumulator A (N+2 bits), the
  multiplier Q (N bits) and the bit last shifted out of Q, `q[-1]`. On load,
  A and `q[-1]` are cleared and Q takes the multiplier. Each step shifts the
  whole register arithmetically right by two bits per digit consumed. Product
  bits move from the bottom of A into the top of Q while the multiplier bits
  leave Q at the bottom. After all `N/2` digits, `{A[N-1:0], Q}` is the
  product. This is the recurrence `p[j+1] = (p[j] + 2^n * e_j * M) / 4`.
* **Partial-product selector** (`pp_generator`): gives 0, M, 2M or their
  negations, N+2 bits wide. 2M is M shifted left by one. A negative multiple
  is sent as its one's complement with `cin = 1`, and the adder adds the
  missing 1. No separate incrementer is needed.
* **Adder** (`ripple_adder`, built from `full_adder` cells): computes
  A + pp + cin. A has two guard bits above N. They are needed because
  A + (+-2M) can exceed the N-bit range, for example -2 x (-128) = +256.
  The guard bits replace the separate carry flip-flop that an unsigned
  shift-add multiplier would have. Its `cout` is left unused because the
  guard bits already hold the sign.

## Control and zero skipping

`shift_add_ctrl` runs an IDLE -> RUN -> DONE state machine. It keeps a count
of the digits still to be consumed. Every digit still in Q (with `q[-1]`) is
recoded in parallel, one `booth_encoder` per digit. Each RUN cycle does one
of two things:

* **Add cycle.** The lowest remaining digit is nonzero. `add_en` is high, so
  A takes the adder sum. The register shifts by one digit.
* **Skip cycle.** The lowest remaining digit is zero. The controller counts
  how many consecutive zero digits start there, stopping at the first
  nonzero digit or at the last digit still to be consumed. It shifts past
  all of them in this one cycle (`shift_digits` = run length). The adder
  result is not used.

The count stops at the remaining digits for a reason: once the multiplier
has partly shifted out, the top of Q holds product bits, not multiplier
bits, and must not be read as digits.

A multiplication therefore spends `R` cycles in RUN:

    R = (number of nonzero digits) + (number of runs of zero digits)
    1 <= R <= N/2

For 8-bit multipliers, R ranges over:

| R | multipliers |
|---|---|
| 1 | 1 (y = 0: one skip of all four digits) |
| 2 | 6 |
| 3 | 33 |
| 4 | 216 |

Over uniformly random 8-bit multipliers the average is 3.81 against a fixed
4. The gain is larger for data with many zero digits, such as small
magnitudes and values near -1.

The critical paths of the two kinds of cycle differ. An add cycle passes
through the encoder, the selector and the carry chain. A skip cycle passes
only through the encoders, the zero-run count and the shifter. This design
clocks both from one clock, so the add path sets the clock period. A version
that clocked skip cycles faster would need a clocking scheme that is not
given here.

## Interface and timing (`booth_sp_multiplier`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `start` | in | 1 | start a multiplication; taken only while `ready` |
| `multiplicand` | in | N_BITS | two's complement, sampled with `start` |
| `multiplier` | in | N_BITS | two's complement, sampled with `start` |
| `ready` | out | 1 | idle, will accept `start` |
| `busy` | out | 1 | digits are being consumed (RUN) |
| `done` | out | 1 | one-cycle pulse, `product` valid |
| `product` | out | 2*N_BITS | signed product, held until the next `start` |

The clock edge that sees `start` loads the operands (edge 0). RUN covers
edges 1..R, and `done` is high during the cycle after edge R. Counting the
cycle in which `start` is high, the result takes `1 + R` cycles: 2 to
`1 + N_BITS/2`, which is 2 to 5 at the default size. After `done`, the
machine is back in IDLE, and `start` may be given again in the next cycle.
The operands need not stay on the inputs after the start cycle.

## How far to trust it, and where it departs from the source

These points follow the source description: the block structure
(multiplicand and multiplier buffers, Booth encoder, partial-product
selector, adder, shift-and-add control, A and Q registers), the recoding
table, negation by one's complement plus a carry, the two-place arithmetic
shift with sign extension, and the idea of adding only the nonzero digits.

These are choices of this design:

* **Signed operands with N/2 digits.** An unsigned multiplier would need one
  more digit (`floor((n+2)/2)` digits). Unsigned operation is not built.
* **Default of 8 bits.** The source's block diagram draws a 4-bit
  datapath, but its worked example and its FPGA pin counts (16 inputs,
  16 outputs) are 8-bit.
* **Accumulator of N+2 bits.** The source speaks of an (n+1)-bit adder.
  That is enough for the selected multiple on its own, but not for the sum
  with A in every case.
* **One run of zeros per cycle.** A run of zero digits is skipped in one
  cycle using a multi-digit shifter. The source says only that zero digits
  are skipped.
* **The remaining choices.** These are the handshake
  (`start`/`ready`/`busy`/`done`), the asynchronous reset, the ripple-carry
  adder organisation, and the three-flag digit encoding.
* **Low transition addition.** The only "low transition" measure is that A
  is written from the adder only on add cycles. No operand isolation or
  other power technique is built. No power, area or timing figure has been
  measured for this RTL.

Not included:

* the bit-serial radix-2 serial-parallel multiplier that served as the
  comparison baseline;
* any FPGA-specific mapping.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `booth_encoder_tb` | all 8 groups against the digit formula |
| `pp_generator_tb` | every 8-bit M times every digit: `signed(pp) + cin == digit*M` |
| `ripple_adder_tb` | corner values and 5000 random sums, including carry out |
| `operand_buffer_tb` | reset, load and hold against a model |
| `acc_shift_register_tb` | load, hold, and 1..N/2-digit shifts with and without the sum, against floor division by 4^k |
| `shift_add_ctrl_tb` | add/skip sequence, digit sent to the selector, cycle count and done/ready, for every 8-bit multiplier plus random ones; the top of Q is filled with random bits to prove the run count stops at the remaining digits |
| `booth_sp_multiplier_tb` | **all 65,536 8x8 operand pairs** at the default parameters: product, latency `1+R`, done pulse width, product hold. It counts every mechanism (adds of +M, +2M, -M, -2M, one-digit skips, multi-digit skips, an all-zero multiplier, use of the guard bits) and fails if one never occurs |
| `booth_sp_multiplier_wide_tb` | 16x16 bits: extreme values and 20,000 random pairs, product and latency, and that latencies 2 and 1+N/2 both occur |

`shift_add_ctrl` also contains an assertion: every RUN cycle consumes at
least one digit and no more than remain.

## Simulating

With Verilator 5, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl +libext+.sv \
    rtl/booth_pkg.sv tb/booth_sp_multiplier_tb.sv --top-module booth_sp_multiplier_tb
./obj_dir/Vbooth_sp_multiplier_tb
```

Change the top module and the testbench file to run another testbench. The
package has to come first on the command line. The exhaustive 8-bit run
takes well under a second.

To change the width, set `N_BITS` on `booth_sp_multiplier`; it must be even.
Every internal width follows from it: the digit count `N_BITS/2`, the
accumulator `N_BITS+2` and the shift-count width `clog2(N_BITS/2+1)`.

## Files

| file | contents |
|---|---|
| `rtl/booth_pkg.sv` | digit struct, controller state enum, `digit_value()` helper |
| `rtl/booth_encoder.sv` | radix-4 recoder |
| `rtl/pp_generator.sv` | partial-product selector |
| `rtl/full_adder.sv`, `rtl/ripple_adder.sv` | accumulator adder |
| `rtl/operand_buffer.sv` | multiplicand register |
| `rtl/acc_shift_register.sv` | A, Q and q[-1] shift register |
| `rtl/shift_add_ctrl.sv` | state machine, zero-run detection |
| `rtl/booth_sp_multiplier.sv` | top level |
| `tb/*_tb.sv` | testbenches listed above |
