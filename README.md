# Shift-and-add modular reducer ("mod without mod")

This is a hardware unit that computes `z mod m` for a 2N-bit value `z` and an
N-bit modulus `m`. It uses no multiplier and no divider, only a shifter, a few
adders and a subtractor. The default size is N = 384: a 768-bit product, such
as the output of a 384 x 384-bit multiplier in a NIST P-384 elliptic-curve
field multiplication, is reduced to 384 bits. Each cycle does one add, so the
critical path is short. The price is latency: about one clock per bit of the
modulus in the base form. Two optional extensions trade area for fewer
clocks: a leading zero detector, and a table that retires several bits per
clock.

The design follows the architecture of R. Swann's thesis *An Extension and
Implementation of the Mod Without Mod Algorithm to Efficiently Compute the
Modulus of a Number in Hardware*. That architecture implements M. A. Will's
"mod without mod" algorithm. The RTL here is an independent implementation.
Where it differs from the published architecture, this file says so.

## The arithmetic

Split `z = z_hi * 2^N + z_lo`, where both halves are N bits. The one constant
the unit needs is

    modVal = 2^N mod m

Every time a 1 would be shifted past bit N-1 of an N-bit word, it is worth
2^N. Dropping that bit and adding `modVal` does not change the value mod m.
The reduction has two phases:

1. **Shift phase.** Start with `R = z_hi`. Shift `R` left one bit at a time,
   N times in total. Each time a bit leaves the N-bit window, drop it and add
   `modVal`. The add can carry into bit N again, so `R` is N+1 bits wide. A
   set bit N is handled on the next clock by another "drop and add `modVal`"
   without a shift. At the end, `R ≡ z_hi * 2^N (mod m)` and `R < 2^(N+1)`.
2. **Correction phase.** Form `R + z_lo`, which is below 3·2^N and
   congruent to `z`. Subtract `m` until the difference would go negative.
   What is left is `z mod m`.

The invariant `R ≡ z_hi * 2^(shifts so far) (mod m)` holds after every clock
of the shift phase, whatever mix of shifts and adds occurs. The unit tests
check it directly.

For a modulus with its top bit set, such as P-384, the correction loop takes
at most three subtractions. Any non-zero `m < 2^N` gives the right answer.
With a short modulus the loop runs about `3·2^N / m` times, so such moduli
should be reduced by a smaller instance (set N to the modulus length).

## Datapath

### Shift-and-add section (`mwm_shadd`)

This section holds the (N+1)-bit register `R`:

* **load** (controller state S1): `R <= {0, z_hi}`.
* **`R[N]` = 1**, an overflow left by the last add: `R <= R[N-1:0] + modVal`.
  There is no shift, and `count_decrement` is low so the counter does not
  count this clock.
* **`R[N]` = 0**: the low N bits are shifted left by `shift_amt` into an
  (N+PAR_BITS)-bit word.
  * The PAR_BITS bits that end up above bit N-1 form a *tag* `t`, worth
    `t · 2^N`. They are dropped, and the table entry
    `mod_vals[t] = (t · 2^N) mod m` is added.
  * A zero tag means a plain shift.
  * The sum is below `2^N + m`, so it fits in N+1 bits.

With `PAR_BITS = 1` the table is just `modVal`. This is the base datapath.

The register is frozen once the counter reports N shifts.

### Correction section (`mwm_correct`)

* In S3, `a = R + z_lo` goes through the subtractor. The register `S` takes
  `a - m` if that is not negative, otherwise `a`.
* In S4, `S` is fed back through the subtractor. `S <= S - m` until the
  difference is negative. The negative sign (`sub_neg`) ends the loop.
* `result` is `S[N-1:0]`. `S` is written only in S3 and S4, so the result
  holds after `done`.

The difference is computed N+3 bits wide, so its sign bit is exact for any
`a < 3·2^N` and any modulus.

### Shift counter (`mwm_counter`) and leading zero detector (`mwm_lzd`)

The counter is loaded with N at reset, and by `reset_count` when an operation
starts. On each clock where the datapath shifts (`count_decrement`) and the
count is not zero, it subtracts the amount shifted. `shift_done` is high while
the count is zero.

The counter also chooses the shift amount:

* `USE_LZD = 0`: `min(PAR_BITS, count)`.
* `USE_LZD = 1`: `min(lz(R[N-1:0]) + PAR_BITS, count)`, where `lz` is the
  leading zero count. This shift moves the register's leading 1 straight into
  the top bit of the tag, so a whole run of zeros costs one clock instead of
  one clock per zero. An all-zero register finishes the shift phase in one
  clock.

As in the published design, the leading zero detector sits inside the
counter.

## Controller (`mwm_fsm`) and handshake

| state | what happens | leaves when | outputs |
|---|---|---|---|
| S0 | wait for `start` low | `start` = 0 → S1 | – |
| S1 | load `z_hi` | `start` = 1 → S2 | `load_z`; `reset_count = start` |
| S2 | shift phase | `shift_done` → S3 | – |
| S3 | add `z_lo`, first subtract | always → S4 | `add_low` |
| S4 | subtract loop | `sub_neg` → S5 | `sub_flag` |
| S5 | finished | always → S0 | `done` |

To start a reduction:

1. Hold `z`, `modulus` and `mod_vals` stable.
2. Drive `start` low for at least one clock, then high.
3. The operation begins on the clock edge that sees `start` high in S1.

`done` pulses for one clock in S5. `result` is valid from that clock until
the next operation reaches S3. If `start` is left high after `done`, the
controller waits in S0 and does not restart.

Reset is synchronous and active high (`rst`).

The one assertion in `mwm_reducer` checks that every result delivered with
`done` is below the modulus.

### Latency

Counting from the edge that sees `start` high in S1 up to the edge that
enters S5, the latency is `K + 3 + L` clocks:

* `K` is the number of shift-phase steps: shift clocks plus overflow-add
  clocks.
* `L` is the number of S4 clocks: the subtractions left after S3, plus one
  for the negative result.

In the base form `K = N + (number of overflowing adds)`. For P-384,
`2^384 mod p = 2^128 + 2^96 - 2^32 + 1` is only 129 bits wide, so overflows
are rare.

## The `modVal` table

`modVal` and the parallel table are inputs, computed outside the unit
whenever the modulus changes:

    mod_vals[t] = (t · 2^N) mod m,   t = 1 .. 2^PAR_BITS - 1

Entry 1 is `modVal`. For `PAR_BITS = 2` the entries are `2^N mod m`,
`2^(N+1) mod m` and `(2^N + 2^(N+1)) mod m`.

The table grows as 2^PAR_BITS - 1 words of N bits. That is 255 words at 8
bits per clock, and 65,535 at 16. A fixed modulus lets the table be
constants.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 384 | modulus width; `z` is 2N bits |
| `PAR_BITS` | 1 | bits retired per shift clock (1 = base datapath, 2 = the two-bit parallel datapath) |
| `USE_LZD` | 0 | add the leading zero detector |

## Measured clock counts

All results below were checked against `z % m`, and every latency against
the formula above. The "published" column gives the source thesis's figures
for the same configurations.

| configuration | operands | measured avg clocks | published |
|---|---|---|---|
| N=384 base | P-384, z = x·y, 10,000 vectors | 388 | 390 |
| N=384 base | random 384-bit moduli (top bit set), z = x·y, 10,000 vectors | 462 | 580 (with the multiplier in front) |
| N=384, LZD | P-384, 100 vectors | 148 | 104 |
| N=384, 2 / 3 / 4 / 8 bits + LZD | P-384, 100 vectors each | 100 / 76 / 62 / 36 | 71 / 53 / 45 / 28 |
| N=384, 16 bits + LZD | P-384, 10 vectors | 22 | 18 |
| N=8 base | random 8-bit moduli, 2,000 vectors | 13 | 12 |

The base unit matches the published counts. The LZD and parallel
configurations take about 1.2 to 1.4 times the published counts. The source
does not give enough detail about its test vectors or its cycle counting to
explain the gap.

## Where this design departs from the published architecture

* **Result hold.** In the published datapath the correction register is
  enabled by `~sign | ~subFlag`, so it is written in every state outside the
  subtract loop. The result can then change right after `done`. Here it is
  written only in S3 and S4. The controller has an extra output, `add_low`
  (S3), for this.
* **Subtraction width.** The published difference is 386 bits, with bit 385
  as the sign. This misreads a large positive difference as negative when the
  modulus is well below 2^N. It is N+3 bits here.
* **No final overflow add.** The published correction section ends with "add
  `modVal` once more if bit N is set". That step can never fire after the
  loop ends, because then `S < m < 2^N`. It is left out.
* **Register load.** The shift-and-add register is enabled by `load_z` as
  well as by `~shift_done`. A new operation therefore loads even while the
  counter still reads zero from the previous one.
* **`reset_count`** is `start` in S1, as in the published signal table. One
  published listing drives it in S0 and S1 instead.
* **LZD width.** The leading zero detector covers the whole register. The
  published listing used a 256-bit detector on the top bits.
* **One table adder.** The parallel datapath's separate adders for
  `modVal`, `modVal2` and their sum are folded into a single table lookup
  feeding a single adder. The selected sum is the same.
* **Not built.** The 384 x 384 multiplier that feeds the unit in the
  modular-multiplication configuration is a library part. The `z` port is
  where it connects. The computation of `modVal` and the table is also not
  built: it is left to whoever sets the modulus.

## Files

`rtl/`:

* `mwm_pkg.sv`: state type, shift-width helper
* `mwm_reducer.sv`: top: controller, counter and both datapath sections
* `mwm_fsm.sv`: six-state controller
* `mwm_counter.sv`: shift counter, chooses the shift amount, holds the LZD
* `mwm_lzd.sv`: leading zero detector
* `mwm_shadd.sv`: shift-and-add section
* `mwm_correct.sv`: correction section

`tb/` (every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`):

* `tb_mwm_full.sv`: default-size reducer, 10,000 P-384 and 10,000
  random-modulus reductions, average-latency check
* `tb_mwm_reducer.sv` with `mwm_reducer_harness.sv`: end-to-end run over
  base, LZD, 2/3/4-bit parallel and N=8 configurations. It checks exact
  latencies and that every mechanism occurs: add without shift, table add,
  multi-bit shift, subtract loop, S0 wait.
* `tb_mwm_workloads.sv`: the configurations in the table above, except
  16 bits per clock
* `tb_mwm_par16.sv`: 16 bits per clock. It takes a few minutes to build,
  because of its 65,535-entry table.
* `tb_mwm_fsm.sv`, `tb_mwm_counter.sv`, `tb_mwm_lzd.sv`, `tb_mwm_shadd.sv`,
  `tb_mwm_correct.sv`: unit tests

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/mwm_pkg.sv \
        tb/tb_mwm_full.sv --top-module tb_mwm_full -o sim
    ./obj_dir/sim

Swap in any other testbench name. Each testbench runs in seconds once built. The
reference values come from the simulator's own wide `%` and `*` operators.
Random operands come from `$urandom`, so pass `+verilator+seed+<n>` for other
vectors.
