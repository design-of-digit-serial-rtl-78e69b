# Digit-serial transposed FIR filter with a minimum-adder-graph multiplier block

A FIR filter multiplies every input sample by a set of constants that are
fixed before the hardware is built. General multipliers are therefore wasted
on it. The cheaper way is *shift-adds*: each constant product is a network of
shifts, additions and subtractions, and products that share a partial product
(for example 7x inside both 29x and 43x) share the adders that build it. This
design does it with **digit-serial arithmetic**: every word travels as a
stream of D-bit digits, one digit per clock, so an adder is only D full
adders and a carry flip-flop whatever the word length. The price is that a
shift is no longer free wiring: shifting by K bits takes K flip-flops, and
every adder output register takes one clock. So the multiplier graphs are
chosen for few adders, and the paths through them are balanced with
pipelining registers.

The RTL is a 5-tap linear-phase filter in transposed form,

    y(n) = 29 x(n) + 43 x(n-1) + 2813 x(n-2) + 43 x(n-3) + 29 x(n-4)

whose multiplier block computes 29x and 43x with a three-operation graph that
shares 7x, and 2813x with a three-adder minimum adder graph (MAG) instead of
the four adders its canonic signed-digit (CSD) form needs.

## Word format and framing

* A sample is a WL-bit two's-complement word (default 24 bits), sent least
  significant digit first, D bits per clock (default 4), so a word takes
  WL/D clocks (6 by default).
* Every stream has a one-bit **start** marker, high during the first digit
  of a word. Each operator uses it to begin a new word: the adder reloads its
  carry and the shifter shifts zeros in. Words may follow back to back.
* All arithmetic is modulo 2^WL. The sender sign-extends samples to WL bits,
  and WL must hold the largest result. With 12-bit samples the largest output
  is 2957 * 2048 < 2^23, so 24 bits never wrap.
* Latency is counted in clocks from an input start marker to the matching
  output start marker. A stream's frame moves later only where it passes a
  register (an adder or a delay). A shift keeps its input's frame.

## Building blocks

| module | what it does | cost at digit size D | latency |
|---|---|---|---|
| `ds_add_sub` | y = a + b (SUB=0) or a - b (SUB=1), mod 2^WL | D full adders, carry FF, D+1 output FFs | 1 |
| `ds_lshift`  | y = (x << K) mod 2^WL | K FFs | 0 |
| `ds_delay`   | delays a stream and its start marker by N clocks | N*(D+1) FFs | N |

**Adder/subtractor.** A D-bit ripple adder with a carry flip-flop between
digits. At a start marker the carry-in is forced to 0 for addition, or to 1
for subtraction, where b is inverted (a + ~b + 1). The sum digit is
registered, and this is the pipelining register of the shift-adds network.
The carry flip-flop resets to the same value, so an idle subtractor fed with
zeros puts out zeros. Without that, the pipeline would fill the filter's
delay lines with ones before the first sample.

**Left shift.** The block keeps the K most recent input bits. Output digit p
is the low D bits of `{input digit p, stored bits}`, which is input bits
p*D-K ... p*D-K+D-1. At a start marker the stored bits belong to the previous
word, so they are replaced by zeros. K may be smaller than, equal to or
larger than D.

**Delay.** A plain shift register on {start, digit}. It serves two purposes.
With N = 1 it is a pipelining register that brings an operand from an earlier
adder level up to a later one. With N near WL/D it is the z^-1 sample delay
of the filter.

## The multiplier graphs

Every adder adds one clock, so both operands of an adder must come from the
same level. An operand from an earlier level first passes through a
`ds_delay` of N = 1.

**`gb_mcm_29_43`: 29x and 43x in three operations.** Writing each constant
out in binary needs six additions. Sharing the binary subpatterns 11 and 101
(3x and 5x) brings that to four. The graph used here shares 7x, which is not
a subpattern of 43 = 101011b, and needs three:

| level | node | operands |
|---|---|---|
| 1 | 7x  | (x << 3) - x |
| 2 | 29x | (7x << 2) + x, with x delayed 1 |
| 3 | 43x | 29x + (7x << 1), with 7x delayed 1 |

29x is delayed one more clock, so both products start 3 clocks after x.
Cost: 6 shift flip-flops and 3 pipelining digit registers.

**`mag_mult_2813`: 2813x with adder cost 3.** In CSD form
2813 = 2^12 - 2^10 - 2^8 - 2^2 + 1, which has five nonzero digits and so
needs four adders. A minimum adder graph needs three, because it uses 3x
twice:

| level | node | operands |
|---|---|---|
| 1 | 3x    | (x << 1) + x |
| 2 | 11x   | (x << 3) + 3x, with x delayed 1 |
| 3 | 2813x | (11x << 8) - 3x, with 3x delayed 1 |

A short search over pairs of 2^k ± 1 terms finds no three-adder graph for
2813 of depth 2, so depth 3 (latency 3) is needed. Cost: 12 shift flip-flops
and 2 pipelining digit registers.

**`mcm_block`** runs both graphs on the same input. It delays each graph's
outputs up to the slowest latency (`LAT_MCM`, 3 clocks with these graphs) and
returns the three products as `p[PROD_29]`, `p[PROD_43]`, `p[PROD_2813]`
(`ds_pkg::prod_e`). The block holds six adders in total.

## The transposed filter (`ds_fir`, the top)

Tap k uses product `TAP_PROD[k]` (in `ds_pkg`). The last tap's product goes
into a sample delay. Each other tap adds its product to the delayed partial
sum of the tap after it:

    s[4] = h4 x(n)
    s[k] = h[k] x(n) + s[k+1](n-1)      y(n) = s[0]

The one timing subtlety is the length of the sample delays. A sample arrives
every WL/D clocks, and the products all start `LAT_MCM` clocks after their
sample. `s[4]` is a bare product, so its delay is WL/D clocks. Every other
`s[k]` leaves an adder one clock later than the products, so its delay is
WL/D - 1 clocks. The output word starts `LAT_FIR` = 4 clocks after its
input word. The filter puts out one word per input word, so at the defaults
it delivers one sample every 6 clocks.

Because the delays count clocks, input words must follow each other without
gaps. Changing D changes only the clocks per word (WL must be a multiple of
D). D = 1 is bit-serial, and D = WL is bit-parallel with one word per clock.
The latency stays 4 clocks in every case.

Ports of `ds_fir`: `clk`, `rst_n` (active-low, asynchronous), `x_start`,
`x[D-1:0]` in, and `y_start`, `y[D-1:0]` out. Parameters: `D` (4), `WL` (24).
The taps, the product list and the latencies are constants in `ds_pkg`.

## How far this follows the architecture it implements

Taken from the architecture:

* the transposed form with a multiplier block;
* digit-serial addition, subtraction and left shift, with shifts costing
  flip-flops and pipelining registers;
* the 29x/43x graph sharing 7x in three operations;
* an adder cost of 3 for 2813 where CSD needs 4.

Choices of this design:

* **The coefficients.** No filter is specified. The taps {29, 43, 2813, 43, 29}
  reuse the two worked examples in a symmetric (linear-phase) filter. To
  change the filter, write new graphs from `ds_add_sub`, `ds_lshift` and
  `ds_delay`, then update `COEF`, `TAP_PROD` and the latencies in `ds_pkg`.
* **The exact graphs.** Only the shared partial product 7x and the adder
  counts are given. The 43x = 29x + 2*7x step and the 3x/11x MAG graph are
  this design's.
* **Pipelining registers.** The MAG multiplier's graph was said to need one
  extra register. The graph here needs two pipelining registers, one before
  level 2 and one before level 3.
* **Sizes and framing.** The digit size, word length, LSD-first order, start
  marker, reset and masking scheme are all design choices. The start marker
  travels with the data, which costs one flip-flop beside every registered
  digit. A shared word counter would avoid that cost, but every stage would
  then need to know its own latency.
* **Shift sharing.** Shifts of the same signal are not merged. For example,
  7x << 2 and 7x << 1 each have their own flip-flops, so the flip-flop count
  is not minimised.

Not included:

* the CSD, MSD and subexpression-elimination multipliers and the direct-form
  filter, which serve only as points of comparison;
* the optimisation algorithms used to find graphs, which are software;
* a reconfigurable variant with multiplexers that change coefficient word
  lengths at run time, which is only mentioned.

## Verification

Each testbench in `tb/` checks its block against values it computes itself,
such as `29*x mod 2^24` or the direct-form filter sum. It also checks the
latency of every frame, and ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_ds_add_sub`, `tb_ds_lshift`, `tb_ds_delay`: 300 words each, with idle
  gaps full of junk digits between some of them. They cover corner words (0,
  -1, most positive, most negative) and shifts of 0, 1, 3, 4, 5 and 8
  (below, at and above the digit size).
* `tb_gb_mcm_29_43`, `tb_mag_mult_2813`, `tb_mcm_block`: products of corner,
  12-bit and full-width random words, with a latency of 3.
* `tb_ds_fir`: the filter at its default size, 600 samples. The samples
  include impulses (the output must reproduce the taps), runs at full-scale
  negative and positive, alternating full scale (largest output) and random
  samples. It counts impulse responses, negative, positive and full-scale
  outputs, and words directly after a negative word. Each must occur at
  least once.
* `tb_ds_fir_digits`: the same filter for D = 1, 2, 3, 8, 12 and 24.

`ds_frame_checker` and `fir_harness` are testbench helpers.

With plain Verilator, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_ds_fir rtl/ds_pkg.sv tb/tb_ds_fir.sv
    ./obj_dir/Vtb_ds_fir

Every testbench finishes in well under a second. Lint with
`verilator --lint-only -Wall -Irtl rtl/ds_pkg.sv rtl/<module>.sv`. The
remaining warnings are package constants a given module does not use, the
reset being used both by flip-flops and by the assertions' `disable iff`, and
the clock and reset being unused by a zero-length `ds_delay`.
