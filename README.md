# Index-to-permutation and random-permutation generators

There are n! permutations of n elements. This RTL provides two kinds of hardware
that produce one of them per clock cycle:

* **An index to permutation converter.** You give it an index `0 <= index < n!`
  and it returns the permutation with that index. With the identity as input
  permutation, index 0 gives `0123…`, index n!−1 gives the reversed identity,
  and the indices follow lexicographic order of the permutations. The circuit
  is a cascade of n−1 identical-looking stages. Each stage works out one digit
  of the index in the *factorial number system* and uses that digit to place
  one element.
* **Two random permutation generators.** The first feeds a random index to the
  converter. The second runs the *Knuth shuffle* as a cascade of n−1
  exchange stages, each stage with its own random number generator.

Both structures have O(n²) hardware (comparators or crossovers) and O(n)
combinational delay. With one register per stage they accept a new input every
clock and give the result n−1 cycles later. A derangement counter comes with
the shuffle. It counts permutations with no fixed point, and the ratio of all
permutations to derangements estimates e.

All RTL is SystemVerilog-2017 in `rtl/`, with one module or package per file.
Self-checking testbenches are in `tb/`.

## Permutation words

An n-element permutation is a packed array `logic [n-1:0][w-1:0]` with
`w = ceil(log2 n)`. **Position p of the permutation is slice `[n-1-p]`.**
This puts the leftmost element, as the permutation is written, in the most
significant bits. So the 4-element permutation `2103` is the byte
`10 01 00 11`, and the identity `0123` is `00 01 10 11 = 27`. The word has
n·ceil(log2 n) bits, for example 36 bits for n = 9 and 40 bits for n = 10.

## The factorial number system

Every integer `0 <= N < n!` has exactly one representation

    N = s(n-1)·(n-1)! + s(n-2)·(n-2)! + … + s(1)·1! + s(0)·0!,   0 <= s(i) <= i

so `s(0)` is always 0. The digits can be found greedily from the top: `s(n-1)`
is the largest value with `s(n-1)·(n-1)! <= N`. You subtract that term and
repeat with `(n-2)!`, and so on.

The digits map to a permutation like this: `s(n-1)` says which of the n
unused elements goes first (counting from 0), `s(n-2)` which of the n−1 still
unused elements goes second, and so on. Example for n = 4 and N = 14:

| stage | running index | weight | digit | unused before | placed | result so far |
|-------|---------------|--------|-------|---------------|--------|---------------|
| 0     | 14            | 3! = 6 | 2     | 0 1 2 3       | 2      | 2 · · ·       |
| 1     | 14 − 12 = 2   | 2! = 2 | 1     | 0 1 3         | 1      | 2 1 · ·       |
| 2     | 2 − 2 = 0     | 1! = 1 | 0     | 0 3           | 0      | 2 1 0 ·       |
| —     | 0             |        |       | 3             | 3      | 2 1 0 3       |

`tb_idx2perm` checks all 24 indices for n = 4 against a hand-written table of
this mapping.

## The converter stage (`fns_stage`)

This is the core of the design. Stage J of an N-element converter gets two
inputs:

* the running index, which is already below `M!` with `M = N − J`;
* the partial permutation. Positions `0..J-1` are settled. Positions `J..N-1`
  hold the M unused elements in their original order.

With `F = (M−1)!`, the stage does the following, all combinationally:

1. **Comparators.** `ge[k] = (index >= k·F)` for `k = 1..M−1`, and `ge[0] = 1`.
   Because the thresholds rise with k, the `ge` bits form a thermometer code
   of the digit `s`. For n = 4, stage 0 compares with 6, 12 and 18.
2. **One-hot code.** `onehot[k] = ge[k] & ~ge[k+1]`, with `ge[M] = 0`.
3. **Subtractor.** A one-hot multiplexer picks the constant `s·F` from
   `{0, F, …, (M−1)·F}`. The stage outputs `index − s·F`, which is below F.
   The last stage always outputs 0.
4. **Element select.** The same one-hot code picks the element at position
   `J + s`, and that element becomes position J.
5. **Closing the gap.** Position `J+k` (k ≥ 1) takes the element from position
   `J+k−1` when `ge[k]` is set, and otherwise keeps its own element. The
   elements before the chosen one move down by one place, and those after it
   stay where they are. The unused elements therefore stay in order, which the
   next stage needs.

The comparators are the thresholds, and the thermometer drives both the one-hot
logic and the shift multiplexers. So stage J costs M−1 magnitude comparators,
one subtractor, an M-way one-hot multiplexer for the element and M−1 two-way
multiplexers. Summed over the stages, that is O(n²) hardware. The index passes
through n−1 subtractors, so the delay is O(n).

The selected element goes through an AND-OR one-hot selector. A tri-state bus
would do the same job, but internal tri-states are awkward in modern flows.
An index of N! or more is outside the specified range. It saturates every
digit at its maximum, so the output is still a valid permutation (not
necessarily a meaningful one).

`digit_o` exposes the digit found in the stage. The cascade does not use it,
but it helps when debugging.

## The converter (`idx2perm`)

`idx2perm` chains N−1 `fns_stage` instances. Stage J places position J. The
last position takes whatever element is left.

* `PIPELINE = 1` (default): a register follows every stage. An index taken with
  `in_valid` gives its permutation with `out_valid` exactly N−1 cycles later.
  A new index is accepted every cycle, with no stalls and no back-pressure.
* `PIPELINE = 0`: the cascade is purely combinational, with
  `out_valid = in_valid` and `perm_out` valid in the same cycle. A design that
  registers only the output and gets one permutation per clock period is built
  this way.

`base_perm` is the permutation that gets rearranged, normally the identity.
It travels down the pipeline with its index, so it may change every cycle. The
output is `base_perm` reordered by the index's permutation: element p of the
output is `base_perm` at position π(p).

Index width: `IDX_W = ceil(log2 N!)`. That is 5 bits for n = 4, 22 for n = 10,
45 for n = 16 and 118 for n = 32. Factorials are computed at elaboration in
320-bit arithmetic (`perm_pkg::fact`), which is enough up to n = 64
(296-bit index).

An index below m! changes only the last m positions. So a 10-element
converter also produces every m-element permutation for m < 10, in its last m
slices, offset by 10 − m. `tb_workload_sizes` uses this to run n = 2..9 on the
default converter.

## Random permutations from a random index (`lfsr`, `rand_int_gen`, `rand_perm_gen`)

`rand_int_gen` turns an M-bit pseudo-random word into a uniform integer in
`[0, K−1]`. It reads the LFSR word `x` as a fraction `0 <= x < 1`, multiplies
it by the constant K and drops the M fraction bits:

    i = floor(K · x / 2^M)

Because K is a constant, the product is a sum of shifted copies of x. Synthesis
builds it as a shift-and-add network, not a general multiplier.

`lfsr` is a Fibonacci LFSR with maximal-length taps (`perm_pkg::lfsr_taps`,
widths 3..32). It shifts one bit per enabled clock and visits all 2^M−1
non-zero words. A zero seed is replaced by 1.

**Bias.** The 2^M−1 words cannot be spread evenly over K integers. For M = 5
and K = 24, seven integers are reached by two words and seventeen by one, so
those seven are twice as likely. `tb_rand_int_gen` checks exactly this. With
M = 32 the difference in probability between two integers is about 24/2^32
(roughly 6·10⁻⁹).

`rand_perm_gen` sets `K = N!` and feeds the integer to `idx2perm` with the
identity as input. Every cycle with `en` high draws one permutation, which
appears N−1 cycles later. The index grows as log2(N!). For N = 64 it would be
296 bits, which is the practical limit of this approach and the reason for
the shuffle.

## The Knuth shuffle (`knuth_stage`, `knuth_shuffle`)

The shuffle starts from a permutation (the identity here). Step J (J = 0..N−2)
exchanges element J with one of the elements `J..N−1`, chosen uniformly; it
may choose element J itself. After N−1 steps every permutation is equally
likely.

* `knuth_stage` is one step. It has N−1−J two-way crossovers between position
  J and positions `J+1..N−1`. The crossover at `J+k` is enabled when the random
  offset `r == k`, and `r = 0` leaves everything unchanged. Over the whole
  shuffle that is n(n−1)/2 crossovers.
* `knuth_shuffle` chains N−1 stages. Stage J has its own `rand_int_gen` with
  `K = N−J` and its own 32-bit LFSR. The seeds come from `SEED` through
  `perm_pkg::stage_seed`, so the stages do not run in lockstep. As in the
  converter, `PIPELINE = 1` puts a register after each stage, with latency N−1
  and one permutation per clock. All LFSRs advance on `en`, so every
  permutation passing a stage meets a fresh random offset.

The shuffle needs no wide index, and its random generators stay at 32 bits
whatever the value of n.

## Derangements and e (`derangement_counter`)

A derangement has no fixed point: no element p sits at position p. There are
`round(n!/e)` derangements of n elements. Of a stream of uniform random
permutations, a fraction close to 1/e are derangements. `derangement_counter`
checks every valid permutation against the identity (`is_derangement`,
combinational). It counts all permutations (`total`) and the derangements
(`derangements`) in 32-bit counters, with a synchronous `clear`.
`total / derangements` then estimates e. For n = 4 the exact ratio is
24/9 = 2.667, since 4!/e rounds to 9. For larger n it approaches
e = 2.71828.

Simulation results with the default seeds:

| n  | permutations | derangements | estimate of e |
|----|--------------|--------------|---------------|
| 4  | 1,048,576    | 393,149      | 2.6671        |
| 8  | 16,777,216   | 6,172,766    | 2.7179        |
| 16 | 16,777,216   | 6,167,716    | 2.7202        |

In the same 2^20-permutation run at n = 4, each of the 24 permutations occurs
within 3 % of the expected 43,690 times.

## Top level (`perm_top`)

`perm_top` places three independent units side by side. They share only `clk`
and `rst_n`.

| unit | module | default size | ports |
|------|--------|--------------|-------|
| index to permutation converter | `idx2perm` | `N_IDX = 10` | `idx_valid`, `idx_in[21:0]` → `idx_out_valid`, `idx_perm` (9 cycles) |
| random permutation generator | `rand_perm_gen` | `N_RAND = 4`, `M = 32` | `rp_en` → `rp_valid`, `rp_perm` (3 cycles) |
| Knuth shuffle + derangement counter | `knuth_shuffle`, `derangement_counter` | `N_KNUTH = 4`, `M = 32` | `ks_en`, `ks_clear` → `ks_valid`, `ks_perm`, `ks_is_derangement`, `ks_total`, `ks_derangements` |

All three rearrange the identity. Reset is synchronous and active low. It
clears the valid pipelines and the counters, and loads the LFSR seeds
(`SEED_RP`, `SEED_KS`).

The sizes are parameters. The default converter is 10 elements wide, and the
random generators work on 4 elements. The same RTL has been simulated at
n = 16 and 32 (converter) and n = 8, 16 and 32 (shuffle).

## Choices made in this implementation

These are not fixed by the underlying method. Change them if your system
needs something else.

* The valid bit that travels with the data, the `en` inputs, and the
  synchronous active-low reset of every register.
* The LFSR polynomials, seeds, the per-stage seed derivation and the one-bit
  shift per clock. Successive words of a one-bit-shift LFSR overlap. Each
  draw is uniform on its own, but consecutive draws of one generator are
  correlated.
* The AND-OR selector in place of tri-state buffers in the converter stage.
* n−1 stages in the shuffle. The last exchange is between the two final
  elements, and a stage for the last element alone would do nothing.
* The derangement counter's structure, its 32-bit width and its `clear`.
* Behaviour outside the specified range: an index ≥ N! saturates the digits
  (see above). An out-of-range shuffle offset (which the generator never
  produces) leaves the permutation unchanged.
* The permutation word order (position 0 in the most significant slice).

Not included: any host or memory interface that supplies indices or collects
results. The units' ports are the interface.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=F` and ends with `$finish`.
Each has a cycle or time watchdog. To build and run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/perm_pkg.sv tb/perm_ref_pkg.sv tb/tb_perm_top.sv \
        --top-module tb_perm_top -o sim
    ./obj_dir/sim

| testbench | what it checks | run time |
|-----------|----------------|----------|
| `tb_fns_stage` | every stage of a 5-element converter, all in-range and some out-of-range indices, random partial permutations | < 1 s |
| `tb_idx2perm` | n = 4 against the hand table and latency 3; n = 10 random indices with identity and reversed input, latency 9, gaps in `in_valid`; n = 6 combinational exhaustive; n = 32 combinational with 118-bit random indices | < 1 s |
| `tb_lfsr` | period exactly 2^M−1 and never zero for M = 3..20; shift structure and hold on `en` low for M = 32; zero seed | < 1 s |
| `tb_rand_int_gen` | `i = floor(Kx/2^M)` for K = 24 and K = 10!; the M = 5 bias (7 twice / 17 once); uniformity for M = 32 | < 1 s |
| `tb_rand_perm_gen` | each output equals the reference permutation of `floor(24x/2^32)`, latency 3, uniform over 240,000 draws | ~1 s |
| `tb_knuth_stage` | every stage and offset of a 5-element shuffle | < 1 s |
| `tb_knuth_shuffle` | 2^20 permutations at n = 4 against a cycle-accurate model, latency, uniformity, derangement share; n = 6 combinational | ~3 s |
| `tb_derangement_counter` | all 24 permutations (9 derangements), random words, `clear` | < 1 s |
| `tb_perm_top` | the top at its default parameters: 300,000 converter indices, 2^20 shuffled and random permutations, derangement count and e, `clear`; counts that each mechanism (pipeline fill, back-to-back results, input gaps, first and last index, exchange with self and with another element, derangement and non-derangement, clear) occurred | ~7 s |
| `tb_workload_sizes` | all indices for n = 2..9 and random ones for n = 10 on the default converter; n = 16 converter; n = 32 shuffle | ~9 s |
| `tb_workload_derangements` | 2^24 permutations each at n = 8 and n = 16, e estimate within 1 % | ~12 s |

The reference model (`tb/perm_ref_pkg.sv`) decodes an index by division and
remainder and takes the digit-th unused element from a list. It shares no
structure with the compare-and-subtract hardware.

## How far to trust it

* The converter is checked exhaustively for n = 4 and 6, for all indices up to
  9! inside the 10-element converter, and on random indices at n = 10, 16 and
  32.
* The random generators are checked for exact agreement with a model of their
  random sources. Their statistics (uniformity, share of derangements) are
  checked within tolerances that a correct design passes with a wide margin.
* LFSR periods are verified only up to 20 bits. The 21- to 32-bit tap sets are
  standard maximal-length polynomials whose periods were not simulated.
* All RTL passes Verilator lint and Yosys elaboration without circuit
  warnings. No timing closure or FPGA implementation has been done with this
  code.
