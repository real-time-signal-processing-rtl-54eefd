# Systolic and wavefront arrays for real-time signal processing

A systolic array gets its speed from many identical processing elements (PEs)
that talk only to their neighbours. Data advances one PE per clock. Each PE
does one step of a recurrence on whatever passes through it. Getting there from
an algorithm is mostly a matter of **where the registers go**. You start from a
signal-flow graph (SFG) of the recurrence. That graph usually has paths with no
delay on them: broadcasts, or sums that ripple through every stage in one
cycle. You then move delays across cut sets until every link between PEs has at
least one register. Two rules do this:

* **Delay transfer.** Across a cut through the graph, you may add k delays to
  every edge that leaves the cut and remove k from every edge that enters it (or
  the reverse). The input/output behaviour does not change.
* **Time scaling.** Every delay D may be replaced by a·D', where D' is the new
  clock. The inputs and outputs then run a times slower: a sample every a
  cycles, with a−1 zeros in between.

This repository holds synthesizable SystemVerilog for five arrays built this
way, following the examples of J. Boulay's thesis *Real Time Signal Processing
Using Systolic Arrays*:

| array | module | what it computes | rate |
|---|---|---|---|
| forward FIR, with PE bypass | `fir_fwd_array` | y(k) = Σ b_i x(k−i), 3 taps | 1 sample / cycle |
| backward FIR | `fir_bwd_array` | same filter, input and output at one end | 1 sample / 2 cycles |
| matrix multiplier | `mm_array` | C = A·B, 4×4 | one product in 11 cycles |
| ARMA (IIR) filter | `arma_array` | y(n) = Σ b_k x(n−k) + Σ a_k y(n−k), 3 sections | 1 sample / 2 cycles |
| wavefront FIR | `wf_fir_array` | FIR with no lock-step: ready/acknowledge handshakes | data-driven |

`systolic_dsp_top` places all five side by side. They share clock and reset
and nothing else. Inside every PE the arithmetic is one shared building block.
`mac_unit` is the combinational multiply-add `y_out = y_in + a·b`, the
`Y ← Y + A·B` step of a systolic PE. Each PE wraps it in registers, and the
wavefront PE also wraps it in handshake control.

## Number format

Every line carries one 16-bit two's-complement word (`W`, default
`systolic_pkg::DATA_W`). Products and sums are truncated to `W` bits, so they
wrap around like integer arithmetic in C. Nothing saturates or widens. Wrap-around
arithmetic is modular, so all the checks below hold for any input. To get
numerically meaningful outputs, choose `W` and the ranges of the coefficients
and inputs so that nothing overflows. The source only says the arrays work on
integers, so the width is this design's own choice. Every register is cleared by
a synchronous active-low `rst_n`.

## Forward FIR: why the sample line has two registers

The FIR recurrence is

    x_i(k) = x_{i-1}(k-1),   s_i(k) = s_{i-1}(k) + b_i x_i(k),   s_0 = 0

In this form the partial sum ripples through all taps in the same cycle. There
is a zero-delay path along the sum line. Cutting between every pair of PEs puts
one delay on each sum edge. To keep the samples and sums aligned, the same cut
then needs one more delay on each sample edge. The result (`fir_fwd_pe`):

    x_in ──[D]──[D]──┬──────────────── x_out
                     │
    b ──────────────(×)── bx
                     │
    s_in ──[D]─ dsin(+)─────────────── s_out      s_out = dsin + b·x_out

The multiply-add is combinational after the registers, so `s_out` is valid in
the same cycle as `x_out`. With 3 PEs a sample entering in cycle t reaches the
output through b_1 in cycle t+4. After that the array gives one result per
cycle with every PE busy. The testbench replays the published 3-tap example
(coefficients 1, samples 1…9,0,1,2). It compares all eleven lines of the pipe
in every cycle. The output rises 0,0,0,0,1,3,6,9,12,15,18,21.

### Fault tolerance by bypass (`ft_bypass_cell`)

Each PE of the forward array sits in an `ft_bypass_cell`. Beside the PE, each of
the two lines has a bypass register. When the PE's `fault[i]` bit is set, both
lines come out of the bypass registers, one cycle after they went in. The
faulty PE is then simply skipped. Its coefficient drops out, and the PEs after
it receive their samples one cycle earlier. The remaining coefficients
therefore move up one tap. The array behaves exactly like an array without that
PE, with the same total latency. The closed form that the testbench checks is

    y(t) = Σ over healthy i of b_i · x(t − (M−i) − Dx(i)),
    Dx(i) = Σ_{j≤i} (2 if PE j healthy else 1)

`fault` is a static control. Detecting a faulty PE is not part of the design.

## Backward FIR: why it needs zeros between samples

It is often convenient to have the input and the output at the same end of the
array. The sum then has to flow against the samples. No cut can give both
lines a register without breaking the timing between input and output. So the
original delay is rescaled to two cycles (D = 2D'), and each line gets one D'
per PE (`fir_bwd_pe`):

    x_out <= x_in            s_out <= s_in + b · x_out     (s flows right to left)

The cost is the rescaling. The source must follow every sample with a zero.
The result for sample x(n) appears on `y` two cycles after x(n) was presented:
y(n) = Σ b_i x(n−i+1), with b_1 applied to x(n) itself. In the cycles between
results, `y` reads 0. Half of the PE slots carry zeros, so the array gives one
result every 2 cycles where the forward array gives one every cycle. The array
does not interleave the zeros itself. The source supplies them. The testbench
replays the published example: samples 1…6 with zeros between them, giving
outputs 1,3,6,9,12 every other cycle.

## Matrix multiplier: skewed inputs, accumulation in place

`mm_array` is an N×N grid (N = 4) of `mm_pe`. PE (i,j) owns c_ij and keeps it
in its own accumulator `Dc`. Every cycle it multiplies the `a` arriving from
the left by the `b` arriving from above and adds the product to `Dc`. It then
passes `a` right and `b` down through one register each.

For a_ik and b_kj to meet in PE (i,j), row i of A must enter i cycles late and
column j of B must enter j cycles late. The source prepends the leading zeros.
No skew registers are built. In cycle t (0-based) the feeds are:

    a_in[i] = A[i][t−i]   (0 outside 0..N−1)
    b_in[j] = B[t−j][j]   (0 outside 0..N−1)

a_ik and b_kj meet in PE (i,j) in cycle i+j+k. The inputs last 3N−2 cycles.
C is complete in the accumulators at the start of cycle 3N−1, counting the
first input cycle as cycle 1. For N = 4 that is cycle 11, and c11 is final in
cycle 5. `clr` loads every accumulator with 0 (through each PE's `c_in`/`c_load`).
Assert it in the cycle before a new product starts. After reset the
accumulators are already 0. Each PE also has a `c_in`/`c_out` pair so that it
can be reused with a moving partial sum. The array does not use them and ties
`c_in` to 0. The testbench compares all 16 accumulators in each of the 11
cycles with the published example, A = B = [1..16]. C ends as
90 100 110 120 / 202 228 254 280 / 314 356 398 440 / 426 484 542 600.

## ARMA filter: feedback in a systolic line

`arma_array` realises the ARMA filter in direct form 2:

    w(n) = x(n) + Σ_{k=1..N} a_k w(n−k)
    y(n) = Σ_{k=1..N} b_k w(n−k)

This is the same filter as y(n) = Σ b_k x(n−k) + Σ a_k y(n−k). Each
`arma_cell` section holds three registers:

* one on the state line `w`, running right;
* one on the feedback line `f`, running left and collecting a·w;
* one on the output line `y`, running left and collecting b·w.

At the left end an adder closes the loop: w = x + f. As in the backward FIR,
the state and the sums run in opposite directions, so the array is
time-rescaled. Feed samples on even cycles after reset and zeros on odd
cycles. The value on `y_out` in the cycle in which x(n) is presented is y(n).
`a[k]` and `b[k]` belong to section k counted from the input end, which applies
lag k+1. The test compares the array with the direct-form-1 difference equation
evaluated in the testbench, over an impulse and random filters.

## Wavefront FIR: the same filter without lock-step

A global clock gets harder to distribute as an array grows. A wavefront array
drops the common timing. Each PE computes as soon as its operands are there,
and the computation moves through the array as a wave. `wf_fir_pe` implements
one FIR iteration. The delay of the recurrence becomes a storage register
`x_reg`.

Every line (x and sum, in and out) is a four-phase channel:

1. The source drives `data` and raises `rdy`.
2. The target latches the data and raises `ack`.
3. The source lowers `rdy`.
4. The target lowers `ack`.

The PE's controller runs the two input lines independently. Each operand is
latched and acknowledged when it is offered, in whatever order the operands
arrive. When both operands are held and both output lines are idle, the PE
*fires*:

    x_out = x_reg,   s_out = s_in + b·x_reg,   x_reg <= x_new

Each output line lowers `rdy` on `ack` and becomes idle when `ack` falls.
Assertions in the PE check that an offered output keeps `rdy` high and its
data stable until acknowledged, and that `ack` is only raised in answer to
`rdy`.

`wf_fir_array` chains M = 3 PEs. A source at the head of the sum line always
offers 0. The sample line ends in a sink that acknowledges everything. If the
consumer of `y` is slow, results back up and the array stops taking samples.
Nothing is lost or reordered. The PEs still use a clock for their flip-flops,
but no transfer depends on how many cycles a neighbour takes. With neighbours
that answer at once, a sample passes about every 5 cycles: the cost of the
handshakes, compared with 1 cycle in the forward systolic array.

## Top level

`systolic_dsp_top` brings every array's ports out with a prefix (`fwd_`, `bwd_`,
`mm_`, `arma_`, `wf_`). Array ports are unpacked arrays of `W`-bit signed words.
Parameters `W`, `M_FWD`, `M_BWD`, `N_MM`, `N_ARMA` and `M_WF` set the sizes. Their
defaults (16, 3, 3, 4, 3, 3) are the sizes of the worked examples. Coefficient
inputs are meant to stay constant while an array runs.

## What follows the source and what was chosen here

These follow the thesis:

* the PE structures and register placement of all four systolic arrays;
* the time rescaling and zero interleaving;
* the skewed matrix feeds;
* the bypass-register scheme, with its one-cycle delay;
* the ready/acknowledge controller of the wavefront PE;
* the sizes and every cycle count that is checked.

These are choices made here:

* the word width, the wrap-around arithmetic and the reset;
* the `faulty` multiplexer in the bypass cell, and applying the bypass to the
  forward FIR, which is the unidirectional linear array of the examples;
* the `clr`/`c_load` multiplexer that initialises the matrix accumulators;
* the register position after the adders on the ARMA's left-going lines;
* the assignment of ARMA coefficients to sections by lag. The figures label the
  sections a2, a1, a0 from the input end;
* the output half of the wavefront protocol, the clocked realisation of the
  wavefront PE, and the terminations of its lines;
* the size of the wavefront example (3 PEs).

Other details:

* For the ARMA filter, the source's transfer function and its difference
  equation disagree on the sign of the feedback. The RTL follows the difference
  equation (feedback added).
* The performance table quotes a 10 MHz clock next to 1 µs per result for the
  forward FIR. Only the cycle counts are implemented and checked: 1 result per
  cycle and latency 4 for the forward FIR, 1 result per 2 cycles and latency 2
  for the backward FIR, 11 cycles per matrix product. No clock rate is claimed.
* Zero interleaving (backward FIR, ARMA) and matrix skew are the source's job.
  The arrays do not generate them.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each one ends by
printing `TB_RESULT checks=N failures=F`. Each compares against values worked
out independently: the published simulation tables where they exist, and
closed-form or reference models otherwise. Each stops itself with a watchdog.
`tb_systolic_dsp_top` runs all five arrays together at the default sizes. It
also counts that every mechanism happens: bypass, zero slots, accumulator
clear, ARMA feedback, wavefront back-pressure, and every wavefront PE firing
once per sample.

With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        --top-module tb_systolic_dsp_top rtl/systolic_pkg.sv tb/tb_systolic_dsp_top.sv
    ./obj_dir/Vtb_systolic_dsp_top

Replace the top module to run any other testbench, for example `tb_mm_array`.
All testbenches finish in well under a second. The testbenches use `$urandom`
for stimulus and no constraint solver.

To change a size, override the parameter on the array, or on the top. The
testbenches compute their expected values from the same parameter. The checks
against the published tables apply only at the default sizes.

`tb_scaled_pipes` grows the pipes and checks the timing rules at the new sizes:

* the forward FIR with 10 taps has its first output M+1 = 11 cycles after the
  first sample, including runs with random PEs bypassed;
* the backward FIR with 10 taps still gives each result 2 cycles after its
  sample;
* the matrix array at N = 3 and N = 6 completes C in cycle 3N−1 and not
  before.

Ten taps is the largest number of coefficients that the original
simulation programs were set up for. The matrix sizes are arbitrary.
