# Low-latency processors for single-input linear filters

A recursive linear filter or controller, y = H(z)·x, is usually built so that
its throughput is good. Its latency, the time from a sample arriving to the
matching output leaving, gets little attention. An embedded controller needs
both to be short. This RTL implements four processors for one single-input
single-output linear time-invariant system with zero initial state. Each
processor rewrites the system into a standard structure. The structures
share a useful property: most of the work for sample n can be done before
x[n] arrives, so x[n] itself passes through only one multiplication and one
addition before the output.

All times are counted in **control steps**, and a control step is one clock
cycle. An addition takes one step. A multiplication takes `M` steps; the
default is `M = 1`. T_L is the latency and T_S is the sample period (cycles
between accepted samples).

| processor | structure | states | coefficients | T_L | T_S | at M = 1 |
|---|---|---|---|---|---|---|
| `mdf2_proc`  (technique 1) | modified Direct Form II | 2N | 4N+1 | M+1 | M+2 | 2, 3 |
| `mdf2u_proc` (technique 2) | technique 1 unfolded once, on-arrival processing | 2N | 8N+4 | M+1 | M+1 | 2, 2 |
| `tdf2_proc`  (technique 3) | transposed Direct Form II (companion form) | N | 2N+1 | M+1 | M+2 | 2, 3 |
| `tdf2u_proc` (technique 4) | technique 3 unfolded once, on-arrival processing | N | 4N+4 | M+1 | M+1 | 2, 2 |

`lin_asp_top` instantiates all four side by side. Each processor has its own
ports, so you can compare them or use any one of them.

## From a transfer function to loaded coefficients

The hardware stores no filter. Each processor has a coefficient memory that
you load over a write port, and the values come from the transfer function.
Write the transfer function as

    H(z) = (b0 + b1 z^-1 + ... + bN z^-N) / (1 - a1 z^-1 - ... - aN z^-N)

Here a_i and b_j are the Direct Form II feedback and feed-forward
coefficients. A state-space system s[n] = A s[n-1] + B x[n],
y[n] = C s[n-1] + D x[n], with polynomial numerator Σα_i z^i and denominator
Σβ_i z^i of degree N, converts as a_i = -β_{N-i}/β_N and b_j = α_{N-j}/β_N.

Every structure below is a state-space system with one special feature. The
matrix A is zero except for its first column and a superdiagonal of ones. The
hardware therefore multiplies only by the first column of A, by B and by D.
The "times one" terms are plain additions of the next state.

**Technique 1 (`mdf2_proc`).** Start from Direct Form II and divide the
feed-forward branch by b0. Then retime it so that its delays sit in two
chains: a left chain s_1..s_N and a right chain s_{N+1}..s_{2N}. With
alpha = (a_1..a_N, b_1/b0..b_N/b0) and beta = (b0·a_1..b0·a_N, b_1..b_N):

    s_i[n] = alpha_i·s_1[n-1] + beta_i·x[n] + s_{i+1}[n-1]     (s_{i+1} := 0 for i = N, 2N)
    y[n]   = s_1[n-1] + s_{N+1}[n-1] + b0·x[n]

Memory layout: address 0 holds b0, 1..2N hold alpha, 2N+1..4N hold beta.

If b0 = 0, set `B0_IS_ZERO = 1`. The equations then use
alpha = beta = (a_1..a_N, b_1..b_N) and y[n] = s_{N+1}[n-1]. That output
exists before x[n] arrives, so it appears in the same cycle the sample is
accepted (latency 0).

**Technique 3 (`tdf2_proc`).** This is the companion form, with only N
states. Set e_i = b_i + a_i·b0. Then:

    s_i[n] = a_i·s_1[n-1] + e_i·x[n] + s_{i+1}[n-1]            (s_{N+1} := 0)
    y[n]   = s_1[n-1] + b0·x[n]

Memory layout: address 0 holds b0, 1..N hold a_i, N+1..2N hold e_i.

**Unfolded techniques 2 and 4 (`mdf2u_proc`, `tdf2u_proc`).** Applying the
system twice gives one step per *pair* of samples (n even):

    s[n+1] = A² s[n-1] + AB x[n] + B x[n+1]
    y[n]   = C s[n-1] + D x[n]
    y[n+1] = CA s[n-1] + CB x[n] + D x[n+1]

For these matrices A² has two non-zero columns plus a second superdiagonal
of ones. Per state:

    s_i[n+1] = p_i·s_1 + q_i·s_2 + s_{i+2} + r_i·x[n] + g_i·x[n+1]

Let alpha/beta be the single-rate first column of A and B: technique 1's
alpha/beta, or a/e for technique 3. Let u_i = 1 if s_{i+1} is in the same
chain as s_i, else 0. Then:

    p_i = alpha_i·alpha_1 + u_i·alpha_{i+1}      q_i = alpha_i
    r_i = alpha_i·beta_1  + u_i·beta_{i+1}       g_i = beta_i

The outputs are:

- technique 2: y[n+1] = h1·s_1 + s_2 + s_{N+2} + h2·x[n] + d1·x[n+1], with
  h1 = alpha_1 + alpha_{N+1} and h2 = beta_1 + beta_{N+1}.
- technique 4: y[n+1] = h1·s_1 + s_2 + h2·x[n] + d1·x[n+1], with h1 = a_1 and
  h2 = e_1.

In both, y[n] is computed as in the single-rate structure with d0, and
d0 = d1 = b0. Memory layout: address 0 is d0, 1 is h1, 2 is h2, 3 is d1. The
p, q, r and g vectors follow from address 4, each as long as the number of
states. Technique 2 needs N ≥ 2.

A filter of order lower than N fits: fill the unused a_i and b_i with zero.
The extra states then stay at zero.

## Why the latency is M+1: the schedules

Every product has its own multiplier (`mult_pipe`, M pipeline stages). Every
addition has its own adder register, so the datapath is fully parallel. The
controller `step_ctrl` accepts a sample (step 0). From then on it counts
steps, and each register loads in its own step. Products of the state and of
x[n] start together in step 0 and are ready in step M.

Single-rate structures (techniques 1 and 3):

| step | work |
|---|---|
| 0 | all products start; technique 1 also forms v = s_1 + s_{N+1} |
| M | t_i = alpha_i·s_1 + beta_i·x; y = b0·x + v (or + s_1) |
| M+1 | s_i ← t_i + s_{i+1}; y is valid (y_valid pulse) |
| M+2 | next sample may be accepted |

The state needs three operands after the multiplication, so it takes two
adder levels. That sets T_S = M+2. The output needs only one adder level
after the multiplication, so T_L = M+1.

Unfolded structures (techniques 2 and 4) use **on-arrival processing**. Each
sample is processed as soon as it arrives; nothing waits for the second
sample of a pair. While x[n+1] is still on its way, everything that depends
only on s[n-1] and x[n] is summed into partial results. When x[n+1] arrives,
it needs one multiplication and one addition, both for the new state and for
y[n+1]:

| step | work |
|---|---|
| even 0 | x[n] accepted, all its products start; v = s_1 + s_{N+1}, w = s_2 + s_{N+2} |
| even M | two adder levels begin: pq_i = p_i s_1 + q_i s_2, rs_i = r_i x[n] + s_{i+2}, qa = h1 s_1 + h2 x[n]; y[n] = d0 x[n] + v |
| even M+1 | part_i = pq_i + rs_i, qs = qa + w; y[n] valid |
| odd 0 (≥ even M+1) | x[n+1] accepted, products g_i x[n+1] and d1 x[n+1] start |
| odd M | s_i ← part_i + g_i x[n+1]; y[n+1] = qs + d1 x[n+1] |
| odd M+1 | y[n+1] valid; next pair may start |

Both samples see T_L = M+1 and the pair takes 2(M+1) steps, so T_S = M+1.
Unfolding buys one step of sample period. The cost is doubling the
coefficient memory and the number of multipliers.

If a sample comes late, the controller waits for it. The schedule always
counts from the actual arrival, and a partial result stays in its register
until it is used. The first sample after reset is the even one of a pair.

## Bit-level multiplication (technique 1 option)

In these structures nearly every product multiplies one of two variables (s_1
or x) by a constant. `mcm_shift_add` exploits this. It makes one shifted copy
of the variable per cycle, and every coefficient whose current bit is set
adds that copy into its own accumulator. The sign bit subtracts, because the
coefficients are two's complement. All products of the variable are done
after CW shifts, whatever the coefficient values.

`mdf2_proc` with `BIT_LEVEL = 1` uses two of these units, one for s_1 and one
for x, instead of one multiplier per product. The schedule stays the same
with M = CW, giving T_L = 17 and T_S = 18 at the default widths.

## Number format and interfaces

- Data and states are W-bit two's complement (default 16).
- Coefficients are CW-bit two's complement with CF fraction bits (defaults 16
  and 12), so their range is [-8, 8).
- Each product is (a·c) >>> CF, truncated to W bits. All sums wrap; nothing
  saturates. Scale the input so that no state overflows.
- Because each product is truncated separately, the four structures agree
  with each other and with H(z) only up to rounding, not bit for bit.

Ports of each processor (the top has the same ports, as arrays `[4]`; index
0..3 = techniques 1..4):

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset. Reset clears states and coefficients. |
| `coef_we`, `coef_addr`, `coef_wdata` | in | coefficient write; the write takes effect the next cycle. The top ignores addresses past a processor's memory. |
| `x_valid`, `x_ready`, `x_data` | in/out/in | a sample is taken in a cycle with both valid and ready high |
| `y_valid`, `y_data` | out | y_valid is a one-cycle pulse marking y_data |

Parameters: `N` (order, default 12, the largest of the benchmark set), `W`,
`CW`, `CF`, `M` (default 1); `B0_IS_ZERO` and `BIT_LEVEL` on `mdf2_proc`
(`T1_B0_IS_ZERO` and `T1_BIT_LEVEL` on the top).

## Files

| file | contents |
|---|---|
| `rtl/lin_pkg.sv` | default sizes, coefficient-memory size functions |
| `rtl/mult_pipe.sv` | M-step pipelined fixed-point multiplier |
| `rtl/mcm_shift_add.sv` | shared-shifter multiplier of one variable by K constants |
| `rtl/coef_mem.sv` | coefficient register file, one write port, all words read in parallel |
| `rtl/step_ctrl.sv` | control-step counter, sample pacing and pair parity |
| `rtl/mdf2_proc.sv`, `rtl/mdf2u_proc.sv`, `rtl/tdf2_proc.sv`, `rtl/tdf2u_proc.sv` | the four processors |
| `rtl/lin_asp_top.sv` | the four processors side by side |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_proc_drv.sv`, `tb/tb_proc_run.sv` | shared stimulus, reference models and checker for the processors |
| `tb/tb_lin_asp_top.sv` | the top at its default parameters, end to end |
| `tb/tb_lin_asp_top_modes.sv` | the top in its three builds (default, b0 = 0, bit level) |
| `tb/tb_workloads.sv` | benchmark filter orders 3-12 on the full-size top |

At the defaults (N = 12), coarse synthesis of `lin_asp_top` gives about 1300
word-level cells, 226 of them multiply-accumulate cells (one per
multiplier), about 7,200 flip-flop bits and 3,600 bits of multiplier
pipeline registers.

## Verification

The processor testbenches have three parts:

- They draw a random stable filter and build the structure's matrices in
  floating point. For the unfolded forms they compute A², AB, CA and CB by
  ordinary matrix products.
- They quantise the coefficients and load them.
- They stream samples, first back to back and then with random gaps.

Each output gets three checks:

- bit-exact agreement with a full-matrix fixed-point model, which does not
  rely on the sparse wiring of the RTL;
- agreement with a floating-point Direct Form II filter of the same H(z),
  within a small tolerance;
- its latency in cycles; with back-to-back input, the sample period is
  checked too.

Configurations covered: every technique at M = 1 for several orders,
including N = 12; M = 2 or 3; technique 1 with b0 = 0; and bit-level
multiplication.

`tb_lin_asp_top` runs the top at its default parameters. The same
12th-order filter goes into all four processors. The test requires that
back-pressure, late samples and on-arrival processing of pairs each happen at
least once. `tb_lin_asp_top_modes` runs three builds of the top at once:
the default one, one with the b0 = 0 form, and one with bit-level
multiplication. `tb_workloads` repeats this for filters of order 3, 4, 5, 6, 8,
10, 11 and 12.

Running one testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb rtl/lin_pkg.sv tb/tb_lin_asp_top.sv \
              --top-module tb_lin_asp_top
    ./obj_dir/Vtb_lin_asp_top

Each testbench ends with `TB_RESULT checks=<n> failures=<n>`.

## What is this design's own

The structures, their equations, the coefficient counts of techniques 1-3,
the latencies and sample periods, on-arrival processing and the shared-shift
multiplication all come from the original description of these techniques.
The following are choices made here:

- **Fully parallel datapath.** There is one multiplier per product and one
  adder per sum; resources are not shared. This gives the minimum T_L and T_S
  at the highest cost. The original synthesis flow allocated and shared
  units, and also produced cheaper schedules at relaxed timing. Those
  schedules are not built.
- **Loadable coefficients** in a register-file coefficient memory, not
  constants folded into the logic. Multiplications by 0 and 1 are therefore
  saved only where the structure has them fixed (the superdiagonal ones), not
  where a particular filter happens to have such values.
- **Technique 4 detail.** The equations and schedule for technique 4 are
  derived here the same way as for technique 2, since only its timing and
  relative cost were given. Its memory has 4N+4 words, a little more than half
  of technique 2's, because h1, h2 and d1 are stored separately.
- **Number format, handshake, reset, memory layout, pair parity.** The Q4.12
  coefficient format, 16-bit words, valid/ready handshake, reset behaviour,
  coefficient layout and pair parity after reset are all this design's own.
- **b0 = 0 form.** The b0 = 0 form is provided for technique 1 only.
- **Not included.** Chip-level pads and layout are not part of this RTL.
