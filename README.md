# Multi-cycle polynomial function evaluator

This RTL computes elementary functions such as sin(x) or 2^x in fixed point. It evaluates a
minimax polynomial over several clock cycles. Each cycle handles K terms, so a design needs K
multipliers instead of N+1. The stage count K sets the trade between area and speed. One result
takes `ceil((N+1)/K)` cycles, and its latency is `ceil((N+1)/K) + K` cycles. The function itself
is just ROM contents, so the same hardware evaluates any polynomial.

The top level, `func_eval_top`, holds two independent evaluators side by side:

| unit | computes | input range | degree | stages K | cycles per result | latency |
|------|----------|-------------|--------|----------|-------------------|---------|
| sine | sin(x)/2 | x in [-1, 1) rad | 6 | 4 | 2 | 6 |
| pow2 | 2^(x-1) | x in [0, 1) | 4 | 3 | 2 | 5 |

Both units use 16-bit inputs and outputs and 4 guard bits. With these defaults every one of the
65536 (sine) and 32768 (power of 2) input codes gives a result within one unit in the last place
(ulp) of the exact value. The largest errors are 0.72 and 0.73 ulp.

## The recursion

Write the polynomial as

    f(x) = a_0 + a_1 x + ... + a_{K-1} x^{K-1}  +  x^K * f'(x)

where `f'` is the polynomial of the remaining coefficients. Applying this again to `f'` gives a
Horner-like loop that consumes one *group* of K coefficients per cycle, starting from the
highest group:

    acc <= (b_0 + b_1 x + ... + b_{K-1} x^{K-1}) + x^K * acc

With K = 1 this is plain Horner's rule. With K = N+1 the whole polynomial is done in one cycle.
When N+1 is not a multiple of K, the top group is padded with zero coefficients.

## Datapath

    ROM#1 ─────────────────────┐
    ROM#2 ──(× x)──────────────+──[reg]──┐                        stage 1
    ROM#3 ──(× x^2)────────────────────── +──[reg]──┐              stage 2
      ...                                            ...
    ROM#K ──(× x^{K-1})────────────────────────────── +──[reg]──┐  stage K-1
                                                                 +── acc ──> round ──> y
                                             x^K ──(×)───────────┘   │
                                                    └────────────────┘ (feedback)

* **Feed-forward network** (`mac_stage`, K-1 copies). Stage s adds `ROM#(s+1) * x^s` to the
  partial sum and registers it. The registers keep every multiplier of the network out of the
  critical path.
* **Feedback loop** (`feedback_mac`). It forms `psum + x^K * acc` in 2P+G bits and truncates it
  to P+G bits into the accumulator. On the first cycle of an evaluation the fed-back value is
  forced to zero, so evaluations can follow each other without an idle cycle. The critical path
  of the whole design is this loop: one P x (P+G) multiplier and one (2P+G)-bit adder.
* **Powers of x** (`power_pipe`). x^(s+1) is formed as x^s · x with a register after every
  multiplier. A delay line of x runs beside it, so x^s arrives at stage s exactly s-1 cycles
  after stage 1 started on the same input. Each power is truncated to P bits. The one product
  that leaves the range, (-1)·(-1), saturates to 1 - ulp.
* **Output rounding** (`out_round`). This stage rounds the accumulator to P bits: it adds half
  an output ulp, drops the G guard bits, and saturates at the largest code. The result is
  registered.

### Number formats

Everything is a signed two's-complement fraction:

| signal | width | fraction bits | range |
|--------|-------|---------------|-------|
| x, x^s, y | P | P-1 | [-1, 1) |
| coefficients, accumulator | P+G | P+G-1 | [-1, 1) |
| products, partial sums | 2P+G | 2P+G-2 | [-2, 2) |

Every coefficient must lie in [-1, 1). Functions whose coefficients do not are stored scaled
down by a constant alpha. Both built-in functions use alpha = 2, so `sin_y` is sin(x)/2 and
`pow2_y` is 2^(x-1). To recover the true value, shift the output left by one bit into a wider
word. The hardware does not do this shift because the doubled value no longer fits in P bits.
Nothing checks partial sums for overflow. Sums wrap, and a coefficient set has to keep its
partial sums inside [-2, 2) and its accumulator inside [-1, 1). The built-in sets do.

## Coefficient ROMs and the rotation trick

There are K ROMs, each holding `CPE = ceil((N+1)/K)` words. ROM#i holds `a_{jK+i-1}` for
j = CPE-1 down to 0. The first cycle of an evaluation reads the highest group, and the last
cycle reads `a_0 .. a_{K-1}`. For the 3-stage, degree-6 sine (CPE = 3):

| ROM | cycle 0 (first) | cycle 1 | cycle 2 (last) |
|-----|-----------------|---------|----------------|
| ROM#1 | a_6 | a_3 | a_0 |
| ROM#2 | 0 | a_4 | a_1 |
| ROM#3 | 0 | a_5 | a_2 |

Stage s of the network runs s-1 cycles behind stage 1, so ROM#i with i >= 3 must deliver its
word i-2 cycles late. A register delay on each ROM output would do this. Instead, the ROM
contents are rotated by i-2 addresses, and all ROMs share one address counter. In the table
above, ROM#3 is stored as `a_2, 0, a_5` at addresses 0, 1, 2. This only works if the counter
never stops while an evaluation is still in the pipeline.

The contents are computed at elaboration (`coef_rom`, `fe_pkg::coef_index`,
`fe_pkg::rom_rotation`). They come from a flat coefficient table: `fe_pkg::coef_table(fn, P+G)`
rounds the real coefficients to P+G bits.

## Control and timing (`fe_ctrl`)

* A free-running counter counts 0 .. CPE-1 and addresses all ROMs.
* The input uses a valid/ready handshake. `in_ready` is high in the cycle where the counter is
  at CPE-1. A held `in_valid` is therefore taken once every CPE cycles, which is the full rate.
  An idle unit may make a new input wait up to CPE-1 cycles. An offered x must stay stable
  until it is taken, and an assertion in `poly_eval` checks this.
* Stage 1 creates a tag {en, first, last} for each cycle of an evaluation. The tag moves down a
  (K-1)-deep shift register beside the partial sums. At the loop, `first` clears the feedback
  and `last` passes the accumulator on to the rounding stage.
* `out_valid` pulses for one cycle, exactly `CPE + K` clock edges after the edge that took x.
  There is no back-pressure on the output.

Reset (`rst_n`, asynchronous, active low) clears the counter, the tags, the accumulator and the
output. The data pipeline registers are not reset, because tags qualify everything they hold.

## Choosing K

A degree-N design with K stages has the following cost and timing:

* K coefficient ROMs, K-1 feed-forward multipliers, K-1 power multipliers and one loop
  multiplier;
* one result every `ceil((N+1)/K)` cycles;
* latency `ceil((N+1)/K) + K` cycles, which is smallest near K = sqrt(N+1).

Throughput grows with K up to K = ceil((N+1)/2), where one result takes two cycles. Larger K
still needs two cycles, until K = N+1 makes it one, so those designs add area for little gain.
The defaults follow this rule: 4 stages for the degree-6 sine and 3 for the degree-4 power of 2.

## Files

| file | contents |
|------|----------|
| `rtl/fe_pkg.sv` | formats, coefficient sets, quantisation, ROM ordering and rotation functions |
| `rtl/coef_rom.sv` | one coefficient ROM (contents computed at elaboration) |
| `rtl/power_pipe.sv` | pipelined powers x^1 .. x^K |
| `rtl/mac_stage.sv` | one feed-forward multiply-add stage |
| `rtl/feedback_mac.sv` | multiply-accumulate loop with clear |
| `rtl/out_round.sv` | rounding and output register |
| `rtl/fe_ctrl.sv` | counter, handshake, tag pipeline |
| `rtl/poly_eval.sv` | one K-stage evaluator (parameters P, G, N, K, COEF) |
| `rtl/func_eval_top.sv` | sine and power-of-2 evaluators side by side |

`poly_eval` is the reusable unit. To evaluate another function, pass a different `COEF` table:
coefficient a_j goes in slot `j*32 +: 32`, and `N` is the degree. Up to 16 terms and P+G up to
32 bits are allowed.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. `tb/tb_ref_pkg.sv` is an
independent sequential model of the arithmetic. It quantises the coefficients, forms truncated
powers and runs the grouped Horner recursion. The evaluator tests compare against it bit for
bit, and also against `$sin` / `$pow` to within one ulp.

| testbench | what it runs |
|-----------|--------------|
| `tb_poly_eval` | 16-bit sine with K = 1..7 and power of 2 with K = 1..6, random inputs, latency and throughput checks |
| `tb_func_eval_top` | the top at its defaults, both units at once, back-to-back and gapped traffic, corner inputs; counts each mechanism |
| `tb_exhaustive_top` | the top at its defaults over every input code, about 131k cycles |
| `tb_width_sweep` | 8-, 12- and 18-bit variants with various K |
| `tb_fe_pkg`, `tb_coef_rom`, `tb_power_pipe`, `tb_mac_stage`, `tb_feedback_mac`, `tb_out_round`, `tb_fe_ctrl` | unit tests |

To run one with Verilator (5.x):

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        --top-module tb_func_eval_top rtl/fe_pkg.sv tb/tb_ref_pkg.sv tb/tb_func_eval_top.sv
    ./obj_dir/Vtb_func_eval_top

The simulator has two-state semantics. Every register read before it is written is reset or
qualified.

## Limits and design choices

* **Coefficients.** Both coefficient sets are this design's own Remez minimax fits. So are the
  input domains, the guard-bit count G = 4 and the degree-4 power of 2. G = 4 was found by
  exhaustive bit-accurate simulation: it keeps all 16-bit results within one ulp for every K.
* **Precision range.** The built-in polynomials meet the one-ulp bound from 8 to 18 bits. At
  20 and 22 bits they reach only about 1.4 and 4 ulp, so those widths need higher-degree
  coefficient sets. The datapath itself accepts them.
* **Truncation.** The powers of x and the accumulator are truncated rather than rounded. Only
  the final output is rounded.
* **Handshake.** The valid/ready input, the free-running counter and the wait of up to CPE-1
  cycles on an idle unit are this design's own choices.
* **Scaling.** Multiplying back by alpha is left to whoever uses the result.
* **Not included.** The symmetric bipartite table method serves only as a comparison and is not
  part of this RTL. FPGA area and clock speed have not been measured. The cycle counts above are
  what the RTL guarantees.
