# Soft-error tolerant polyphase decimator

A decimator lowers the sample rate of an oversampled signal by a factor M:
it low-pass filters the signal and keeps every M-th sample. In the polyphase
form the low-pass filter is split into M short "phase" filters that each run at
the output rate, so nothing is computed for the samples that are thrown away.

On an SRAM-based FPGA a single upset in the configuration memory can break one
of those phase filters, and the broken filter then corrupts every output
sample. Triplicating the whole decimator fixes this at more than three times
the area. This design instead uses a property of the polyphase structure
itself: all phase filters see interleaved samples of the same input and
interleaved taps of the same filter, so their outputs at a given time are
strongly correlated. A phase filter whose output suddenly stands alone above
(or below) all the others is taken to be faulty, and its contribution to the
sum is replaced by the average of its two neighbours. Only the small logic
that does this checking is duplicated, and a final Compare & Select stage
decides which copy to trust.

The scheme is the one published by Z. Gao, J. Zhu, T. Yan, A. Ullah and
P. Reviriego, "Fault Tolerant Polyphase Filters-based Decimators for
SRAM-based FPGA Implementations", IEEE Trans. Emerging Topics in Computing,
10(2), 2022. The RTL here is an independent implementation of it; the
register timing, interfaces and the points listed under
[Design choices and departures](#design-choices-and-departures) are its own.

The default configuration is the published case study: decimation by
M = 16, a 64-tap prototype filter (K = 4 taps per phase), 8-bit signed input
samples and coefficients, 18-bit phase outputs and a 22-bit result.

## The decimation datapath

With prototype filter h(n), n = 0..N-1, the decimated output is

    z(r) = sum_{n=0}^{N-1} h(n) x(rM + n)

Writing n = m + kM splits it into M phase filters:

    P_m(k)  = h(m + kM)                               m = 0..M-1, k = 0..K-1
    y_m(r)  = sum_{k=0}^{K-1} P_m(k) x((r+k)M + m)    (phase filter m)
    z(r)    = sum_{m=0}^{M-1} y_m(r)

Phase filter m therefore only ever sees the samples x(jM + m), one per
output period. In hardware:

* `input_commutator` collects M consecutive input samples and hands the block
  over in one cycle, sample jM+m on lane m.
* `coef_mem` holds h(n) in registers behind a write port and presents them in
  the P_m(k) arrangement.
* `phase_filter` (M instances) keeps a K-deep delay line of its lane and
  forms the K products in parallel. With 8-bit operands, four products fit
  exactly in 18 bits; sixteen phase outputs fit exactly in 22 bits.

## Finding and repairing a faulty phase filter

This is the part of the design that needs the most thought. It lives in
`sum_ppf_protection` (one "Sum & PPFs Protection" copy) and
`fault_filter_detect`.

1. **Sum and mean.** z' = sum of all y_m is formed and registered (this
   register is the "delay of the sum"; the phase outputs are delayed
   alongside it). The mean y_th = z'/M is the threshold. M must be a power of
   two: the division is an arithmetic shift, and because y_m is an integer,
   `y_m > floor(z'/M)` is exactly `y_m > z'/M`.
2. **Vote.** Each phase output is compared with the mean, c_m = 1 when
   y_m > y_th. The count C = sum c_m is about M/2 in normal operation: the
   phase outputs are similar, and they scatter on both sides of their own
   mean.
3. **Isolate.** A phase filter corrupted badly enough to drag the mean with
   it ends up alone on its side: C = 1 (it is the single 1) or C = M-1 (it is
   the single 0). Only in those two cases is a phase declared faulty, and its
   index is the position of the lone bit.
4. **Substitute.** The faulty output is replaced by its neighbours:

        y^S_0     = y_1
        y^S_m     = (y_{m-1} + y_{m+1}) / 2      0 < m < M-1
        y^S_{M-1} = y_{M-2}

   and the output becomes z = z' + (y^S_m - y_m). The halving is an
   arithmetic shift (rounds towards minus infinity).

Consequences worth knowing:

* A small fault in a phase filter, one that leaves its output among the
  others, does not produce C = 1 or C = M-1 and is not corrected. That is
  intended: the error it causes is comparable to the error of the
  substitution itself.
* Likewise, an upset coefficient usually only perturbs its phase mildly and
  is normally not flagged (the end-to-end test shows this for a flipped sign
  bit of the centre tap at M = 16).
* Occasionally the vote gives C = 1 or C = M-1 with no fault at all; the
  "correction" is then a small substitution error. Both copies do the same
  thing, so this does not disturb Compare & Select.
* The substitution is only as good as the correlation between neighbouring
  phases, which grows with M. In the end-to-end tests, with one phase stuck
  at a large value, the output SNR rises from about 2 dB to about 38 dB at
  M = 16, and from about -10 dB to about 27 dB at M = 4.

## Protecting the protection: duplicate with comparison

`sum_fault_tolerance` instantiates two identical `sum_ppf_protection` copies
on the same phase outputs. Each copy reports z, z' and C. `compare_select`
then picks the output:

| case | condition | output |
|------|-----------|--------|
| (a) | z1 == z2 | copy 1 (both copies agree) |
| (b) | z1 != z2 and C1, C2 are at different distances from M/2 | the copy whose C is closer to M/2 |
| (c) | z1 != z2, C gives no decision | the copy with z == z' (the one that did not correct) |
| -   | none of the above | copy 1 |

Why these rules cover a single upset in one copy:

* A wrong sum z' moves the mean, so that copy's C moves away from M/2: (b).
* A wrong mean or a wrong comparison rarely produces C = 1 or M-1, so the
  copy makes no correction and both z agree. If it does produce them, C
  differs between the copies: (b).
* A wrong decision or a wrong register after the correction gives z1 != z2
  with equal C; the healthy copy has z == z' (no correction): (c).
* Faults in the substitute or in the delayed phase outputs only matter when a
  correction is made, which is rare.

Compare & Select itself is not protected; it is small.

Synthesis caution: the two copies are logically identical. A tool that
shares resources or merges duplicate logic will fold them into one and the
protection disappears. The instances carry `keep_hierarchy`/`dont_touch`
attributes; make sure the flow honours them or turn resource sharing off.

The selected rule, the chosen copy and the selected copy's detection result
are brought out as status ports (`sel_rule`, `sel_copy2`, `phase_fault`,
`phase_fault_idx`) for monitoring.

## Interface and timing (`ppf_decimator_ft`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `coef_wr_en`, `coef_wr_addr`, `coef_wr_data` | in | 1, log2 N, H_W | write h(n); coefficients reset to zero |
| `in_valid`, `in_x` | in | 1, X_W | input sample x(n), at most one per clock, gaps allowed |
| `out_valid`, `z_out` | out | 1, Z_W | decimated sample z(r), one-cycle pulse |
| `sel_rule` | out | 2 | `sel_rule_e`: agree / by C / by z == z' / default |
| `sel_copy2` | out | 1 | output taken from copy 2 |
| `phase_fault`, `phase_fault_idx` | out | 1, log2 M | chosen copy replaced phase `phase_fault_idx` |

* Throughput: one output per M accepted input samples; at one sample per
  clock the input rate equals the clock rate.
* Latency: z(r) needs x(rM+N-1). Accepted in cycle t, it appears in cycle
  t+5: commutator 1, phase filter 1, Sum & PPFs Protection 2, Compare &
  Select 1. Two of those cycles (the delayed sum and the registered selection)
  are the cost of the protection over a plain sum.
* The first output is z(0), after N input samples; the phase filters
  suppress their K-1 warm-up outputs.

## Parameters

All modules take their defaults from `ppf_pkg`.

| parameter | default | meaning |
|-----------|---------|---------|
| `M` | 16 | decimation factor = number of phases (power of two) |
| `N` | 64 | prototype filter length (multiple of M) |
| `X_W` | 8 | input sample width |
| `H_W` | 8 | coefficient width |
| `Y_W` | 18 | phase output width; must hold K products exactly |
| `Z_W` | 22 | output width; must hold the sum of M phase outputs |

For other sizes choose `Y_W >= X_W + H_W + ceil(log2 K)` and
`Z_W >= Y_W + log2 M`. For example M = 4, N = 64 needs `Y_W = 20`.

## Files

| file | content |
|------|---------|
| `rtl/ppf_pkg.sv` | default sizes, `sel_rule_e` |
| `rtl/input_commutator.sv` | serial-to-polyphase input switch |
| `rtl/coef_mem.sv` | coefficient registers, polyphase view |
| `rtl/phase_filter.sv` | one K-tap phase filter |
| `rtl/fault_filter_detect.sv` | count C, find the lone phase, compute the correction |
| `rtl/sum_ppf_protection.sv` | sum, mean, comparisons, corrected output (one copy) |
| `rtl/compare_select.sv` | choice between the two copies |
| `rtl/sum_fault_tolerance.sv` | two copies plus Compare & Select |
| `rtl/ppf_decimator_ft.sv` | top level |
| `tb/ppf_ref_pkg.sv` | integer reference models of one copy and of Compare & Select |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_ppf_decimator_ft_m4` |

## Verification

Every testbench compares the RTL with values computed independently in the
testbench, prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* Unit tests: block handover order and timing with random input gaps
  (`tb_input_commutator`); polyphase coefficient mapping and word rewrites
  (`tb_coef_mem`); phase filter against the FIR sum, including extreme
  operands and warm-up (`tb_phase_filter`); the lone-bit rule at every
  position and random votes (`tb_fault_filter_detect`); one protection copy
  on correlated, outlier and random phase sets with a 2-cycle latency check
  (`tb_sum_ppf_protection`); all selection rules (`tb_compare_select`); the
  duplicated unit with forced upsets of z' in copy 1 and of z in copy 2
  (`tb_sum_fault_tolerance`).
* End to end at the default size (`tb_ppf_decimator_ft`): a 64-tap
  Hamming-windowed low-pass with cut-off 1/M, quantised to 8 bits, filters a
  64-times oversampled binary symbol stream with noise and random input gaps.
  Each output is checked against a reference built from the input history
  (which is itself checked against the direct form of z(r)), including
  latency. Upsets are emulated one at a time for a window of outputs: phase 5,
  phase 0 and phase 15 stuck at a large value, a flipped coefficient sign bit,
  a wrong z' register in copy 1 and a wrong z register in copy 2. The test
  fails if a mechanism never occurs: correct detection of the stuck phase, an
  output error reduced by the correction, each of the selection rules (a),
  (b), (c), input gaps, outputs under a coefficient upset.
* `tb_ppf_decimator_ft_m4` runs the same end-to-end test at M = 4.

Upsets are emulated with `force` on internal signals (`dut.y[m]`,
`dut.u_sft.u_prot1.zp_d`, `dut.u_sft.u_prot2.z`), so the testbenches depend on
those names.

To run a testbench with Verilator 5:

    verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/ppf_pkg.sv tb/ppf_ref_pkg.sv tb/tb_ppf_decimator_ft.sv \
        --top-module tb_ppf_decimator_ft
    ./obj_dir/Vtb_ppf_decimator_ft

Each run takes well under a second. The simulator is two-state, so the
testbenches assert reset explicitly (with a falling edge) before use.

## Design choices and departures

* Interfaces (sample strobe, coefficient write port, status outputs), reset
  behaviour and all register placement are choices of this implementation.
* Phase outputs are delayed in ordinary registers; the published FPGA
  implementation used two block RAMs for this delay.
* A phase output equal to the mean counts as "below" (c_m = 0).
* When C1 != C2 but both are equally far from M/2, rule (c) is used; when no
  rule decides, copy 1 is output.
* z keeps 22 bits; a correction that would leave that range wraps.
* Not included: the unprotected reference decimator (its datapath is the
  commutator, the phase filters and the plain sum z' of this design) and the
  FPGA fault-injection platform (processor, configuration access port, golden
  copy, comparator, clock synchroniser). Upsets of the FPGA configuration
  memory cannot be reproduced at RTL; the tests emulate their effect on
  signals instead.
* Resource figures and the reachable clock rate of an FPGA build are not
  reproduced.
