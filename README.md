# Fast-locking all-digital PLL with feed-forward frequency compensation

A phase-locked loop has to find the right oscillator frequency before it can lock
the phase. A plain feedback loop does that slowly: its bandwidth is kept narrow to
filter noise. This ADPLL does not search for the frequency at all. It predicts it.
After reset it runs the digitally controlled oscillator (DCO) at two trial codes
and counts how many DCO cycles fit in one reference period at each. From the two
counts it works out the DCO gain, then computes the code for the wanted divider
ratio N. That code goes straight into the loop filter's integrator, and the divider
is restarted in phase with the reference. The feedback loop then only has to remove
the small error left by the prediction. On a later channel change (new N), the
stored gain gives a new code at once, without new measurements.

The loop has six blocks:

| block | file | role |
|---|---|---|
| DCO | `rtl/dco.sv` | five-phase ring oscillator, 10–625 MHz (behavioural model) |
| MD, modified divider | `rtl/md.sv` + `reset_syn.sv`, `savef.sv`, `t2d.sv`, `pfd.sv` | divide by N, count DCO cycles per reference cycle, detect and coarsely count the phase error |
| PFD | `rtl/pfd.sv` (inside MD) | phase/frequency detector on falling edges |
| P2D, phase-to-digital | `rtl/p2d.sv` | refines the phase error to 1/5 of a DCO period using the other four phases |
| FDLPF, loop filter | `rtl/fdlpf.sv` | proportional + integral filter; loads the predicted code |
| LC, loop control | `rtl/lc.sv` | the feed-forward algorithm |
| top | `rtl/adpll_top.sv` | wires the loop together |

Shared widths are in `rtl/adpll_pkg.sv`.

## The feed-forward prediction (LC)

The loop control steps once per rising reference edge. It has no handshake and
relies on fixed latencies:

| edge after reset | LC does | DCO runs at |
|---|---|---|
| e0 | code W1 is on `w_lc`, `sel`=1, `fa_mode`=1 | W1 (loaded by the filter at e0) |
| e1 | put W2 on `w_lc` | W1 |
| e2 | read F1 (DCO cycles counted in reference cycle e0→e1) | W2 |
| e3 | wait | W2 |
| e4 | read F2 (cycle e2→e3) | W2 |
| e5 | put predicted W on `w_lc` | W2 |
| e6 | `sel`=0, `fa_mode`=0, `locked`=1 | W; phase loop starts |

The prediction assumes the DCO is linear between the two trial points:

    Kf = (W1 − W2) / (F1 − F2)        codes per (DCO cycle per reference cycle)
    W  = W1 + Kf · (N − F1)

The datapath has four subtractors/adders (ΔW, ΔF, N−F1 and the final sum), one
multiplier and one divider. Kf carries 8 fraction bits. W is rounded and clamped
to 0..1023. If ΔF = 0, the result is W1.

When `n_div` changes while `locked` is high, LC recomputes W from the stored F1
and F2 in one cycle. It pulses `fa_mode` so the divider realigns, and returns to
tracking on the next edge.

Accuracy: F is an integer count, so the prediction can be off by up to about one
DCO cycle per reference cycle, that is 1/N in frequency. With the defaults this is
a few percent. The PI loop removes the rest.

## The divider and its two modes (MD)

One counter, clocked by DCO phase CLK[0], does two jobs. A multiplexer picks its
next value:

* **Frequency acquisition** (`fa_mode`=1). The counter restarts on every
  reference edge. Just before the restart, saveF stores count+1 in `f_meas`: the
  number of CLK[0] cycles in the reference period that just ended. `reset_div`
  holds the PFD cleared.
* **Phase acquisition** (`fa_mode`=0). On the first reference edge in this mode,
  the counter is preset to `ALIGN`=2, not 0. After that it divides by N.
  `div_clk` is high for counts 0..N/2−1. The preset makes up for the latency of
  the synchroniser (below). As a result, the first falling edge of `div_clk`
  lands within one DCO period after the reference's, and the phase loop starts
  with an error below one DCO cycle. `reset_div` falls at that edge.

The reference enters the CLK[0] domain through two flip-flops and an edge
detector (Reset_syn). So every action "on a reference edge" actually happens at
the third CLK[0] edge after it. The same pulse, `zero`, clears the T2D and P2D
counters, well before the next error window. A window opens near the falling
reference edge, half a reference period later. That is why the detector uses
falling edges, and why N must be roughly 8 or more.

## Measuring the phase error to a fifth of a DCO period (PFD, T2D, P2D)

The PFD raises `up` if the reference falls first and `dn` if the divided clock
falls first. It clears both once both have fallen. `p_error = up ^ dn` is a pulse
exactly as wide as the time between the two edges. T2D captures its sign
(`lead` = `up` at the start of the pulse). It also counts the CLK[0] rising edges
inside the pulse into the 2-bit count P, which saturates at 3.

The DCO ring gives five phases. CLK[k] is CLK[0] delayed by k/5 of a period, so
together their rising edges form a grid with spacing T_DCO/5. The P2D counts the
rising edges of CLK[1..4] inside the same pulse, each with a 2-bit counter.
Because phase k is close to CLK[0], its count differs from P by −1, 0 or +1. A
comparator takes that difference from the two low bits. The P2D output is

    P1 = 5·P + Σₖ (cntₖ − P)  =  Σ over all five phases of edges inside the pulse

This is the pulse width in units of T_DCO/5. P1 is 6 bits wide, registered on the
falling edge of `p_error`, and cleared by `zero`. The 2-bit coarse count limits
the exact range to pulses shorter than three DCO periods (P1 ≤ 19). Longer
pulses give a large positive value with the right sign, which is all the loop
needs while it pulls in.

## The loop filter (FDLPF)

Once per rising reference edge:

    e    = lead ? +P1 : −P1                 (inverse block)
    I    = sel ? W_lc : clamp(I + KI·e)      (integral path with load multiplexer)
    code = sel ? W_lc : clamp(I + KP·e)      (registered output)

KP = 48 and KI = 8 with 4 fraction bits, that is 3.0 and 0.5 codes per T_DCO/5.
They were chosen for the 271 MHz operating point with a 13.55 MHz reference. At
that point one code is about 0.6 MHz, and one code of frequency error moves the
phase by about 0.22 T_DCO/5 per reference cycle. For other reference frequencies
or DCO gains, retune them through the top's parameters.

## DCO model

`dco.sv` is a behavioural model of an analog part. It is not synthesizable. The
frequency is linear in the code: f = 10 + code·615/1023 MHz. The ring position
advances every tenth of the current period, so a code change takes effect within
a tenth of a cycle. While `run` is high (the loop's off state), all phases are low
and the ring is stopped. Note the polarity: `run` high means off. To use a real
oscillator, replace this file. The loop expects only that the code-to-frequency
curve is monotonic and close to linear between W1 and W2.

## Interface of `adpll_top`

Inputs: `ref_clk`; `rst_n` (asynchronous, active low); `run` (high = DCO off);
`n_div[9:0]` (divider ratio; change it only between reference edges, and a change
starts a re-prediction).

Outputs: `clk_out[4:0]` (DCO phases) and `div_clk`. Observation outputs: `code`
(DCO control word), `f_meas`, `p1`, `lead`, `p_error`, `up`, `dn`, `reset_div`,
`fa_mode`, `locked` (high once the predicted code is loaded and the phase loop
runs; it does not detect lock) and `kf` (Kf in Q8).

Parameters: `FRAC`, `KP`, `KI` (filter) and `W1`, `W2` (trial codes). Width
constants are in `adpll_pkg`.

## How it behaves

Simulation setup: 13.55 MHz reference, N = 20 (271 MHz), then switches to N = 25
and N = 16. The first prediction lands a few codes from the locked value
(code 422–444 against 434). The phase error stays within 2/5 of a DCO period from
about 5 reference cycles after the prediction is loaded, and the output frequency
then matches N·f_ref to the measurement resolution. Counted from reset, frequency
and phase are settled after about 11 reference cycles: 6 for the measurements and
the prediction, 5 for the phase loop. The same holds after each channel switch.

Across the range, with the default parameters and a 13.55 MHz reference, the
loop locks at N = 8, 12, 30 and 46 (108 to 623 MHz) within 3–8 reference cycles
of each prediction. Near the top of the range the code runs into its upper
limit, 1023. The low end needs a slower reference, because the divider needs N
of roughly 8 or more. With a 1.5 MHz reference and the gains scaled down by the
ratio of the reference periods (`FRAC`=8, `KP`=85, `KI`=14), it locks at 12 and
18 MHz. 10 MHz is code 0, the edge of the code range.

## Where this departs from the original description, and why

* The original loop is said to lock within 2 reference cycles. This
  implementation needs about 5 reference cycles after the prediction. Most of
  that is spent removing the prediction error that comes from integer frequency
  counts. The original's F1 and F2 cycles (first and third reference cycle) are
  kept.
* T2D samples the error pulse on the rising CLK[0] edge. The original re-samples
  it on the falling edge. Using the rising edge makes the CLK[0] count cover the
  same window as the four P2D counters, which the P1 formula above needs.
* Several things are this design's own choice, because the source does not give
  them: the synchroniser, the alignment preset, the error sign path (`lead`), the
  prediction formula's fixed-point format, the trial codes, the filter gains, all
  widths except P (2 bits) and P1 (6 bits), and the re-prediction on a channel
  switch.
* The asynchronous crossings are handled only as far as a simulation needs:
  `lead`, `p1` and `f_meas` are read in the reference domain while stable, and
  the PFD's reset feedback is a zero-delay loop. A silicon implementation needs
  proper synchronisers, and a minimum reset pulse in the PFD.

## Simulating

Every testbench in `tb/` checks itself. It ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

    verilator --binary --timing --assert -y rtl rtl/adpll_pkg.sv tb/tb_adpll_top.sv --top tb_adpll_top
    ./obj_dir/Vtb_adpll_top

Replace `tb_adpll_top` with `tb_pfd`, `tb_md`, `tb_p2d`, `tb_lc`, `tb_fdlpf` or
`tb_dco` to test one block. What each testbench checks:

* `tb_adpll_top` runs the whole loop at default parameters. It checks the
  off state, the trial codes, F1 and F2, the predicted code against the formula,
  phase lock and output frequency on three channels, and that every mechanism
  occurred.
* `tb_adpll_range` runs two loops across the output range, as described above.
* `tb_pfd` checks the pulse width and sign for random offsets, and `reset_div`.
* `tb_md` checks `f_meas` for several reference periods, alignment, divider
  period and duty, and the T2D count and sign for drifting phase in both
  directions.
* `tb_p2d` checks P1 against an independent count of all five phases' edges for
  random pulses.
* `tb_lc` checks the step sequence and the prediction, with clamping and
  ΔF = 0, for random counts and channel switches.
* `tb_fdlpf` compares against an integer model.
* `tb_dco` checks the period against the formula, the phase spacing and `run`.

Time units are ns (`timescale 1ns/1fs`).
