# BOC acquisition engine with reordered sub-carrier phase cancellation

A GNSS receiver has to find a satellite's code phase and Doppler shift before it can track the
signal. Signals with binary offset carrier (BOC) modulation make this harder. Their
autocorrelation has several sharp peaks, so the code search needs a fine step and easily locks
onto a side peak. Sub-carrier phase cancellation (SCPC) avoids this. It correlates the input four
times: with the carrier in phase and in quadrature, and with the replica code carrying an
in-phase and a quad-phase square sub-carrier. It then adds the four squared results. The result
has one wide peak, which a coarser code step can find.

Done directly, SCPC needs four full correlators for each code phase searched. This engine
implements the cheaper structure from the paper "An Efficient Acquisition Architecture for
BOC-modulated Signal". The correlation is reordered so that the expensive part runs on only two
channels, and those channels are time-shared. The RTL is synthesizable SystemVerilog. By default
it tests 400 code phases per dwell on a BOC(10,5) signal with 4 samples per code increment.

## The reordered correlation

In the rest of this text, a **dchip** is one code increment, the step between code-phase
hypotheses. It lasts `L` samples (default 4). A PRN code chip is `K` dchips long (default 8), and
each dchip of a chip has its own sub-carrier position `k = 0..K-1`. The in-phase and quad-phase
sub-carriers are fixed sign patterns over `k`. For BOC(10,5):

    S_I = + + - - + + - -        S_Q = + - - + + - - +

The direct correlation multiplies every sample by carrier × code × sub-carrier and sums. Within a
dchip neither the code nor the sub-carrier changes, and the sub-carrier repeats in every chip. So
the work splits into three steps:

1. **Carrier wipe-off and dchip sums.** The input is multiplied by the replica sin and cos and
   summed over the `L` samples of each dchip:
   `T_I(j) = Σ x·sin`, `T_Q(j) = Σ x·cos`. This step runs once and is shared by every hypothesis.
2. **Code correlation per sub-carrier position.** Hypothesis `d` pairs input dchip `j` with
   replica dchip `j+d`. It adds `±T_I(j)` and `±T_Q(j)`, signed by that replica's code chip, into
   the accumulators `M_I(d,k)` and `M_Q(d,k)`, where `k = (j+d) mod K`. Each hypothesis has `K`
   accumulators per branch. Only two branches are needed (I and Q), not four.
3. **Sub-carrier correlation.** After the dwell, each hypothesis forms
   `Y_II = Σ_k S_I(k)·M_I(d,k)`, `Y_IQ = Σ S_I·M_Q`, `Y_QI = Σ S_Q·M_I` and `Y_QQ = Σ S_Q·M_Q`.
   It then forms `Q = Y_II² + Y_IQ² + Y_QI² + Y_QQ²`.

These steps give exactly the same `Q` as the sample-by-sample SCPC sums with the same quantized
carrier. The end-to-end testbenches check this bit for bit against a direct reference. All code
and sub-carrier products are sign inversions, so the cost is in the adders of step 2.

## Time-shared lanes and the accumulator layout

A dchip sum stays in its output register (Reg0 for I, Reg1 for Q) for `L` clocks while the next
dchip is being summed. Each **lane** uses those `L` clocks to serve `L` hypotheses, one per clock.
`LANES` lanes therefore cover `P = LANES·L` hypotheses with `2·LANES` accumulating adders. This is
the time division of the architecture, and it saves a factor of `L`.

`code_correlator_bank` holds three pieces of state:

- **Replica window.** `win[d]`, for `d = 0..P-1`, is a `P`-bit shift register. It holds the code
  bit of replica dchip `j+d`. It shifts once per dchip, taking the next bit from
  `code_generator`, which holds each chip for `K` steps.
- **`kbase`.** This is the sub-carrier position of `win[0]`. Hypothesis `d` uses position
  `(kbase + d) mod K`. Each lane adds its constant `(u·L) mod K` and its slot number.
- **Slot sequence.** In the clock where `t_valid` arrives, slot 0 runs. Slots `1..L-1` follow in
  the next clocks. In slot `s`, lane `u` serves hypothesis `d = u·L + s`. After slot `L-1` the
  window shifts and `dchip_done` pulses.

Each lane (`correlator_lane`) holds `L·K` registers per branch. Each clock it does one
read-modify-write. In the first `K` dchips of a dwell, every register of a lane is visited exactly
once. Those first visits overwrite the register instead of adding to it, so no clearing pass is
needed.

The design relies on one timing rule: **at most one input sample per clock**. Under that rule a
dchip lasts at least `L` clocks, so the lanes finish before the dchip registers change. The
controller guarantees it by accepting at most one sample per clock. An assertion in
`code_correlator_bank` checks the rule.

Loading a code offset `o`: the generator restarts at code phase 0. The window then shifts `o+P`
times, so `win[d]` holds replica dchip `o+d`. `kbase` starts at `−P mod K`, which makes it `o mod K`
after loading.

## Search sequence and timing

`acq_controller` runs one **dwell** for each block of `P` code phases, at one Doppler bin:

| phase  | cycles                              | what happens |
|--------|-------------------------------------|--------------|
| LOAD   | `1 + o + P`                         | restart the code generator, carrier oscillator, integrator, bank and sub-carrier counter; fill the replica window; `dwell_start` on the last cycle |
| ACCUM  | ≥ `N_DCHIP·L`                       | `in_ready` high; accept `N_DCHIP·L` samples (gaps allowed) |
| DRAIN  | ≤ `L`                               | the last dchip goes through the lanes |
| READ   | `P·K`                               | one accumulator pair per clock → sub-carrier correlator → combiner → peak detector |
| FLUSH + DECIDE | 5                           | pipeline empties; threshold test |

Here `o = block·P` is the first code phase of the block.

The search visits the blocks of bin 0, then the blocks of bin 1, and so on. Each new bin adds
`freq_step` to the carrier frequency word. The search stops on the first dwell after which the
largest `Q` seen exceeds `threshold` (`found = 1`), or after the last cell (`found = 0`). The peak
detector keeps the largest `Q` of the whole search with its cell:

- `best_code`, in dchips: input dchip `j` matches replica dchip `j + best_code`.
- `best_bin`: the Doppler bin.

The input is treated as a **snapshot**. `dwell_start` tells the sample source to rewind to the
first sample, because every dwell correlates the same record from its start. Input is stalled
during LOAD, READ and FLUSH; there is no double-buffering of the accumulators.

At the defaults, a dwell takes about `32736 + 3200 + 400 + o` cycles. That is 0.45 ms at an
81.84 MHz clock for the first block.

## Modules

| module | role |
|--------|------|
| `boc_acq_top` | wires the datapath and controller; the only module a user instantiates |
| `acq_controller` | dwell and search sequencing |
| `carrier_dco` | 32-bit phase accumulator; sin/cos from an 8-sector table with levels {1,2,2,1,−1,−2,−2,−1} |
| `dchip_integrator` | mixers, dchip sums, Reg0/Reg1 |
| `code_generator` | 1023-chip Gold code (G1/G2 registers, phase-select taps), held `K` steps per chip |
| `code_correlator_bank` | replica window, slot sequencing, `LANES` lanes, readout multiplexer |
| `correlator_lane` | sign inversion and `L·K`×2 accumulators |
| `subcarrier_dco` | sub-carrier position counter and the `S_I`, `S_Q` signs |
| `subcarrier_correlator` | forms `Y_II`, `Y_IQ`, `Y_QI`, `Y_QQ` serially over `k` |
| `power_combiner` | computes `Q` as a sum of four squares |
| `peak_detect` | running maximum, its cell, threshold comparison |
| `boc_acq_pkg` | default `L`, `K`, sub-carrier period, sign functions, controller state type |

## Top-level interface (`boc_acq_top`)

- **Command:**
  - `start` begins a search; it is a pulse, accepted in idle or done.
  - `n_bins` and `n_blocks` set the search size; both must be ≥ 1.
  - `freq_start` and `freq_step` are carrier frequency words:
    `f = word · f_sample / 2^32`, with the IF included.
  - `threshold` is compared with `Q`.
- **Status:** `busy`, `done`, `found`, `best_q`, `best_code`, `best_bin`, and `state` (the
  controller state, for debug).
- **Samples:**
  - `if_sample` is a signed `IF_W`-bit sample, transferred when `in_valid && in_ready`.
  - `dwell_start` is a one-clock request to rewind the snapshot.

Reset is asynchronous and active low. All outputs are registered or decoded from registered state.

## Parameters and derived widths

| parameter | default | origin |
|-----------|---------|--------|
| `L` | 4 | reference: 81.84 MHz sampling of BOC(10,5) |
| `K` | 8 | reference: sub-carrier positions per code chip for BOC(10,5) |
| `SC_PERIOD` | 4 | reference: period of the published `S_I`/`S_Q` patterns |
| `LANES` | 100 | gives `P = 400`, the parallelism at which the reference compares hardware cost |
| `N_DCHIP` | 8184 | own choice: one period of the 1023-chip code |
| `IF_W`, `AMP_W`, `PHASE_W` | 4, 3, 32 | own choice |
| `BIN_W`, `CODE_W` | 8, 16 | own choice |
| `TAP_A`, `TAP_B` | 2, 6 | own choice: GPS C/A PRN 1 |

The widths are derived so that nothing can overflow:

- `T_W = IF_W + AMP_W + log2(L)`
- `ACC_W = T_W + ⌈log2(N_DCHIP/K)⌉ + 1`
- `Y_W = ACC_W + log2(K)`
- `Q_W = 2·Y_W + 1`

At the defaults these are 9, 20, 23 and 47 bits. The accumulator storage is
`2·P·K·ACC_W` = 128,000 bits. It is written as per-lane register arrays, which can be mapped onto
small RAMs with one read-modify-write port.

Constraints on the parameters:

- `P ≥ 2`.
- `N_DCHIP ≥ K`, so every accumulator gets its first-visit write.
- `CODE_W` must hold `n_blocks·P`.
- `K` and `L` need not be powers of two.

## How far the design follows the reference, and where it departs

These parts follow the reference:

- The three-step reordered correlation.
- The two code-correlation channels.
- Time division by `L`.
- The accumulator banks addressed by hypothesis and sub-carrier position.
- The `S_I`/`S_Q` patterns.
- The combined four-square statistic and the threshold test.

The reference gives only the function or the name of these parts, so their insides here are this
design's own choices:

- The carrier and sub-carrier oscillators.
- The PRN generator. A Gold code stands in for the real BOC signal's code.
- The controller and the search order.
- The snapshot rewind.
- The lane count.
- All widths.

Known differences and limits:

- **Sample rate against `K·L`.** The reference gives `K = 8` and `L = 4` for BOC(10,5) at
  81.84 MHz. But a 5.115 MHz code chip spans 16 samples at that rate, not `K·L = 32`. Both numbers
  are kept as defaults. Nothing in the RTL depends on the sample rate; only the input's
  chip-to-sample ratio must equal `K·L`.
- **Doppler on code and sub-carrier.** Code Doppler and sub-carrier Doppler are not applied during
  a dwell. The replica code and sub-carrier advance exactly one position per `L` samples.
- **Validation.** The step that confirms a detected cell before it is accepted is not built.
  `found` reports only the threshold crossing.
- **Threshold.** The threshold is an input. No noise-floor estimate is made.
- **Adder count.** The reference's adder count at parallelism 400 is a quarter of direct SCPC. This
  build uses 2 adders per lane (200 at the defaults), plus 2 for the dchip sums, 4 for the
  sub-carrier sums and the combiner.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

- `tb_boc_acq_top` runs the whole engine at `LANES = 2`, `N_DCHIP = 256`. It searches 3 Doppler
  bins × 3 code blocks over a synthetic BOC(10,5)-like snapshot with noise and random source gaps.
  - It checks every `Q` the engine computes against a direct, sample-by-sample SCPC reference
    for that cell. It also checks that `best_q` is the reference maximum and that the reported
    cell is the true one.
  - It checks the early stop on detection.
  - It checks the load and read cycle counts.
  - It requires that every mechanism occurs: source gaps, backpressure, all time-division slots,
    first-visit writes, bin and block steps, and both detect and no-detect endings.
- `tb_boc_acq_parallelism` runs three engines side by side with `P = 40`, `400` and `1200` code
  phases per dwell (`LANES = 10`, `100`, `300`). Every `Q` that each engine computes is checked
  against the direct reference.
- `tb_boc_acq_full` runs one full dwell at the default parameters: 400 code phases and 32736
  samples, against the same direct reference. It finishes in seconds.
- The unit benches compare each block with an independent model:
  - Carrier levels computed with real arithmetic.
  - Published first chips of PRN 1 and PRN 2.
  - An array model of the accumulators.
  - The printed sub-carrier patterns.
  - Integer `Y` and `Q`.

To run any bench with Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
        rtl/boc_acq_pkg.sv tb/tb_boc_acq_top.sv --top-module tb_boc_acq_top
    ./obj_dir/Vtb_boc_acq_top

To try another configuration, change the parameter overrides on the `boc_acq_top` instance in
`tb_boc_acq_top` and the matching local parameters, including `Q_W`, which must equal the top's
derived `Q` width. The reference model in that bench follows `L`, `K`, `D` (the true code delay)
and the bin settings.
