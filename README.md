# Fixed-throughput MIMO detector for 4x4 802.11n: an array of metric units

A receiver using 4x4 spatial multiplexing sends four independent QAM symbols
on the same frequency at once. Every receive antenna sees a weighted mix of all
four, so for every OFDM tone the receiver has to decide which four symbols
were sent. Exact maximum-likelihood detection is too expensive at these rates.
Depth-first sphere decoders have data-dependent run time, and K-best decoders
need sorting and large buffers. This design implements a **fixed sphere
decoder (FSD)** instead. For every tone it explores a search tree of fixed shape,
so the work per tone, and with it the throughput, is fixed for a given
modulation. The hardware is a forward-flowing array of small **Metric
Computation Units (MCUs)**, one per tree level per search path. It can be
pipelined as deeply as the clock needs. It switches between QPSK, 16-QAM and
64-QAM from one tone to the next.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. The two
published design points differ only in two parameters:

| design point     | parallelism `M` | pipeline stages `K` | cycles per tone (QPSK / 16 / 64) |
|------------------|-----------------|---------------------|----------------------------------|
| area-optimised (default) | 3       | 8                   | 2 / 6 / 22                       |
| power-optimised  | 4               | 5                   | 1 / 4 / 16                       |

## The search

The channel is `y = H s + n`. A QR decomposition `H = QR` is computed outside
this design. It turns detection into minimising `||y' - R s||^2` with
`y' = Q^H y` and `R` upper triangular. Because `R` is triangular, the metric
splits into one term per row. The symbol of stream 3 depends only on row 3, stream 2
on rows 2 and 3, and so on. This gives a four-level tree, searched from level 3
down to level 0.

The fixed sphere decoder expands the tree like this:

* **Level 3 (full expansion):** all `eta` constellation points are tried
  (`eta` = 4, 16 or 64). This gives `eta` independent search paths.
* **Levels 2, 1, 0 (single expansion):** each path keeps only the point
  nearest to its interference-free estimate.

For a path, level `i` computes

```
b_i   = y'_i - sum_{j>i} R_ij s_j           interference of the levels above
s_i   = candidate                            (level 3)
      = nearest point to b_i / R_ii          (levels 2..0)
m    += |b_i - R_ii s_i|^2                   partial Euclidean distance
```

The path with the smallest final metric `m` is the decision. Every tone costs
exactly `eta` paths of four MCU evaluations each, whatever the noise or the
channel.

## The array and its passes

`detector_array` holds `M` columns. Each column is one search path built as a
chain of four MCUs, from level 3 at the top to level 0 at the bottom. All
columns see the same tone and differ only in their level-3 candidate. The MCUs
are matched to their level:

* the level-`i` unit has exactly `3-i` complex multipliers for interference
  cancellation;
* the top unit has no slicer.

No hardware sits idle because a level needs less work.

A tone has `eta` paths but the array holds only `M`, so `fsd_controller` issues
every tone for `P = ceil(eta/M)` consecutive cycles (passes). In pass `p`,
column `c` gets constellation point `p*M + c`. When `eta` is not a multiple of
`M` (with `M = 3`, always), the unused columns of the last pass are marked
invalid. `min_search` keeps a running minimum across the columns of a pass and
across the passes of a tone. One cycle after the last pass it outputs the
winning vector.

The next tone is accepted during the last pass of the current one, so the
array is busy every cycle. This gives the processing time of one MIMO-OFDM
symbol (52 data tones) as

```
T_p = 52 * ceil(eta/M) * T_clk,      T_clk = C_d / (K+1)
```

Here `C_d` is the delay of the unpipelined array. The 802.11n budget is 52
tones in 3.6 us, and the design target used with it is 3000 ns. The cycle
counts and the throughputs they give at the clock frequencies published for
the two design points are:

| point | mode   | cycles / symbol | clock     | time     | throughput  | required   |
|-------|--------|-----------------|-----------|----------|-------------|------------|
| M3 K8 | QPSK   | 104             | 38.8 MHz  | 2.68 us  | 155.2 Mb/s  | 115.6 Mb/s |
| M3 K8 | 16-QAM | 312             | 116.3 MHz | 2.68 us  | 310.1 Mb/s  | 231.1 Mb/s |
| M3 K8 | 64-QAM | 1144            | 426.6 MHz | 2.68 us  | 465.4 Mb/s  | 346.7 Mb/s |
| M4 K5 | QPSK   | 52              | 18.0 MHz  | 2.89 us  | 144.0 Mb/s  | 115.6 Mb/s |
| M4 K5 | 16-QAM | 208             | 71.8 MHz  | 2.90 us  | 287.2 Mb/s  | 231.1 Mb/s |
| M4 K5 | 64-QAM | 832             | 287.3 MHz | 2.90 us  | 431.0 Mb/s  | 346.7 Mb/s |

Throughput is `52 x 4 x log2(eta)` bits per symbol time. The end-to-end
testbenches measure the cycle counts and check them against this table. The
clock frequencies are published synthesis results for a 45 nm library; this
RTL does not reproduce them. Scaling the clock per mode is what trades power
against throughput: a system clocks the array only as fast as the current
modulation needs.

## Reconfiguration on the fly

Each tone carries its modulation (`tone_t.mode`). The modulation flows through
the controller, the array and the pipeline together with the data. So a tone
of one modulation can follow a tone of another with no flush and no idle
cycle, and the only thing that changes is the number of passes. The modulation
affects:

* the candidate list (`mod_point`) and the pass count (`mod_passes`) in
  `fsd_pkg`;
* the number of slicer thresholds in `mcu_slicer`.

## Pipelining: a systolic array plus retiming

The `K` pipeline ranks are split in two.

* **Systolic ranks.** The first `min(K, 3)` ranks sit between tree levels
  inside `detector_array`, the first one directly below the top level. Each
  column's partial symbol vector and metric are registered there, and a copy
  of the tone moves down beside the columns. With three such ranks the four
  levels work on four different passes in the same cycle. A new pass enters
  every cycle and nothing ever flows backward. The valid and control bits of
  each pass (first/last pass, column valid flags, tag, mode) are delayed by
  the same number of ranks in a `retime_pipe` next to the array.
* **Retiming ranks.** The remaining `K - min(K, 3)` ranks (5 at the default
  `K = 8`, 2 at `K = 5`) are a plain register chain (`retime_pipe`) behind
  the array. A synthesis flow with register retiming is expected to move them
  into the MCUs, which cuts the array's delay `C_d` into `K+1` stages.

Functionally the ranks add exactly `K` cycles of latency and never stall. A
tone's result therefore appears `P + K` cycles after the clock edge that
accepted it (`P` = passes of that tone). Results come out in tone order.

If your flow does not retime, the longest combinational path is a single
MCU, a quarter of the array.

## Number formats (this design's choices)

* `y'` and `R` components: 12-bit signed (`W_IN`).
* `R_ii` is taken as real and positive, as a QR with a positive diagonal
  delivers. Its imaginary part is ignored, and so is the lower triangle of `R`.
* Constellation points are odd integers per axis (+-1, +-3, +-5, +-7). The
  scale of the constellation must be folded into `R` by the QR stage.
* Point number `idx` of a modulation with `L = sqrt(eta)` levels per axis:
  in-phase level `idx % L`, quadrature level `idx / L`. Level `l` is the value
  `2l - (L-1)`.
* Residuals are `W_IN+7` bits and metrics are `2*(W_IN+7)+2` = 40 bits. These
  widths cannot overflow for any input, so there is no saturation logic. Real
  designs would cut these widths after a fixed-point study.
* The slicer does not divide. It compares each axis of `b_i` with `R_ii` times
  the decision thresholds (0, +-2, +-4, +-6) and counts the thresholds
  exceeded.
* Ties are broken deterministically:
  * in the slicer, the lower level wins;
  * among equal metrics, the lowest candidate number wins.

## Interface and timing of `fsd_detector`

| port         | dir | width | meaning |
|--------------|-----|-------|---------|
| `clk`        | in  | 1     | clock |
| `rst_n`      | in  | 1     | synchronous reset, active low |
| `in_valid`   | in  | 1     | a tone is offered |
| `in_ready`   | out | 1     | the tone is taken at this edge if `in_valid` (high when idle or in the last pass) |
| `in_tone`    | in  | `tone_t` (488) | tag (6 b), mode (2 b), `y[4]`, `r[4][4]` as complex 12+12-bit values |
| `out_valid`  | out | 1     | one-cycle pulse per tone; no back-pressure |
| `out_sym`    | out | 4 x `sym_t` | decided symbols, 4-bit signed I and Q per stream, index = stream |
| `out_metric` | out | 40    | metric of the winning path |
| `out_tag`, `out_mode` | out | 6, 2 | copied from the tone |

A tone of modulation `eta` holds `in_ready` low for `P-1` cycles after it is
accepted, where `P = ceil(eta/M)`. Its result arrives `P+K` cycles after
acceptance. An assertion in `fsd_controller` checks that a tone stays unchanged
until its last pass.

## Module hierarchy

```
fsd_detector                top (parameters M, K)
  fsd_controller            tone holder, pass counter, candidate generator
  detector_array            M columns x 4 MCUs, min(K,3) ranks between levels
    mcu  (LEVEL 3..0)       interference cancellation, decision, metric adder
      mcu_slicer            one axis of the nearest-point decision
  retime_pipe  (u_ctl_pipe) control of each pass, delayed beside the array
  retime_pipe  (u_pipe)     the other K-min(K,3) ranks, for retiming
  min_search                minimum over columns and passes
fsd_pkg                     widths, tone/symbol types, modulation helpers
```

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=F`. The reference model is `tb/fsd_ref_pkg.sv`. It
decides each level by brute force over all constellation points, so it shares
no code with the threshold slicer. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/fsd_pkg.sv tb/fsd_ref_pkg.sv tb/tb_fsd_detector.sv --top-module tb_fsd_detector
./obj_dir/Vtb_fsd_detector
```

Replace the top-level name to run another testbench:

| testbench | what it checks |
|-----------|----------------|
| `tb_fsd_detector` | Default parameters, end to end. Runs one 52-tone symbol each of QPSK, 16-QAM and 64-QAM at full rate, with cycle counts, throughput, the 3.6 us and 3000 ns budgets, and per-tone latency `P+K`. Then runs 300 tones of random modulation with random gaps. Every result is checked against the reference. Noiseless tones must return the sent vector with zero metric. It counts mode switches, partial passes, input stalls, back-to-back tones and idle gaps, and fails if any of them never happens. |
| `tb_fsd_detector_power` | The same at `M=4, K=5` with that point's clocks and throughputs. |
| `tb_fsd_controller` | Pass count, candidate order and masking, first/last flags, handshake. |
| `tb_mcu` | Each level's decision and metric. Noiseless recovery. |
| `tb_detector_array` | Every column's vector and metric. A new pass enters every cycle, for the systolic array (results 3 cycles later) and for a combinational one. |
| `tb_min_search` | Selection with frequent equal metrics and partial passes. |
| `tb_retime_pipe` | Exact `K`-cycle delay and reset. |

The checking of both end-to-end runs is in `tb/fsd_detector_bench.sv`. Its `M`
and `K` must match the detector it is connected to.

## What is outside this RTL, and where it departs from the original design

* **Preprocessing is not included.** Channel estimation and the QR
  decomposition that produce `R` and `y'` are inputs to this design.
* **The MIMO-OFDM receiver interface is not included.** Tone buffering, tone
  ordering and delivery are not designed here. The boundary is the
  `in_valid/in_ready` tone port. The only timing requirement used is 52 tones
  per 3.6 us.
* **Clocking is not included.** The published design runs each modulation at
  its own clock frequency. The clock source that switches the frequency, and
  the symmetrical clock mesh used in the power estimates, are clocking
  infrastructure with no RTL here. The RTL is single-clock; its cycle counts
  per mode are what those frequencies are derived from.
* **The inside of the MCU is this design's own.** The original design names
  the MCU and its metric adder but does not spell out their insides. This RTL
  uses the standard FSD level computation given above, and the threshold
  slicer, the widths and the tie rules are its own.
* **Where the pipeline registers sit.** The original places all `K` ranks by
  retiming. Here three are written between the tree levels, and the rest are
  written behind the array and left to the synthesis tool.
* **Not reproduced:** the published gate counts (58.2k / 67.7k gate
  equivalents), power (11.91 / 9.7 mW) and clock frequencies. They depend on
  the library and flow.
* **Fixed 4x4.** The number of streams is fixed at `NT = 4` in `fsd_pkg`.
  Other MIMO sizes (2x2, 3x3) would need the level count made a parameter
  throughout.
* **No bit demapping.** The output is symbols, not soft or hard bits.
