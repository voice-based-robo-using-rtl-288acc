# GMM emission-probability accelerator for an embedded speech recognizer

An HMM speech recognizer spends most of its time on one job: for each
10 ms frame, and for each HMM state that still holds a token after beam
pruning, it scores the frame's acoustic feature vector against that
state's Gaussian mixture model. Profiles of a 16-bit fixed-point recognizer
put about 69% of the run time there. Feature extraction takes about 7% and
the Viterbi token-passing search about 24%.

This RTL is the hardware half of a hardware/software split. A soft processor
keeps running feature extraction, the search and pruning. For every state it
needs scored, it hands the accelerator the state's Gaussian parameters. The
accelerator returns the state's log emission probability. The processor
itself is not included here: it connects through the accelerator's memory-mapped
slave port (`avs_*`).

Two ideas shape the accelerator:

* **Data parallelism.** `LANES` feature coefficients of a Gaussian are
  processed per clock.
* **A double buffer for the acoustic parameters.** The accelerator never
  holds the acoustic model. It holds exactly two HMM states' parameters,
  in two banks. The processor loads one bank while the datapath reads the
  other. Loading therefore overlaps computing, and the model can be of any
  size. The search may also ask for states in any order: nothing is
  preloaded or predicted.

## The computation

All states use diagonal-covariance Gaussians. For feature vector `o`
(D coefficients) and mixture `m` of a state, the accelerator computes

    s_m = g_m - sum_d  prec_md * (o_d - mu_md)^2          (prec = 1 / (2 sigma^2))
    score = max_m s_m

`g_m` holds the log mixture weight plus the normalisation term
`-0.5 log((2 pi)^D |Sigma_m|)`. Software precomputes it per mixture and
writes it like any other parameter. The log of the sum over mixtures is
replaced by its largest term. This is the usual approximation in fixed-point
recognizers. A true log-add would need a lookup table and is not included.

Number formats (all fixed point, all this design's choice apart from the
16-bit width):

| quantity              | width | format used in the testbenches            |
|-----------------------|-------|-------------------------------------------|
| `o_d`, `mu_md`        | 16 s  | Q.8                                       |
| `prec_md`             | 16 u  | Q.12                                      |
| per-coefficient term  | 30 u  | `(prec*(o-mu)^2) >> SHIFT`, SHIFT = 20 → Q.8 |
| mixture sum           | 40 u  | cannot overflow for D up to 1024          |
| `g_m`, score          | 32 s  | Q.8; `s_m` saturates to the 32-bit range   |

Only `SHIFT` fixes a relation between these formats. Any other choice of
binary points works if `SHIFT` is set to match.

## The double buffer: how a state moves through the accelerator

Each bank is in one of three states (`gmm_pkg::bank_state_e`):

* `EMPTY`: the processor may write it.
* `FULL`: it has been loaded and started, and waits for the datapath.
* `BUSY`: the datapath is reading it.

Two pointers in `gmm_ctrl` move through the banks alternately:

* `wr_bank` is the bank the processor loads. Parameter writes always go to
  it, so the processor never names a bank. A **start** command (a write to
  CMD, carrying a 16-bit tag) marks it `FULL` and moves `wr_bank` to the
  other bank. STATUS.load_ready tells whether the new `wr_bank` is `EMPTY`.
* `rd_bank` is the next bank for the sequencer. When that bank is `FULL`,
  the sequencer marks it `BUSY` and reads it for `M * STEPS` cycles, with
  `STEPS = ceil(D / LANES)`. Then it returns the bank to `EMPTY` **as soon
  as the last word has been read**, not when the score comes out. The
  processor can therefore refill that bank while the pipeline is still
  draining.

The score is written, with its tag, into a one-entry result register. The
processor pops it by reading RESULT. If the register is still full when the
next score arrives, the sequencer stalls in `S_HOLD` (STATUS.stalled). It
takes up no further bank until the old result has been read. Banks still
fill during a stall, so with a lazy processor both banks end up `FULL` and
load_ready drops. This is the back-pressure path.

Accesses that would break the scheme are **dropped, not queued**, and set
the sticky STATUS.write_error flag. A write to STATUS clears the flag. The
dropped accesses are:

* a start or a parameter write while `wr_bank` is not `EMPTY`;
* a feature write while any state is queued or being computed. The feature
  vector is shared by all states of a frame, so it is only changed between
  frames.

A typical frame, from the processor's side:

    write D features                       (accelerator idle)
    for each surviving state q:
        poll STATUS until load_ready
        write M*D {prec,mean} words and M constants
        write CMD = q                      -> this state queues, next bank offered
        if STATUS.result_valid: read STATUS (tag) and RESULT (score)
    drain: pop results until STATUS shows !busy and !result_valid

## Register map and bus

The bus port is an Avalon-MM style slave with these properties:

* word addressed, with 32-bit data;
* one transfer per cycle and no wait states;
* read data comes **one cycle after** `avs_read`.

The word address is `{region[1:0], mixture[MIX_W-1:0], coefficient[IDX_W-1:0]}`.
At the defaults (D = 39, M = 8) the address is 11 bits wide.

| region | offset        | access | meaning |
|--------|---------------|--------|---------|
| 0      | 0 CMD         | W      | start the loaded bank; `[15:0]` = tag returned with the result |
| 0      | 1 STATUS      | R      | `[31:16]` result tag, `[4]` stalled, `[3]` write_error, `[2]` result_valid, `[1]` load_ready, `[0]` busy |
| 0      | 1 STATUS      | W      | clear write_error |
| 0      | 2 RESULT      | R      | signed 32-bit score; the read pops it |
| 1      | coefficient d | W      | feature `o_d` in `[15:0]` |
| 2      | mixture m, d  | W      | `{prec_md[31:16], mu_md[15:0]}` |
| 3      | mixture m     | W      | constant `g_m` (32-bit signed) |

Mean and precision share one write. This halves the bus traffic, which
bounds the throughput.

## Datapath and timing

`gmm_ctrl` reads the buffers one coefficient group per cycle, working
through each mixture in turn. Both buffers answer one cycle after the
request. The controller delays the datapath sideband signals (first/last
beat of a mixture, first/last mixture) by the same cycle so they stay
aligned. `gmm_datapath` has this pipeline:

1. `LANES` × `gmm_pe`, in two stages: the difference is squared, then
   multiplied by the precision and shifted. A lane past coefficient D − 1
   (the last group is padded when D is not a multiple of LANES) is masked
   to zero.
2. The adder tree, in one stage.
3. The accumulator over the `STEPS` groups of a mixture. At the mixture's
   last group it forms `g_m − sum` and saturates it. One stage.
4. The running maximum over mixtures. One stage.

The score comes out 5 cycles after the last beat. Measured from the cycle
of the start command to result_valid, one state takes
**`M * STEPS + 8` cycles: 88 at the defaults**.

Throughput is set by the bus, not the datapath. A state needs `M*D + M` =
320 parameter writes and only 88 cycles of computing, and the double buffer
hides all of the computing. With the processor writing every cycle, the
frame-load testbench measures **324 cycles per state**. At 120 MHz,
2300 states then take 0.62 of a 10 ms frame. Making the datapath faster would
not help unless parameter delivery were also made faster.

## Parameters

| parameter | default | note |
|-----------|---------|------|
| `DATA_W`  | 16      | 16-bit fixed point, as in the recognizer this serves |
| `D`       | 39      | feature coefficients (MFCC + energy, deltas, accelerations) |
| `M`       | 8       | Gaussians per state |
| `LANES`   | 4       | coefficients per cycle |
| `SHIFT`   | 20      | product scaling, see the formats above |

`gmm_pkg` holds the defaults, the status word (`status_t`), the region
and bank-state enums, and the register offsets.

## How far this follows the source design, and where it is its own

The source design gives the following:

* the hardware/software partition: the processor runs feature extraction,
  the search and adaptive pruning, and the accelerator computes the GMM
  scores;
* the processor instructing the accelerator and reading back the result;
* the accelerator exploiting data parallelism;
* the double buffering of the acoustic parameters, with no assumption on
  the order in which states are needed;
* 16-bit fixed-point arithmetic;
* an FPGA implementation reaching 120 MHz.

It does not give the accelerator's internals, so everything below the
block level is this design's own:

* the sizes D, M and LANES;
* the lane and pipeline structure;
* the formats, saturation and the max-over-mixtures approximation;
* the bus, register map and word packing;
* the bank hand-over rules, the result register, the stall and the
  drop-and-flag error policy;
* reset: asynchronous, active low, on all control state; the memories are
  not reset.

Known limits:

* One state is in the datapath at a time. The next `FULL` bank starts only
  after the previous score has been handed over. A state therefore takes
  88 cycles of datapath time even though its read phase is only 80 cycles.
  This does not matter while the bus bounds throughput.
* No interrupt output: the processor polls STATUS.
* The 120 MHz figure belongs to the source FPGA implementation and has not
  been checked by timing analysis of this RTL. The multiplier in each lane
  is 34 × 16 bits in one stage and is the likely critical path.

The processor, feature extraction, the token-passing search, the adaptive
beam pruning and the processor's memory are software or vendor parts, and
are not implemented here. The end-to-end testbench contains a small model
of the processor software to exercise the accelerator.

## Files

`rtl/`

* `gmm_pkg.sv`: shared constants and types.
* `gmm_accelerator.sv`: the top, which wires the blocks below.
* `gmm_host_if.sv`: bus slave and address decode.
* `gmm_ctrl.sv`: bank states, sequencer, result register and error flag.
* `gmm_feature_buffer.sv`: feature vector registers, read `LANES` at a time.
* `gmm_param_buffer.sv`: the two parameter banks, split into `LANES` narrow
  RAMs.
* `gmm_datapath.sv`: lanes, adder tree, accumulator and mixture maximum.
* `gmm_pe.sv`: one lane.

`tb/`: each testbench prints `TB_RESULT checks=N failures=F`.

* `gmm_ref_pkg.sv`: the reference formula in 64-bit integers, used by the
  checking testbenches.
* `gmm_pe_tb`, `gmm_feature_buffer_tb`, `gmm_param_buffer_tb`,
  `gmm_datapath_tb`, `gmm_ctrl_tb`, `gmm_host_if_tb`: block tests.
* `gmm_accelerator_tb`: end to end, at the default sizes. The testbench plays
  the processor and runs a 24-state, 24-frame token-passing search. It uses
  the adaptive beam rule: narrow the beam by δ above an upper token count,
  widen it by δ below a lower one, never past the original width. Every
  score is compared with the reference, and the best path with a
  software-only run of the same search. The test also requires that each of
  these happened at least once:
  * a load overlapping computation;
  * a full double buffer;
  * a sequencer stall;
  * a dropped write;
  * a beam narrowing and a beam widening;
  * a state won by a mixture other than the first.

  It also checks the 88-cycle latency.
* `gmm_frame_load_tb`: one frame of 2300 states at full bus rate. It checks
  every score and the per-state cycle bound, and prints the fraction of the
  frame budget used.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
        rtl/gmm_pkg.sv tb/gmm_ref_pkg.sv tb/gmm_accelerator_tb.sv \
        --top-module gmm_accelerator_tb -o sim
    ./obj_dir/sim

Substitute any other testbench name. The block testbenches set the block's
parameters themselves, to the same defaults. To change a size, override
`D`, `M`, `LANES` or `SHIFT` on `gmm_accelerator`. Bus address widths
follow automatically. The testbenches take their sizes from `gmm_pkg`'s
defaults, so they must be edited to match.

The RTL has also been simulated at other sizes by changing the defaults in
`gmm_pkg`: (D, M, LANES) = (13, 1, 1), (16, 2, 8), (20, 3, 5) and
(64, 16, 16). At each of these the frame-load test scored every state
correctly. The end-to-end test's coverage goals (a beam widening, a
non-first winning mixture) are tuned to its default random data, so at
other sizes some of them may not be reached. Its score checks still hold.
