# DRSSE: acquiring an m-sequence by recursive soft estimation of S chips

A spread-spectrum receiver cannot despread anything until its local PN
generator runs in step with the transmitter. For an m-sequence from an
S-stage shift register, being in step takes only S consecutive correct chips.
Load them into a copy of the generator and it then produces every later chip
of the transmitted sequence. This approach is called *sequential estimation*.
Its weakness is that chips are received at a very low SNR, so S hard
decisions in a row are seldom all right.

This RTL implements differential recursive soft sequential estimation (DRSSE),
the scheme of L.-L. Yang and L. Hanzo. It fixes that weakness in two ways:

1. **Differential preprocessing.** Multiplying each complex chip sample by
   the conjugate of the previous one, `U_i = Re(Z_i conj(Z_{i-1}))`, removes
   any carrier phase that stays constant over two chips. The product
   `b_i = c_i c_{i-1}` of an m-sequence with itself, one chip apart, is again
   an m-sequence with the same recursion. The receiver can therefore acquire
   `{b_i}` without knowing the carrier phase.
2. **Recursive soft decoding.** Every chip obeys the parity rule
   `b_i = prod b_{i-s_m}`, taken over the generator taps. The decoder keeps
   log-likelihood ratios (LLRs) for the last S chips in a *soft-chip
   register*. Each new chip's channel LLR is reinforced by what that parity
   rule predicts from the register. Reliability therefore builds up as chips
   arrive. The register's LLR magnitudes show, at any time, how safe it is to
   load its S signs into the generator.

The hardware cost is about that of the generator itself: one S-entry LLR
shift register, a sign/min network over the taps, and a few adders.

## Signal chain

```
 z (complex chip samples, no carrier phase knowledge)
   |
   +--> diff_processor --U_i--> soft_channel_info --intrinsic--> siso_decoder --L(y_i)--> soft_chip_register
   |         |                                                     ^   |  load_cmd            | S LLRs
   |         |                                                     +---+----- taps g_k -------+
   |         v                                                         v
   |     despreader <--b_i-- mseq_generator <--S signs-- load_switch <--+
   |         |                  ^                           ^ reload
   |         v                  |                           |
   |     lowpass_filter --> tracking_loop ------------------+--> locked
   |
   +--> phase_resolver (on lock: b chips -> c chips, two candidates) --> local PN mseq_generator --c_i--> symbol_correlator --> Z[n]
                                                                                              r_coh ---^
```

The hierarchy is `drsse_receiver` (top) → `drsse_acquisition` (the DRSSE loop)
plus `phase_resolver`, a second `mseq_generator` (the local PN generator for
`{c_i}`) and `symbol_correlator`. The analog front end is not part of the RTL.
It consists of the antenna, the two carrier mixers and the carrier-phase
estimate used by the coherent path. The top instead takes two sampled inputs:
`z`, the complex chip sample used for acquisition, and `r_coh`, the real
coherently demodulated sample used to despread data.

## The recursion, chip by chip

This is the heart of the design (`siso_decoder`, `soft_chip_register`). Take
the cycle in which chip `i` arrives (`valid` high):

* The soft-chip register holds `q[k] = L(y_{i-1-k})` for `k = 0..S-1`, the
  newest on the left.
* The intrinsic LLR is `L_c * U_i + L(b_i)` (`soft_channel_info`).
* The extrinsic LLR is formed over the taps with `g_k = 1`, which read
  `q[k-1]`. Its sign is the product of the tap signs, i.e. the parity rule
  applied to the signs. Its magnitude is the smallest tap magnitude: the
  prediction can be no more reliable than its weakest input.
* The soft output `L(y_i) = intrinsic + extrinsic` is saturated to ±32767
  and shifted into `q[0]` at the clock edge. `q[S-1]` is dropped.

Everything from `z` to the register input is combinational, so one chip is
fully decoded per clock. The register starts at all zeros, so the extrinsic
term is zero until every tap has received a value. That is the start-up
condition of the recursion. If the channel is good enough, the magnitudes
grow with the number of chips decoded. The published results show the
erroneous-loading probability falling steadily as L, the number of chips fed
to the decoder, grows.

The recursion is positive feedback and never forgets. Once the register holds
a self-consistent m-sequence with large LLRs, a later contradiction has to
beat the smallest tap magnitude. This is why the register is cleared (`clr`)
only to start a new acquisition, and why LLRs saturate rather than wrap.

## Loading, tracking and reloading

* **Loading command** (`siso_decoder.load_cmd`). It is high when all S
  register magnitudes are at least `llr_thresh` *and* at least `min_chips`
  chips have been decoded since `clr`. Either rule can be switched off with a
  zero. The second rule corresponds to decoding a fixed number of chips
  `L = k·S` before loading.
* **Switch bank** (`load_switch`). It makes a ">= 0" decision on every
  register entry: a non-negative LLR gives +1, a negative LLR gives -1. The
  decisions are loaded into the b-domain generator on the first loading
  command of an acquisition, and on every reloading command.
* **Load alignment.** The register's contents (`b_{i-1}..b_{i-S}`) are
  exactly the state the generator needs to produce `b_i`. So a load in the
  same cycle as chip `i` makes the generator output `b_i` in that cycle, and
  nothing has to be re-timed.
* **Despreader and low-pass filter.** After a load, `U_i·b_i` is summed over
  windows of `LPF_WIN` chips (integrate-and-dump). The first window starts
  after the load.
* **Tracking loop** (`tracking_loop`). A window sum at or above `lock_thresh`
  counts as tracked. `CONFIRM` tracked windows in a row raise `locked`. A
  window below the threshold raises the reloading command, which loads
  whatever S chips the still-running soft register holds at that moment.
  Since the register keeps improving, a wrong early load is repaired by a
  later reload.

A good `lock_thresh` is half the noiseless window sum:
`LPF_WIN · 32² / 2 = 32768` for the default window. In step, each despread
chip contributes about `32² = 1024`. Out of step, the sum over a window stays
near zero.

## From b back to c (`phase_resolver`)

A coherent receiver must despread `{c_i}`, not `{b_i}`. Given
`b_G..b_{G+S-1}`, the chips `c_j = b_j c_{j-1}` follow once `c_{G-1}` is
known. Both values of `c_{G-1}` are therefore tried:

* Candidate A (`c_{G-1} = +1`) is the running XOR of the b bits, starting
  from the oldest.
* Candidate B is A with every chip negated.

Every primitive polynomial has an odd number of terms, so the feedback reads
an even number of taps. Negating the state therefore does not negate the
output. The two candidates are different phases of the m-sequence, and only
one of them matches what was sent.

Each candidate drives its own generator. Both replicas are correlated with
the next `RES_WIN` complex samples, and the candidate with the larger
`|Σre| + |Σim|` wins. Because this measure ignores the carrier phase, it works
on the non-coherent `z`. The resolver starts when the tracking loop declares
lock, taking the b generator's state at that moment. When it finishes,
`done` loads the winner's state, already advanced to the current chip, into
the local PN generator. The symbol correlator then starts its first symbol on
that chip.

The published scheme also offers two other ways to obtain the c chips: a
`(2^S-1) × 2S` look-up table, and running the b recursion backwards to a
known `c_0`. Neither is built. This method's cost does not grow with the
sequence length or with the recursion depth.

## Number formats and run-time settings

All formats are defined in `rtl/drsse_pkg.sv`.

| quantity | format | note |
|---|---|---|
| chip | 1 bit | 0 = +1, 1 = -1; the product of chips is XOR |
| `z.re`, `z.im`, `r_coh` | 8-bit signed | scale so that a unit-amplitude noiseless chip reads ±32 (`NOMINAL_AMP`) |
| `U` | 17-bit signed | noiseless in-step value ±1024 |
| LLR | 16-bit signed, 4 fraction bits | saturates at ±32767 (±2047.9) |
| `lc` (L_c) | 10-bit unsigned, 4 fraction bits | `lc = round(16 · L_c)`, L_c up to 63.9 |
| `la` (L(b_i)) | LLR format | 0 when nothing is known in advance |

The channel LLR is `floor(U · lc / 2^10)` in LLR units: 2·log2(32) bits for
the sample scale, plus 4 − 4 fraction bits.

* **AWGN.** Use `L_c = 2·Ec/N0`. For example, 0 dB gives `lc = 32` and
  2 dB gives `lc = 51`.
* **Fading with a known channel.** `lc` is sampled every chip, so
  `2 α_i² Ec/(Ω N0)` can be applied chip by chip. This is maximal-ratio
  weighting.
* **Fading without channel knowledge.** Use the AWGN setting, which gives
  equal-gain weighting. It performs worse.

The differential delay unit resets to "one", i.e. the sample (32, 0).

### Parameters

| parameter | default | meaning |
|---|---|---|
| `S` | 13 | generator stages (period 2^S − 1 = 8191) |
| `TAPS` | `TAPS_S13` = `32'h100D` | bit k−1 set ⇔ g_k = 1; the default is g(D) = 1 + D + D³ + D⁴ + D¹³. `TAPS_S5` = g(D) = 1 + D² + D⁵ for S = 5 |
| `LPF_WIN` | 64 | chips per low-pass (integrate-and-dump) window |
| `CONFIRM` | 2 | passing windows in a row needed for lock |
| `RES_WIN` | 64 | chips correlated by the phase resolver |
| `SF` | 64 | chips per data symbol in the symbol correlator |
| `CNT_W` | 16 | width of the chip counter and `min_chips` |

The two polynomials are the ones used to evaluate the scheme. S = 5 needs
`S` and `TAPS` overridden together. The window lengths, `CONFIRM` and `SF`
are this design's own choices; the scheme does not fix them.

## Timing and interface

* Single clock, asynchronous active-low reset `rst_n`.
* `clr` is a synchronous restart of an acquisition: the soft register goes to
  zero, the differential delay goes to one, and counters, lock and resolver
  are cleared.
* One chip per cycle with `valid` high. The clock may run faster than the
  chip rate.
* Latency from a chip to its soft output in the register is one clock edge.
* A window result reaches the tracking loop one cycle after the window's last
  chip. A reload reaches the generator one cycle after that.
* The resolver needs `RES_WIN` chips after lock. `Z[n]` appears one cycle
  after the `SF`-th chip of each symbol.

## Files

| file | block |
|---|---|
| `rtl/drsse_pkg.sv` | shared types, formats, tap masks, saturation helpers |
| `rtl/drsse_receiver.sv` | top level |
| `rtl/drsse_acquisition.sv` | DRSSE acquisition loop |
| `rtl/diff_processor.sv` | `U_i = Re(Z_i conj(Z_{i-1}))` |
| `rtl/soft_channel_info.sv` | intrinsic LLR `L_c U_i + L(b_i)` |
| `rtl/siso_decoder.sv` | sign/min extrinsic, soft output, loading command |
| `rtl/soft_chip_register.sv` | S soft-chip delay units |
| `rtl/load_switch.sv` | ">= 0" decisions and the load/reload switch bank |
| `rtl/mseq_generator.sv` | ±1 m-sequence generator with parallel load |
| `rtl/despreader.sv` | `U_i · b_i` |
| `rtl/lowpass_filter.sv` | integrate-and-dump |
| `rtl/tracking_loop.sv` | lock / reload decision |
| `rtl/phase_resolver.sv` | b chips → c chips, two-candidate correlation |
| `rtl/symbol_correlator.sv` | despread and integrate over a symbol → Z[n] |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_chan_pkg.sv` | testbench channel model: reference m-sequence, Gaussian noise |
| `tb/tb_workloads.sv` | erroneous-loading probability at the published operating points |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and exits. With
Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/drsse_pkg.sv tb/tb_chan_pkg.sv tb/tb_drsse_receiver.sv \
    --top-module tb_drsse_receiver -o sim && ./obj_dir/sim
```

Replace the last file and the top module name to run another testbench. Only
`tb_drsse_acquisition`, `tb_drsse_receiver` and `tb_workloads` need
`tb/tb_chan_pkg.sv`. All
testbenches draw their stimulus from `$urandom`; add
`+verilator+seed+N` to vary it.

## What has been verified

* **`tb_drsse_receiver`** runs the top with every parameter at its default.
  Each run starts an acquisition at a random point of the 8191-chip sequence,
  with a drifting carrier phase and noise.
  * The first run plants a weak, inverted sample and loads early. Its first
    load is wrong and must be repaired by a reload.
  * The other runs use AWGN at Ec/N0 = 3 dB and load after 20·S chips.
  * Checked in every run: lock is reached; the resolver picks the right
    candidate; the local replica equals the transmitted chip on every chip
    after acquisition; every Z[n] equals an independently computed sum.
  * The test also requires that loads, reloads, locks, both resolver
    outcomes and symbols all actually occur.
* **`tb_drsse_acquisition`** compares the soft output on every chip with a
  bit-exact model written in the testbench. It covers four scenarios:
  noiseless; a wrong first load followed by a reload; AWGN at 2 dB with
  loading after 260 chips; and LLR saturation.
* **Module testbenches** check each block against an independent reference.
  The generator is checked for period and balance at S = 13 and S = 5, and
  for the recursion on its own output.
* **`tb_workloads`** estimates the erroneous-loading probability. This is
  the chance that at least one of the S loaded chips is wrong. The loop is
  forced to load after exactly L decoded chips. The test uses the
  configurations the scheme was published with. Results with the default
  seed:

  | configuration | L | wrong loads |
  |---|---|---|
  | S = 5, g = 1 + D² + D⁵, AWGN 0 dB, no recursion | 1·S = 5 | 1469 / 2000 |
  | S = 5, AWGN 0 dB | 40·S = 200 | 5 / 2000 |
  | S = 5, AWGN −1.7 dB | 200·S = 1000 | 80 / 1000 |
  | S = 13, AWGN 2 dB | 20·S = 260 | 98 / 2000 |
  | S = 13, AWGN 1.7 dB | 40·S = 520 | 118 / 2000 |
  | S = 13, AWGN 1 dB | 200·S = 2600 | 256 / 1000 |
  | S = 13, Rayleigh 2 dB, L_c from the known amplitude | 200·S = 2600 | 0 / 600 |
  | S = 13, Rayleigh 2 dB, fixed L_c = 2Ec/N0 | 200·S = 2600 | 146 / 600 |

  In the fading runs the amplitude is redrawn for every block of S chips.
  The carrier phase is random per run and equal on adjacent chips.

  These numbers show the published trends:

  * Recursion cuts the error rate sharply.
  * Knowing the channel (maximal-ratio weighting) beats a fixed L_c
    (equal-gain weighting) by a wide margin.

  The absolute AWGN rates are higher than the published curves, which lie
  between about 10⁻³ and 10⁻⁴ at these points. They are also less improved
  by longer recursions at low SNR. A floating-point model of the same
  equations and channel gives the same rates as the RTL: 4 % to 6 % for
  S = 13 at 2 dB and L = 260, 6 % and 26 % at the two low-SNR 200·S points.
  So the gap is not a fixed-point effect. It follows from the noise model:

  * Here the chip samples carry complex noise of total variance N0/Ec. Then
    `U_i` contains the noise-times-noise term, and neighbouring `U_i` share
    noise.
  * If `U_i` is instead drawn as `b_i` plus independent Gaussian noise of
    variance N0/Ec, S = 5 at 0 dB and L = 200 falls to about 3·10⁻⁴. S = 13
    at 2 dB and L = 260 still gives about 4 %.
  * With half that noise variance, both points fall below 10⁻³.

  The error rates therefore depend strongly on how Ec/N0 is normalised. The
  thresholds for a real receiver should be set from measurements on its own
  front end.

## Departures and limits

* **Tracking loop.** Only the lock/reload decision is built. A real code
  tracking loop also keeps sub-chip timing aligned, using early/late
  correlation on oversampled input. This design works on one sample per chip
  and assumes chip timing is already right.
* **Low-pass filter.** It is an integrate-and-dump. The scheme names a
  low-pass filter without giving its form.
* **Loading rule.** The rule (magnitude threshold plus minimum chip count)
  and the "reload immediately" behaviour are this design's reading of
  "sufficiently high" reliability. The thresholds are run-time inputs.
* **LLR saturation.** The saturation limit is an implementation bound.
  Unbounded LLRs cannot be built.
* **Coherent path.** The carrier-phase estimate and the mixers are outside
  the RTL. `r_coh` must already be carrier-coherent.
* **Data modulation.** The symbol correlator assumes symbols begin where the
  local PN generator is loaded. Data modulation is not modelled: acquisition
  is assumed to run on an unmodulated (pilot) sequence, as in the scheme's
  signal model. A data transition inside a chip pair would corrupt that one
  differential product.
