# Successive interference cancellation receiver for the WCDMA uplink

In a WCDMA uplink every user is told apart by its own complex scrambling code. The codes are not
orthogonal, and multipath makes this worse, so each user's signal interferes with every other
user's detection (multiple access interference). A successive interference cancellation (SIC)
receiver handles users one after another. It detects the first user with a RAKE receiver and
rebuilds that user's share of the received signal from the decisions and channel estimates. It
subtracts the rebuilt copy and passes the cleaner residual to the next user's RAKE. Each
cancellation removes one interferer, so later users are detected with less interference.

This RTL implements a three-user SIC receiver as a streaming hardware pipeline, with one stage per
user. Its signal processing follows a published receiver that ran as software on four DSPs:
- the RAKE fingers, the pilot-aided ARMA channel estimator and the MRC decision;
- a regenerator built from re-spreading, re-scrambling, a 9-tap raised-cosine filter and the
  estimated multipath channel;
- stages chained through FIFO links.

The timing, buffering, fixed-point scaling and interfaces are this design's own. They are
described below.

With default parameters, one frame of three users runs end to end with no bit errors. A plain
RAKE on the same signal misdetects a quarter of the weakest user's bits.

## Signal conventions

| quantity | value |
|---|---|
| chip rate | 3.84 Mchip/s, 38400 chips per 10 ms frame, 15 slots of 2560 chips |
| samples | complex, 16-bit I and 16-bit Q, four samples per chip (`sic_pkg::cplx_s_t`, 32 bits) |
| user signal | one DPDCH (data) on I with spreading factor SF (default 16) and code C<sub>SF,SF/4</sub>; DPCCH (pilot and control) on Q with SF 256 and an all-ones code |
| DPCCH bit | 256 chips; 10 per slot; the first `NPILOT` (default 6) are pilots |
| pair | two DPCCH bits = 512 chips = 2048 samples = 512/SF data bits (32 at SF 16) |
| symbols | carried as sign flags: 1 means -1, 0 means +1 |
| path delay `tau` | in quarter chips, 0..511 (`D_MAX` = 511, about 133 chips) |

A stream marks its frame start with `sof` on sample 0. Frames are assumed to follow each other
without gaps: after the first `sof`, all timing counts from it.

## The chain (`sic_receiver`)

```
rx ──► link0 ──► stage U0 ──► link1 ──► stage U1 ──► link2 ──► RAKE U2
                  │ bits U0               │ bits U1              │ bits U2
                  ▼                       ▼                      ▼
              ber_checker             ber_checker            ber_checker
```

- **Links** (`fifo_link`, 64 words). Each word is a 32-bit sample plus the frame flag. A stage
  takes a sample whenever its input link has one and its output link is not almost full. So an
  empty link makes the next stage wait, and a full one makes the previous stage stop.
- **Stage** (`sic_stage`). Holds a RAKE, a regenerator and a 4096-sample buffer of the received
  signal. It outputs `e'[u] = r'[u] − r̂'[u]`, saturated to 16 bits, exactly `LAT` = 2815 samples
  after the input.
- The **last user** gets no regeneration, only a RAKE.
- **`cancel_en`** (one bit per cancelling stage) switches a stage's subtraction off. The stage
  still detects its user, but passes `r'` on unchanged with the same latency, so later stages need
  no retiming. This is for when interference is already low enough, or for plain RAKE detection
  of all users.
- **`ber_checker`** compares each user's decisions with transmitted bits. The bits are loaded
  beforehand through a write port, one frame (2400 bits) deep.

Path delays, finger enables, scrambling code numbers, the gain ratios β<sub>d</sub>/β<sub>c</sub>
and the estimator weight W are inputs. The path searcher that would supply the delays is not part
of this RTL. Users are processed in a fixed order; there is no ranking by received power.

## The RAKE receiver (`rake_receiver`)

**Finger alignment.** Samples are written into a 1024-entry circular buffer
(`sample_buffer`). The chip strobe starts `D_MAX` samples after the frame start and repeats every
four samples. For chip `n`, finger `l` reads sample `4n + tau_l` from the buffer. So every finger
works on the same chip index at the same moment. This lets one scrambling-code generator and one
OVSF generator serve all fingers.

**Finger** (`rake_finger`). Descrambles with the conjugate code, `p = r' · conj(C_s)`. Since
`C_s` is ±1±j, this is additions only. It then keeps two sums:
- `q`, the sum of `p · C_d` over SF chips: the despread data symbol;
- `p_acc`, the sum of `p` over 256 chips: the DPCCH symbol, which needs no multiplication because
  its code is all ones.

**Channel estimator** (`channel_estimator`, one per finger). For a pilot bit the raw estimate is
`α̃ = −j · b_p · p_acc`. On the second bit of each pilot pair the estimate is updated:

    α̂[m] = W · α̂[m−2] + (1 − W) · (α̃[m] + α̃[m−1]),   W = w_coef / 256

Over pairs of non-pilot bits the estimate is held. With six pilot bits per slot, three pairs
update and two hold. The first pilot pair after reset loads `α̃[m] + α̃[m−1]` directly, so the
filter does not start from zero. In steady state `α̂ = 1024 · β_c · α`: a factor 2 from
descrambling, 256 from accumulation and 2 from the pair sum.

**Pair buffering and combining.** A bit must be combined with the estimate of its own pilot
period, and that estimate only exists once the pair is over. So the despread data symbols of a
pair (and its two DPCCH symbols) are kept in one bank of a two-bank buffer while the next pair
fills the other bank. When the pair's estimate is ready, `mrc_combiner` walks through the
`512/SF + 2` symbols, one per cycle, computing

    decision = sign( Σ_l Re(q_l · conj(α̂_l)) )

over the enabled fingers. Data decisions stream out on `bit_valid`/`bit_neg`. The DPCCH bits are
decided the same way from `−j·p_acc`; at pilot positions the known value is used instead. Then
`pair_valid` hands the regenerator the pair's decisions and estimates. All of this ends about
512/SF + 6 cycles after the pair's last chip sample.

## The signal regenerator (`signal_regenerator`)

This is the hardest part to follow, mostly because of its schedule.

**What it computes.** From the decisions it rebuilds the chips with the DPCCH gain divided out,
because the estimate already contains β<sub>c</sub>:

    ŝ[n] = (b̂[n] C_d[n] G + j b̂_p[n]) · C_s[n],   G = β_d/β_c  (input `gain`, Q8)

It then upsamples them by 4 with zero insertion and shapes them with `rc_filter`. That filter is a
raised-cosine pulse with roll-off 0.22, 9 taps over ±1 chip, Q8 values 0, 75, 161, 230, 256, 230,
161, 75, 0. It stands in for the cascade of the transmit and receive root-raised-cosine filters.
With 33-tap RRC filters that cascade has 65 taps, and its nine centre taps hold 94.4 % of its
energy. The parameter `RC_TAPS` = 33 selects a longer raised cosine over ±4 chips instead, to
compare against the short one. The regenerator's internal lead then grows from 4 to 16 samples;
`LAT` stays the same.

The filtered stream `x'` goes through the estimated channel:

    r̂'[u] = Σ_l α̂_l[pair(u)] · x'[u − tau_l] / 2^26

The `2^26` removes the Q8 symbol scale, the Q8 filter scale and the estimator gain of 1024.
`x'` is written into a 1024-entry circular buffer, and each path is a read tap at its own delay.
Taps that would reach back before the first stored sample read as zero.

**When it computes it.** The regenerator steps once for every sample the stage takes, and runs
exactly `LAT = 2048 + D_MAX + 256` samples behind. That lag covers:
- the last path's delay (`D_MAX`);
- a whole pair (2048 samples), whose decisions exist only after it ends;
- the RAKE's combining time (256 samples of margin).

The filter is centred, so chips are generated `(RC_TAPS−1)/2` samples (one chip for 9 taps)
ahead of the output sample. Decisions arrive per pair into a two-bank store. An assertion checks that a pair's bank is filled
before its first chip is rebuilt. Bank `P mod 2` is overwritten by pair `P+2` only after both the
chip generator and the output have moved on to pair `P+1`.

Because `LAT` is fixed, the stage only has to read the received sample written `LAT` samples
earlier. Its read pointer starts at the frame's first sample and advances once per rebuilt sample.

## Fixed-point summary

| signal | width | scale |
|---|---|---|
| received sample I/Q | 16 | input units |
| finger sums `q`, `p_acc` | 26 | ×2 (descrambling) × chips summed |
| estimate `α̂` | 28 | 1024 · β<sub>c</sub> · α |
| MRC metric | 58 | full precision |
| rebuilt chip | 14 | Q8 |
| filter output | 25 | Q8 · Q8 |
| rebuilt sample `r̂'` | 18, saturated | input units |
| residual | 16, saturated | input units |

## Where this departs from the DSP receiver it follows

- **Hardware pipeline instead of software.** The original runs each stage on its own DSP. This
  RTL is a clocked pipeline taking up to one sample per cycle, so real time needs a clock of at
  least 15.36 MHz. No DSP, host interface or board memory is modelled.
- **Scrambling code generated on line.** The code is the 3GPP long uplink code (a Gold code of
  X<sup>25</sup>+X<sup>3</sup>+1 and X<sup>25</sup>+X<sup>3</sup>+X<sup>2</sup>+X+1; the second
  sequence comes from shift masks). It is generated as needed rather than precomputed and
  stored.
- **Decisions per pair.** The despread symbols are buffered so that each bit uses the estimate of
  its own pilot pair.
- **DPCCH control bits are detected.** The regenerator needs all DPCCH bits, not only the pilots.
- **Assumed values.** The pilot pattern is a parameter (`PILOT_NEG`, default all +1). `NPILOT` = 6
  is assumed, as is the estimator's start-up rule.
- **Fixed-point choices.** The word widths and the Q8 formats are this design's own; the original
  fixed-point choices are not reproduced.
- **Path delays are inputs.** No path searcher or tracker is included.
- **One data channel.** The standard allows up to six DPDCHs at SF 4. Like the receiver it
  follows, this one handles a single DPDCH, so data is BPSK on I only.

## Verification

Every module has a self-checking testbench in `tb/`, ending with
`TB_RESULT checks=N failures=M`. The reference models are in `tb/tb_wcdma_pkg.sv` and were
written independently of the RTL:
- the scrambling code from its definition, with the second sequence made by really advancing the
  m-sequences 16,777,232 chips rather than by shift masks;
- OVSF codes from the recursive code tree;
- the raised-cosine taps from the formula;
- a transmitter and multipath channel, with optional Doppler fading and, as the pulse, either the
  9-tap raised cosine or the cascade of two 33-tap root-raised-cosine filters.

| testbench | what it shows |
|---|---|
| `tb_sic_receiver` | full default size, one frame plus the chain's latency, three users at different powers (2, 4 and 3 paths, one path 77 chips late): no bit errors for any user. A plain RAKE for the weakest user on the raw signal does make errors (about 620 of 2560). U0's cancellation leaves under 0.5 % of its energy. Estimate updates, holds, link waits and both cancellations all occur. At the end `cancel_en` goes low, and stage U0 then passes the received samples on unchanged |
| `tb_sic_stage` | one stage with a randomly stalling downstream: bits, residual against the exact interference-free signal, one output per input, fixed latency, stalls; with `cancel_en` low, the output equals the input exactly |
| `tb_sic_sf` | one stage at SF 4 and one at SF 256, each with an interferer: all bits correct, residual under 3 % of the user's energy |
| `tb_rake_receiver` | decisions, DPCCH bits, estimate accuracy, pair result latency within 512/SF + 12 cycles |
| `tb_signal_regenerator` | every rebuilt sample equals an exact integer evaluation of the regeneration formula, for 9 and for 33 filter taps; output exactly `LAT` steps + 3 cycles after its input |
| `tb_rc_filter` | both filters' impulse responses and random input against the formula's Q8 taps; the 94.4 % energy share of the nine taps in the 65-tap RRC cascade |
| `tb_channel_estimator`, `tb_rake_finger`, `tb_mrc_combiner`, `tb_scrambling_code_gen`, `tb_ovsf_code`, `tb_sample_buffer`, `tb_fifo_link`, `tb_ber_checker` | each block against its defining formula or a model |

`tb_sic_workloads` runs the receiver on the channels it is meant for. Every run uses three users
at SF 16, with U0 6 dB and U1 3 dB stronger than U2, and white Gaussian noise. The transmit pulse
is the cascade of two 33-tap RRC filters, which neither regeneration filter matches exactly. A
second receiver with `RC_TAPS` = 33 runs on the same signal. Plain RAKEs for U1
and U2 run on the raw signal alongside, so each run reports error rates with and without
cancellation. E<sub>b</sub>/N<sub>0</sub> is U2's, counting data-bit energy over all its paths.
The runs are:
- AWGN at 7 dB over two frames;
- one Rayleigh-fading path at 50 km/h, 10 dB;
- AWGN at 7 dB once more with `cancel_en` low. Here U1's and U2's decisions must match the plain
  RAKEs bit for bit;
- six standard multipath cases at 10 dB, each path fading at the case's speed:

| case | path delays (ns) | path powers (dB) | speed (km/h) |
|---|---|---|---|
| 1, 5 | 0, 976 | 0, −10 | 3, 50 |
| 2 | 0, 976, 20000 | 0, 0, 0 | 3 |
| 3, 6 | 0, 260, 521, 781 | 0, −3, −6, −9 | 120, 250 |
| 4 | 0, 976 | 0, 0 | 3 |

Each fading path is modelled as eight rays with random phases and Doppler shifts at a 1.95 GHz
carrier. Delays are rounded to quarter chips. One run with the default seed gave:

| run | U2 BER, SIC, 9-tap | U2 BER, SIC, 33-tap | U2 BER without SIC |
|---|---|---|---|
| AWGN 7 dB | 0.0014 | 0.0010 | 0.040 |
| single-path fading | 0.048 | 0.040 | 0.119 |
| case 1 | 0.0000 | 0.0000 | 0.0012 |
| case 2 | 0.0012 | 0.0004 | 0.042 |
| case 3 | 0.0058 | 0.0029 | 0.034 |
| case 4 | 0.0000 | 0.0000 | 0.0004 |
| case 5 | 0.024 | 0.017 | 0.085 |
| case 6 | 0.019 | 0.019 | 0.049 |

The single-user bound Q(√(2E<sub>b</sub>/N<sub>0</sub>)) at 7 dB is 0.0007. Over all runs U2 makes
246 errors with the 9-tap filter, 198 with the 33-tap filter and 1033 without cancellation. The
longer filter helps a little, and most of the gain comes from the short one.

One frame is short next to a fade at walking speed. So single runs swing a lot: in case 1, U0 sits
in a −16 dB fade for the whole frame and loses a quarter of its bits. The testbench therefore
checks only the following:
- every run delivers every bit;
- the AWGN error rate stays within four times the bound;
- cancellation helps U2 in AWGN, and at least halves U2's errors over all runs with either
  filter;
- the two filters' totals are within a factor of two of each other;
- no run with cancellation exceeds 10 % for U2;
- the RAKE-only run matches the plain RAKEs.

The other testbenches use static channels with light noise.

## Simulating

With Verilator 5, for example for the full receiver:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/sic_pkg.sv tb/tb_wcdma_pkg.sv rtl/*.sv tb/tb_sic_receiver.sv \
  --top-module tb_sic_receiver
./obj_dir/Vtb_sic_receiver
```

List `rtl/sic_pkg.sv` first. Simulating the full receiver takes a few seconds, and the workload
runs (`tb_sic_workloads`) under a minute. Other testbenches
work the same way; a block testbench needs only the package, its block and the blocks below it.

## Changing it

- `LOG2_SF` sets the data spreading factor, from 4 to 256; pair buffers scale as 512/SF. The
  frame rules (256-chip DPCCH bits, 38400-chip frames) are fixed in `sic_pkg`.
- `L` sets the number of fingers.
- `RC_TAPS` (9 or 33) sets the length of the regenerators' raised-cosine filter.
- `NPILOT` and `PILOT_NEG` set the slot's pilot count and pattern; `NPILOT` must be even.
- `D_MAX` (in `sic_pkg`) bounds the path delays. The stage latency grows with it, and the
  buffers must stay deeper than the delays they cover.
- Only three users are chained in `sic_receiver`. More users means more `sic_stage` instances and
  links in series.
