# 4x4 MIMO receiver front-end for a UMTS (WCDMA) downlink

This is synthesizable SystemVerilog for the digital front-end of a receiver with
four antennas. The transmitter it expects also has four antennas. It sends four
independent data streams, all spread with the same channelization code, plus one
continuous pilot per transmit antenna. To separate the streams, a MIMO decoder
needs two things for every RAKE finger: the soft symbols seen by each receive
antenna, and the 4x4 channel matrix at that finger's delay. This front-end
produces both, with little hardware. The key piece is a channel estimator that
estimates all four channels into one receive antenna with a single shared FIR
filter plus four small correlators.

```
             per receive antenna (x4, in parallel)
if_data --> ddc --> agc --> freq_comp --> rrc_filter --+--> chan_est --(h x4)--+
                     |          ^                       |                      |
                     |          | fo_step               +--> rake <--fpos/fid--+-- finger_assign
                     |          |                              |                     |
                     +--(strongest antenna)--> foffset_est     | soft symbols        | coefficients
                                                               v                     v
                                                        out_fifo (symbols)    out_fifo (coefficients)
                                                               \______ to the MIMO decoder ______/
```

All antennas run in lock step, one sample per clock, at four samples per chip
(`OS = 4`). `if_sof` marks the first sample of a radio frame. That marker comes
from cell search and synchronization, which is not part of this design. Every
unit that despreads keeps its own time reference, and each one restarts from
the `sof` flag that travels with its input stream.

## Hybrid FIR/correlator channel estimation

The pilot of transmit antenna *i* is `S_i(n) = S_c(n) * C_i(n)`:
- `S_c` is the complex scrambling code.
- `C_i` is an OVSF (Walsh) code of period K = 256 chips.

The estimate of delay *p* is the correlation of the received samples with the
pilot over K chips:

    h_i(p) = sum_{n=0}^{K-1} x(p + n*OS) * conj(S_c(n)) * C_i(n)

A FIR filter with K taps computes this for every delay at once, but it is
expensive. A bank of correlators, one per delay, is cheap only when there are
few delays. The hybrid splits the sum into R chunks of L chips (K = L*R, L a
power of two):

    h_i(p) = sum_{r=0}^{R-1} C_i,r * [ sum_{l=0}^{L-1} x(p + (l + rL)*OS) * conj(S_c(l + rL)) * C_i,low(l) ]

The split works because a Walsh code factors. The bit for chip `n = l + r*L` is
the parity of `n & code`. The low log2(L) bits of `n` come only from `l`, and
the high bits only from `r`. So `C_i(n) = C_i,low(l) * C_i,r`, where `C_i,r` is
a single sign per chunk.

- **`ce_fir`** computes the inner sum. It is an L-tap FIR whose +-1 coefficients
  are `conj(S_c)` times `C_i,low` for the current chunk. It produces one partial
  sum per delay position and sample. The coefficients of the next chunk are
  loaded at the chunk boundary, so the filter never stalls.
- **`ce_correlator`** computes the outer sum. It holds one memory word per delay
  position and adds `+-` each partial sum into it (read-modify-write). It
  restarts at the first chunk of a window, and the finished estimate leaves at
  the last chunk.

The pilot codes used are 0, 64, 128 and 192. With L = 64 they differ only above
bit 6, so their `C_i,low` are all the same. As a result, **one FIR serves all
four transmit antennas**, and only the cheap correlator is built four times
(`chan_est`). The sign of chunk `r` of pilot `i` is
`parity((r << 6) & code_i & 255)`.

Sizes are set in `umts_pkg`:
- L = 64 chips (`LCH`), giving 256 delay positions (`NPOS`) at 4 samples per chip.
  This covers the typical urban delay spread of about 40 chips with room to spare.
- `avg_syms` (1..16) sets how many 256-chip pilot symbols one estimate spans.
- Estimation windows start on pilot-symbol boundaries and follow one another
  without gaps.
- Position `p` of window `w` leaves two cycles after sample
  `(c0 + 256*avg_syms - 1)*OS + p`, where `c0` is the first chip of the window.

## Finger assignment and the 2-bit tags

`finger_assign` receives all 16 estimates of a position together (the four
`chan_est` run in step). For each position:
1. It adds |Re|+|Im| of the 16 estimates into one power profile.
2. It tests whether the previous position was a local maximum.
3. It keeps the four strongest maxima in a sorted list.

One cycle after the last position, the list becomes the new finger set. At that
point `fid` advances (a 2-bit tag), `f_load` pulses, and `fpos`/`fvalid` change.

No estimates are stored. While the profile streams past, the block also picks
out the coefficients of the *current* set. These are the fingers that the RAKE
is using while this very estimate is being measured. Whenever the position
equals a finger position, a coefficient record leaves. The record holds the tag,
the finger mask, the position, and all 16 coefficients.

The RAKE switches to a new set at its next symbol boundary, and it labels every
soft-symbol record with the tag of the set it used. The decoder can therefore
pair symbols and coefficients by tag. The two output FIFOs give it the slack
to do so.

## RAKE

`rake` delays the *signal*, not the code. All four fingers share one local time
reference, so they all start and end a symbol together. A finger at delay `p`
reads tap `NPOS - p` of a 256-sample delay line. `delay_line` is a circular
memory rather than a register chain, which avoids the toggling of a shift
register.

Because the time reference runs NPOS samples late, fingers can move to any
position between symbols with no partial symbols. Each finger despreads with
`conj(S_c) * C_data` and integrates over `2^sf_log2` chips. The soft symbol of
symbol `s` appears one cycle after sample `(s*SF + SF - 1)*OS + NPOS`.

## Carrier-offset estimation and compensation

One local oscillator serves all antennas, so a single frequency word
compensates all four paths. The estimate is feed-forward: `foffset_est` works on
the AGC output, before the compensation.

1. It despreads one pilot over each 256-chip symbol at the strongest finger of
   the strongest antenna.
2. It takes the phase of each symbol.
3. It subtracts the phase of the previous symbol.
4. It averages `2^fo_navg_log2` differences.

The frequency word has one turn = 2^32 per sample:

    fo_step = mean(dphi) * 2^16 / (256*OS)          (dphi in 1/65536 turn)

The phase is found without a multiplier (`phase_est`):
- The magnitudes are ordered so that `u = min/max` lies in [0, 1]. This uses
  arctan(x) = pi/2 - arctan(1/x) when |Im| > |Re|.
- `seq_divider` computes `u` one bit per clock (12 fraction bits).
- The angle is then `0.7918*u + 0.0493` rad, i.e. `8259*u + 514` in 16-bit
  turns.
- The signs of Re and Im give the quadrant.

The approximation error is up to a few degrees. It averages out because the
argument keeps turning from symbol to symbol. Offsets up to half a turn per
pilot symbol are unambiguous: Fc/512, which is 7.5 kHz at 3.84 Mchip/s.

`freq_comp` applies the word: a 32-bit NCO plus a CORDIC rotation by -phase.

Any change of the following starts the averaging afresh:
- position or pilot: the next symbol;
- antenna: the next three symbols, because the delay line still holds samples
  from the old antenna.

The top re-chooses the antenna only when the strongest path moves. Without this,
antennas of nearly equal power would take turns and keep the estimator
restarting.

## Blocks of the receive chain

| module | function | latency |
|---|---|---|
| `ddc` | 32-bit NCO and CORDIC rotate the real IF down to baseband. A two-tap sum notches the mirror image (IF = sample rate/4, `if_step = 2^30`). | 17 |
| `agc` | Measures the mean of \|Re\|+\|Im\| over 256 samples. Moves the gain by 1/32 of itself outside a +-1/8 dead zone around `agc_target`. | 1 |
| `freq_comp` | NCO + CORDIC, driven by `fo_step`. | 16 |
| `rrc_filter` | 33-tap root-raised-cosine filter, roll-off 0.22, 4 samples/chip. `sof` is delayed by the 16-sample group delay, so delay positions mean the same before and after the filter. | 1 |
| `scr_code_gen`, `time_ref` | UMTS downlink Gold scrambling code (18-bit x and y registers; the Q branch uses the standard's shifted taps), plus sample, chip and pilot-chip counters restarted by `sof`. | 0 |
| `out_fifo` | First-word-fall-through FIFO. A write into a full FIFO is dropped and counted (`sym_drops`, `coef_drops`). | - |

## Top level: `mimo_frontend`

Top-level ports:

| ports | meaning |
|---|---|
| `if_valid`, `if_sof`, `if_data[4]` | 12-bit real IF samples, one per receive antenna. |
| `if_step`, `agc_target`, `avg_syms`, `data_code`, `sf_log2`, `x_init` | Run-time configuration: IF, level, estimate length, data code, spreading factor, scrambling-code start state. |
| `fo_pilot`, `fo_navg_log2`, `fo_enable` | Offset estimator: pilot used, averaging, and whether compensation is applied. |
| `sym_rd`, `sym_data`, `sym_empty`, `sym_level`, `sym_full` | Soft-symbol records: tag plus 4x4 soft symbols. |
| `coef_rd`, `coef_data`, `coef_empty`, `coef_level`, `coef_full` | Coefficient records. |
| `fpos`, `fvalid`, `fid`, `f_load`, `agc_*`, `fo_*`, `*_drops` | Status outputs. |

Parameters: `SYM_DEPTH` (64) and `COEF_DEPTH` (16) set the FIFO depths. The
shared sizes live in `umts_pkg`.

## Where this design departs from the original front-end

- **Parallel antennas.** The original multiplexes the four antennas onto one
  datapath at 16x the chip rate (64 MHz). Here each antenna has its own chain,
  clocked at the sample rate. The function is the same, but the hardware cost is
  not.
- **Own choices.** These parts are this design's own and could be replaced
  without touching the rest:
  - DDC (NCO/CORDIC, IF = fs/4);
  - AGC algorithm;
  - RRC length and word widths;
  - FIFO depths;
  - pilot code numbers;
  - L = 64;
  - local-maximum peak rule;
  - antenna-selection hysteresis;
  - all word widths.
- **No cell search.** The frame timing is an input.
- **Single data code.** There is one data code and no downlink power control or
  other users. The synchronization channels are not modelled in the tests.
- **Chip rate.** Chip-rate numbers assume 3.84 Mchip/s. The original rounds this
  to 4 MHz.

## Simulation

Every block has a self-checking testbench in `tb/`. Each compares against a model
written independently in the testbench, mostly direct sums over the samples,
and checks the latencies. `tb/tb_model_pkg.sv` builds the scrambling code from
its definition. Each testbench prints `TB_RESULT checks=N failures=M`.

`tb_mimo_frontend` runs the whole front-end at its default parameters. The
setup:
- 4 transmit antennas, each with a pilot and QPSK data at SF 16.
- 16 three-path channels with delays of 8, 56 and 120 samples.
- A 2.5 kHz carrier offset, IF at fs/4, and 40,000 samples.

Partway through, compensation is switched on and the input level is raised
four-fold. For a stretch of time neither FIFO is read. The testbench checks:
- the offset estimate, within 3%;
- that every finger set covers the three paths;
- that the coefficients rotate between estimate periods with compensation off
  and stay still with it on;
- that every soft symbol correlates positively with the transmitted data
  weighted by the coefficient record of the same tag;
- that every mechanism happened at least once: estimates, finger loads and tag
  changes, coefficient records, offset estimates, compensation, AGC up and
  down, drops in both FIFOs, and the swap branch of the arctangent.

It takes about 20 seconds.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/umts_pkg.sv tb/tb_model_pkg.sv $(ls rtl/*.sv | grep -v umts_pkg) tb/tb_mimo_frontend.sv \
    --top-module tb_mimo_frontend -o vtb
./obj_dir/vtb
```

Use the same command with another `tb/tb_<block>.sv` and `--top-module` for the
block tests. For the ones that do not use the model package, drop
`tb/tb_model_pkg.sv`. All checking in the testbenches is gated by reset,
so they also pass when the simulator starts registers at random values
(`+verilator+rand+reset+2`).
