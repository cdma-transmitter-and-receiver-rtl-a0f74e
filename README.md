# DS-CDMA transmitter and receiver with Gold codes

A direct-sequence spread-spectrum (DS-CDMA) link in synthesizable
SystemVerilog. Each data bit is multiplied by one full period of a 127-chip
Gold code, the resulting chip stream is BPSK-modulated onto a carrier made by a
LUT-based direct digital synthesizer (DDS), and the receiver recovers the bit by
coherent demodulation followed by a matched filter (a correlator against the
user's own Gold code) and a constant threshold. Because every user is given a
different Gold code, a receiver only sees a correlation peak for its own
transmitter; a signal spread with another code stays below the threshold.

Everything runs from one master clock. The published design fixes the code
(Gold, two 7-bit LFSRs, length 127), the modulation (BPSK, coherent
demodulation), the DDS phase resolution (5.625 degrees, 64 steps), the
receiver's scaling (shift right by nine places, words from -7 to +7), the
correlator type (matched filter) and the use of a constant threshold. Chip
length, threshold value, synchronisation and the handshakes are this
implementation's own choices and are listed in
[Where this design chooses for itself](#where-this-design-chooses-for-itself).

## Signal chain

```
 user_data ──► spreader ──► bpsk_mod ──► out_ss_signal ══► bpsk_demod ──► s2p ──► matched_filter ──► threshold_det ──► rx_out_bit
   (1 bit)    data XOR PN   DDS + 180°     6-bit samples     ±7 per chip   127 words   Σ ±word          |corr| ≥ 448
                 ▲                                               ▲                        ▲
             gold_gen (tx key)                            local DDS             gold_gen (rx key), loaded after reset
                 ▲
             tx_ctrl: chip / bit strobes ───────── chip_sync ─────┘
```

| Quantity | Value |
|---|---|
| Gold code length = chips per data bit | 127 |
| Master clocks per chip (`CLKS_PER_CHIP`) | 64 |
| Master clocks per data bit | 127 × 64 = 8128 |
| Carrier frequency | `phase_inc_word` / 64 of the master clock |
| Transmit sample | 6-bit signed, −31 … +31 |
| Demodulator word | 4-bit signed, −7 … +7, one per chip |
| Correlator output | 11-bit signed, peak ±889 (127 × 7) |
| Threshold | 448 |
| Latency, `data_req` to `rx_bit_valid` | 8128 + 4 = 8132 master clocks |

## Gold code generator

`gold_gen` holds two 7-stage Fibonacci LFSRs (`lfsr`). Stages are numbered 1
to 7; stage 1 receives the feedback and stage 7 is the output.

* g1: feedback = stage 3 XOR stage 7 (polynomial x⁷ + x³ + 1)
* g2: feedback = stage 1 XOR stage 2 XOR stage 3 XOR stage 7
  (x⁷ + x³ + x² + x + 1)

Both are maximal-length (period 127), and the chip is the XOR of their stage-7
outputs. The 14-bit user key is the pair of seeds: `user_key[13:7]` for g1 and
`user_key[6:0]` for g2. Changing the relative seed changes the code; the
family has 2⁷ + 1 = 129 members, more than the 63 links the design is meant to
carry. Any two codes of the family have periodic cross-correlation in
{−1, −17, +15}, which the `gold_gen` testbench checks for every shift. A zero
seed would lock an LFSR at zero, so it is loaded as 1.

`lfsr` is generic (`N`, `TAPS`); with `N = 4, TAPS = 4'b1001` it is the
textbook 4-stage generator with feedback from stages 1 and 4 (period 15).

## Transmitter (`cdma_tx`)

* `tx_ctrl` counts master clocks within a chip and chips within a bit, and
  produces `chip_start`, `chip_end` and `sos` (start of sequence: chip 0 of a
  code period, which is also the first clock of a data bit). These are clock
  enables; there are no derived clocks.
* `gold_gen` is loaded with `user_key` while `rst` is high and advances on
  `chip_end`.
* `spreader` is the NRZ coder and the multiplier. With the polar mapping
  0 → +1, 1 → −1 the product of data and chip is the XOR of the bits. The bit
  on `user_data` is taken in the cycle `data_req` (= `sos`) is high and held in
  `buf_data` for the whole bit.
* `bpsk_mod` is the DDS: a frequency register (`phase_inc_word`), a phase
  register that adds it every clock (the phase accumulator), a phase shift
  controller that adds 32 of the 64 steps (180°) while the chip is 1, and
  `cos_lut`. The phase restarts at 0 at each chip start. The output is
  registered, so `out_ss_signal` and its companion `chip_sync` (first sample of
  a chip) lag the control strobes by one clock.

`cos_lut` entry k is `floor(31·cos(2πk/64))`, computed at elaboration time;
for instance 31, 21, 0, −22, −31 at 0°, 45°, 90°, 135°, 180°.

## Receiver (`cdma_rx`)

### Coherent demodulator and scaling

`bpsk_demod` runs its own DDS with the same frequency word, restarted at each
`chip_sync`, so its local carrier is in phase with the received one. Each
sample is multiplied by the local carrier (6 × 6 bits) and the products are
integrated over the chip (integrate and dump: this is the low-pass filter).
At the next `chip_sync` the integral is shifted right arithmetically by nine
places and saturated to −7 … +7. A clean, full-scale chip integrates to about
±30 700, far above 7 · 2⁹, so a strong signal always gives ±7; weaker or
noisy chips give intermediate words. The receiver keeps these 15-level soft
values instead of deciding each chip, because a CDMA chip on its own carries
too little energy to decide on; the decision is made after correlation.
`demod_out_bit` (the sign) is brought out only for observation.

### Matched filter and bit synchronisation

This is the part that makes the receiver work without being told where a data
bit begins.

* `s2p` is a 127-word shift register of demodulator words; the newest word is
  `taps[0]`, the oldest `taps[126]`. It shifts once per chip.
* `matched_filter` holds a 127-bit reference. After reset the receiver's own
  `gold_gen` (loaded with `rx_user_key`) runs for 127 master clocks at full
  speed and its chips are shifted in, in transmission order, so that chip 0 of
  the code ends in `coef[126]` — the same position the oldest received chip
  occupies. `code_ready` rises when the reference is complete.
* After every chip the correlator forms
  `corr = Σₖ (coef[k] ? −taps[k] : +taps[k])` over all 127 words.
* When the register holds exactly one code period of one data bit, every
  product is +7 (data 0) or −7 (data 1): `corr` = ±889. At every other
  alignment the words belong to two different bits or mismatch the code, and
  `corr` stays near the Gold code side lobes. For the key used in the tests
  the largest off-peak |corr| over all alignments and all pairs of
  neighbouring data bits is 133 (19 × 7), far below the threshold.
* `threshold_det` compares |corr| with the constant `THRESHOLD` (448, about
  half the peak). When it is reached a bit is declared: `rx_out_bit` = 1 for a
  negative peak, `rx_bit_valid` pulses for one clock.

The correlator is therefore evaluated 127 times per bit and fires once, at the
alignment that is the bit boundary. A receiver whose reference is a different
Gold code never reaches the threshold: for the two keys of the tests the
largest |corr| over all alignments and data patterns is 175 (25 × 7).

Receiver timing: the demodulated word appears one clock after the
`chip_sync` that closes its chip, the shift register takes it on that clock,
the correlator is sampled one clock later and the decision is registered one
clock after that.

### What the receiver needs to be given

Carrier and chip timing. `chip_sync` must mark the first sample of each chip,
and `phase_inc_word` must equal the transmitter's. In `cdma_top` both come
from the transmitter, since both ends share one device and one clock. There is
no carrier recovery, chip-timing recovery or code acquisition beyond the
bit-boundary search above.

## Top level (`cdma_top`)

Transmitter output is wired straight to receiver input. Ports:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | master clock; synchronous active-high reset, loads both keys |
| `tx_user_key`, `rx_user_key` | in | 14 | Gold code keys of the two ends |
| `phase_inc_word` | in | 6 | carrier frequency word, shared |
| `user_data` | in | 1 | bit to send, taken when `data_req` is high |
| `data_req` | out | 1 | one pulse per bit period, the first in the clock after reset |
| `out_ss_signal` | out | 6 | transmitted samples |
| `pn_seq`, `chip_signal`, `buf_data` | out | 1 | transmitter code chip, spread chip, held data bit |
| `demod_out_value`, `demod_out_bit`, `demod_valid` | out | 4, 1, 1 | demodulator word per chip |
| `corr` | out | 11 | correlator output |
| `code_ready` | out | 1 | receiver reference loaded |
| `rx_out_bit`, `rx_bit_valid` | out | 1 | recovered bit and its strobe |

Parameters (defaults): `CLKS_PER_CHIP = 64`, `CHIPS_PER_BIT = 127`,
`DEMOD_SHIFT = 9`, `THRESHOLD = 448`, `CORR_W` derived. Shared constants and
types (`phase_t`, `sample_t`, `demod_t`, `key_t`) are in `cdma_pkg`.

Reset: hold `rst` for at least one clock. The receiver needs 127 clocks after
reset to load its reference; the first bit cannot complete before 8128 clocks,
so nothing is lost.

## Where this design chooses for itself

* **Code length vs. correlator length.** The code is 127 chips; a 128-word
  correlator is also mentioned in the source material. This design spreads
  each bit with exactly one code period and uses 127 correlator words.
* **Chip length.** 64 master clocks per chip, i.e. one carrier cycle per chip
  at frequency word 1. Not specified by the source.
* **Scaling.** "Shift by nine and truncate to 4 bits" is implemented as shift
  then saturate to ±7, which is the only reading that gives ±7 for a clean
  signal rather than wrapped garbage.
* **Phase mapping.** Chip 0 is sent at 0°, chip 1 at 180° (absolute phase).
* **Threshold.** 448. The source specifies a constant threshold but no value.
* **Synchronisation.** Chip and carrier timing are taken from the transmitter
  (`chip_sync`); the carrier phase restarts at each chip at both ends.
* **Clocks.** The derived data and chip clocks of the original are replaced by
  clock enables on one master clock.
* **Key layout.** The 14-bit key holds the two 7-bit seeds; a zero seed is
  loaded as 1.
* **Reference loading** of the matched filter from the receiver's own Gold
  generator right after reset.
* **Not built:** antennas and RF, the on-chip logic analyser used for debug,
  and a data source (data enter through `user_data`). Several simultaneous
  users and a noisy channel are not modelled in the RTL; the oscillator of the
  block diagrams is the DDS inside `bpsk_mod` and `bpsk_demod`.

## Verification

Every module has a self-checking testbench in `tb/` whose expected values are
computed from formulas (LFSR recurrences, `floor(31·cos)`, the integral and
shift), not from the RTL. Shared reference models are in `tb/tb_ref_pkg.sv`.
Notable checks:

* `tb_gold_gen`: chip-exact codes for two keys, period 127, and the three-valued
  cross- and auto-correlation of the Gold family.
* `tb_matched_filter`: exact sums for random words; peak ±889 for an aligned
  code period; all 126 misalignments below the threshold.
* `tb_cdma_rx`: a BPSK stream generated in the testbench, starting at a random
  chip offset; every bit found once with the right value; nothing found with a
  foreign code; and all bits found in a weaker signal (amplitude 12 of 31)
  with uniform noise of ±19 per sample, where most demodulator words are soft
  (between −7 and +7).
* `tb_cdma_top`: the whole link at default parameters (8128 clocks per bit):
  34 random bits recovered with the exact latency of 8132 clocks at frequency
  words 1 and 3, then no detection at all with a mismatched receiver key. It
  also counts that data 0 and 1, demodulator saturation at +7 and −7, the
  reference loads and the rejection all occurred. It runs in about a second.

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`; each has a watchdog. The RTL also carries three concurrent
assertions, active when simulated with `--assert`: a bit starts only on a chip
boundary (`tx_ctrl`), the demodulator never emits −8 (`bpsk_demod`), and no bit
is declared before the reference code is loaded (`cdma_rx`).

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cdma_pkg.sv tb/tb_ref_pkg.sv tb/tb_cdma_top.sv --top-module tb_cdma_top
./obj_dir/Vtb_cdma_top
```

Replace `tb_cdma_top` by any other testbench name. Lint a module alone with
`verilator --lint-only -Wall -Irtl -y rtl rtl/cdma_pkg.sv rtl/<module>.sv`.
Verilator reports two `PINCONNECTEMPTY` warnings (the LFSR state outputs that
`gold_gen` leaves open) and unused package constants; neither affects the
circuit.

## Changing it

* Another code length: change `LFSR_N` in `cdma_pkg` and the two `TAPS` values
  in `gold_gen` to a preferred pair of that degree; `GOLD_LEN`,
  `CHIPS_PER_BIT` and the correlator width follow.
* Chip length: `CLKS_PER_CHIP`. Keep `DEMOD_SHIFT` such that a clean chip
  integral, about `CLKS_PER_CHIP · 480`, still exceeds `7 << DEMOD_SHIFT` if
  saturation on clean signals is wanted.
* Threshold: it is an absolute number, so it assumes a received amplitude
  near full scale (the correlation peak scales with the signal). Set
  `THRESHOLD` between the largest side lobe (133 for the key of
  the tests, 175 for the foreign code tried) and the peak `CHIPS_PER_BIT · 7`.
* Carrier: `phase_inc_word` at run time; 0 < word < 32 keeps more than two
  samples per carrier cycle.
