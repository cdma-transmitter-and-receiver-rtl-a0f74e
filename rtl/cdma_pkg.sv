// cdma_pkg: widths and constants shared by the DS-CDMA transmitter and
// receiver.
//
// The link spreads each data bit with one full period of a 127-chip Gold
// code (two 7-bit LFSRs), sends it as BPSK with a LUT-based direct digital
// synthesizer of 64 phase steps (5.625 degrees each), and recovers it with a
// coherent demodulator, a 127-word matched filter and a constant threshold.
// The code length, LFSR size, phase resolution, the demodulator's shift of
// nine places and its -7..+7 output range are the published figures of the
// design; the sample width of 6 bits follows the printed transmitter samples
// (values such as 31, 21, 0, -22). Everything else here is this
// implementation's choice.
package cdma_pkg;

  localparam int unsigned LFSR_N      = 7;          // two 7-bit LFSRs
  localparam int unsigned KEY_W       = 2 * LFSR_N; // user key: both seeds
  localparam int unsigned GOLD_LEN    = (1 << LFSR_N) - 1; // 127 chips
  localparam int unsigned PHASE_BITS  = 6;          // 360/64 = 5.625 degrees
  localparam int unsigned SAMPLE_W    = 6;          // signed carrier sample
  localparam int          AMP         = 31;         // cosine table amplitude
  localparam int unsigned DEMOD_W     = 4;          // demodulator word
  localparam int          DEMOD_MAX   = 7;          // words lie in -7..+7

  typedef logic [PHASE_BITS-1:0]      phase_t;
  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [DEMOD_W-1:0]  demod_t;
  typedef logic [KEY_W-1:0]           key_t;

  // Bits needed for a signed sum of n words of magnitude at most DEMOD_MAX.
  function automatic int unsigned corr_width(int unsigned n);
    return $clog2(n * DEMOD_MAX + 1) + 1;
  endfunction

endpackage
