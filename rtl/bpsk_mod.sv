// bpsk_mod: BPSK modulator built as a LUT-based direct digital synthesizer.
//
// The frequency register holds the phase increment (phase_inc_word), the
// phase register adds it once per master clock (together: the phase
// accumulator), the phase shift controller adds half a cycle (180 degrees,
// 32 of the 64 phase steps) while the spread chip is 1, and the cosine table
// turns the phase into a 6-bit signed sample. Carrier frequency is
// phase_inc_word/64 of the master clock.
//
// The carrier phase restarts at 0 on chip_start, so that every chip starts at
// the same carrier phase and the receiver can integrate whole chips. With 64
// clocks per chip this never changes the waveform, since the accumulator wraps
// to 0 there anyway; it is this design's choice for other chip lengths.
//
// Timing: the sample for the chip value and phase of cycle t appears on
// out_ss_signal at cycle t+1; sample_start marks, with the same delay, the
// first sample of each chip. phase_inc_word passes through the frequency
// register and takes effect one clock after it changes.
module bpsk_mod
  import cdma_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  phase_t phase_inc_word,
  input  logic   chip_start,
  input  logic   chip_signal,
  output sample_t out_ss_signal,
  output logic   sample_start
);

  localparam phase_t HALF_CYCLE = phase_t'(1 << (PHASE_BITS - 1));

  phase_t  freq_reg;    // frequency register
  phase_t  phase_reg;   // phase register
  phase_t  cur_phase;
  phase_t  lut_phase;
  sample_t lut_value;

  assign cur_phase = chip_start ? '0 : phase_reg;
  // phase shift controller
  assign lut_phase = chip_signal ? cur_phase + HALF_CYCLE : cur_phase;

  cos_lut u_lut (.phase(lut_phase), .value(lut_value));

  always_ff @(posedge clk) begin
    freq_reg <= phase_inc_word;
    if (rst) begin
      phase_reg     <= '0;
      out_ss_signal <= '0;
      sample_start  <= 1'b0;
    end else begin
      phase_reg     <= cur_phase + freq_reg;
      out_ss_signal <= lut_value;
      sample_start  <= chip_start;
    end
  end

endmodule
