// bpsk_demod: coherent BPSK demodulator with integrate-and-dump low-pass
// filter and scaling to a 4-bit word.
//
// A local DDS (frequency register, phase register, the same cosine table as
// the modulator) regenerates the carrier; its phase restarts at 0 on
// chip_sync, which marks the first received sample of each chip. Every sample
// is multiplied by the local carrier and the products are summed over the
// chip. At the next chip_sync the sum is shifted right arithmetically by
// DEMOD_SHIFT (nine) places and limited to -7..+7, giving one of 15 soft
// values per chip rather than a hard bit, because single chips of a CDMA
// signal are too weak to decide on; the decision is left to the correlator.
//
// Timing: demod_out_value, demod_out_bit (1 for a negative value, i.e. a
// chip sent with 180 degrees) and the one-cycle demod_valid strobe appear one
// clock after the chip_sync that closes the chip. The first chip_sync after
// reset only starts integration.
//
// The shift by nine and the -7..+7 range are published; that the limiting
// saturates (a clean full-chip sum is far above 7 << 9) and the integrate and
// dump form of the filter are this design's reading.
module bpsk_demod
  import cdma_pkg::*;
#(
  parameter int unsigned CLKS_PER_CHIP = 64,
  parameter int unsigned DEMOD_SHIFT   = 9
) (
  input  logic    clk,
  input  logic    rst,
  input  phase_t  phase_inc_word,
  input  sample_t rx_in,
  input  logic    chip_sync,
  output demod_t  demod_out_value,
  output logic    demod_out_bit,
  output logic    demod_valid
);

  localparam int unsigned PROD_W = 2 * SAMPLE_W;
  localparam int unsigned ACC_W  = PROD_W + $clog2(CLKS_PER_CHIP + 1);
  localparam logic signed [ACC_W-1:0] LIM = ACC_W'(DEMOD_MAX);

  phase_t  freq_reg, phase_reg, cur_phase;
  sample_t carrier;
  logic signed [PROD_W-1:0] prod;
  logic signed [ACC_W-1:0]  acc, scaled;
  logic started;

  assign cur_phase = chip_sync ? '0 : phase_reg;

  cos_lut u_lut (.phase(cur_phase), .value(carrier));

  assign prod   = rx_in * carrier;
  assign scaled = acc >>> DEMOD_SHIFT;

  always_ff @(posedge clk) begin
    freq_reg <= phase_inc_word;
    if (rst) begin
      phase_reg       <= '0;
      acc             <= '0;
      started         <= 1'b0;
      demod_out_value <= '0;
      demod_out_bit   <= 1'b0;
      demod_valid     <= 1'b0;
    end else begin
      phase_reg   <= cur_phase + freq_reg;
      demod_valid <= chip_sync && started;
      if (chip_sync) begin
        acc     <= ACC_W'(prod);
        started <= 1'b1;
        if (started) begin
          if (scaled > LIM)       demod_out_value <= demod_t'(DEMOD_MAX);
          else if (scaled < -LIM) demod_out_value <= demod_t'(-DEMOD_MAX);
          else                    demod_out_value <= demod_t'(scaled);
          demod_out_bit <= acc[ACC_W-1];
        end
      end else begin
        acc <= acc + ACC_W'(prod);
      end
    end
  end

  // The word never takes the 4-bit code -8: the range is symmetric.
  a_range: assert property (@(posedge clk) disable iff (rst)
                            demod_valid |-> (demod_out_value != demod_t'(-8)));

endmodule
