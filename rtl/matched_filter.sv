// matched_filter: correlator of the received chip values with the user's
// PN code.
//
// The reference register holds LEN chips of the code. It is filled by
// shifting coef_bit in at coef_shift, one chip per shift, in the order the
// chips are transmitted; after LEN shifts the first chip sits in
// coef[LEN-1], the same place the serial-to-parallel converter holds the
// oldest of the last LEN received words. Each word is multiplied by +1
// (chip 0) or -1 (chip 1) and the LEN products are added. When the stored
// words are exactly one code period of one data bit, |corr| peaks at
// LEN * 7 = 889, positive for data 0 and negative for data 1; elsewhere it
// stays near the low Gold code side lobes.
//
// corr is combinational in taps and coef. The weights of +1/-1 are
// published; loading the reference through a shift register is this
// design's choice.
module matched_filter
  import cdma_pkg::*;
#(
  parameter int unsigned LEN    = GOLD_LEN,
  parameter int unsigned CORR_W = corr_width(LEN)
) (
  input  logic                     clk,
  input  logic                     coef_shift,
  input  logic                     coef_bit,
  input  demod_t                   taps [LEN],
  output logic signed [CORR_W-1:0] corr
);

  logic [LEN-1:0] coef;

  always_ff @(posedge clk) begin
    if (coef_shift) coef <= {coef[LEN-2:0], coef_bit};
  end

  always_comb begin
    corr = '0;
    for (int k = 0; k < LEN; k++) begin
      if (coef[k]) corr = corr - CORR_W'(taps[k]);
      else         corr = corr + CORR_W'(taps[k]);
    end
  end

endmodule
