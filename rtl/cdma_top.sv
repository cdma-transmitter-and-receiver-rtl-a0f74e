// cdma_top: one complete DS-CDMA link, transmitter wired straight to
// receiver on a single master clock.
//
// The transmitter spreads user_data with the Gold code of tx_user_key and
// BPSK-modulates it; the receiver demodulates the samples, correlates them
// with the Gold code of rx_user_key and declares a bit wherever the
// correlation magnitude reaches the threshold. With equal keys every sent bit
// comes back on rx_out_bit; with keys of different Gold codes the correlation
// stays below threshold and nothing is detected, which is how users sharing
// the band are kept apart.
//
// The receiver takes its chip and carrier timing from the transmitter's
// chip_sync (both sit on one device); bit timing it finds from the
// correlation peak. A bit taken at data_req appears on rx_out_bit with a
// rx_bit_valid pulse CHIPS_PER_BIT * CLKS_PER_CHIP + 4 clocks later.
// Both keys are loaded while rst is high; keep rst high for one clock or more.
module cdma_top
  import cdma_pkg::*;
#(
  parameter int unsigned CLKS_PER_CHIP = 64,
  parameter int unsigned CHIPS_PER_BIT = GOLD_LEN,
  parameter int unsigned DEMOD_SHIFT   = 9,
  parameter int          THRESHOLD     = 448,
  parameter int unsigned CORR_W        = corr_width(CHIPS_PER_BIT)
) (
  input  logic    clk,
  input  logic    rst,
  input  key_t    tx_user_key,
  input  key_t    rx_user_key,
  input  phase_t  phase_inc_word,
  input  logic    user_data,
  output logic    data_req,
  output sample_t out_ss_signal,
  output logic    pn_seq,
  output logic    chip_signal,
  output logic    buf_data,
  output demod_t  demod_out_value,
  output logic    demod_out_bit,
  output logic    demod_valid,
  output logic signed [CORR_W-1:0] corr,
  output logic    code_ready,
  output logic    rx_out_bit,
  output logic    rx_bit_valid
);

  logic chip_sync;

  cdma_tx #(.CLKS_PER_CHIP(CLKS_PER_CHIP), .CHIPS_PER_BIT(CHIPS_PER_BIT)) u_tx (
    .clk, .rst, .user_key(tx_user_key), .phase_inc_word, .user_data, .data_req,
    .out_ss_signal, .chip_sync, .pn_seq, .buf_data, .chip_signal
  );

  cdma_rx #(
    .CLKS_PER_CHIP(CLKS_PER_CHIP), .CHIPS_PER_BIT(CHIPS_PER_BIT),
    .DEMOD_SHIFT(DEMOD_SHIFT), .THRESHOLD(THRESHOLD), .CORR_W(CORR_W)
  ) u_rx (
    .clk, .rst, .user_key(rx_user_key), .phase_inc_word, .rx_in(out_ss_signal),
    .chip_sync, .demod_out_value, .demod_out_bit, .demod_valid, .corr,
    .code_ready, .rx_out_bit, .rx_bit_valid
  );

endmodule
