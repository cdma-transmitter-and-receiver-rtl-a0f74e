// cdma_rx: direct-sequence spread-spectrum receiver.
//
// Chain: BPSK demodulator (one soft value -7..+7 per chip) -> serial-to-
// parallel converter (last 127 values) -> matched filter against the user's
// Gold code -> constant-threshold detector. The correlator is evaluated after
// every chip; it crosses the threshold only when the stored chips line up with
// one full code period, so the detector finds the bit boundaries by itself
// and only chip and carrier timing (chip_sync, the first sample of each chip)
// have to be supplied.
//
// Reference code: while rst is high the local gold_gen takes user_key; in the
// CHIPS_PER_BIT clocks after reset it runs at full speed and its chips are
// shifted into the matched filter, after which code_ready rises and detection
// is enabled. The receiver must therefore be reset at least that long before
// the first chip it is to decode arrives; with CLKS_PER_CHIP >= 1 the first
// bit's chips cannot be complete earlier, since detection needs a full period.
//
// Timing: a bit is reported (rx_bit_valid pulse, rx_out_bit) three clocks
// after the chip_sync that closes its last chip.
module cdma_rx
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
  input  key_t    user_key,
  input  phase_t  phase_inc_word,
  input  sample_t rx_in,
  input  logic    chip_sync,
  output demod_t  demod_out_value,
  output logic    demod_out_bit,
  output logic    demod_valid,
  output logic signed [CORR_W-1:0] corr,
  output logic    code_ready,
  output logic    rx_out_bit,
  output logic    rx_bit_valid
);

  localparam int unsigned LW = $clog2(CHIPS_PER_BIT + 1);

  logic [LW-1:0] load_cnt;
  logic          loading;
  logic          pn_seq;
  logic          corr_en;
  demod_t        taps [CHIPS_PER_BIT];

  // Reference code loading after reset.
  assign loading = !rst && !code_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      load_cnt   <= '0;
      code_ready <= 1'b0;
    end else if (loading) begin
      load_cnt   <= load_cnt + 1'b1;
      code_ready <= (load_cnt == LW'(CHIPS_PER_BIT - 1));
    end
  end

  gold_gen u_gold (
    .clk, .load(rst), .user_key, .en(loading), .pn_seq
  );

  bpsk_demod #(.CLKS_PER_CHIP(CLKS_PER_CHIP), .DEMOD_SHIFT(DEMOD_SHIFT)) u_demod (
    .clk, .rst, .phase_inc_word, .rx_in, .chip_sync,
    .demod_out_value, .demod_out_bit, .demod_valid
  );

  s2p #(.DEPTH(CHIPS_PER_BIT)) u_s2p (
    .clk, .rst, .shift(demod_valid), .din(demod_out_value), .taps
  );

  matched_filter #(.LEN(CHIPS_PER_BIT), .CORR_W(CORR_W)) u_mf (
    .clk, .coef_shift(loading), .coef_bit(pn_seq), .taps, .corr
  );

  // Evaluate the correlator once per new chip, after the shift has landed.
  always_ff @(posedge clk) begin
    if (rst) corr_en <= 1'b0;
    else     corr_en <= demod_valid && code_ready;
  end

  threshold_det #(.CORR_W(CORR_W), .THRESHOLD(THRESHOLD)) u_thr (
    .clk, .rst, .en(corr_en), .corr, .rx_out_bit, .rx_bit_valid
  );

  // No bit is declared before the reference code is complete.
  a_ref_first: assert property (@(posedge clk) disable iff (rst) rx_bit_valid |-> code_ready);

endmodule
