// cdma_tx: direct-sequence spread-spectrum transmitter.
//
// Chain: data bit -> NRZ/spreading with a 127-chip Gold code -> BPSK on a DDS
// carrier. tx_ctrl produces the chip and bit strobes, gold_gen the code
// (loaded with user_key while rst is high, advanced once per chip), spreader
// holds the data bit for one code period and XORs it with the chip, bpsk_mod
// turns the chip into carrier samples.
//
// Interface: user_data is sampled in the cycle data_req is high (once every
// CHIPS_PER_BIT * CLKS_PER_CHIP clocks, first in the cycle after reset).
// out_ss_signal carries one signed 6-bit sample per master clock, one clock
// behind the control strobes; chip_sync is high with the first sample of every
// chip. pn_seq, buf_data and chip_signal are brought out for observation.
module cdma_tx
  import cdma_pkg::*;
#(
  parameter int unsigned CLKS_PER_CHIP = 64,
  parameter int unsigned CHIPS_PER_BIT = GOLD_LEN
) (
  input  logic    clk,
  input  logic    rst,
  input  key_t    user_key,
  input  phase_t  phase_inc_word,
  input  logic    user_data,
  output logic    data_req,
  output sample_t out_ss_signal,
  output logic    chip_sync,
  output logic    pn_seq,
  output logic    buf_data,
  output logic    chip_signal
);

  logic chip_start, chip_end, sos;

  tx_ctrl #(.CLKS_PER_CHIP(CLKS_PER_CHIP), .CHIPS_PER_BIT(CHIPS_PER_BIT)) u_ctrl (
    .clk, .rst, .chip_start, .chip_end, .sos
  );

  gold_gen u_gold (
    .clk, .load(rst), .user_key, .en(chip_end && !rst), .pn_seq
  );

  spreader u_spread (
    .clk, .rst, .sos, .user_data, .pn_seq, .buf_data, .chip_signal
  );

  bpsk_mod u_mod (
    .clk, .rst, .phase_inc_word, .chip_start, .chip_signal,
    .out_ss_signal, .sample_start(chip_sync)
  );

  assign data_req = sos && !rst;

endmodule
