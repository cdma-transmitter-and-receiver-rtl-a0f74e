// tx_ctrl: clock and control circuit of the transmitter.
//
// Everything runs on the master clock; the slower chip and data rates are
// produced as one-cycle strobes instead of derived clocks. A chip lasts
// CLKS_PER_CHIP master clocks and a data bit CHIPS_PER_BIT chips, so one bit
// is spread over exactly one period of the 127-chip Gold code.
//
//   chip_start  first master clock of every chip (restarts the carrier phase)
//   chip_end    last master clock of every chip (advances the PN generator)
//   sos         start of sequence: first master clock of a data bit, which is
//               also chip 0 of the code period; the data bit is taken here
//
// After reset the first cycle is a chip start and a start of sequence.
// 127 chips per bit is the published code length; 64 clocks per chip (one
// carrier cycle per chip at the smallest frequency word) is this design's
// choice.
module tx_ctrl #(
  parameter int unsigned CLKS_PER_CHIP = 64,
  parameter int unsigned CHIPS_PER_BIT = 127
) (
  input  logic clk,
  input  logic rst,
  output logic chip_start,
  output logic chip_end,
  output logic sos
);

  localparam int unsigned CW = (CLKS_PER_CHIP > 1) ? $clog2(CLKS_PER_CHIP) : 1;
  localparam int unsigned BW = (CHIPS_PER_BIT > 1) ? $clog2(CHIPS_PER_BIT) : 1;

  logic [CW-1:0] clk_cnt;
  logic [BW-1:0] chip_cnt;

  assign chip_start = (clk_cnt == '0);
  assign chip_end   = (clk_cnt == CW'(CLKS_PER_CHIP - 1));
  assign sos        = chip_start && (chip_cnt == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_cnt  <= '0;
      chip_cnt <= '0;
    end else if (chip_end) begin
      clk_cnt  <= '0;
      chip_cnt <= (chip_cnt == BW'(CHIPS_PER_BIT - 1)) ? '0 : chip_cnt + 1'b1;
    end else begin
      clk_cnt  <= clk_cnt + 1'b1;
    end
  end

  // A bit always starts on a chip boundary.
  a_sos_on_chip: assert property (@(posedge clk) disable iff (rst) sos |-> chip_start);

endmodule
