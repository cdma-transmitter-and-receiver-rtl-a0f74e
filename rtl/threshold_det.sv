// threshold_det: constant-threshold decision device after the matched filter.
//
// In a cycle where `en` is high the correlator output is compared with the
// fixed THRESHOLD. If |corr| >= THRESHOLD a data bit is declared: rx_out_bit
// takes the sign of corr (1 for negative) and rx_bit_valid pulses for one
// clock, one clock after `en`. rx_out_bit holds its value between detections.
// The peak of a clean bit is 127 * 7 = 889; the default threshold of 448,
// about half of it, is this design's choice (a constant threshold is
// published, its value is not).
module threshold_det #(
  parameter int unsigned CORR_W    = 11,
  parameter int          THRESHOLD = 448
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic signed [CORR_W-1:0] corr,
  output logic                     rx_out_bit,
  output logic                     rx_bit_valid
);

  logic signed [CORR_W:0] mag;
  assign mag = corr[CORR_W-1] ? -(CORR_W+1)'(corr) : (CORR_W+1)'(corr);

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_out_bit   <= 1'b0;
      rx_bit_valid <= 1'b0;
    end else begin
      rx_bit_valid <= 1'b0;
      if (en && (mag >= (CORR_W+1)'(THRESHOLD))) begin
        rx_out_bit   <= corr[CORR_W-1];
        rx_bit_valid <= 1'b1;
      end
    end
  end

endmodule
