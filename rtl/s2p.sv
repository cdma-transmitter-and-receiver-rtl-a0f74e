// s2p: serial-to-parallel converter in front of the matched filter.
//
// A shift register of DEPTH demodulator words. On `shift` the new word enters
// taps[0] and every older word moves one place up; taps[DEPTH-1] is the oldest
// and drops out. All DEPTH words are visible in parallel, one clock after the
// shift that brought the newest in. Reset clears the register to zero, so the
// correlator sees no signal until it has filled. DEPTH defaults to the Gold
// code length of 127.
module s2p
  import cdma_pkg::*;
#(
  parameter int unsigned DEPTH = GOLD_LEN
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   shift,
  input  demod_t din,
  output demod_t taps [DEPTH]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) taps[i] <= '0;
    end else if (shift) begin
      taps[0] <= din;
      for (int i = 1; i < DEPTH; i++) taps[i] <= taps[i-1];
    end
  end

endmodule
