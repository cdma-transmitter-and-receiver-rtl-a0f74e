// gold_gen: Gold code generator, one chip per enable.
//
// Two 7-stage Fibonacci LFSRs run side by side. The first (g1) feeds stage 1
// with the XOR of stages 3 and 7, the second (g2) with the XOR of stages 1,
// 2, 3 and 7; both are maximal-length with period 127, and the XOR of their
// last stages is a Gold sequence of length 127. The relative starting states
// of g1 and g2 select which code of the family is produced, so the 14-bit
// user key holds both seeds: user_key[13:7] seeds g1, user_key[6:0] g2.
//
// Timing: `load` takes the key in one clock; after that every `en` moves to
// the next chip. pn_seq is the current chip and is valid from the clock after
// the load. The tap positions follow the published generator; the key layout
// and the zero-seed guard inside lfsr are this design's choices.
module gold_gen
  import cdma_pkg::*;
(
  input  logic clk,
  input  logic load,
  input  key_t user_key,
  input  logic en,
  output logic pn_seq
);

  logic q1, q2;

  lfsr #(.N(LFSR_N), .TAPS(7'b100_0100)) u_g1 (
    .clk, .load, .seed(user_key[KEY_W-1:LFSR_N]), .en, .q(q1), .state()
  );

  lfsr #(.N(LFSR_N), .TAPS(7'b100_0111)) u_g2 (
    .clk, .load, .seed(user_key[LFSR_N-1:0]), .en, .q(q2), .state()
  );

  assign pn_seq = q1 ^ q2;

endmodule
