// lfsr: Fibonacci linear feedback shift register (m-sequence generator).
//
// Stages are numbered 1..N as in the usual drawing: stage 1 is state[0] and
// receives the feedback, the output is the last stage, state[N-1]. The
// feedback is the XOR of every stage whose bit is set in TAPS (bit i-1 for
// stage i). On `en` the register shifts one place toward stage N. With a
// primitive tap set the output repeats after 2^N - 1 steps.
//
// `load` copies `seed` into the register in one clock (and has priority over
// `en`). An all-zero state would never leave zero, so a zero seed is loaded
// as 1; this guard is an implementation choice.
//
// Defaults are the first generator of the Gold pair: 7 stages, feedback from
// stages 3 and 7. The 4-stage example with feedback from stages 1 and 4 is
// obtained with N = 4, TAPS = 4'b1001.
module lfsr #(
  parameter int unsigned  N    = 7,
  parameter logic [N-1:0] TAPS = 7'b100_0100
) (
  input  logic         clk,
  input  logic         load,
  input  logic [N-1:0] seed,
  input  logic         en,
  output logic         q,
  output logic [N-1:0] state
);

  logic fb;
  assign fb = ^(state & TAPS);
  assign q  = state[N-1];

  always_ff @(posedge clk) begin
    if (load)
      state <= (seed == '0) ? N'(1) : seed;
    else if (en)
      state <= {state[N-2:0], fb};
  end

endmodule
