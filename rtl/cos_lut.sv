// cos_lut: cosine table of the direct digital synthesizer.
//
// 2^PHASE_BITS entries cover one carrier cycle; with the default 6 phase bits
// one step is 5.625 degrees. Entry k holds floor(AMP * cos(2*pi*k/64)) as a
// signed SAMPLE_W-bit number, AMP = 31, so the table spans -31..+31 and, for
// example, gives 31, 21, 0, -22, -31 at 0, 45, 90, 135 and 180 degrees. The
// table is computed at elaboration time from that formula (a tiny offset keeps
// exact zeros of the cosine from rounding down to -1).
//
// The lookup is combinational: `value` follows `phase` in the same cycle.
module cos_lut
  import cdma_pkg::*;
#(
  parameter int unsigned PHASE_BITS_P = PHASE_BITS,
  parameter int          AMP_P        = AMP
) (
  input  logic [PHASE_BITS_P-1:0] phase,
  output sample_t                 value
);

  localparam int unsigned DEPTH = 1 << PHASE_BITS_P;
  typedef sample_t table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    real    pi, x;
    pi = 3.14159265358979323846;
    for (int k = 0; k < DEPTH; k++) begin
      x    = AMP_P * $cos(2.0 * pi * k / DEPTH) + 1.0e-9;
      t[k] = sample_t'($floor(x));
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  assign value = TABLE[phase];

endmodule
