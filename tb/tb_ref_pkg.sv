// tb_ref_pkg: reference models shared by the testbenches, written from the
// formulas rather than from the RTL.
//   ref_cos(k)      floor(31*cos(2*pi*k/64)) with exact zeros kept at 0
//   gold_code(key)  one period (127 chips) of the Gold code of a 14-bit key,
//                   from the recurrences of x^7+x^3+1 (seed key[13:7]) and
//                   x^7+x^3+x^2+x+1 (seed key[6:0]); chip i is the i-th chip
//                   sent after the key is loaded
package tb_ref_pkg;

  function automatic int ref_cos(input int k);
    real x = 31.0 * $cos(2.0 * 3.14159265358979 * (k % 64) / 64.0);
    real d = x - $floor(x + 0.5);
    if (d < 1.0e-6 && d > -1.0e-6) return int'($floor(x + 0.5));
    return int'($floor(x));
  endfunction

  typedef bit code_t [127];

  function automatic code_t gold_code(input logic [13:0] key);
    bit a [134];
    bit b [134];
    code_t c;
    logic [6:0] s1, s2;
    s1 = (key[13:7] == 0) ? 7'd1 : key[13:7];
    s2 = (key[6:0] == 0)  ? 7'd1 : key[6:0];
    for (int i = 1; i <= 7; i++) begin
      a[7 - i] = s1[i-1];
      b[7 - i] = s2[i-1];
    end
    for (int k = 0; k + 7 < 134; k++) begin
      a[k+7] = a[k+4] ^ a[k];
      b[k+7] = b[k+6] ^ b[k+5] ^ b[k+4] ^ b[k];
    end
    for (int i = 0; i < 127; i++) c[i] = a[i] ^ b[i];
    return c;
  endfunction

endpackage
