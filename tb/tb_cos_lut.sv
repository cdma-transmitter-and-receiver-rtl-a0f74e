// tb_cos_lut: all 64 entries against floor(31*cos(2*pi*k/64)), and the
// sample values 31, 21, 0, -22, -31 at 0, 45, 90, 135 and 180 degrees.
module tb_cos_lut;
  import cdma_pkg::*;
  phase_t  phase;
  sample_t value;
  cos_lut dut (.phase, .value);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int ref_cos(input int k);
    real x = 31.0 * $cos(2.0 * 3.14159265358979 * k / 64.0);
    // values within 1e-6 of an integer are that integer
    real d = x - $floor(x + 0.5);
    if (d < 1.0e-6 && d > -1.0e-6) return int'($floor(x + 0.5));
    return int'($floor(x));
  endfunction

  initial begin
    for (int k = 0; k < 64; k++) begin
      phase = phase_t'(k); #1;
      check(int'(value) == ref_cos(k), $sformatf("entry %0d: %0d expected %0d", k, value, ref_cos(k)));
    end
    phase = 0;  #1; check(value == 31,  "0 deg");
    phase = 8;  #1; check(value == 21,  "45 deg");
    phase = 16; #1; check(value == 0,   "90 deg");
    phase = 24; #1; check(value == -22, "135 deg");
    phase = 32; #1; check(value == -31, "180 deg");
    phase = 48; #1; check(value == 0,   "270 deg");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
