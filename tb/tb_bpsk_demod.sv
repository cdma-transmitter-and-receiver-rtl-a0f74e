// tb_bpsk_demod: feeds chips of 64 samples, each a scaled cosine with a
// random 0/180 degree phase and a random amplitude (from 1/31 to full scale),
// at several frequency words. The expected word is computed here: the sum of
// sample * floor(31*cos) over the chip, shifted right by 9, limited to -7..+7.
// Checks value, hard bit, the valid strobe one clock after the closing
// chip_sync, and that both unlimited and limited words occur.
module tb_bpsk_demod;
  import cdma_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, chip_sync, demod_out_bit, demod_valid;
  phase_t inc;
  sample_t rx_in;
  demod_t demod_out_value;

  bpsk_demod dut (.clk, .rst, .phase_inc_word(inc), .rx_in, .chip_sync,
                  .demod_out_value, .demod_out_bit, .demod_valid);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int acc, expv, amp, n_lim, n_mid, n_valid, ph, s;
  bit flip, have_prev;
  initial begin
    rst = 1; chip_sync = 0; rx_in = 0; inc = 1; n_lim = 0; n_mid = 0; n_valid = 0; have_prev = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 3; f++) begin
      inc = (f == 0) ? 6'd1 : (f == 1) ? 6'd4 : 6'd7;
      @(negedge clk);
      check(!demod_valid, "valid without chip_sync");
      for (int c = 0; c < 40; c++) begin
        flip = 1'($urandom);
        amp  = 1 + ($urandom % 6) * (($urandom % 2) ? 1 : 6);
        acc  = 0;
        for (int t = 0; t < 64; t++) begin
          ph = (t * inc) % 64;
          s  = (ref_cos(ph + (flip ? 32 : 0)) * amp) / 31;
          chip_sync = (t == 0);
          rx_in = sample_t'(s);
          acc += s * ref_cos(ph);
          @(negedge clk);
          if (t == 0 && have_prev) begin
            check(demod_valid, "no valid after chip_sync");
            check(int'(demod_out_value) == expv, $sformatf("inc %0d chip %0d: %0d expected %0d", inc, c, demod_out_value, expv));
            check(demod_out_bit == (expv < 0 || (expv == 0 && flip_prev)), "hard bit");
            n_valid++;
          end else if (t != 0) begin
            check(!demod_valid, "valid inside a chip");
          end
        end
        // expected word of this chip, reported at the next chip_sync
        expv = acc >>> 9;
        if (expv > 7) expv = 7;
        if (expv < -7) expv = -7;
        if (expv == 7 || expv == -7) n_lim++; else n_mid++;
        flip_prev = (acc < 0);
        have_prev = 1;
      end
      // close the last chip of this frequency
      chip_sync = 1; rx_in = 0;
      @(negedge clk);
      check(demod_valid && int'(demod_out_value) == expv, "last chip");
      chip_sync = 0; have_prev = 0;
      rst = 1; @(negedge clk); rst = 0;
    end
    check(n_lim > 10 && n_mid > 10, $sformatf("limited %0d, unlimited %0d", n_lim, n_mid));
    check(n_valid > 100, "too few words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  bit flip_prev;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
