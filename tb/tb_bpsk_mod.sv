// tb_bpsk_mod: chips of 64 clocks with random values and several frequency
// words. Each output sample must equal the cosine table at
// (phase + 32 * chip) mod 64 of the previous clock, where phase counts up by
// the frequency word from 0 at every chip start; sample_start must mark the
// first sample of each chip.
module tb_bpsk_mod;
  import cdma_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic    rst, chip_start, chip_signal, sample_start;
  phase_t  inc;
  sample_t out_ss_signal;

  bpsk_mod dut (.clk, .rst, .phase_inc_word(inc), .chip_start, .chip_signal,
                .out_ss_signal, .sample_start);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int exp_sample, phase, n_flip;
  bit exp_start;
  logic prev_chip;
  initial begin
    rst = 1; chip_start = 0; chip_signal = 0; inc = 1; n_flip = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 4; f++) begin
      inc = (f == 0) ? 6'd1 : (f == 1) ? 6'd2 : (f == 2) ? 6'd5 : 6'd8;
      @(negedge clk);   // let the frequency register take the new word
      for (int c = 0; c < 12; c++) begin
        prev_chip = chip_signal;
        chip_signal = 1'($urandom);
        if (c > 0 && prev_chip != chip_signal) n_flip++;
        for (int t = 0; t < 64; t++) begin
          chip_start = (t == 0);
          phase = (t * inc) % 64;
          exp_sample = ref_cos(phase + (chip_signal ? 32 : 0));
          exp_start = (t == 0);
          @(negedge clk);
          check(int'(out_ss_signal) == exp_sample,
                $sformatf("inc %0d chip %0d t %0d: %0d expected %0d", inc, c, t, out_ss_signal, exp_sample));
          check(sample_start == exp_start, "sample_start");
        end
      end
    end
    check(n_flip > 4, "too few 180 degree phase shifts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
