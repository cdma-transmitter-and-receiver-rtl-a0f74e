// tb_matched_filter: loads a 127-chip reference (a random one, then a Gold
// code) and checks the correlation of random words against the sum computed
// here; then stores exactly one code period, sent as +-7, and checks the
// peak of +-889 and that every misaligned position stays far below it.
module tb_matched_filter;
  import cdma_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic coef_shift, coef_bit;
  demod_t taps [127];
  logic signed [10:0] corr;
  matched_filter dut (.clk, .coef_shift, .coef_bit, .taps, .corr);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit ref_chips [127];
  code_t code;
  int expv, maxside, i;
  // chips are shifted in sending order; the oldest (chip 0) ends in coef[126]
  task automatic load(input bit chips [127]);
    for (int i = 0; i < 127; i++) begin
      coef_shift = 1; coef_bit = chips[i];
      @(negedge clk);
    end
    coef_shift = 0;
  endtask

  initial begin
    coef_shift = 0; coef_bit = 0;
    foreach (taps[i]) taps[i] = 0;
    foreach (ref_chips[i]) ref_chips[i] = 1'($urandom);
    @(negedge clk);
    load(ref_chips);
    for (int n = 0; n < 200; n++) begin
      expv = 0;
      for (int k = 0; k < 127; k++) begin
        taps[k] = demod_t'(int'($urandom % 15) - 7);
        // taps[k] lines up with chip 126-k
        expv += ref_chips[126 - k] ? -int'(taps[k]) : int'(taps[k]);
      end
      #1;
      check(int'(corr) == expv, $sformatf("corr %0d expected %0d", corr, expv));
    end
    code = gold_code(14'b11100100111011);
    load(code);
    // a bit of data d is received as chips (-1)^(d ^ code[i]) * 7
    for (int d = 0; d < 2; d++) begin
      maxside = 0;
      for (int sh = 0; sh < 127; sh++) begin
        // stream: the period starts sh chips late; words before it are 0
        for (int k = 0; k < 127; k++) begin
          i = 126 - k - sh;   // chip index held in taps[k]
          taps[k] = (i < 0) ? 4'sd0 : ((code[i] ^ d[0]) ? -4'sd7 : 4'sd7);
        end
        #1;
        if (sh == 0) check(int'(corr) == (d ? -889 : 889), $sformatf("peak %0d", corr));
        else if ((corr < 0 ? -corr : corr) > maxside) maxside = (corr < 0 ? -corr : corr);
      end
      check(maxside < 448, $sformatf("side lobe %0d reaches the threshold", maxside));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
