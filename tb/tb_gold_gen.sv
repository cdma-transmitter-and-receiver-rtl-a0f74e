// tb_gold_gen: checks the Gold generator chip by chip against two m-sequence
// models built from the recurrences of x^7+x^3+1 and x^7+x^3+x^2+x+1, and
// checks the defining property of a Gold code family: periodic cross- and
// off-peak auto-correlations of period-127 codes only take the values
// -1, -17 and +15.
module tb_gold_gen;
  import cdma_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic load, en, pn_seq;
  key_t user_key;
  gold_gen dut (.clk, .load, .user_key, .en, .pn_seq);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // m-sequence from its recurrence: a[k+7] = xor of a[k+7-t] over taps t.
  // The output (stage 7) at step k is a[k]; stage i holds a[k+7-i].
  function automatic void mseq(input logic [6:0] seed, input bit second, output bit a [381]);
    logic [6:0] s;
    s = (seed == 0) ? 7'd1 : seed;
    for (int i = 1; i <= 7; i++) a[7 - i] = s[i-1];
    for (int k = 0; k + 7 < 381; k++) begin
      if (!second) a[k+7] = a[k+4] ^ a[k];                       // stages 3, 7
      else         a[k+7] = a[k+6] ^ a[k+5] ^ a[k+4] ^ a[k];     // stages 1, 2, 3, 7
    end
  endfunction

  bit codes [2][127];

  task automatic run_key(input key_t k, input int idx);
    bit a [381];
    bit b [381];
    mseq(k[13:7], 1'b0, a);
    mseq(k[6:0], 1'b1, b);
    @(negedge clk); load = 1; en = 0; user_key = k;
    @(negedge clk); load = 0; en = 1;
    for (int i = 0; i < 254; i++) begin
      check(pn_seq == (a[i] ^ b[i]), $sformatf("key %h chip %0d", k, i));
      if (i < 127) codes[idx][i] = pn_seq;
      else check(pn_seq == codes[idx][i-127], "period is not 127");
      @(negedge clk);
    end
    en = 0;
  endtask

  function automatic int xcorr(input int x, input int y, input int sh);
    int s = 0;
    for (int i = 0; i < 127; i++)
      s += (codes[x][i] == codes[y][(i + sh) % 127]) ? 1 : -1;
    return s;
  endfunction

  int   c;
  logic held;
  initial begin
    load = 0; en = 0; user_key = '0;
    run_key(14'b11100100111011, 0);
    run_key(14'b11100100000001, 1);
    for (int sh = 0; sh < 127; sh++) begin
      c = xcorr(0, 1, sh);
      check(c == -1 || c == -17 || c == 15, $sformatf("cross-correlation %0d at shift %0d", c, sh));
      if (sh != 0) begin
        c = xcorr(0, 0, sh);
        check(c == -1 || c == -17 || c == 15, $sformatf("auto-correlation %0d at shift %0d", c, sh));
      end
    end
    check(xcorr(0, 0, 0) == 127, "auto-correlation peak");
    // en low holds the chip
    @(negedge clk); load = 1; user_key = 14'h1234;
    @(negedge clk); load = 0; en = 1;
    @(negedge clk); en = 0;
    begin
      held = pn_seq;
      repeat (5) begin @(negedge clk); check(pn_seq == held, "chip changed without en"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
