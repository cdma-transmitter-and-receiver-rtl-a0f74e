// tb_s2p: random words shifted in at random times; the 127 parallel taps
// must match a queue model (newest first), and reset must clear them.
module tb_s2p;
  import cdma_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, shift;
  demod_t din;
  demod_t taps [127];
  s2p dut (.clk, .rst, .shift, .din, .taps);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int model [127];
  bit ok;
  initial begin
    rst = 1; shift = 0; din = 0;
    @(negedge clk); rst = 0;
    foreach (model[i]) model[i] = 0;
    for (int n = 0; n < 600; n++) begin
      shift = ($urandom % 3) != 0;
      din = demod_t'(int'($urandom % 15) - 7);
      @(negedge clk);
      if (shift) begin
        for (int i = 126; i > 0; i--) model[i] = model[i-1];
        model[0] = int'(din);
      end
      ok = 1;
      foreach (model[i]) if (int'(taps[i]) != model[i]) ok = 0;
      check(ok, $sformatf("taps differ at step %0d", n));
    end
    rst = 1; @(negedge clk); rst = 0;
    ok = 1;
    foreach (taps[i]) if (taps[i] != 0) ok = 0;
    check(ok, "reset");
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
