// tb_threshold_det: random correlations around the threshold of 448, with
// and without enable; a bit must be declared exactly when en is high and
// |corr| >= 448, with the sign as value, one clock later; the value must be
// held otherwise.
module tb_threshold_det;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, en, rx_out_bit, rx_bit_valid;
  logic signed [10:0] corr;
  threshold_det dut (.clk, .rst, .en, .corr, .rx_out_bit, .rx_bit_valid);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int v, n_hit;
  bit exp_valid, exp_bit;
  initial begin
    rst = 1; en = 0; corr = 0; exp_bit = 0; n_hit = 0;
    @(negedge clk); rst = 0;
    for (int n = 0; n < 3000; n++) begin
      case ($urandom % 4)
        0: v = 448 + int'($urandom % 3) - 1;
        1: v = -448 + int'($urandom % 3) - 1;
        2: v = int'($urandom % 1779) - 889;
        default: v = ($urandom % 2) ? 889 : -889;
      endcase
      corr = 11'(v);
      en = ($urandom % 4) != 0;
      exp_valid = en && (v >= 448 || v <= -448);
      if (exp_valid) begin exp_bit = (v < 0); n_hit++; end
      @(negedge clk);
      check(rx_bit_valid == exp_valid, $sformatf("valid for %0d en %0b", v, en));
      check(rx_out_bit == exp_bit, $sformatf("bit for %0d", v));
    end
    check(n_hit > 100, "too few detections");
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
