// tb_tx_ctrl: checks the strobe spacing of the transmitter control at a
// reduced size (5 clocks per chip, 7 chips per bit) and at the default size:
// chip_start every CLKS_PER_CHIP clocks, chip_end in the clock before it,
// sos every CLKS_PER_CHIP * CHIPS_PER_BIT clocks, all starting right after
// reset.
module tb_tx_ctrl;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;
  logic cs_a, ce_a, sos_a, cs_b, ce_b, sos_b;

  tx_ctrl #(.CLKS_PER_CHIP(5), .CHIPS_PER_BIT(7)) dut_a (.clk, .rst, .chip_start(cs_a), .chip_end(ce_a), .sos(sos_a));
  tx_ctrl dut_b (.clk, .rst, .chip_start(cs_b), .chip_end(ce_b), .sos(sos_b));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 3 * 64 * 127; t++) begin
      if (t < 5 * 7 * 4) begin
        check(cs_a  == (t % 5 == 0), $sformatf("a chip_start t=%0d", t));
        check(ce_a  == (t % 5 == 4), $sformatf("a chip_end t=%0d", t));
        check(sos_a == (t % 35 == 0), $sformatf("a sos t=%0d", t));
      end
      if (cs_b != (t % 64 == 0))          check(0, $sformatf("b chip_start t=%0d", t));
      if (ce_b != (t % 64 == 63))         check(0, $sformatf("b chip_end t=%0d", t));
      if (sos_b != (t % (64 * 127) == 0)) check(0, $sformatf("b sos t=%0d", t));
      if (sos_b) check(1, "");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
