// tb_spreader: random sos, data and PN chips against a model: the data bit
// is taken at sos and held, and every chip is data XOR PN, including the
// chip in the sos cycle itself.
module tb_spreader;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, sos, user_data, pn_seq, buf_data, chip_signal;
  spreader dut (.clk, .rst, .sos, .user_data, .pn_seq, .buf_data, .chip_signal);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic held;
  initial begin
    rst = 1; sos = 0; user_data = 0; pn_seq = 0;
    @(negedge clk); rst = 0; held = 0;
    check(buf_data == 0, "reset value");
    for (int i = 0; i < 2000; i++) begin
      sos = ($urandom % 8) == 0;
      user_data = 1'($urandom);
      pn_seq = 1'($urandom);
      #1;
      check(chip_signal == ((sos ? user_data : held) ^ pn_seq), $sformatf("chip_signal step %0d", i));
      if (sos) held = user_data;
      @(negedge clk);
      check(buf_data == held, $sformatf("buf_data step %0d", i));
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
