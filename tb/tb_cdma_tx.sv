// tb_cdma_tx: the transmitter at 8 clocks per chip and the full 127 chips
// per bit. Checks that a data bit is requested every 127 * 8 clocks, that
// the PN chips are the Gold code of the key from its recurrences, that each
// chip is data XOR PN, and that every output sample is the cosine table at
// phase t*inc + 32*chip, one clock behind the chip, with chip_sync on the
// first sample of every chip.
module tb_cdma_tx;
  import cdma_pkg::*;
  import tb_ref_pkg::*;
  localparam int CLKS = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, user_data, data_req, chip_sync, pn_seq, buf_data, chip_signal;
  key_t key;
  phase_t inc;
  sample_t out_ss_signal;

  cdma_tx #(.CLKS_PER_CHIP(CLKS)) dut (
    .clk, .rst, .user_key(key), .phase_inc_word(inc), .user_data, .data_req,
    .out_ss_signal, .chip_sync, .pn_seq, .buf_data, .chip_signal
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  code_t code;
  bit data_bits [4];
  int n_req;
  initial begin
    key = 14'b11100100111011; inc = 6'd2; user_data = 0; rst = 1; n_req = 0;
    code = gold_code(key);
    repeat (2) @(negedge clk);
    rst = 0;
    for (int b = 0; b < 4; b++) begin
      data_bits[b] = 1'($urandom);
      for (int c = 0; c < 127; c++) begin
        for (int t = 0; t < CLKS; t++) begin
          user_data = (c == 0 && t == 0) ? data_bits[b] : 1'($urandom);
          #1;
          check(data_req == (c == 0 && t == 0), $sformatf("data_req bit %0d chip %0d t %0d", b, c, t));
          if (data_req) n_req++;
          if (t == 0) begin
            check(pn_seq == code[c], $sformatf("pn chip %0d", c));
            check(chip_signal == (data_bits[b] ^ code[c]), $sformatf("chip_signal bit %0d chip %0d", b, c));
          end
          @(negedge clk);
          check(int'(out_ss_signal) == ref_cos((t * 2) % 64 + ((data_bits[b] ^ code[c]) ? 32 : 0)),
                $sformatf("sample bit %0d chip %0d t %0d", b, c, t));
          check(chip_sync == (t == 0), "chip_sync");
        end
      end
    end
    check(n_req == 4, "data requests");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6 * 127 * CLKS) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
