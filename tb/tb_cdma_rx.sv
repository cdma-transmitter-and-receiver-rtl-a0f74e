// tb_cdma_rx: the receiver alone, fed by a BPSK signal generated here from
// the formulas (16 clocks per chip, frequency word 4, 127 chips per bit).
// The stream starts at a random chip offset, so the receiver must find the
// bit boundaries from the correlation peak. Every complete bit must be
// detected once with the right value; a receiver holding another Gold code
// must detect nothing. A third run sends a weaker signal (amplitude 12 of 31)
// in uniform noise of +-19 per sample: the demodulator then yields soft
// words between -7 and +7, and every bit must still be recovered. Also checks that the reference code is ready 127
// clocks after reset.
module tb_cdma_rx;
  import cdma_pkg::*;
  import tb_ref_pkg::*;
  localparam int CLKS = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, chip_sync, demod_out_bit, demod_valid, code_ready, rx_out_bit, rx_bit_valid;
  key_t key;
  phase_t inc;
  sample_t rx_in;
  demod_t demod_out_value;
  logic signed [10:0] corr;

  cdma_rx #(.CLKS_PER_CHIP(CLKS)) dut (
    .clk, .rst, .user_key(key), .phase_inc_word(inc), .rx_in, .chip_sync,
    .demod_out_value, .demod_out_bit, .demod_valid, .corr, .code_ready,
    .rx_out_bit, .rx_bit_valid
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit sent [$];
  int n_det, n_bad;
  bit foreign;
  always @(posedge clk) if (!rst && rx_bit_valid) begin
    n_det++;
    if (foreign || sent.size() == 0) n_bad++;
    else begin
      automatic bit b = sent.pop_front();
      check(rx_out_bit == b, "received bit");
    end
  end

  // Counts demodulator words strictly between -7 and +7 (only a noisy,
  // weaker signal produces them).
  int n_soft;
  always @(posedge clk) if (!rst && demod_valid && demod_out_value != 7 && demod_out_value != -7) n_soft++;

  // amp: signal amplitude out of 31; noise: uniform noise of +-noise added
  task automatic send(input logic [13:0] txkey, input logic [13:0] rxkey, input int nbits,
                      input int amp = 31, input int noise = 0);
    code_t code;
    int offset;
    bit d;
    code = gold_code(txkey);
    key = rxkey; inc = 6'd4; rx_in = 0; chip_sync = 0;
    rst = 1; repeat (2) @(negedge clk); rst = 0;
    for (int t = 0; t < 126; t++) begin
      @(negedge clk);
      check(!code_ready, "code ready early");
    end
    @(negedge clk);
    check(code_ready, "code not ready after 127 clocks");
    // partial first bit: chips offset..126 of a random bit
    // fewer than 64 chips of a partial bit: below threshold even when clean
    offset = 64 + ($urandom % 63);
    for (int b = -1; b < nbits; b++) begin
      d = 1'($urandom);
      if (b >= 0) sent.push_back(d);
      for (int c = (b < 0) ? offset : 0; c < 127; c++)
        for (int t = 0; t < CLKS; t++) begin
          chip_sync = (t == 0);
          rx_in = sample_t'((ref_cos((t * 4) % 64 + ((d ^ code[c]) ? 32 : 0)) * amp) / 31
                  + ((noise > 0) ? int'($urandom % (2 * noise + 1)) - noise : 0));
          @(negedge clk);
        end
    end
    // one more chip closes the last bit
    for (int t = 0; t < CLKS; t++) begin
      chip_sync = (t == 0); rx_in = 0; @(negedge clk);
    end
    repeat (5) @(negedge clk);
  endtask

  initial begin
    n_det = 0; n_bad = 0; foreign = 0;
    send(14'b11100100111011, 14'b11100100111011, 10);
    check(n_det == 10, $sformatf("%0d bits detected, 10 sent", n_det));
    check(sent.size() == 0, "bits lost");
    check(n_bad == 0, "spurious detections");
    foreign = 1; n_det = 0; sent.delete();
    send(14'b11100100111011, 14'b11100100000001, 4);
    check(n_det == 0, $sformatf("%0d bits detected with a foreign code", n_det));
    // weaker signal (amplitude 12 of 31) in uniform noise of +-19
    foreign = 0; n_det = 0; n_bad = 0; n_soft = 0; sent.delete();
    send(14'b01011001100101, 14'b01011001100101, 8, 12, 19);
    $display("noisy channel: %0d bits, %0d soft demodulator words", n_det, n_soft);
    check(n_det == 8 && n_bad == 0 && sent.size() == 0, $sformatf("noisy channel: %0d of 8 bits", n_det));
    check(n_soft > 100, "noisy channel gave too few soft words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30 * 127 * CLKS) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
