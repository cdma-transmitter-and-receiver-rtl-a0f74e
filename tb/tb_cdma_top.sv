// tb_cdma_top: end-to-end test of the whole link at its default size
// (127 chips per bit, 64 clocks per chip).
//
// Phase 1: matching keys, frequency word 1, random data. Every bit handed to
// the transmitter must come back on rx_out_bit, exactly once, exactly
// CHIPS_PER_BIT * CLKS_PER_CHIP + 4 clocks after it was taken.
// Phase 2: the same with frequency word 3 (a carrier three times faster).
// Phase 3: the receiver uses a different Gold code; no bit may be detected.
// It also counts the mechanisms of the design: data 0 and data 1 received,
// demodulator words limited to +7 and -7, the receiver's code load, the two
// frequency words, and a rejected foreign code; one that never occurs is a
// failure.
module tb_cdma_top;
  import cdma_pkg::*;

  localparam int unsigned CLKS   = 64;
  localparam int unsigned CHIPS  = 127;
  localparam int unsigned BITCLK = CLKS * CHIPS;
  localparam int unsigned LAT    = BITCLK + 4;

  logic    clk = 1'b0;
  logic    rst;
  key_t    tx_key, rx_key;
  phase_t  inc;
  logic    user_data;
  logic    data_req;
  sample_t out_ss_signal;
  logic    pn_seq, chip_signal, buf_data;
  demod_t  demod_out_value;
  logic    demod_out_bit, demod_valid;
  logic signed [10:0] corr;
  logic    code_ready, rx_out_bit, rx_bit_valid;

  cdma_top dut (
    .clk, .rst, .tx_user_key(tx_key), .rx_user_key(rx_key),
    .phase_inc_word(inc), .user_data, .data_req, .out_ss_signal, .pn_seq,
    .chip_signal, .buf_data, .demod_out_value, .demod_out_bit, .demod_valid,
    .corr, .code_ready, .rx_out_bit, .rx_bit_valid
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // scoreboard
  logic   sent_bit [$];
  longint sent_time [$];
  int     detections = 0;
  int     n_rx0 = 0, n_rx1 = 0, n_pos7 = 0, n_neg7 = 0, n_loaded = 0;
  bit     expect_none = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  always @(posedge clk) begin
    if (!rst && data_req) begin
      sent_bit.push_back(user_data);
      sent_time.push_back(cycle);
    end
    if (!rst && demod_valid) begin
      if (demod_out_value == 4'sd7)  n_pos7++;
      if (demod_out_value == -4'sd7) n_neg7++;
    end
    if (!rst && rx_bit_valid) begin
      detections++;
      if (expect_none) begin
        check(1'b0, "bit detected with a foreign code");
      end else if (sent_bit.size() == 0) begin
        check(1'b0, "bit detected that was never sent");
      end else begin
        automatic logic   b = sent_bit.pop_front();
        automatic longint t = sent_time.pop_front();
        check(rx_out_bit == b, $sformatf("rx bit %0b, sent %0b", rx_out_bit, b));
        check(cycle - t == LAT, $sformatf("latency %0d, expected %0d", cycle - t, LAT));
        if (b) n_rx1++; else n_rx0++;
      end
    end
  end

  // New random data whenever the transmitter takes a bit.
  always @(posedge clk) if (data_req || rst) user_data <= 1'($urandom);

  task automatic run_link(input key_t tk, input key_t rk, input phase_t f,
                          input int nbits, input bit none);
    tx_key = tk; rx_key = rk; inc = f; expect_none = none;
    sent_bit.delete(); sent_time.delete();
    rst = 1'b1;
    repeat (3) @(posedge clk);
    rst = #1 1'b0;
    repeat (CHIPS + 2) @(posedge clk);
    check(code_ready, "reference code not loaded");
    if (code_ready) n_loaded++;
    repeat (nbits * BITCLK) @(posedge clk);
    repeat (LAT + 2) @(posedge clk);
    if (!none) begin
      // all bits older than one latency must have been received
      check(sent_bit.size() <= 2, $sformatf("%0d bits not received", sent_bit.size()));
    end
  endtask

  int det_before;

  initial begin
    rst = 1'b1; user_data = 1'b0;
    tx_key = '0; rx_key = '0; inc = 6'd1;
    run_link(14'b11100100111011, 14'b11100100111011, 6'd1, 24, 1'b0);
    $display("phase 1: %0d bits detected", detections);
    det_before = detections;
    run_link(14'b01011001100101, 14'b01011001100101, 6'd3, 8, 1'b0);
    $display("phase 2: %0d bits detected", detections - det_before);
    check(detections - det_before >= 8, "too few bits at frequency word 3");
    det_before = detections;
    run_link(14'b11100100111011, 14'b11100100000001, 6'd1, 6, 1'b1);
    $display("phase 3: %0d bits detected with a foreign code", detections - det_before);
    check(detections == det_before, "foreign code was not rejected");
    // mechanisms
    check(n_rx0 > 0, "no data 0 received");
    check(n_rx1 > 0, "no data 1 received");
    check(n_pos7 > 0, "demodulator never limited to +7");
    check(n_neg7 > 0, "demodulator never limited to -7");
    check(n_loaded == 3, "reference code loads");
    check(det_before >= 30, "too few bits received in total");
    $display("mechanisms: rx0=%0d rx1=%0d dem+7=%0d dem-7=%0d code_loads=%0d foreign_rejected=%0d",
             n_rx0, n_rx1, n_pos7, n_neg7, n_loaded, (detections == det_before));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50 * BITCLK) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
