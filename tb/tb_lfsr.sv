// tb_lfsr: checks the shift register against a bit-list model of the drawn
// circuit, for the 7-stage generator (stages 3 and 7 fed back) and for the
// 4-stage example (stages 1 and 4 fed back). Both must repeat after exactly
// 2^N - 1 steps with 2^(N-1) ones per period; a zero seed must load as 1;
// `load` must win over `en`.
module tb_lfsr;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       load7, en7, q7;
  logic [6:0] seed7, st7;
  logic       load4, en4, q4;
  logic [3:0] seed4, st4;

  lfsr dut7 (.clk, .load(load7), .seed(seed7), .en(en7), .q(q7), .state(st7));
  lfsr #(.N(4), .TAPS(4'b1001)) dut4 (.clk, .load(load4), .seed(seed4), .en(en4), .q(q4), .state(st4));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // model: stage[1..N] as an int array
  task automatic run7(input logic [6:0] seed);
    int st [1:7];
    int ones = 0, period = 0, fb;
    for (int i = 1; i <= 7; i++) st[i] = (seed == 0) ? (i == 1) : seed[i-1];
    @(negedge clk); load7 = 1; seed7 = seed; en7 = 0;
    @(negedge clk); load7 = 0; en7 = 1;
    for (int k = 0; k < 127; k++) begin
      check(q7 == st[7][0], $sformatf("N=7 seed %0h step %0d output", seed, k));
      ones += st[7];
      fb = st[3] ^ st[7];
      for (int i = 7; i > 1; i--) st[i] = st[i-1];
      st[1] = fb;
      @(negedge clk);
      period++;
      if (period < 127) check(st7 != ((seed == 0) ? 7'd1 : seed), "N=7 period shorter than 127");
    end
    check(st7 == ((seed == 0) ? 7'd1 : seed), "N=7 period not 127");
    check(ones == 64, $sformatf("N=7 ones per period %0d", ones));
    en7 = 0;
  endtask

  task automatic run4(input logic [3:0] seed);
    int st [1:4];
    int ones = 0, fb;
    for (int i = 1; i <= 4; i++) st[i] = seed[i-1];
    @(negedge clk); load4 = 1; seed4 = seed; en4 = 0;
    @(negedge clk); load4 = 0; en4 = 1;
    for (int k = 0; k < 15; k++) begin
      check(q4 == st[4][0], $sformatf("N=4 step %0d output", k));
      ones += st[4];
      fb = st[1] ^ st[4];
      for (int i = 4; i > 1; i--) st[i] = st[i-1];
      st[1] = fb;
      @(negedge clk);
      if (k < 14) check(st4 != seed, "N=4 period shorter than 15");
    end
    check(st4 == seed, "N=4 period not 15");
    check(ones == 8, "N=4 ones per period");
    en4 = 0;
  endtask

  initial begin
    load7 = 0; en7 = 0; seed7 = 0; load4 = 0; en4 = 0; seed4 = 0;
    run7(7'b1110010);
    run7(7'b0011011);
    run7(7'b0000000);
    run4(4'b1000);
    run4(4'b0110);
    // load has priority over en; en low holds the state
    @(negedge clk); load7 = 1; en7 = 1; seed7 = 7'h55;
    @(negedge clk); load7 = 0; en7 = 0;
    check(st7 == 7'h55, "load did not win over en");
    @(negedge clk);
    check(st7 == 7'h55, "state moved without en");
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
