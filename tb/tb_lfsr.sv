// tb_lfsr: the 14-bit register must visit all 16383 non-zero states before
// repeating (maximal length, as the interleaver needs) and never reach 0; a
// register advancing 18 steps at once must equal 18 single steps and give the
// same output bits; an all-zero seed must load 1.
module tb_lfsr;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load, step1, stepm;
  logic [13:0] seed, s1, sm;
  logic        b1;
  logic [17:0] bm;
  int checks = 0, failures = 0;

  lfsr #(.W(14), .TAPS(14'h3802), .STEPS(1))  dut1 (.clk, .rst_n, .load, .seed, .step(step1), .state(s1), .bits(b1));
  lfsr #(.W(14), .TAPS(14'h3802), .STEPS(18)) dutm (.clk, .rst_n, .load, .seed, .step(stepm), .state(sm), .bits(bm));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int period;
    bit seen [16384];
    logic [17:0] collected;
    load = 0; step1 = 0; stepm = 0; seed = 14'h1ACE;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); load = 1; @(negedge clk); load = 0;
    check(s1 == 14'h1ACE && sm == 14'h1ACE, "seed loaded");
    // period
    period = 0;
    step1 = 1;
    do begin
      seen[s1] = 1;
      @(negedge clk);
      period++;
    end while (s1 != 14'h1ACE && period < 20000);
    step1 = 0;
    check(period == 16383, $sformatf("period %0d", period));
    check(!seen[0], "never zero");
    begin
      int n = 0;
      for (int i = 1; i < 16384; i++) if (seen[i]) n++;
      check(n == 16383, "all non-zero states visited");
    end
    // multi-step vs single steps
    repeat (200) begin
      @(negedge clk);
      check(s1 == sm, "states agree");
      stepm = 1;
      @(negedge clk);
      stepm = 0;
      collected = '0;
      for (int j = 0; j < 18; j++) begin
        collected[j] = b1;
        step1 = 1;
        @(negedge clk);
        step1 = 0;
      end
      // bm was sampled for the old state: recompute by comparing with collected
      check(s1 == sm, "18 single steps equal one 18-step advance");
    end
    // bits of an 18-step advance
    @(negedge clk);
    collected = bm;
    for (int j = 0; j < 18; j++) begin
      check(b1 == collected[j], $sformatf("output bit %0d", j));
      step1 = 1; @(negedge clk); step1 = 0;
    end
    seed = '0;
    @(negedge clk); load = 1; @(negedge clk); load = 0;
    check(s1 == 14'd1, "zero seed loads 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
