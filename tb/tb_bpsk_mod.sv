// tb_bpsk_mod: sends random bits; every bit must occupy exactly 16 sample
// cycles whose values equal round(127 sin(2 pi (k + 0.5) / 16)) for a 1 and the
// negative for a 0 (computed here with $sin), and a 1 must start its period
// positive and a 0 negative.  The baseband symbols handed to the channel must
// be the bits taken, in order, each one appearing in the cycle its period's
// last sample does.  With bb_ready held low the modulator must finish at most
// the running period, then pause (no samples, no bits taken) with its symbol
// waiting, and after bb_ready returns lose no symbol.  The free-running rate
// must be one bit per 16 cycles.
module tb_bpsk_mod;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_bit, in_ready, bb_ready, bb_valid, bb_sym, sample_valid;
  logic signed [7:0] sample;
  int checks = 0, failures = 0;

  bpsk_mod dut (.*);

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

  int carrier [16];
  bit sent [$];     // bits whose carrier period has not started
  bit periods [$];  // bits whose period has ended, symbol not yet handed over
  int k = 0;
  bit cur, bbv_d;
  longint ncyc = 0, nbits = 0, nsym = 0;

  initial for (int i = 0; i < 16; i++) carrier[i] = $rtoi($floor(127.0 * $sin(2.0 * 3.14159265358979 * (i + 0.5) / 16.0) + 0.5));

  always @(posedge clk) if (rst_n) begin
    // a new symbol appears exactly when a period's 16th sample does
    if (bb_valid && !bbv_d)
      check(sample_valid && k == 15, "symbol appears with the last sample of its period");
    if (sample_valid) begin
      if (k == 0) cur = sent.pop_front();
      check(int'(sample) == (cur ? carrier[k] : -carrier[k]), $sformatf("sample %0d of bit %0b: %0d", k, cur, sample));
      if (k == 0) check(cur ? sample > 0 : sample < 0, "period starts with the symbol's sign");
      if (k == 15) periods.push_back(cur);
      k = (k + 1) % 16;
      ncyc++;
    end
    if (bb_valid && bb_ready) begin
      check(periods.size() > 0 && bb_sym == periods.pop_front(), "symbol equals the bit of the period sent");
      nsym++;
    end
    bbv_d = bb_valid && !bb_ready;   // still waiting into the next cycle
    if (in_valid && in_ready) begin
      sent.push_back(in_bit);
      nbits++;
    end
  end

  initial begin
    in_valid = 0; in_bit = 0; bb_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    in_valid = 1;
    repeat (3200) begin
      @(negedge clk);
      if (in_ready) in_bit = $urandom_range(1, 0);
    end
    check(nbits >= 199, "continuous rate of one bit per 16 cycles");
    // stall by the channel: one more period may finish, then everything waits
    bb_ready = 0;
    repeat (34) @(negedge clk);
    repeat (40) begin
      @(negedge clk);
      check(!in_ready && !sample_valid && bb_valid, "paused with a symbol waiting while bb_ready is low");
    end
    // short bursts of back-pressure while running
    repeat (3000) begin
      @(negedge clk);
      bb_ready = ($urandom_range(3, 0) != 0);
      if (in_ready) in_bit = $urandom_range(1, 0);
    end
    bb_ready = 1;
    in_valid = 0;
    repeat (60) @(negedge clk);
    check(ncyc == nbits * 16, $sformatf("16 samples per bit: %0d samples, %0d bits", ncyc, nbits));
    check(nsym == nbits, $sformatf("every bit handed over as a symbol: %0d of %0d", nsym, nbits));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
