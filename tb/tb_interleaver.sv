// tb_interleaver: full-size frames (16383 bits).  Random bits are written, then read
// back with a random hold.  A reference model of the 14-bit LFSR
// (x^14+x^13+x^12+x^2+1, started at 1 every frame) gives the pseudorandom
// order: the interleaver must output frame bit L_k as its k-th bit, the
// deinterleaver, written in that order, must return the frame in its
// original order.  Also checked: in_ready low while reading, the phase
// changes after exactly 16383 bits, and with hold low the frame is read at
// one bit per cycle.
module tb_interleaver;
  localparam int LEN = 16383;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic bIn, newBit, in_ready, hold, bout, bitReady, reading;
  int checks = 0, failures = 0;

  interleaver dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit frame [LEN + 1];       // frame[j], j = 1..LEN: the j-th bit in natural order
  int lseq  [LEN];           // LFSR address sequence

  initial begin
    logic [13:0] s;
    s = 14'd1;
    for (int k = 0; k < LEN; k++) begin
      lseq[k] = s;
      s = {s[12:0], s[13] ^ s[12] ^ s[11] ^ s[1]};
    end
  end

  initial begin
    bIn = 0; newBit = 0; hold = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      int got, cycles, errs;
      // ---- write
      for (int j = 1; j <= LEN; j++) frame[j] = $urandom_range(1, 0);
      for (int k = 0; k < LEN; k++) begin
        @(negedge clk);
        check(in_ready && !reading, "ready in write phase");
        if (f == 1) while ($urandom_range(4, 0) == 0) begin newBit = 0; @(negedge clk); end
        newBit = 1;
        bIn = frame[k + 1];
      end
      @(negedge clk);
      newBit = 0;
      check(reading && !in_ready, "read phase after LEN bits");
      // ---- read
      got = 0; cycles = 0; errs = 0;
      while (got < LEN) begin
        hold = (f == 2) ? ($urandom_range(2, 0) == 0) : 1'b0;
        @(posedge clk);
        cycles++;
        if (bitReady && !hold) begin
          if (bout != frame[lseq[got]]) errs++;
          got++;
        end
        @(negedge clk);
      end
      hold = 0;
      check(errs == 0, $sformatf("frame %0d: %0d wrong bits", f, errs));
      if (f == 0) check(cycles <= LEN + 2, $sformatf("read rate: %0d cycles for %0d bits", cycles, LEN));
      @(negedge clk);
      check(!reading && in_ready, "back to write phase");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
