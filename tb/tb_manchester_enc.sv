// tb_manchester_enc: offers random bits (with random gaps); every accepted bit
// b must leave as the chip pair b, ~b on consecutive cycles, bits must be
// accepted at most every second cycle, and with in_valid held high the chip
// stream must be gap-free (one bit per two cycles).
module tb_manchester_enc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_bit, in_ready, chip_valid, chip;
  int checks = 0, failures = 0;
  bit exp_q [$];

  manchester_enc dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      exp_q.push_back(in_bit);
      exp_q.push_back(!in_bit);
    end
    if (chip_valid) begin
      if (exp_q.size() == 0) check(0, "chip without a bit");
      else check(chip == exp_q.pop_front(), "chip value");
    end
  end

  initial begin
    int busy;
    in_valid = 0; in_bit = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // random gaps
    repeat (2000) begin
      @(negedge clk);
      in_valid = ($urandom_range(1, 0) == 1);
      in_bit   = $urandom_range(1, 0);
    end
    // continuous stream: count chip cycles in a 200-cycle window
    @(negedge clk); in_valid = 1;
    repeat (10) @(negedge clk);
    busy = 0;
    repeat (200) begin
      @(negedge clk);
      in_bit = $urandom_range(1, 0);
      if (chip_valid) busy++;
    end
    check(busy == 200, $sformatf("continuous chips: %0d of 200 cycles", busy));
    in_valid = 0;
    repeat (4) @(negedge clk);
    check(exp_q.size() == 0, "all chips delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
