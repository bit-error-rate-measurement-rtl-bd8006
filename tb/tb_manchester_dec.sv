// tb_manchester_dec: sends random chip pairs, each either complete, with the
// first chip erased or with the second erased (the erased chip carrying a
// random value); the decoded bit must be the original one, and a pair with
// both chips present but equal must raise `viol`.
module tb_manchester_dec;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sync, in_valid, chip, erased, out_valid, out_bit, viol;
  int checks = 0, failures = 0;

  manchester_dec dut (.*);

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

  task automatic send(input bit c, input bit e);
    @(negedge clk);
    in_valid = 1; chip = c; erased = e;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    sync = 0; in_valid = 0; chip = 0; erased = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) begin
      bit b, bad;
      int mode;
      b    = $urandom_range(1, 0);
      mode = $urandom_range(3, 0);   // 0: none erased, 1: first, 2: second, 3: corrupted pair
      bad  = (mode == 3);
      send(mode == 1 ? $urandom_range(1, 0) : b, mode == 1);
      send(mode == 2 ? $urandom_range(1, 0) : (bad ? b : !b), mode == 2);
      check(out_valid, "one bit per pair");
      if (!bad) check(out_bit == b, $sformatf("decoded bit, mode %0d", mode));
      check(viol == bad, "violation flag");
    end
    // sync drops a half pair
    send(1'b1, 1'b0);
    @(negedge clk); sync = 1; @(negedge clk); sync = 0;
    send(1'b0, 1'b0);
    check(!out_valid, "sync restarts the pair");
    send(1'b1, 1'b0);
    check(out_valid && out_bit == 1'b0, "pair after sync");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
