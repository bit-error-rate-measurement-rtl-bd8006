// tb_p2s: loads random words and drains them with a random ready; the bits
// must come out LSB first, exactly W of them, and out_valid must then drop.
module tb_p2s;
  localparam int unsigned W = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load, out_valid, out_ready, out_bit;
  logic [W-1:0] din;
  int checks = 0, failures = 0;

  p2s #(.W(W)) dut (.*);

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

  initial begin
    load = 0; out_ready = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(!out_valid, "empty after reset");
    repeat (300) begin
      logic [W-1:0] w;
      int got;
      w = W'($urandom);
      din <= w; load <= 1;
      @(posedge clk);
      load <= 0;
      got = 0;
      while (got < W) begin
        out_ready <= ($urandom_range(3, 0) != 0);
        @(posedge clk);
        if (out_valid && out_ready) begin
          check(out_bit == w[got], $sformatf("bit %0d of %h", got, w));
          got++;
        end
      end
      out_ready <= 0;
      @(negedge clk);
      check(!out_valid, "valid drops after W bits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
