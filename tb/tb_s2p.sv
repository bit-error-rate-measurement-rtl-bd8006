// tb_s2p: sends random bits with gaps; after W bits `full` must rise with the
// word assembled LSB first, extra bits must be ignored, `clear` must empty it.
module tb_s2p;
  localparam int unsigned W = 18;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, in_valid, in_bit, full;
  logic [W-1:0] dout;
  int checks = 0, failures = 0;

  s2p #(.W(W)) dut (.*);

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
    clear = 0; in_valid = 0; in_bit = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (300) begin
      logic [W-1:0] w;
      int sent;
      w = W'($urandom);
      sent = 0;
      while (sent < W) begin
        @(negedge clk);
        check(!full, "not full before W bits");
        in_valid = ($urandom_range(2, 0) != 0);
        in_bit   = w[sent];
        if (in_valid) sent++;
      end
      @(negedge clk);
      in_valid = 1; in_bit = ~w[0];        // extra bit: ignored
      @(negedge clk);
      in_valid = 0;
      check(full, "full after W bits");
      check(dout == w, $sformatf("word %h, got %h", w, dout));
      clear = 1;
      @(negedge clk);
      clear = 0;
      check(!full, "clear empties");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
