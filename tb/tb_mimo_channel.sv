// tb_mimo_channel: drives random fading and noise streams and random symbols;
// each ST symbol must give r[j+2t] = sum_i +-h[2j+i] + n[j+2t] with the last
// four gains and noise values seen before the fourth symbol (most recent
// as h[0] and n[0]), h passed on,
// st_bits equal to the four bits, and bb_ready low while a result waits.
module tb_mimo_channel;
  import ber_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic bb_valid, bb_sym, bb_ready, fade_valid, noise_valid, out_valid, out_ready;
  logic [HW-1:0] fade;
  logic signed [15:0] noise;
  rmat_t r;
  hmat_t h;
  logic [3:0] st_bits;
  int checks = 0, failures = 0;

  mimo_channel dut (.*);

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

  int hq [4], nq [4];   // most recent at index 0

  initial begin
    bb_valid = 0; bb_sym = 0; fade_valid = 0; noise_valid = 0; out_ready = 0; fade = 0; noise = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2000) begin
      logic [3:0] bits;
      int eh [4], en [4];
      bits = 4'($urandom);
      for (int s = 0; s < 4; s++) begin
        // a few fading/noise updates before each symbol
        repeat ($urandom_range(3, 1)) begin
          @(negedge clk);
          bb_valid = 0;
          fade_valid = 1; fade = HW'($urandom_range(20000, 0));
          noise_valid = 1; noise = 16'($urandom_range(20000, 0) - 10000);
          @(posedge clk);
          for (int i = 3; i > 0; i--) begin hq[i] = hq[i-1]; nq[i] = nq[i-1]; end
          hq[0] = int'(fade); nq[0] = int'(noise);
        end
        @(negedge clk);
        fade_valid = 0; noise_valid = 0;
        bb_valid = 1; bb_sym = bits[s];
        check(bb_ready, "ready for symbols");
      end
      for (int i = 0; i < 4; i++) begin eh[i] = hq[i]; en[i] = nq[i]; end
      @(negedge clk);
      bb_valid = 0;
      check(out_valid, "result after the fourth symbol");
      check(!bb_ready, "busy while the result waits");
      check(st_bits == bits, "st_bits");
      for (int t = 0; t < 2; t++)
        for (int j = 0; j < 2; j++) begin
          int want;
          logic signed [RW-1:0] rv;
          rv = r[j + 2*t];
          want = en[j + 2*t];
          for (int i = 0; i < 2; i++) want += bits[i + 2*t] ? eh[2*j + i] : -eh[2*j + i];
          check(int'(rv) == want, $sformatf("r[%0d] = %0d, expected %0d", j + 2*t, rv, want));
          for (int i = 0; i < 2; i++) check(int'(h[2*j + i]) == eh[2*j + i], "gain passed on");
        end
      repeat ($urandom_range(2, 0)) @(negedge clk);
      out_ready = 1;
      @(negedge clk);
      out_ready = 0;
      check(!out_valid, "result taken");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
