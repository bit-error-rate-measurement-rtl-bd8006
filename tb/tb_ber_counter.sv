// tb_ber_counter: feeds blocks equal to a reference model of the data source
// (14-bit LFSR, 9 output bits per block) with a random number of flipped
// bits; bit_count, err_count and block_count must follow, exp_block must
// match the model, and seed_load must clear the counts and restart.
module tb_ber_counter;
  import ber_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic seed_load, rx_valid;
  seed_t seed;
  blk_t rx_block, exp_block;
  logic [31:0] bit_count, err_count, block_count;
  int checks = 0, failures = 0;

  ber_counter dut (.*);

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

  function automatic blk_t next_block(ref logic [13:0] s);
    blk_t b;
    for (int j = 0; j < NB; j++) begin
      b[j] = s[13];
      s = {s[12:0], s[13] ^ s[12] ^ s[11] ^ s[1]};
    end
    return b;
  endfunction

  initial begin
    logic [13:0] s;
    int nbits, nerr, nblk;
    seed_load = 0; rx_valid = 0; rx_block = '0; seed = 14'h2B3D;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      @(negedge clk); seed_load = 1; @(negedge clk); seed_load = 0;
      check(bit_count == 0 && err_count == 0 && block_count == 0, "cleared by seed_load");
      s = seed; nbits = 0; nerr = 0; nblk = 0;
      repeat (1000) begin
        blk_t b, flip;
        int nf;
        b = next_block(s);
        check(exp_block == b, "reference block");
        nf = $urandom_range(3, 0) == 0 ? $urandom_range(NB, 1) : 0;
        flip = '0;
        for (int i = 0; i < nf; i++) flip[i] = 1'b1;
        rx_block = b ^ flip; rx_valid = 1;
        @(negedge clk);
        rx_valid = 0;
        nbits += NB; nerr += nf; nblk++;
        check(bit_count == nbits && err_count == nerr && block_count == nblk, "counts");
        if ($urandom_range(1, 0)) @(negedge clk);
      end
      seed = seed_t'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
