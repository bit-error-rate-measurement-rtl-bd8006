// tb_pn_encoder: sends random 8-bit words with a random out_ready; every
// output bit must be the data bit (LSB first) XOR the PN bit of a reference
// model of the 14-bit LFSR started from the seed, and a word must not be taken
// before the previous one is sent.
module tb_pn_encoder;
  import ber_pkg::*;
  localparam int unsigned DW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic seed_load, in_valid, in_ready, out_valid, out_bit, out_ready;
  seed_t seed;
  logic [DW-1:0] in_data;
  int checks = 0, failures = 0;

  pn_encoder #(.DATA_W(DW)) dut (.*);

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

  logic [13:0] pn;
  bit exp_q [$];

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) for (int i = 0; i < DW; i++) exp_q.push_back(in_data[i]);
    if (out_valid && out_ready) begin
      bit d;
      d = exp_q.pop_front();
      check(out_bit == (d ^ pn[13]), "scrambled bit");
      pn = {pn[12:0], pn[13] ^ pn[12] ^ pn[11] ^ pn[1]};
    end
  end

  initial begin
    seed_load = 0; in_valid = 0; out_ready = 0; in_data = '0; seed = 14'h2C91;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); seed_load = 1; pn = seed; @(negedge clk); seed_load = 0;
    repeat (4000) begin
      @(negedge clk);
      if (in_valid && in_ready) in_valid = 0;
      if (!in_valid && $urandom_range(3, 0) == 0) begin in_valid = 1; in_data = DW'($urandom); end
      out_ready = ($urandom_range(3, 0) != 0);
      check(!(in_ready && out_valid), "no new word while sending");
    end
    in_valid = 0; out_ready = 1;
    repeat (20) @(negedge clk);
    check(exp_q.size() == 0, "all bits sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
