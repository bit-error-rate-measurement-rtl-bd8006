// tb_pn_decoder: feeds the bits of random words, scrambled by a reference
// model of the PN sequence, with random gaps and a random out_ready; the
// decoder must return the original words in order and take no bit while a
// finished word waits.
module tb_pn_decoder;
  import ber_pkg::*;
  localparam int unsigned DW = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic seed_load, in_valid, in_bit, in_ready, out_valid, out_ready;
  seed_t seed;
  logic [DW-1:0] out_data;
  int checks = 0, failures = 0;

  pn_decoder #(.DATA_W(DW)) dut (.*);

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

  logic [DW-1:0] words [$];
  logic [13:0] pn;
  int nwords = 0;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    check(words.size() > 0 && out_data == words.pop_front(), "decoded word");
    nwords++;
  end

  initial begin
    seed_load = 0; in_valid = 0; in_bit = 0; out_ready = 0; seed = 14'h0777;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); seed_load = 1; pn = seed; @(negedge clk); seed_load = 0;
    fork
      forever begin
        @(negedge clk);
        out_ready = ($urandom_range(2, 0) == 0);
      end
      repeat (300) begin
        logic [DW-1:0] w;
        w = DW'($urandom);
        words.push_back(w);
        for (int i = 0; i < DW; i++) begin
          @(negedge clk);
          while ($urandom_range(3, 0) == 0) @(negedge clk);
          in_valid = 1; in_bit = w[i] ^ pn[13];
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          pn = {pn[12:0], pn[13] ^ pn[12] ^ pn[11] ^ pn[1]};
          @(negedge clk);
          in_valid = 0;
        end
      end
    join_any
    repeat (20) @(negedge clk);
    check(nwords == 300, $sformatf("%0d words", nwords));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
