// tb_block_perm: checks the block permutation against the 3 x 3 worked example
// (array 5 7 2 / 1 8 0 / 6 4 3 turns D0..D8 into D5 D7 D2 / D1 D8 D0 /
// D6 D4 D3) and against a reference model for random blocks and random
// permutations; the inverse instance must undo the forward one.
module tb_block_perm;
  import ber_pkg::*;

  blk_t  din, fwd, back;
  perm_t perm;
  int checks = 0, failures = 0;

  block_perm #(.INVERSE(1'b0)) dut_f (.din(din), .perm(perm), .dout(fwd));
  block_perm #(.INVERSE(1'b1)) dut_i (.din(fwd), .perm(perm), .dout(back));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic perm_t rand_perm();
    int unsigned a [NB];
    perm_t p;
    for (int i = 0; i < NB; i++) a[i] = i;
    for (int i = NB - 1; i > 0; i--) begin
      int unsigned j = $urandom_range(i, 0);
      int unsigned t = a[i]; a[i] = a[j]; a[j] = t;
    end
    for (int i = 0; i < NB; i++) p[i] = IW'(a[i]);
    return p;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned ex [NB] = '{5, 1, 6, 7, 8, 4, 2, 0, 3};   // the example array, column-major
    int unsigned want [NB] = '{5, 1, 6, 7, 8, 4, 2, 0, 3};
    // worked example: give every D_i a unique pattern through 9 one-hot runs
    for (int i = 0; i < NB; i++) perm[i] = IW'(ex[i]);
    for (int src = 0; src < NB; src++) begin
      din = blk_t'(1) << src;
      #1;
      for (int pos = 0; pos < NB; pos++)
        check(fwd[pos] == (want[pos] == src), $sformatf("example: cell %0d should hold D%0d", pos, want[pos]));
    end
    // random
    repeat (2000) begin
      blk_t expd;
      perm = rand_perm();
      din  = blk_t'($urandom);
      #1;
      for (int i = 0; i < NB; i++) expd[i] = din[perm[i]];
      check(fwd == expd, "forward permutation");
      check(back == din, "inverse undoes forward");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
