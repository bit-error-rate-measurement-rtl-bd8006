// tb_perm_update: loads a key and applies many updates; after each the set
// must equal a reference model (P <- P o K, P2 <- rotl(P2) ^ KD), P1 and P3
// must remain permutations, and the sequence must actually change.
module tb_perm_update;
  import ber_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load, update;
  key_t key;
  perm_t p1, p3, m1, m3;
  dsel_t p2, m2;
  int checks = 0, failures = 0;

  perm_update dut (.*);

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
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int changed;
    load = 0; update = 0;
    key = '{p1: rand_perm(), p2: 3'b011, p3: rand_perm(), k: rand_perm(), kd: 3'b100};
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (20) begin
      key = '{p1: rand_perm(), p2: dsel_t'($urandom), p3: rand_perm(), k: rand_perm(), kd: dsel_t'($urandom)};
      @(negedge clk); load = 1; @(negedge clk); load = 0;
      check(p1 == key.p1 && p2 == key.p2 && p3 == key.p3, "load");
      m1 = key.p1; m2 = key.p2; m3 = key.p3;
      changed = 0;
      repeat (50) begin
        @(negedge clk); update = ($urandom_range(1, 0) == 1);
        @(negedge clk);
        if (update) begin
          perm_t o1;
          o1 = m1;
          for (int i = 0; i < NB; i++) begin m1[i] = o1[key.k[i]]; end
          o1 = m3;
          for (int i = 0; i < NB; i++) begin m3[i] = o1[key.k[i]]; end
          m2 = {m2[COLS-2:0], m2[COLS-1]} ^ key.kd;
        end
        update = 0;
        if (p1 != key.p1) changed++;
        check(p1 == m1 && p2 == m2 && p3 == m3, "update matches model");
        check(is_perm(p1) && is_perm(p3), "still permutations");
      end
      check(changed > 0, "the set changes over the updates");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
