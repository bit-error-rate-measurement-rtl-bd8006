// tb_ml_detector: random gains and received samples, noiseless and noisy,
// offered back to back and with gaps, with a random out_ready.  Every decision
// is checked against an exhaustive search over the 16 candidates done here:
// the reported cost must equal the least cost and the reported symbol must
// have that cost; with no noise the transmitted symbol itself must come back.
// Also checked: with out_ready high and symbols always offered, one symbol
// is taken every 16 cycles (rate Fclk/16), and the decision of a lone symbol
// appears 21 cycles after it was taken.
module tb_ml_detector;
  import ber_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  rmat_t r;
  hmat_t h;
  logic [3:0] out_bits;
  logic [CW-1:0] out_cost;
  int checks = 0, failures = 0;

  ml_detector dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { rmat_t r; hmat_t h; logic [3:0] s; bit noisy; } job_t;
  job_t jobs [$];

  function automatic longint cost_of(rmat_t rr, hmat_t hh, logic [3:0] c);
    longint sum = 0;
    for (int t = 0; t < 2; t++)
      for (int j = 0; j < 2; j++) begin
        longint e;
        logic signed [RW-1:0] rv;
        rv = rr[j + 2*t];
        e = longint'(rv);
        for (int i = 0; i < 2; i++) e -= c[i + 2*t] ? longint'(hh[2*j + i]) : -longint'(hh[2*j + i]);
        sum += e * e;
      end
    return sum;
  endfunction

  function automatic job_t make_job(bit noisy);
    job_t jb;
    jb.s = 4'($urandom);
    jb.noisy = noisy;
    for (int k = 0; k < 4; k++) jb.h[k] = HW'($urandom_range(19000, 0));
    for (int t = 0; t < 2; t++)
      for (int j = 0; j < 2; j++) begin
        int acc;
        acc = noisy ? $urandom_range(16000, 0) - 8000 : 0;
        for (int i = 0; i < 2; i++) acc += jb.s[i + 2*t] ? int'(jb.h[2*j + i]) : -int'(jb.h[2*j + i]);
        jb.r[j + 2*t] = RW'(acc);
      end
    return jb;
  endfunction

  // scoreboard
  int ndec = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    job_t jb;
    longint best;
    jb = jobs.pop_front();
    best = cost_of(jb.r, jb.h, 4'd0);
    for (int c = 1; c < 16; c++) if (cost_of(jb.r, jb.h, 4'(c)) < best) best = cost_of(jb.r, jb.h, 4'(c));
    check(longint'(out_cost) == best, $sformatf("least cost %0d, got %0d", best, out_cost));
    check(cost_of(jb.r, jb.h, out_bits) == best, "decision has the least cost");
    if (!jb.noisy) check(out_bits == jb.s || best == 0 && cost_of(jb.r, jb.h, jb.s) == 0, "noiseless: transmitted symbol");
    ndec++;
  end

  task automatic offer(input job_t jb);
    @(negedge clk);
    in_valid = 1; r = jb.r; h = jb.h;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    jobs.push_back(jb);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    longint t_first, t_last, t0;
    int lat;
    in_valid = 0; out_ready = 0; r = '0; h = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency of a lone symbol
    out_ready = 1;
    offer(make_job(0));
    lat = 1;
    while (!out_valid) begin @(negedge clk); lat++; end
    check(lat == 21, $sformatf("latency %0d cycles", lat));
    @(negedge clk);
    // rate: 40 symbols back to back
    fork
      forever @(negedge clk) if (in_valid && in_ready) t_last = $time;
    join_none
    t_first = -1;
    for (int n = 0; n < 40; n++) begin
      job_t jb;
      jb = make_job(n % 2);
      @(negedge clk);
      in_valid = 1; r = jb.r; h = jb.h;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      if (t_first < 0) t_first = $time;
      t0 = $time;
      jobs.push_back(jb);
    end
    @(negedge clk); in_valid = 0;
    check((t0 - t_first) / 10 == 39 * 16, $sformatf("39 intervals took %0d cycles", (t0 - t_first) / 10));
    // random gaps and random out_ready
    fork
      forever begin @(negedge clk); out_ready = ($urandom_range(2, 0) != 0); end
    join_none
    for (int n = 0; n < 1500; n++) begin
      if ($urandom_range(3, 0) == 0) repeat ($urandom_range(30, 1)) @(negedge clk);
      offer(make_job($urandom_range(1, 0)));
    end
    repeat (200) @(negedge clk);
    check(ndec == 1541, $sformatf("%0d decisions", ndec));
    check(jobs.size() == 0, "every symbol decided");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
