// tb_fading_gen: reproduces the two uniform sources with reference LFSR models
// and checks every output against real arithmetic: rayleigh against
// sqrt(-2 ln u1) (tolerance 0.004, the segmented fit plus rounding) and gauss
// against sigma_n sqrt(-2 ln u1) cos(2 pi (a + 0.5)/256), a = top 8 bits of u2
// (tolerance 0.006 sigma).  It also checks the statistics over 20000 samples:
// E[r^2] near 2 for the Rayleigh output, mean near 0 and variance near
// sigma^2 for the Gaussian output, and the 4-edge latency from en.
module tb_fading_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic seed_load, en, out_valid;
  logic [15:0] seed_u1, sigma_n, rayleigh;
  logic [17:0] seed_u2;
  logic signed [15:0] gauss;
  int checks = 0, failures = 0;

  fading_gen dut (.*);

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

  function automatic logic [15:0] step16(logic [15:0] s);
    for (int i = 0; i < 16; i++) s = {s[14:0], s[15] ^ s[14] ^ s[12] ^ s[3]};
    return s;
  endfunction
  function automatic logic [17:0] step18(logic [17:0] s);
    for (int i = 0; i < 16; i++) s = {s[16:0], s[17] ^ s[10]};
    return s;
  endfunction

  localparam real PI = 3.14159265358979;

  initial begin
    logic [15:0] u1;
    logic [17:0] u2;
    real sum_r2, sum_g, sum_g2, sig, maxe_r, maxe_g;
    int n, lat;
    seed_load = 0; en = 0; seed_u1 = 16'hBEEF; seed_u2 = 18'h2ACE1; sigma_n = 16'h1800;  // sigma 1.5
    sig = 1.5;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); seed_load = 1; @(negedge clk); seed_load = 0;
    u1 = seed_u1; u2 = seed_u2;
    // latency
    en = 1; @(negedge clk); en = 0;
    lat = 0;
    while (!out_valid && lat < 20) begin @(negedge clk); lat++; end
    check(lat == 4, $sformatf("output %0d edges after en", lat));
    u1 = step16(u1); u2 = step18(u2);
    repeat (3) @(negedge clk);
    // stream
    n = 0; sum_r2 = 0; sum_g = 0; sum_g2 = 0; maxe_r = 0; maxe_g = 0;
    en = 1;
    fork
      repeat (20010) @(negedge clk);
      forever begin
        @(negedge clk);
        if (out_valid && n < 20000) begin
          real ur, er, eg, rr, gg;
          ur = real'(u1) / 65536.0;
          rr = $sqrt(-2.0 * $ln(ur));
          gg = sig * rr * $cos(2.0 * PI * (real'(u2[17:10]) + 0.5) / 256.0);
          er = real'(rayleigh) / 4096.0 - rr;
          eg = real'(gauss) / 4096.0 - gg;
          if (er < 0) er = -er;
          if (eg < 0) eg = -eg;
          if (er > maxe_r) maxe_r = er;
          if (eg > maxe_g) maxe_g = eg;
          check(er < 0.004, $sformatf("rayleigh u1=%0d: %f vs %f", u1, real'(rayleigh) / 4096.0, rr));
          check(eg < 0.006 * sig || (gg > 7.99 || gg < -7.99), $sformatf("gauss u1=%0d: %f vs %f", u1, real'(gauss) / 4096.0, gg));
          sum_r2 += (real'(rayleigh) / 4096.0) ** 2;
          sum_g  += real'(gauss) / 4096.0;
          sum_g2 += (real'(gauss) / 4096.0) ** 2;
          u1 = step16(u1); u2 = step18(u2);
          n++;
        end
      end
    join_any
    $display("max errors: rayleigh %f gauss %f; E[r^2]=%f mean_g=%f var_g=%f", maxe_r, maxe_g,
             sum_r2 / n, sum_g / n, sum_g2 / n - (sum_g / n) ** 2);
    check(n == 20000, "one sample per cycle");
    check(sum_r2 / n > 1.9 && sum_r2 / n < 2.1, "Rayleigh second moment 2");
    check(sum_g / n > -0.06 && sum_g / n < 0.06, "Gaussian mean 0");
    check((sum_g2 / n) / (sig * sig) > 0.93 && (sum_g2 / n) / (sig * sig) < 1.07, "Gaussian variance sigma^2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
