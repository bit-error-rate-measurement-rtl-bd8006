// fading_gen: fading variate generator (Box-Muller style), giving every
// enabled cycle one Rayleigh variate and one scaled Gaussian variate.
//
// With u1, u2 independent and uniform on (0,1), r = sqrt(-2 ln u1) is
// Rayleigh distributed (the magnitude of a zero-mean, unit-variance complex
// Gaussian) and g = r cos(2 pi u2) is N(0,1).  r is not computed with
// iterative logarithm and square-root units but by a piecewise-linear
// approximation over a hybrid segmentation of (0,1):
//   * (0, 0.5) is cut logarithmically towards 0: segment p holds
//     u1 in [2^p, 2^(p+1)) / 2^16;
//   * [0.5, 1) is cut logarithmically towards 1: segment p holds
//     1 - u1 in [2^p, 2^(p+1)) / 2^16 (this is where sqrt(-2 ln u) is steep);
//   * every segment is cut uniformly into 4 sub-segments.
// The addressing unit finds the leading one of u1 (or of 1 - u1), which
// gives the segment; the next two bits give the sub-segment and the 12 bits
// after them the offset x in [0,1).  The coefficient memory (128 entries)
// returns slope a and intercept b, both signed Q3.12, and r = b + a*x.
// The coefficients are a least-squares line fit of sqrt(-2 ln u1) over all
// 16-bit u1 of each sub-segment (worst error about 0.002); they are stored in
// fading_coef.hex as {a, b} per line, address {upper half, p[3:0], sub[1:0]}.
// cos(2 pi u2) comes from a 64-entry quarter-wave table (fading_cos.hex,
// round(32767 sin(pi/2 (i+0.5)/64))) addressed by the top 8 bits of u2.
// The Gaussian output is finally scaled by sigma_n.
//
// u1 comes from a 16-bit LFSR (x^16+x^15+x^13+x^4+1), u2 from an 18-bit LFSR
// (x^18+x^11+1); both advance 16 steps per sample so successive samples use
// fresh bits.  The LFSRs never produce 0, so u1 is never 0.
//
// Formats: rayleigh unsigned Q4.12, gauss signed Q3.12 (saturated), sigma_n
// unsigned Q4.12.  Timing: fully pipelined, one sample per cycle; the sample
// taken at a clock edge with `en` high leaves 4 edges later with out_valid.
//
// From the published design: the Box-Muller route to Rayleigh and Gaussian
// variates, the PRNG -> addressing unit -> coefficient memory -> a*u + b
// structure, the sine/cosine function, the sigma_n scaling and the hybrid
// (logarithmic, then uniform) segmentation of (0, 0.5) and (0.5, 1).  Own
// choices: word widths, 4 sub-segments, the fitted coefficients and the
// uniform sources.
module fading_gen (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               seed_load,
  input  logic [15:0]        seed_u1,
  input  logic [17:0]        seed_u2,
  input  logic               en,
  input  logic [15:0]        sigma_n,
  output logic               out_valid,
  output logic [15:0]        rayleigh,
  output logic signed [15:0] gauss
);

  logic [15:0] u1;
  logic [17:0] u2;
  logic [15:0] u1_bits, u2_bits;

  lfsr #(.W(16), .TAPS(16'hD008), .STEPS(16)) u_pn1 (
    .clk, .rst_n, .load(seed_load), .seed(seed_u1), .step(en),
    .state(u1), .bits(u1_bits)
  );
  lfsr #(.W(18), .TAPS(18'h20400), .STEPS(16)) u_pn2 (
    .clk, .rst_n, .load(seed_load), .seed(seed_u2), .step(en),
    .state(u2), .bits(u2_bits)
  );

  logic [31:0] coef_mem [128];
  logic [15:0] cos_mem  [64];
  initial begin
    $readmemh("rtl/fading_coef.hex", coef_mem);
    $readmemh("rtl/fading_cos.hex", cos_mem);
  end

  // ---- addressing unit (combinational on the current u1)
  logic        half;
  logic [15:0] v, m;
  logic [3:0]  p;

  always_comb begin
    half = u1[15];
    v    = half ? 16'(17'h10000 - {1'b0, u1}) : u1;
    p    = '0;
    for (int i = 0; i < 16; i++) if (v[i]) p = 4'(i);
    m    = v << (4'd15 - p);
  end

  // ---- pipeline
  logic [3:0]  vld;
  logic [6:0]  s1_addr;
  logic [11:0] s1_x, s2_x;
  logic [7:0]  s1_ang;
  logic signed [15:0] s2_a, s2_b, s3_f, s4_f;
  logic [15:0] s2_tab;
  logic [1:0]  s2_q;
  logic signed [16:0] s3_cos, s4_g;
  logic signed [28:0] ax;    // a * x, Q.24
  logic signed [32:0] fc;    // r * cos, Q.27

  assign ax = s2_a * $signed({1'b0, s2_x});
  assign fc = s3_f * s3_cos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[2:0], en};
  end

  always_ff @(posedge clk) begin
    // 1: segment address, offset and angle
    s1_addr <= {half, p, m[14:13]};
    s1_x    <= m[12:1];
    s1_ang  <= u2[17:10];
    // 2: coefficient memory and cosine table
    {s2_a, s2_b} <= coef_mem[s1_addr];
    s2_x         <= s1_x;
    s2_tab       <= cos_mem[s1_ang[6] ? s1_ang[5:0] : 6'd63 - s1_ang[5:0]];
    s2_q         <= s1_ang[7:6];
    // 3: r = b + a*x
    s3_f   <= s2_b + 16'(ax >>> 12);
    s3_cos <= (s2_q == 2'd1 || s2_q == 2'd2) ? -$signed({1'b0, s2_tab}) : $signed({1'b0, s2_tab});
    // 4: r cos(2 pi u2)
    s4_f <= (s3_f < 0) ? 16'sd0 : s3_f;
    s4_g <= 17'(fc >>> 15);
  end

  // 5: scale by sigma_n, saturate
  logic signed [33:0] g_scaled;
  assign g_scaled = (s4_g * $signed({1'b0, sigma_n})) >>> 12;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      rayleigh  <= '0;
      gauss     <= '0;
    end else begin
      out_valid <= vld[3];
      rayleigh  <= s4_f;
      if (g_scaled > 34'sd32767)       gauss <= 16'sd32767;
      else if (g_scaled < -34'sd32768) gauss <= -16'sd32768;
      else                             gauss <= 16'(g_scaled);
    end
  end

endmodule
