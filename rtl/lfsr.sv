// lfsr: Fibonacci linear feedback shift register, the pseudorandom source of
// the whole system (PRNG of the cipher, PN sequence of the link encoder,
// read/write address of the interleavers, data source, uniform numbers of the
// fading generator).
//
// The new bit is the XOR of the state bits selected by TAPS and enters at bit 0;
// the output bit of a step is the MSB.  One `step` advances the register STEPS
// times at once, and `bits` gives the STEPS output bits of that advance
// (bits[0] first).  `load` (priority over `step`) copies `seed` into the
// register; an all-zero seed, which would lock the register, loads 1 instead.
// Reset loads 1.  The register widths and taps are parameters; the 14-bit
// default with taps 14,13,12,2 gives the maximal period 2^14-1 = 16383 that
// the interleaver length needs.
//
// From the published design: an LFSR as PRNG / PN source and the 14-bit width
// of the interleaver's address generator.  Own choices: polynomial, the
// multi-step advance and the zero-seed guard.
module lfsr #(
  parameter int unsigned       W     = 14,
  parameter logic [W-1:0]      TAPS  = 14'h3802,
  parameter int unsigned       STEPS = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [W-1:0]     seed,
  input  logic             step,
  output logic [W-1:0]     state,
  output logic [STEPS-1:0] bits
);

  logic [W-1:0] nxt;

  always_comb begin
    logic [W-1:0] s;
    s = state;
    for (int j = 0; j < STEPS; j++) begin
      bits[j] = s[W-1];
      s = {s[W-2:0], ^(s & TAPS)};
    end
    nxt = s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      state <= W'(1);
    else if (load)   state <= (seed == '0) ? W'(1) : seed;
    else if (step)   state <= nxt;
  end

endmodule
