// ber_counter: bit error rate measurement.
//
// Regenerates the transmitted data with its own copy of the data source (the
// 14-bit LFSR, NB output bits per block, same seed) and compares every
// received block with it: bit_count grows by NB per block, err_count by the
// number of differing bits.  BER = err_count / bit_count.  Counters saturate
// at 2^32 - 1.  `seed_load` restarts the reference and clears the counts.
//
// From the published design: BER as wrong bits over received bits.  Own
// choices: the regenerated reference and 32-bit counters.
module ber_counter
  import ber_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        seed_load,
  input  seed_t       seed,
  input  logic        rx_valid,
  input  blk_t        rx_block,
  output blk_t        exp_block,
  output logic [31:0] bit_count,
  output logic [31:0] err_count,
  output logic [31:0] block_count
);

  seed_t ref_state;
  logic [$clog2(NB+1)-1:0] nerr;

  lfsr #(.W(LFSR_W), .TAPS(LFSR_TAPS), .STEPS(NB)) u_ref (
    .clk, .rst_n, .load(seed_load), .seed, .step(rx_valid),
    .state(ref_state), .bits(exp_block)
  );

  always_comb begin
    nerr = '0;
    for (int i = 0; i < NB; i++) nerr = nerr + ($clog2(NB+1))'(rx_block[i] ^ exp_block[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_count   <= '0;
      err_count   <= '0;
      block_count <= '0;
    end else if (seed_load) begin
      bit_count   <= '0;
      err_count   <= '0;
      block_count <= '0;
    end else if (rx_valid) begin
      if (bit_count <= 32'hFFFF_FFFF - NB) bit_count <= bit_count + NB;
      if (err_count <= 32'hFFFF_FFFF - NB) err_count <= err_count + 32'(nerr);
      if (block_count != '1)               block_count <= block_count + 1'b1;
    end
  end

endmodule
