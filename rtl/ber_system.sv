// ber_system: single-chip bit error rate measurement system for a 2x2 MIMO
// BPSK link carrying CSEEC-encrypted data.
//
// Transmit side: a 14-bit LFSR data source produces 9-bit plaintext blocks;
// cseec_encrypt turns each into a 9-bit ciphertext; pn_encoder serialises it
// and scrambles it with a PN sequence; the interleaver spreads each 16383-bit
// frame in pseudorandom order; bpsk_mod sends every bit as one carrier period
// (16 samples, brought out on tx_sample) and hands the antipodal symbol to
// the channel.
// Channel: mimo_channel groups four symbols into a 2x2 space-time symbol and
// applies Rayleigh gains and Gaussian noise from two fading_gen instances.
// Receive side: ml_detector picks the most likely ST symbol; its four bits are
// serialised into the deinterleaver; pn_decoder removes the PN sequence and
// regroups 9-bit words; cseec_decrypt recovers the plaintext; ber_counter
// compares it with a local copy of the data source and counts bits and
// errors.
//
// Every stage hands data on with a valid/ready handshake, so the slowest stage
// (the modulator, 16 cycles per bit) sets the pace and the interleavers'
// read phases stall their producers.  `cfg_load` loads the key, all seeds and
// clears the counters; `run` lets the data source send blocks.  Both
// fading generators run freely; sigma_n (unsigned Q4.12) sets the noise level.
//
// From the published design: the chain of blocks (encryption, encoder,
// interleaver, BPSK modulator, channel, ML detector, deinterleaver, decoder,
// decryption, BER measurement).  Own choices: the data source and BER
// reference, the 9-bit words on the link, the baseband channel, the serial
// link between detector and deinterleaver and the handshakes.
module ber_system
  import ber_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_load,
  input  key_t               key,
  input  seed_t              crypt_seed,
  input  seed_t              pn_seed,
  input  seed_t              data_seed,
  input  logic [15:0]        fade_seed_u1,
  input  logic [17:0]        fade_seed_u2,
  input  logic [15:0]        noise_seed_u1,
  input  logic [17:0]        noise_seed_u2,
  input  logic [15:0]        sigma_n,
  input  logic               run,
  output logic               tx_sample_valid,
  output logic signed [7:0]  tx_sample,
  output logic [31:0]        bit_count,
  output logic [31:0]        err_count,
  output logic [31:0]        block_count
);

  // ---------------------------------------------------------------- source
  seed_t src_state;
  blk_t  src_block;
  logic  enc_in_ready;

  lfsr #(.W(LFSR_W), .TAPS(LFSR_TAPS), .STEPS(NB)) u_src (
    .clk, .rst_n, .load(cfg_load), .seed(data_seed), .step(run && enc_in_ready),
    .state(src_state), .bits(src_block)
  );

  // ---------------------------------------------------------------- encrypt
  logic enc_out_valid, pne_in_ready;
  blk_t cipher;

  cseec_encrypt u_enc (
    .clk, .rst_n, .cfg_load, .key, .seed(crypt_seed),
    .in_valid(run), .in_block(src_block), .in_ready(enc_in_ready),
    .out_valid(enc_out_valid), .out_block(cipher), .out_ready(pne_in_ready)
  );

  // ---------------------------------------------------------------- transmitter
  logic pne_valid, pne_bit, ilv_in_ready;

  pn_encoder #(.DATA_W(NB)) u_pne (
    .clk, .rst_n, .seed_load(cfg_load), .seed(pn_seed),
    .in_valid(enc_out_valid), .in_data(cipher), .in_ready(pne_in_ready),
    .out_valid(pne_valid), .out_bit(pne_bit), .out_ready(ilv_in_ready)
  );

  logic ilv_bit, ilv_ready, ilv_reading, mod_in_ready;

  interleaver u_ilv (
    .clk, .rst_n, .bIn(pne_bit), .newBit(pne_valid), .in_ready(ilv_in_ready),
    .hold(!mod_in_ready), .bout(ilv_bit), .bitReady(ilv_ready), .reading(ilv_reading)
  );

  logic bb_valid, bb_sym, bb_ready;

  bpsk_mod u_mod (
    .clk, .rst_n, .in_valid(ilv_ready), .in_bit(ilv_bit), .in_ready(mod_in_ready),
    .bb_ready, .bb_valid, .bb_sym,
    .sample_valid(tx_sample_valid), .sample(tx_sample)
  );

  // ---------------------------------------------------------------- channel
  logic               fade_valid, noise_valid;
  logic [15:0]        fade_ray, noise_ray;
  logic signed [15:0] fade_gauss, noise_gauss;

  fading_gen u_fade (
    .clk, .rst_n, .seed_load(cfg_load), .seed_u1(fade_seed_u1), .seed_u2(fade_seed_u2),
    .en(1'b1), .sigma_n(16'h1000),
    .out_valid(fade_valid), .rayleigh(fade_ray), .gauss(fade_gauss)
  );

  fading_gen u_noise (
    .clk, .rst_n, .seed_load(cfg_load), .seed_u1(noise_seed_u1), .seed_u2(noise_seed_u2),
    .en(1'b1), .sigma_n,
    .out_valid(noise_valid), .rayleigh(noise_ray), .gauss(noise_gauss)
  );

  logic       ch_valid, ml_in_ready;
  rmat_t      ch_r;
  hmat_t      ch_h;
  logic [3:0] ch_bits;

  mimo_channel u_chan (
    .clk, .rst_n, .bb_valid, .bb_sym, .bb_ready,
    .fade_valid, .fade(fade_ray), .noise_valid, .noise(noise_gauss),
    .out_valid(ch_valid), .out_ready(ml_in_ready), .r(ch_r), .h(ch_h), .st_bits(ch_bits)
  );

  // ---------------------------------------------------------------- receiver
  logic          ml_valid, ml_ready;
  logic [3:0]    ml_bits;
  logic [CW-1:0] ml_cost;

  ml_detector u_ml (
    .clk, .rst_n, .in_valid(ch_valid), .r(ch_r), .h(ch_h), .in_ready(ml_in_ready),
    .out_valid(ml_valid), .out_bits(ml_bits), .out_cost(ml_cost), .out_ready(ml_ready)
  );

  logic st_valid, st_bit, dil_in_ready;

  // ST symbol back to a bit stream, bit 0 first
  p2s #(.W(4)) u_st2s (
    .clk, .rst_n, .load(ml_valid && ml_ready), .din(ml_bits),
    .out_valid(st_valid), .out_ready(dil_in_ready), .out_bit(st_bit)
  );
  assign ml_ready = !st_valid;

  logic dil_bit, dil_ready, dil_reading, pnd_in_ready;

  deinterleaver u_dil (
    .clk, .rst_n, .bIn(st_bit), .newBit(st_valid), .in_ready(dil_in_ready),
    .hold(!pnd_in_ready), .bout(dil_bit), .bitReady(dil_ready), .reading(dil_reading)
  );

  logic pnd_valid, dec_in_ready;
  blk_t rx_cipher;

  pn_decoder #(.DATA_W(NB)) u_pnd (
    .clk, .rst_n, .seed_load(cfg_load), .seed(pn_seed),
    .in_valid(dil_ready), .in_bit(dil_bit), .in_ready(pnd_in_ready),
    .out_valid(pnd_valid), .out_data(rx_cipher), .out_ready(dec_in_ready)
  );

  // ---------------------------------------------------------------- decrypt
  logic        dec_valid;
  blk_t        plain_rx, plain_exp;
  logic [15:0] viol_count;

  cseec_decrypt u_dec (
    .clk, .rst_n, .cfg_load, .key, .seed(crypt_seed),
    .in_valid(pnd_valid), .in_block(rx_cipher), .in_ready(dec_in_ready),
    .out_valid(dec_valid), .out_block(plain_rx), .out_ready(1'b1),
    .viol_count
  );

  // ---------------------------------------------------------------- BER
  ber_counter u_ber (
    .clk, .rst_n, .seed_load(cfg_load), .seed(data_seed),
    .rx_valid(dec_valid), .rx_block(plain_rx), .exp_block(plain_exp),
    .bit_count, .err_count, .block_count
  );

endmodule
