// pn_encoder: link encoder.  Takes DATA_W-bit words (8 bits by default) and
// sends them serially, LSB first, each bit XORed with the next bit of a 14-bit
// LFSR PN sequence started from a 14-bit seed.  The receiver's pn_decoder,
// seeded alike, removes the sequence again.
//
// Interface: `seed_load` restarts the PN sequence from `seed`.  A word is
// taken on in_valid && in_ready (only when the previous word has been fully
// sent); bits leave on out_valid/out_ready, one per handshake, the PN register
// stepping once per bit sent.  The first bit is offered the cycle after the
// word is taken.
//
// From the published design: 8-bit input words and a 14-bit seed for an LFSR PN
// sequence.  Own choice: reading the encoder as a PN scrambler (the code is
// not specified) and the handshakes.
module pn_encoder
  import ber_pkg::*;
#(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              seed_load,
  input  seed_t             seed,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_data,
  output logic              in_ready,
  output logic              out_valid,
  output logic              out_bit,
  input  logic              out_ready
);

  logic  sh_valid, sh_bit, pn;
  seed_t pn_state;

  assign in_ready  = !sh_valid && !seed_load;
  assign out_valid = sh_valid;
  assign out_bit   = sh_bit ^ pn;

  p2s #(.W(DATA_W)) u_p2s (
    .clk, .rst_n, .load(in_valid && in_ready), .din(in_data),
    .out_valid(sh_valid), .out_ready, .out_bit(sh_bit)
  );

  lfsr #(.W(LFSR_W), .TAPS(LFSR_TAPS), .STEPS(1)) u_pn (
    .clk, .rst_n, .load(seed_load), .seed, .step(out_valid && out_ready),
    .state(pn_state), .bits(pn)
  );

endmodule
