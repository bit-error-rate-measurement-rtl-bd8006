// cseec_encrypt: block cipher with embedded error control (CSEEC) encryption.
//
// Per block B (NB = 9 bits):
//   S = pre-permutation of B by P1
//   S is shifted out serially (p2s), Manchester coded (2 chips per bit) and
//   gathered back into the 18-chip block T (s2p); serial chip 2i lands in
//   T[i], chip 2i+1 in T[NB+i]
//   U = T xor rSeq, rSeq = the next 18 output bits of the 14-bit PRNG
//   V = U with one column of every Manchester pair deleted (selection P2)
//   C = post-permutation of V by P3
// After each block the PRNG advances 18 steps and the permutation set is
// updated from the key (perm_update).
//
// Interface: `cfg_load` loads key and PRNG seed.  A block is taken on
// in_valid && in_ready; the ciphertext is offered on out_valid until
// out_ready.  Timing: 2*NB + 3 cycles from acceptance to out_valid
// (one load cycle, 18 chip cycles, two cycles of pipeline), one block
// at a time.
//
// From the published design: the order of the steps and the 3 x 3 block.  Own
// choices: Manchester convention, chip layout, delete rule, update rule,
// PRNG polynomial and the handshakes.
module cseec_encrypt
  import ber_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cfg_load,
  input  key_t  key,
  input  seed_t seed,
  input  logic  in_valid,
  input  blk_t  in_block,
  output logic  in_ready,
  output logic  out_valid,
  output blk_t  out_block,
  input  logic  out_ready
);

  typedef enum logic [1:0] {IDLE, RUN, DONE} state_e;
  state_e st;

  perm_t p1, p3;
  dsel_t p2;
  blk_t  s_blk, v_blk, c_blk;
  cblk_t raw, t_blk, u_blk;
  logic [NC-1:0] rseq;
  seed_t prng_state;

  logic ps_valid, ps_bit, me_ready, chip_valid, chip, s2p_full;
  logic accept, finish;

  assign in_ready = (st == IDLE) && !cfg_load;
  assign accept   = in_valid && in_ready;
  assign finish   = out_valid && out_ready;

  perm_update u_upd (
    .clk, .rst_n, .load(cfg_load), .update(finish), .key,
    .p1, .p2, .p3
  );

  lfsr #(.W(LFSR_W), .TAPS(LFSR_TAPS), .STEPS(NC)) u_prng (
    .clk, .rst_n, .load(cfg_load), .seed, .step(finish),
    .state(prng_state), .bits(rseq)
  );

  block_perm #(.INVERSE(1'b0)) u_pre (.din(in_block), .perm(p1), .dout(s_blk));

  p2s #(.W(NB)) u_p2s (
    .clk, .rst_n, .load(accept), .din(s_blk),
    .out_valid(ps_valid), .out_ready(me_ready), .out_bit(ps_bit)
  );

  manchester_enc u_man (
    .clk, .rst_n, .in_valid(ps_valid), .in_bit(ps_bit), .in_ready(me_ready),
    .chip_valid, .chip
  );

  s2p #(.W(NC)) u_s2p (
    .clk, .rst_n, .clear(finish), .in_valid(chip_valid), .in_bit(chip),
    .full(s2p_full), .dout(raw)
  );

  always_comb begin
    for (int i = 0; i < NB; i++) begin
      t_blk[i]      = raw[2*i];
      t_blk[NB + i] = raw[2*i + 1];
    end
  end

  assign u_blk = t_blk ^ rseq;

  col_delete u_del (.u(u_blk), .dsel(p2), .v(v_blk));

  block_perm #(.INVERSE(1'b0)) u_post (.din(v_blk), .perm(p3), .dout(c_blk));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= IDLE;
      out_valid <= 1'b0;
      out_block <= '0;
    end else begin
      unique case (st)
        IDLE: if (accept) st <= RUN;
        RUN:  if (s2p_full) begin
                st        <= DONE;
                out_valid <= 1'b1;
                out_block <= c_blk;
              end
        DONE: if (out_ready) begin
                st        <= IDLE;
                out_valid <= 1'b0;
              end
        default: st <= IDLE;
      endcase
    end
  end

endmodule
