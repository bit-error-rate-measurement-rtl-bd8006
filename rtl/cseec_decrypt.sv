// cseec_decrypt: CSEEC decryption, the mirror of cseec_encrypt.
//
// Per ciphertext block C:
//   V = inverse post-permutation of C by P3
//   identify delete: V is expanded to the 18-chip layout, deleted chips
//   flagged as erased (col_restore)
//   U xor rSeq on the surviving chips (same PRNG, same seed, same steps)
//   the chips leave serially (chip 2i = T[i], chip 2i+1 = T[NB+i]) into the
//   Manchester decoder, which rebuilds every erased chip from its partner
//   the decoded bits are gathered (s2p) into S and B = inverse
//   pre-permutation of S by P1.
// The permutation set and the PRNG are advanced exactly as in encryption, so
// decryption stays synchronised block by block.
//
// Interface and handshakes as cseec_encrypt.  `viol_count` counts Manchester
// pairs that arrived with both chips present but not complementary (never,
// with the delete step as built; kept as a consistency monitor).  Timing:
// 2*NB + 3 cycles from acceptance to out_valid, one block at a time.
//
// From the published design: the order of the steps and the shared
// permutation update.  Own choices: as for cseec_encrypt, plus the violation
// counter.
module cseec_decrypt
  import ber_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_load,
  input  key_t        key,
  input  seed_t       seed,
  input  logic        in_valid,
  input  blk_t        in_block,
  output logic        in_ready,
  output logic        out_valid,
  output blk_t        out_block,
  input  logic        out_ready,
  output logic [15:0] viol_count
);

  typedef enum logic [1:0] {IDLE, RUN, DONE} state_e;
  state_e st;

  perm_t p1, p3;
  dsel_t p2;
  blk_t  v_blk, s_blk, b_blk;
  cblk_t u_blk, er_blk, t_blk, ser_chips, ser_erased;
  logic [NC-1:0] rseq;
  seed_t prng_state;

  logic pc_valid, pc_chip, pe_valid, pe_bit;
  logic md_valid, md_bit, md_viol, s2p_full;
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

  block_perm #(.INVERSE(1'b1)) u_post_inv (.din(in_block), .perm(p3), .dout(v_blk));

  col_restore u_ident (.v(v_blk), .dsel(p2), .u(u_blk), .erased(er_blk));

  assign t_blk = u_blk ^ (rseq & ~er_blk);

  always_comb begin
    for (int i = 0; i < NB; i++) begin
      ser_chips[2*i]      = t_blk[i];
      ser_chips[2*i + 1]  = t_blk[NB + i];
      ser_erased[2*i]     = er_blk[i];
      ser_erased[2*i + 1] = er_blk[NB + i];
    end
  end

  p2s #(.W(NC)) u_p2s_chip (
    .clk, .rst_n, .load(accept), .din(ser_chips),
    .out_valid(pc_valid), .out_ready(1'b1), .out_bit(pc_chip)
  );

  p2s #(.W(NC)) u_p2s_erase (
    .clk, .rst_n, .load(accept), .din(ser_erased),
    .out_valid(pe_valid), .out_ready(1'b1), .out_bit(pe_bit)
  );

  manchester_dec u_dec (
    .clk, .rst_n, .sync(accept), .in_valid(pc_valid), .chip(pc_chip), .erased(pe_bit),
    .out_valid(md_valid), .out_bit(md_bit), .viol(md_viol)
  );

  s2p #(.W(NB)) u_s2p (
    .clk, .rst_n, .clear(finish), .in_valid(md_valid), .in_bit(md_bit),
    .full(s2p_full), .dout(s_blk)
  );

  block_perm #(.INVERSE(1'b1)) u_pre_inv (.din(s_blk), .perm(p1), .dout(b_blk));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= IDLE;
      out_valid  <= 1'b0;
      out_block  <= '0;
      viol_count <= '0;
    end else begin
      if (md_valid && md_viol && viol_count != '1) viol_count <= viol_count + 1'b1;
      unique case (st)
        IDLE: if (accept) st <= RUN;
        RUN:  if (s2p_full) begin
                st        <= DONE;
                out_valid <= 1'b1;
                out_block <= b_blk;
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
