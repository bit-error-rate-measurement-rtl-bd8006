// block_perm: bit permutation of one cipher block, used as the pre- and
// post-permutation of encryption and, with INVERSE = 1, to undo them in
// decryption.
//
// Forward: out[i] = in[perm[i]], so the permutation array read in the same
// column-major order as the block names the source bit of every cell (the
// array 5 7 2 / 1 8 0 / 6 4 3 turns D0..D8 into D5 D7 D2 / D1 D8 D0 /
// D6 D4 D3).  Inverse: out[perm[i]] = in[i].  Purely combinational.
//
// From the published design: the permutation itself and its example.  Own
// choice: a single module for both directions.
module block_perm
  import ber_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  blk_t  din,
  input  perm_t perm,
  output blk_t  dout
);

  always_comb begin
    if (INVERSE) dout = apply_inv_perm(din, perm);
    else         dout = apply_perm(din, perm);
  end

endmodule
