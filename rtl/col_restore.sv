// col_restore: "identify delete" step of decryption.
//
// Expands the ROWS x COLS block V back to the ROWS x 2*COLS coded layout using
// the same delete selection as encryption (see col_delete): kept columns go to
// their place, deleted columns are filled with 0 and flagged in `erased`, so
// that the PRNG XOR and the Manchester decoder know which chips are missing.
// Purely combinational.
//
// From the published design: the 'identify delete' step that re-expands the
// block.  Own choice: the erasure mask that carries the positions on.
module col_restore
  import ber_pkg::*;
(
  input  blk_t  v,
  input  dsel_t dsel,
  output cblk_t u,
  output cblk_t erased
);

  always_comb begin
    u      = '0;
    erased = '0;
    for (int c = 0; c < COLS; c++)
      for (int r = 0; r < ROWS; r++) begin
        if (dsel[c]) begin
          u[c*ROWS + r]               = v[c*ROWS + r];
          erased[(COLS + c)*ROWS + r] = 1'b1;
        end else begin
          u[(COLS + c)*ROWS + r]      = v[c*ROWS + r];
          erased[c*ROWS + r]          = 1'b1;
        end
      end
  end

endmodule
