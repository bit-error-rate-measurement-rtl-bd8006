// col_delete: delete step of the cipher.
//
// The randomised Manchester block U (ROWS x 2*COLS chips, column-major) loses
// one column of every first-chip/second-chip pair: for data column c,
// dsel[c] = 1 keeps coded column c and deletes column COLS+c, dsel[c] = 0
// keeps column COLS+c and deletes column c.  The kept columns, in data column
// order, form the ROWS x COLS block V.  Since a Manchester pair is a bit and
// its complement (before the PRNG XOR), every deleted chip can be rebuilt by
// the receiver, yet an observer never sees the PRNG output of the deleted
// positions.  Purely combinational.
//
// From the published design: a delete step after the PRNG XOR that removes
// columns.  Own choice: how many and which columns (one per Manchester pair).
module col_delete
  import ber_pkg::*;
(
  input  cblk_t u,
  input  dsel_t dsel,
  output blk_t  v
);

  always_comb begin
    for (int c = 0; c < COLS; c++)
      for (int r = 0; r < ROWS; r++)
        v[c*ROWS + r] = dsel[c] ? u[c*ROWS + r] : u[(COLS + c)*ROWS + r];
  end

endmodule
