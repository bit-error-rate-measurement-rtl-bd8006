// ber_pkg: sizes, types and helper functions shared by the CSEEC cipher and the
// BER measurement link.
//
// The cipher works on a ROWS x COLS bit block (3 x 3, as in the permutation and
// delete illustrations).  Bit D<i> of a block sits in row i % ROWS, column
// i / ROWS (column-major numbering, as the illustrations number D0..D8).  A
// permutation array holds, for every output position i, the input position it
// takes its bit from: out[i] = in[p[i]].
//
// The Manchester-coded block holds 2*NB chips: chip T[i] is the first chip of
// bit i and T[NB+i] its second chip, so coded columns 0..COLS-1 carry first
// chips and columns COLS..2*COLS-1 the matching second chips.  The delete step
// removes one column of every first/second pair; a delete-select bit per data
// column says which (1: keep the first-chip column, 0: keep the second).
//
// All pseudorandom sources are Fibonacci LFSRs; the 14-bit one uses
// x^14 + x^13 + x^12 + x^2 + 1 (period 16383).
//
// From the published design: the 3 x 3 block, its column-major numbering and
// the permutation rule (its worked example), the 14-bit LFSR and seed.  Own
// choices: the LFSR polynomial, the chip layout, the one-column-per-pair
// delete rule, the key layout and all fixed-point widths.
package ber_pkg;

  localparam int unsigned ROWS = 3;
  localparam int unsigned COLS = 3;
  localparam int unsigned NB   = ROWS * COLS;  // plaintext and ciphertext bits
  localparam int unsigned NC   = 2 * NB;       // Manchester-coded chips
  localparam int unsigned IW   = 4;            // permutation index width

  localparam int unsigned        LFSR_W    = 14;
  localparam logic [LFSR_W-1:0]  LFSR_TAPS = 14'h3802;  // bits 13, 12, 11, 1

  // 2x2 MIMO link: a space-time (ST) symbol is 2 transmit antennas x 2 time
  // slots of BPSK symbols, so 4 bits and 16 candidates for the ML search.
  // Bit k of an ST symbol goes to antenna k % 2 in slot k / 2; a 1 is +1.
  // Channel gain h[2*j + i] links transmit antenna i to receive antenna j;
  // sample r[j + 2*t] is receive antenna j in slot t.
  localparam int unsigned HW = 16;   // channel gain, unsigned Q4.12
  localparam int unsigned RW = 19;   // received sample, signed Q7.12
  localparam int unsigned CW = 44;   // ML cost
  typedef logic [3:0][HW-1:0] hmat_t;
  typedef logic [3:0][RW-1:0] rmat_t;

  typedef logic [NB-1:0]          blk_t;
  typedef logic [NC-1:0]          cblk_t;
  typedef logic [COLS-1:0]        dsel_t;
  typedef logic [NB-1:0][IW-1:0]  perm_t;
  typedef logic [LFSR_W-1:0]      seed_t;

  // Encryption key: the starting permutation set and the values that derive
  // each block's set from the previous one.
  typedef struct packed {
    perm_t p1;   // pre-permutation
    dsel_t p2;   // delete selection
    perm_t p3;   // post-permutation
    perm_t k;    // permutation composed into P1 and P3 after every block
    dsel_t kd;   // mask folded into P2 after every block
  } key_t;

  function automatic blk_t apply_perm(blk_t b, perm_t p);
    blk_t r;
    for (int i = 0; i < NB; i++) r[i] = b[p[i]];
    return r;
  endfunction

  function automatic blk_t apply_inv_perm(blk_t b, perm_t p);
    blk_t r;
    r = '0;
    for (int i = 0; i < NB; i++) r[p[i]] = b[i];
    return r;
  endfunction

  // (p o k)[i] = p[k[i]]: still a permutation when p and k are.
  function automatic perm_t compose(perm_t p, perm_t k);
    perm_t r;
    for (int i = 0; i < NB; i++) r[i] = p[k[i]];
    return r;
  endfunction

  function automatic bit is_perm(perm_t p);
    logic [NB-1:0] seen;
    seen = '0;
    for (int i = 0; i < NB; i++) if (p[i] < IW'(NB)) seen[p[i]] = 1'b1;
    return &seen;
  endfunction

endpackage
