// perm_update: holds the permutation set (P1, P2, P3) of the cipher and
// derives a new set from it and the key after every block.
//
// `load` takes the starting set from the key.  `update` replaces
//   P1 <- P1 o K,  P3 <- P3 o K   (composition with the key permutation K,
//                                  (P o K)[i] = P[K[i]], so P stays a permutation)
//   P2 <- rotate_left(P2, 1) ^ KD (a different choice of deleted columns).
// Encryption and decryption hold one each and update them in the same order,
// so both sides always use the same set.  `load` wins over `update`.
//
// From the published design: a new permutation set per block, derived from the
// old one and the key.  Own choice: the derivation rule.
module perm_update
  import ber_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  logic  update,
  input  key_t  key,
  output perm_t p1,
  output dsel_t p2,
  output perm_t p3
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NB; i++) begin
        p1[i] <= IW'(i);
        p3[i] <= IW'(i);
      end
      p2 <= '1;
    end else if (load) begin
      p1 <= key.p1;
      p2 <= key.p2;
      p3 <= key.p3;
    end else if (update) begin
      p1 <= compose(p1, key.k);
      p3 <= compose(p3, key.k);
      p2 <= {p2[COLS-2:0], p2[COLS-1]} ^ key.kd;
    end
  end

endmodule
