// hb_decipher: inverse of the Hummingbird 16-bit block cipher, D_k = E_k^-1.
//
// Undoes hb_cipher step by step in reverse order: m ^= K2 ^ K4, inverse S-box
// layer, m ^= K1 ^ K3, then for j = 4 down to 1: inverse transform L^-1,
// inverse S-box layer, m ^= Kj. The source names a decryption module but
// does not spell it out; this is the direct inverse of its cipher.
// One combinational path, no clock.
module hb_decipher
  import hb_pkg::*;
#(
  parameter bit ROTATE = 1'b1  // meaning of "<<" in L, see hb_perm
) (
  input  word_t   c,  // ciphertext word
  input  subkey_t k,  // subkey k_i
  output word_t   m   // plaintext word
);

  word_t pre, pre_sub;
  word_t rnd [ROUNDS+1];  // rnd[ROUNDS] = input of the round inverses
  word_t unl [ROUNDS];    // after L^-1 of round j
  word_t uns [ROUNDS];    // after inverse S-box of round j

  assign pre = c ^ kword(k, 2) ^ kword(k, 4);
  hb_sbox_layer #(.INVERSE(1'b1)) u_sbox_fin (.d(pre), .q(pre_sub));
  assign rnd[ROUNDS] = pre_sub ^ kword(k, 1) ^ kword(k, 3);

  for (genvar j = ROUNDS - 1; j >= 0; j--) begin : g_round
    hb_perm #(.INVERSE(1'b1), .ROTATE(ROTATE)) u_perm (.d(rnd[j+1]), .q(unl[j]));
    hb_sbox_layer #(.INVERSE(1'b1)) u_sbox (.d(unl[j]), .q(uns[j]));
    assign rnd[j] = uns[j] ^ kword(k, j + 1);
  end

  assign m = rnd[0];

endmodule
