// hb_cipher: the Hummingbird 16-bit block cipher E_k.
//
// A substitution-permutation network keyed by one 64-bit subkey
// k = K1 || K2 || K3 || K4. Four regular rounds j = 1..4 each do key mixing
// (m ^= Kj), the S-box layer and the linear transform L. A final step does
// m ^= K1 ^ K3, one more S-box layer and m ^= K2 ^ K4. This follows the
// source algorithm step for step. The whole cipher is one combinational
// path (no registers, zero clock latency); the caller registers the result.
module hb_cipher
  import hb_pkg::*;
#(
  parameter bit ROTATE = 1'b1  // meaning of "<<" in L, see hb_perm
) (
  input  word_t   m,  // plaintext word
  input  subkey_t k,  // subkey k_i
  output word_t   c   // ciphertext word
);

  word_t mix [ROUNDS];   // after key mixing of round j
  word_t sub [ROUNDS];   // after the S-box layer of round j
  word_t rnd [ROUNDS+1]; // rnd[0] = m, rnd[j] = output of round j
  word_t fin_mix, fin_sub;

  assign rnd[0] = m;

  for (genvar j = 0; j < ROUNDS; j++) begin : g_round
    assign mix[j] = rnd[j] ^ kword(k, j + 1);
    hb_sbox_layer #(.INVERSE(1'b0)) u_sbox (.d(mix[j]), .q(sub[j]));
    hb_perm #(.INVERSE(1'b0), .ROTATE(ROTATE)) u_perm (.d(sub[j]), .q(rnd[j+1]));
  end

  assign fin_mix = rnd[ROUNDS] ^ kword(k, 1) ^ kword(k, 3);
  hb_sbox_layer #(.INVERSE(1'b0)) u_sbox_fin (.d(fin_mix), .q(fin_sub));
  assign c = fin_sub ^ kword(k, 2) ^ kword(k, 4);

endmodule
