// hb_pkg: types, constants and pure functions shared by the Hummingbird
// encryption core.
//
// Hummingbird works on 16-bit words, keeps an 80-bit internal state (four
// 16-bit state registers RS1..RS4 plus a 16-bit LFSR) and uses a 256-bit key
// split into four 64-bit subkeys k1..k4, one per block cipher E_k1..E_k4.
// Bit numbering: a word m = (m0, m1, ..., m15) is stored with m0 as the most
// significant bit, so nibble A = m0..m3 is bits [15:12] and goes to S-box S1.
// A subkey k = K1 || K2 || K3 || K4 holds K1 in bits [63:48]; the 256-bit key
// K = k1 || k2 || k3 || k4 holds k1 in bits [255:192].
//
// The four 4x4 S-box tables are those of the published Hummingbird-1
// specification; they are a choice of this design (the source text only says
// they are four balanced, non-linear Serpent-like 4x4 boxes) and can be
// replaced by editing SBOX. The linear transform L(m) = m ^ (m << 6) ^
// (m << 10) uses left rotations when `rotate` is set (the default of every
// module here) and plain left shifts otherwise. Both variants satisfy
// L^16 = identity, so the inverse is L applied 15 times. All additions of
// state words are modulo 2^16.
package hb_pkg;

  localparam int unsigned WORD_W      = 16;   // block size
  localparam int unsigned SUBKEY_W    = 64;   // one subkey k_i
  localparam int unsigned KEY_W       = 256;  // full key k1..k4
  localparam int unsigned ROUNDS      = 4;    // regular rounds of E_k
  localparam int unsigned INIT_ROUNDS = 4;    // initialization rounds
  localparam int unsigned NWORDS      = 4;    // plaintext words per operation
  localparam logic [15:0] LFSR_SEED_OR = 16'h1000; // keeps the LFSR seed non-zero

  typedef logic [WORD_W-1:0]   word_t;
  typedef logic [SUBKEY_W-1:0] subkey_t;
  typedef logic [KEY_W-1:0]    key_t;

  // The four internal state registers.
  typedef struct packed {
    word_t rs1;
    word_t rs2;
    word_t rs3;
    word_t rs4;
  } state_t;

  // SBOX[i][x] is S_(i+1)(x).
  localparam logic [3:0] SBOX [4][16] = '{
    '{4'h8, 4'h6, 4'h5, 4'hF, 4'h1, 4'hC, 4'hA, 4'h9,
      4'hE, 4'hB, 4'h2, 4'h4, 4'h7, 4'h0, 4'hD, 4'h3},
    '{4'h0, 4'h7, 4'hE, 4'h1, 4'h5, 4'hB, 4'h8, 4'h2,
      4'h3, 4'hA, 4'hD, 4'h6, 4'hF, 4'hC, 4'h4, 4'h9},
    '{4'h2, 4'hE, 4'hF, 4'h5, 4'hC, 4'h1, 4'h9, 4'hA,
      4'hB, 4'h4, 4'h6, 4'h8, 4'h0, 4'h7, 4'h3, 4'hD},
    '{4'h0, 4'h7, 4'h3, 4'h4, 4'hC, 4'h1, 4'hA, 4'hF,
      4'hD, 4'hE, 4'h6, 4'hB, 4'h2, 4'h8, 4'h9, 4'h5}
  };

  // Forward S-box i (0..3) of a nibble.
  function automatic logic [3:0] sbox_fwd(input logic [1:0] i, input logic [3:0] x);
    return SBOX[i][x];
  endfunction

  // Inverse S-box i (0..3) of a nibble, found by searching the table.
  function automatic logic [3:0] sbox_inv(input logic [1:0] i, input logic [3:0] y);
    logic [3:0] r;
    r = '0;
    for (int unsigned x = 0; x < 16; x++)
      if (SBOX[i][x] == y) r = 4'(x);
    return r;
  endfunction

  // Left rotation or left shift of a word.
  function automatic word_t lmove(input word_t m, input int unsigned n, input bit rotate);
    return rotate ? word_t'((m << n) | (m >> (WORD_W - n))) : word_t'(m << n);
  endfunction

  // Linear transform L(m) = m ^ (m << 6) ^ (m << 10).
  function automatic word_t lin(input word_t m, input bit rotate);
    return m ^ lmove(m, 6, rotate) ^ lmove(m, 10, rotate);
  endfunction

  // Inverse of L: since L^16 = identity, L^-1 = L^15.
  function automatic word_t lin_inv(input word_t m, input bit rotate);
    word_t r;
    r = m;
    for (int k = 0; k < 15; k++) r = lin(r, rotate);
    return r;
  endfunction

  // Subkey word K_j (j = 1..4) of a 64-bit subkey.
  function automatic word_t kword(input subkey_t k, input int unsigned j);
    return k[SUBKEY_W - WORD_W*j +: WORD_W];
  endfunction

  // Subkey k_i (i = 1..4) of the 256-bit key.
  function automatic subkey_t subkey(input key_t key, input int unsigned i);
    return key[KEY_W - SUBKEY_W*i +: SUBKEY_W];
  endfunction

endpackage
