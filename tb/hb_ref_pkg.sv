// hb_ref_pkg: behavioural reference model of Hummingbird used by the
// testbenches. It is written independently of the RTL: words are handled as
// bit arrays in message order (m[0] is the first bit, stored as the word's
// most significant bit), the S-boxes as integer tables and the transform as
// index arithmetic, so a slip in the RTL's packing or shifting shows up as a
// mismatch rather than being copied.
package hb_ref_pkg;

  typedef int unsigned u32;

  // S-box tables, S_(b+1)(x) = SB[b][x].
  localparam int SB [4][16] = '{
    '{ 8,  6,  5, 15,  1, 12, 10,  9, 14, 11,  2,  4,  7,  0, 13,  3},
    '{ 0,  7, 14,  1,  5, 11,  8,  2,  3, 10, 13,  6, 15, 12,  4,  9},
    '{ 2, 14, 15,  5, 12,  1,  9, 10, 11,  4,  6,  8,  0,  7,  3, 13},
    '{ 0,  7,  3,  4, 12,  1, 10, 15, 13, 14,  6, 11,  2,  8,  9,  5}
  };

  // message-order bit i of a 16-bit word
  function automatic bit mb(input logic [15:0] w, input int i);
    return w[15 - i];
  endfunction

  function automatic logic [15:0] ref_sub(input logic [15:0] m);
    int v;
    logic [15:0] r;
    r = '0;
    for (int b = 0; b < 4; b++) begin
      v = 0;
      for (int t = 0; t < 4; t++) v = v * 2 + int'(mb(m, 4*b + t));
      v = SB[b][v];
      for (int t = 0; t < 4; t++) r[15 - (4*b + t)] = 1'((v >> (3 - t)) & 1);
    end
    return r;
  endfunction

  // "m << n" in message order: output bit i takes input bit i+n
  // (wrapping around when rotate is set, zero otherwise).
  function automatic logic [15:0] ref_move(input logic [15:0] m, input int n, input bit rotate);
    logic [15:0] r;
    for (int i = 0; i < 16; i++) begin
      if (i + n < 16)      r[15 - i] = mb(m, i + n);
      else if (rotate)     r[15 - i] = mb(m, i + n - 16);
      else                 r[15 - i] = 1'b0;
    end
    return r;
  endfunction

  function automatic logic [15:0] ref_lin(input logic [15:0] m, input bit rotate);
    return m ^ ref_move(m, 6, rotate) ^ ref_move(m, 10, rotate);
  endfunction

  // K_j of a 64-bit subkey K1||K2||K3||K4
  function automatic logic [15:0] ref_kw(input logic [63:0] k, input int j);
    logic [63:0] t;
    t = k >> (16 * (4 - j));
    return t[15:0];
  endfunction

  function automatic logic [63:0] ref_subkey(input logic [255:0] key, input int i);
    logic [255:0] t;
    t = key >> (64 * (4 - i));
    return t[63:0];
  endfunction

  // 16-bit block cipher
  function automatic logic [15:0] ref_e(input logic [15:0] m, input logic [63:0] k, input bit rotate);
    logic [15:0] x;
    x = m;
    for (int j = 1; j <= 4; j++) begin
      x = x ^ ref_kw(k, j);
      x = ref_sub(x);
      x = ref_lin(x, rotate);
    end
    x = x ^ ref_kw(k, 1) ^ ref_kw(k, 3);
    x = ref_sub(x);
    return x ^ ref_kw(k, 2) ^ ref_kw(k, 4);
  endfunction

  typedef struct {
    logic [15:0] rs [1:4];
    logic [15:0] lfsr;
    logic [15:0] tv3;
  } ref_state_t;

  // LFSR step from the recurrence s(n+16) = s(n+15)+s(n+12)+s(n+10)+s(n+7)+s(n+3)+s(n)
  function automatic logic [15:0] ref_lfsr_step(input logic [15:0] w);
    bit s [0:16];
    logic [15:0] r;
    for (int i = 0; i < 16; i++) s[i] = w[i];
    s[16] = s[15] ^ s[12] ^ s[10] ^ s[7] ^ s[3] ^ s[0];
    for (int i = 0; i < 16; i++) r[i] = s[i + 1];
    return r;
  endfunction

  function automatic void ref_init(ref ref_state_t st, input logic [15:0] nonce [4],
                                   input logic [255:0] key, input bit rotate);
    logic [15:0] v12, v23, v34, tv;
    for (int i = 1; i <= 4; i++) st.rs[i] = nonce[i - 1];
    tv = '0;
    for (int t = 0; t < 4; t++) begin
      v12 = ref_e(16'(st.rs[1] + st.rs[3]), ref_subkey(key, 1), rotate);
      v23 = ref_e(16'(v12 + st.rs[2]),      ref_subkey(key, 2), rotate);
      v34 = ref_e(16'(v23 + st.rs[3]),      ref_subkey(key, 3), rotate);
      tv  = ref_e(16'(v34 + st.rs[4]),      ref_subkey(key, 4), rotate);
      st.rs[1] = st.rs[1] + tv;
      st.rs[2] = st.rs[2] + v12;
      st.rs[3] = st.rs[3] + v23;
      st.rs[4] = st.rs[4] + v34;
    end
    st.tv3  = tv;
    st.lfsr = tv | 16'h1000;
  endfunction

  function automatic void ref_update(ref ref_state_t st, input logic [15:0] v12,
                                     input logic [15:0] v23, input logic [15:0] v34);
    st.lfsr  = ref_lfsr_step(st.lfsr);
    st.rs[1] = st.rs[1] + v34;
    st.rs[3] = st.rs[3] + v23 + st.lfsr;
    st.rs[4] = st.rs[4] + v12 + st.rs[1];
    st.rs[2] = st.rs[2] + v12 + st.rs[4];
  endfunction

  function automatic logic [15:0] ref_encrypt(ref ref_state_t st, input logic [15:0] pt,
                                              input logic [255:0] key, input bit rotate);
    logic [15:0] v12, v23, v34, ct;
    v12 = ref_e(16'(pt  + st.rs[1]), ref_subkey(key, 1), rotate);
    v23 = ref_e(16'(v12 + st.rs[2]), ref_subkey(key, 2), rotate);
    v34 = ref_e(16'(v23 + st.rs[3]), ref_subkey(key, 3), rotate);
    ct  = ref_e(16'(v34 + st.rs[4]), ref_subkey(key, 4), rotate);
    ref_update(st, v12, v23, v34);
    return ct;
  endfunction

endpackage
