// hb_encdec: one 16-bit word of Hummingbird encryption or decryption,
// together with the internal state update that follows it.
//
// Encryption (decrypt = 0), with + modulo 2^16:
//   V12 = E_k1(PT + RS1), V23 = E_k2(V12 + RS2),
//   V34 = E_k3(V23 + RS3), CT  = E_k4(V34 + RS4)
// Decryption (decrypt = 1) walks the same chain backwards with D_k = E_k^-1:
//   V34 = D_k4(CT) - RS4, V23 = D_k3(V34) - RS3,
//   V12 = D_k2(V23) - RS2, PT  = D_k1(V12) - RS1
// Both then update the state from the same intermediate values, using the
// already stepped LFSR value L' = LFSR(t+1):
//   RS1' = RS1 + V34,        RS3' = RS3 + V23 + L',
//   RS4' = RS4 + V12 + RS1', RS2' = RS2 + V12 + RS4'
// so a decryptor that starts from the same state stays in step with the
// encryptor. The source states that each word passes the four block ciphers
// and that the state registers and LFSR are updated; the exact chaining and
// update equations are those of the published Hummingbird-1 specification.
// Combinational; the top level registers the result and the new state.
module hb_encdec
  import hb_pkg::*;
#(
  parameter bit ROTATE = 1'b1
) (
  input  logic   decrypt,   // 0: din is plaintext, 1: din is ciphertext
  input  word_t  din,
  input  state_t rs_in,
  input  key_t   key,
  input  word_t  lfsr_next, // LFSR after this word's step
  output word_t  dout,      // ciphertext (encrypt) or plaintext (decrypt)
  output state_t rs_out
);

  // encryption chain
  word_t e12, e23, e34, ect;
  hb_cipher #(.ROTATE(ROTATE)) u_e1 (.m(word_t'(din + rs_in.rs1)), .k(subkey(key, 1)), .c(e12));
  hb_cipher #(.ROTATE(ROTATE)) u_e2 (.m(word_t'(e12 + rs_in.rs2)), .k(subkey(key, 2)), .c(e23));
  hb_cipher #(.ROTATE(ROTATE)) u_e3 (.m(word_t'(e23 + rs_in.rs3)), .k(subkey(key, 3)), .c(e34));
  hb_cipher #(.ROTATE(ROTATE)) u_e4 (.m(word_t'(e34 + rs_in.rs4)), .k(subkey(key, 4)), .c(ect));

  // decryption chain
  word_t d4, d3, d2, d1;
  word_t d34, d23, d12;
  hb_decipher #(.ROTATE(ROTATE)) u_d4 (.c(din), .k(subkey(key, 4)), .m(d4));
  assign d34 = d4 - rs_in.rs4;
  hb_decipher #(.ROTATE(ROTATE)) u_d3 (.c(d34), .k(subkey(key, 3)), .m(d3));
  assign d23 = d3 - rs_in.rs3;
  hb_decipher #(.ROTATE(ROTATE)) u_d2 (.c(d23), .k(subkey(key, 2)), .m(d2));
  assign d12 = d2 - rs_in.rs2;
  hb_decipher #(.ROTATE(ROTATE)) u_d1 (.c(d12), .k(subkey(key, 1)), .m(d1));

  word_t v12, v23, v34;

  always_comb begin
    v12  = decrypt ? d12 : e12;
    v23  = decrypt ? d23 : e23;
    v34  = decrypt ? d34 : e34;
    dout = decrypt ? word_t'(d1 - rs_in.rs1) : ect;

    rs_out.rs1 = rs_in.rs1 + v34;
    rs_out.rs3 = rs_in.rs3 + v23 + lfsr_next;
    rs_out.rs4 = rs_in.rs4 + v12 + rs_out.rs1;
    rs_out.rs2 = rs_in.rs2 + v12 + rs_out.rs4;
  end

endmodule
