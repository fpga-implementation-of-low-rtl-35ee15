// hb_init: one round of the Hummingbird initialization.
//
// Initialization starts from the 64-bit nonce (RS1..RS4 = nonce words) and
// runs four of these rounds. One round chains the four block ciphers:
//   V12 = E_k1(RS1 + RS3), V23 = E_k2(V12 + RS2),
//   V34 = E_k3(V23 + RS3), TV  = E_k4(V34 + RS4)
// and updates RS1 += TV, RS2 += V12, RS3 += V23, RS4 += V34 (all mod 2^16).
// After the fourth round the LFSR is seeded with TV | 0x1000. The source says
// only that initialization uses the four ciphers, the four state registers
// and the nonce; the round equations are those of the published Hummingbird-1
// specification. Combinational: the round counter and the state registers
// sit in the top level, which applies one round per clock.
module hb_init
  import hb_pkg::*;
#(
  parameter bit ROTATE = 1'b1
) (
  input  state_t rs_in,   // state before the round
  input  key_t   key,     // k1 || k2 || k3 || k4
  output state_t rs_out,  // state after the round
  output word_t  tv       // TV of this round (TV of round 4 seeds the LFSR)
);

  word_t v12, v23, v34;

  hb_cipher #(.ROTATE(ROTATE)) u_e1 (.m(word_t'(rs_in.rs1 + rs_in.rs3)), .k(subkey(key, 1)), .c(v12));
  hb_cipher #(.ROTATE(ROTATE)) u_e2 (.m(word_t'(v12 + rs_in.rs2)),       .k(subkey(key, 2)), .c(v23));
  hb_cipher #(.ROTATE(ROTATE)) u_e3 (.m(word_t'(v23 + rs_in.rs3)),       .k(subkey(key, 3)), .c(v34));
  hb_cipher #(.ROTATE(ROTATE)) u_e4 (.m(word_t'(v34 + rs_in.rs4)),       .k(subkey(key, 4)), .c(tv));

  always_comb begin
    rs_out.rs1 = rs_in.rs1 + tv;
    rs_out.rs2 = rs_in.rs2 + v12;
    rs_out.rs3 = rs_in.rs3 + v23;
    rs_out.rs4 = rs_in.rs4 + v34;
  end

endmodule
