// hb_sbox_layer: substitution layer of the Hummingbird 16-bit block cipher.
//
// The word is cut into four nibbles A = bits [15:12], B = [11:8], C = [7:4]
// and D = [3:0]; the result is S1(A) || S2(B) || S3(C) || S4(D), as in the
// substitution step of the cipher. With INVERSE set, each nibble goes through
// the inverse box instead, which the decryption path needs. Purely
// combinational, no clock. The nibble-to-box assignment follows the source
// algorithm; the table contents come from hb_pkg (published Hummingbird-1
// boxes, a choice of this design).
module hb_sbox_layer
  import hb_pkg::*;
#(
  parameter bit INVERSE = 1'b0  // 0: S1..S4, 1: their inverses
) (
  input  word_t d,  // input word
  output word_t q   // substituted word
);

  always_comb begin
    for (int unsigned i = 0; i < 4; i++) begin
      // box i takes nibble i counted from the most significant end
      q[WORD_W-1-4*i -: 4] = INVERSE ? sbox_inv(2'(i), d[WORD_W-1-4*i -: 4])
                                     : sbox_fwd(2'(i), d[WORD_W-1-4*i -: 4]);
    end
  end

endmodule
