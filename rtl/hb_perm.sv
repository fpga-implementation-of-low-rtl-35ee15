// hb_perm: permutation (diffusion) layer of the Hummingbird block cipher.
//
// Computes L(m) = m ^ (m << 6) ^ (m << 10) on a 16-bit word, or its inverse
// when INVERSE is set. ROTATE selects left rotations (default) or plain left
// shifts for "<<"; the source writes the operator without saying which it is,
// and rotation is the reading of the published Hummingbird-1 cipher. The
// inverse is L^15, because L^16 is the identity for either reading; after
// constant folding it is a fixed XOR network. Purely combinational.
module hb_perm
  import hb_pkg::*;
#(
  parameter bit INVERSE = 1'b0,  // 0: L, 1: L^-1
  parameter bit ROTATE  = 1'b1   // 1: "<<" is a rotation, 0: a shift
) (
  input  word_t d,
  output word_t q
);

  assign q = INVERSE ? lin_inv(d, ROTATE) : lin(d, ROTATE);

endmodule
