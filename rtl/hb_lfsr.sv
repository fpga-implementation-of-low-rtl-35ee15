// hb_lfsr: 16-bit linear feedback shift register of the Hummingbird state.
//
// Fibonacci form of the feedback polynomial
// f(x) = x^16 + x^15 + x^12 + x^10 + x^7 + x^3 + 1: one step shifts the
// register right by one and enters s15 ^ s12 ^ s10 ^ s7 ^ s3 ^ s0 at bit 15,
// i.e. bit i holds sequence element s(n+i). The polynomial is that of the
// published Hummingbird-1 specification; the source text only names a 16-bit
// LFSR. `load` writes `seed` (used at the end of initialization), `step`
// advances one position (once per encrypted word). `q_next` is the stepped
// value of the current contents, available combinationally so that the word
// datapath can use LFSR(t+1) in the same cycle as the step. Load wins over
// step. Synchronous, active-low reset to zero.
module hb_lfsr
  import hb_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  word_t seed,
  input  logic  step,
  output word_t q,       // current contents
  output word_t q_next   // contents after one step
);

  assign q_next = {q[15] ^ q[12] ^ q[10] ^ q[7] ^ q[3] ^ q[0], q[15:1]};

  always_ff @(posedge clk) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= seed;
    else if (step)  q <= q_next;
  end

endmodule
