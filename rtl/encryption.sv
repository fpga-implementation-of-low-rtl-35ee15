// encryption: Hummingbird encryption core, top level.
//
// Hummingbird is a hybrid of block and stream cipher: each 16-bit word runs
// through four keyed 16-bit block ciphers whose inputs are offset by four
// 16-bit internal state registers RS1..RS4, and the state (plus a 16-bit
// LFSR) changes after every word. The port list follows the block diagram of
// the source design; what each control pin does is this design's reading,
// since the source names the pins without describing them.
//
// Operation (all inputs sampled on the rising edge of `clock`):
//   * reset    : active low, synchronous; clears key, state, LFSR and outputs.
//   * key load : e_write = 1 stores e_data_in as the next 64-bit subkey,
//                k1 first, then k2, k3, k4 (256-bit key). t_cl_in = 1 clears
//                the key and restarts loading at k1. Ignored while busy.
//   * t_in     : starts initialization. RS1..RS4 take e_nonce0..3 and four
//                initialization rounds (hb_init) run, one per clock, the
//                first on the nonce directly. On completion e_tv3 shows TV of
//                the fourth round and the LFSR holds TV | 0x1000.
//   * t_enc    : starts one operation on the four words e_pt0..e_pt3, one
//                word per clock (hb_encdec), word 0 in the start cycle; the
//                other three are captured at the start. Results appear on
//                e_ct0..e_ct3. t_if = 1 together with t_enc selects
//                decryption: e_pt* then carry ciphertext and e_ct* receive
//                plaintext. The LFSR steps once per word.
//   * e_rs1..e_rs4 always show the state registers.
//   * e_busy is high while an operation runs; e_done pulses for one clock
//     with the last state update. Starts while busy are ignored; t_in wins
//     over t_enc if both are raised together. These two status pins are
//     additions of this design.
// Latency: initialization and a four-word operation take four clocks each,
// e_done is high in the fourth. Every word path is combinational between
// registers (four ciphers in series), which keeps the clock count low at
// the price of a long combinational path.
module encryption
  import hb_pkg::*;
#(
  parameter bit ROTATE = 1'b1  // "<<" in the cipher's transform is a rotation
) (
  input  logic        clock,
  input  logic        reset,      // active low
  // key loading
  input  logic [63:0] e_data_in,
  input  logic        e_write,
  input  logic        t_cl_in,
  // nonce and initialization
  input  logic [15:0] e_nonce0,
  input  logic [15:0] e_nonce1,
  input  logic [15:0] e_nonce2,
  input  logic [15:0] e_nonce3,
  input  logic        t_in,
  // data words
  input  logic [15:0] e_pt0,
  input  logic [15:0] e_pt1,
  input  logic [15:0] e_pt2,
  input  logic [15:0] e_pt3,
  input  logic        t_enc,
  input  logic        t_if,       // with t_enc: 1 = decrypt
  // results and state
  output logic [15:0] e_ct0,
  output logic [15:0] e_ct1,
  output logic [15:0] e_ct2,
  output logic [15:0] e_ct3,
  output logic [15:0] e_rs1,
  output logic [15:0] e_rs2,
  output logic [15:0] e_rs3,
  output logic [15:0] e_rs4,
  output logic [15:0] e_tv3,
  output logic        e_busy,
  output logic        e_done
);

  typedef enum logic [1:0] {IDLE, INIT, CRYPT} mode_e;

  mode_e       mode;
  logic [1:0]  cnt;        // round / word index
  logic [1:0]  key_ptr;    // next subkey slot to write
  logic        dec_q;      // current operation decrypts
  key_t        key;
  state_t      rs;
  word_t       din_buf [NWORDS];  // captured words 1..3 (entry 0 unused)
  word_t       dout    [NWORDS];
  word_t       tv3;

  // start conditions
  logic start_init, start_crypt;
  assign start_init  = (mode == IDLE) && t_in;
  assign start_crypt = (mode == IDLE) && t_enc && !t_in;

  // ---------------------------------------------------------------- datapath
  state_t init_in, init_out, ed_out;
  word_t  init_tv, ed_din, ed_dout;
  word_t  lfsr_next;
  logic   ed_dec;

  // first initialization round works on the nonce directly
  assign init_in = start_init ? state_t'{rs1: e_nonce0, rs2: e_nonce1,
                                         rs3: e_nonce2, rs4: e_nonce3}
                              : rs;

  hb_init #(.ROTATE(ROTATE)) u_init (
    .rs_in(init_in), .key(key), .rs_out(init_out), .tv(init_tv));

  assign ed_din = start_crypt ? e_pt0 : din_buf[cnt];
  assign ed_dec = start_crypt ? t_if  : dec_q;

  hb_encdec #(.ROTATE(ROTATE)) u_encdec (
    .decrypt(ed_dec), .din(ed_din), .rs_in(rs), .key(key),
    .lfsr_next(lfsr_next), .dout(ed_dout), .rs_out(ed_out));

  logic init_step, crypt_step, init_last;
  assign init_step  = start_init  || (mode == INIT);
  assign crypt_step = start_crypt || (mode == CRYPT);
  assign init_last  = (mode == INIT) && (cnt == 2'(INIT_ROUNDS - 1));

  hb_lfsr u_lfsr (
    .clk(clock), .rst_n(reset),
    .load(init_last), .seed(init_tv | LFSR_SEED_OR),
    .step(crypt_step), .q(), .q_next(lfsr_next));

  // ------------------------------------------------------------- control
  always_ff @(posedge clock) begin
    if (!reset) begin
      mode    <= IDLE;
      cnt     <= '0;
      key_ptr <= '0;
      dec_q   <= 1'b0;
      key     <= '0;
      rs      <= '0;
      tv3     <= '0;
      e_done  <= 1'b0;
      for (int i = 0; i < NWORDS; i++) begin
        din_buf[i] <= '0;
        dout[i]    <= '0;
      end
    end else begin
      e_done <= 1'b0;

      // key register file
      if (mode == IDLE && !t_in && !t_enc) begin
        if (t_cl_in) begin
          key     <= '0;
          key_ptr <= '0;
        end else if (e_write) begin
          key[KEY_W - SUBKEY_W*int'(key_ptr) - 1 -: SUBKEY_W] <= e_data_in;
          key_ptr <= key_ptr + 2'd1;
        end
      end

      if (init_step) begin
        rs <= init_out;
        if (start_init) begin
          mode <= INIT;
          cnt  <= 2'd1;
        end else if (init_last) begin
          mode   <= IDLE;
          cnt    <= '0;
          tv3    <= init_tv;
          e_done <= 1'b1;
        end else begin
          cnt <= cnt + 2'd1;
        end
      end else if (crypt_step) begin
        rs        <= ed_out;
        dout[cnt] <= ed_dout;
        if (start_crypt) begin
          mode       <= CRYPT;
          cnt        <= 2'd1;
          dec_q      <= t_if;
          din_buf[1] <= e_pt1;
          din_buf[2] <= e_pt2;
          din_buf[3] <= e_pt3;
        end else if (cnt == 2'(NWORDS - 1)) begin
          mode   <= IDLE;
          cnt    <= '0;
          e_done <= 1'b1;
        end else begin
          cnt <= cnt + 2'd1;
        end
      end
    end
  end

  // ------------------------------------------------------------- outputs
  assign e_ct0  = dout[0];
  assign e_ct1  = dout[1];
  assign e_ct2  = dout[2];
  assign e_ct3  = dout[3];
  assign e_rs1  = rs.rs1;
  assign e_rs2  = rs.rs2;
  assign e_rs3  = rs.rs3;
  assign e_rs4  = rs.rs4;
  assign e_tv3  = tv3;
  assign e_busy = (mode != IDLE);

  // the completion pulse always comes with the return to idle
  a_done_idle: assert property (@(posedge clock) disable iff (!reset)
    e_done |-> mode == IDLE);

endmodule
