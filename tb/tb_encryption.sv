// tb_encryption: end-to-end test of the Hummingbird core at its default
// parameters. It runs several sessions, each of which:
//   loads a random 256-bit key as four 64-bit writes (sometimes after a
//   clear, sometimes with a stray write that the clear discards),
//   initializes from a random nonce and checks RS1..RS4 and TV3 against the
//   reference model,
//   encrypts several four-word messages and checks ciphertext and state,
//   then re-initializes with the same nonce and decrypts the ciphertexts,
//   which must give back the plaintexts and the same state sequence.
// Each operation must take exactly four clocks from start to e_done. Starts
// raised while the core is busy must be ignored, and a reset in the middle
// of an operation must clear everything. The test counts how often each of
// these mechanisms was exercised and fails if one never was.
module tb_encryption;
  import hb_ref_pkg::*;

  logic clock = 1'b0;
  always #5 clock = ~clock;

  int checks = 0, failures = 0;

  logic        reset;
  logic [63:0] e_data_in;
  logic        e_write, t_cl_in, t_in, t_enc, t_if;
  logic [15:0] e_nonce0, e_nonce1, e_nonce2, e_nonce3;
  logic [15:0] e_pt0, e_pt1, e_pt2, e_pt3;
  logic [15:0] e_ct0, e_ct1, e_ct2, e_ct3;
  logic [15:0] e_rs1, e_rs2, e_rs3, e_rs4, e_tv3;
  logic        e_busy, e_done;

  encryption dut (.*);

  // mechanism counters
  int n_keyload = 0, n_clear = 0, n_init = 0, n_enc = 0, n_dec = 0;
  int n_busy_ignored = 0, n_reset_mid = 0;

  initial begin
    repeat (200000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t FAIL %s", $time, what);
    end
  endtask

  task automatic idle_inputs;
    e_write = 1'b0; t_cl_in = 1'b0; t_in = 1'b0; t_enc = 1'b0; t_if = 1'b0;
  endtask

  task automatic check_state(input ref_state_t st, input string what);
    check(e_rs1 == st.rs[1] && e_rs2 == st.rs[2] && e_rs3 == st.rs[3] && e_rs4 == st.rs[4],
          $sformatf("%s state %h %h %h %h exp %h %h %h %h", what, e_rs1, e_rs2, e_rs3, e_rs4,
                    st.rs[1], st.rs[2], st.rs[3], st.rs[4]));
  endtask

  // wait for e_done, count clocks since the start edge, poke a start while busy
  task automatic wait_done(input int expected, input bit poke);
    int cyc;
    cyc = 0;
    do begin
      @(posedge clock); #1;
      cyc++;
      idle_inputs();
      if (poke && cyc == 1 && e_busy) begin
        // raise both starts mid-operation; they must change nothing
        t_in = 1'b1; t_enc = 1'b1; e_write = 1'b1; e_data_in = 64'hDEAD_BEEF_DEAD_BEEF;
        n_busy_ignored++;
      end
    end while (!e_done && cyc < 20);
    idle_inputs();
    check(cyc == expected, $sformatf("latency %0d exp %0d", cyc, expected));
  endtask

  task automatic load_key(input logic [255:0] key, input bit with_clear);
    if (with_clear) begin
      // a stray write, then a clear that must discard it
      e_write = 1'b1; e_data_in = 64'hFFFF_0000_FFFF_0000;
      @(posedge clock); #1;
      idle_inputs(); t_cl_in = 1'b1;
      @(posedge clock); #1;
      idle_inputs();
      n_clear++;
    end
    for (int i = 1; i <= 4; i++) begin
      e_write = 1'b1; e_data_in = ref_subkey(key, i);
      @(posedge clock); #1;
    end
    idle_inputs();
    n_keyload++;
  endtask

  task automatic do_init(input logic [15:0] nonce [4], input logic [255:0] key,
                         output ref_state_t st, input bit poke);
    e_nonce0 = nonce[0]; e_nonce1 = nonce[1]; e_nonce2 = nonce[2]; e_nonce3 = nonce[3];
    t_in = 1'b1;
    wait_done(4, poke);
    // the nonce inputs may change once initialization has started
    ref_init(st, nonce, key, 1'b1);
    check_state(st, "init");
    check(e_tv3 == st.tv3, $sformatf("tv3 %h exp %h", e_tv3, st.tv3));
    n_init++;
  endtask

  task automatic do_op(input bit dec, input logic [15:0] din [4], output logic [15:0] dout [4],
                       input bit poke);
    e_pt0 = din[0]; e_pt1 = din[1]; e_pt2 = din[2]; e_pt3 = din[3];
    t_enc = 1'b1; t_if = dec;
    @(posedge clock); #1;
    idle_inputs();
    // words 1..3 must have been captured: scramble the inputs
    e_pt0 = 16'($urandom); e_pt1 = 16'($urandom); e_pt2 = 16'($urandom); e_pt3 = 16'($urandom);
    begin
      int cyc;
      cyc = 1;
      while (!e_done && cyc < 20) begin
        if (poke && cyc == 1) begin
          t_in = 1'b1; t_enc = 1'b1; n_busy_ignored++;
        end
        @(posedge clock); #1;
        idle_inputs();
        cyc++;
      end
      check(cyc == 4, $sformatf("op latency %0d", cyc));
    end
    dout[0] = e_ct0; dout[1] = e_ct1; dout[2] = e_ct2; dout[3] = e_ct3;
    if (dec) n_dec++; else n_enc++;
  endtask

  initial begin
    logic [255:0] key;
    logic [15:0]  nonce [4];
    logic [15:0]  pt [8][4];
    logic [15:0]  ct [8][4];
    logic [15:0]  back [4];
    ref_state_t   st, st_enc [8];
    int           nmsg;

    idle_inputs();
    e_data_in = '0;
    {e_nonce0, e_nonce1, e_nonce2, e_nonce3} = '0;
    {e_pt0, e_pt1, e_pt2, e_pt3} = '0;
    reset = 1'b0;
    repeat (2) @(posedge clock); #1;
    reset = 1'b1;
    check(e_rs1 == 0 && e_rs2 == 0 && e_rs3 == 0 && e_rs4 == 0 && e_tv3 == 0 && !e_busy,
          "reset values");

    for (int session = 0; session < 12; session++) begin
      for (int i = 0; i < 8; i++) key[32*i +: 32] = $urandom;
      if (session == 0) key = '0;
      for (int i = 0; i < 4; i++) nonce[i] = 16'($urandom);
      nmsg = 1 + session % 8;
      load_key(key, session % 3 == 1);

      // encryption pass
      do_init(nonce, key, st, session == 2);
      for (int m = 0; m < nmsg; m++) begin
        logic [15:0] got [4];
        logic [15:0] exp [4];
        for (int w = 0; w < 4; w++) pt[m][w] = 16'($urandom);
        for (int w = 0; w < 4; w++) exp[w] = ref_encrypt(st, pt[m][w], key, 1'b1);
        do_op(1'b0, pt[m], got, session == 3 && m == 0);
        for (int w = 0; w < 4; w++) begin
          ct[m][w] = got[w];
          check(got[w] == exp[w], $sformatf("s%0d m%0d ct%0d %h exp %h", session, m, w, got[w], exp[w]));
        end
        check_state(st, "after encryption");
        st_enc[m] = st;
      end

      // decryption pass from the same nonce
      do_init(nonce, key, st, 1'b0);
      for (int m = 0; m < nmsg; m++) begin
        do_op(1'b1, ct[m], back, session == 4 && m == 0);
        for (int w = 0; w < 4; w++)
          check(back[w] == pt[m][w], $sformatf("s%0d m%0d pt%0d %h exp %h", session, m, w, back[w], pt[m][w]));
        check_state(st_enc[m], "after decryption");
      end
    end

    // reset in the middle of an operation
    e_pt0 = 16'h1111; t_enc = 1'b1;
    @(posedge clock); #1;
    idle_inputs();
    @(posedge clock); #1;
    check(e_busy, "busy mid operation");
    reset = 1'b0;
    @(posedge clock); #1;
    reset = 1'b1;
    check(!e_busy && e_rs1 == 0 && e_rs2 == 0 && e_rs3 == 0 && e_rs4 == 0 && e_ct0 == 0,
          "reset mid operation");
    n_reset_mid++;
    // the key was cleared too: encrypting zero from the zero state must match
    begin
      logic [15:0] z [4];
      logic [15:0] got [4];
      ref_state_t  zs;
      for (int i = 1; i <= 4; i++) zs.rs[i] = '0;
      zs.lfsr = '0;
      for (int w = 0; w < 4; w++) z[w] = '0;
      do_op(1'b0, z, got, 1'b0);
      for (int w = 0; w < 4; w++)
        check(got[w] == ref_encrypt(zs, 16'h0, 256'h0, 1'b1), "zero key after reset");
    end

    $display("mechanisms: keyload=%0d clear=%0d init=%0d enc=%0d dec=%0d busy_ignored=%0d reset_mid=%0d",
             n_keyload, n_clear, n_init, n_enc, n_dec, n_busy_ignored, n_reset_mid);
    check(n_keyload > 0, "key load exercised");
    check(n_clear > 0, "key clear exercised");
    check(n_init > 0, "initialization exercised");
    check(n_enc > 0, "encryption exercised");
    check(n_dec > 0, "decryption exercised");
    check(n_busy_ignored > 0, "start while busy exercised");
    check(n_reset_mid > 0, "reset mid operation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
