// tb_hb_encdec: encrypts random words from random states with the word
// datapath and compares ciphertext and new state with the reference model;
// then decrypts that ciphertext from the same state and checks that the
// plaintext and the same new state come back.
module tb_hb_encdec;
  import hb_pkg::*;
  import hb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic   decrypt;
  word_t  din, dout, lfsr_next;
  state_t rs_in, rs_out;
  key_t   key;

  hb_encdec dut (.decrypt(decrypt), .din(din), .rs_in(rs_in), .key(key),
                 .lfsr_next(lfsr_next), .dout(dout), .rs_out(rs_out));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_state_t  st;
    logic [15:0] pt, ct;
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < 8; i++) key[32*i +: 32] = $urandom;
      for (int i = 1; i <= 4; i++) st.rs[i] = 16'($urandom);
      st.lfsr = 16'($urandom);
      rs_in = '{rs1: st.rs[1], rs2: st.rs[2], rs3: st.rs[3], rs4: st.rs[4]};
      lfsr_next = ref_lfsr_step(st.lfsr);
      pt = 16'($urandom);
      ct = ref_encrypt(st, pt, key, 1'b1);
      // encryption
      decrypt = 1'b0; din = pt;
      #1;
      checks += 2;
      if (dout !== ct) begin
        failures++;
        if (failures < 10) $display("enc pt=%h got %h exp %h", pt, dout, ct);
      end
      if (rs_out.rs1 !== st.rs[1] || rs_out.rs2 !== st.rs[2] ||
          rs_out.rs3 !== st.rs[3] || rs_out.rs4 !== st.rs[4]) begin
        failures++;
        if (failures < 10) $display("enc state mismatch");
      end
      // decryption from the same starting state
      decrypt = 1'b1; din = ct;
      #1;
      checks += 2;
      if (dout !== pt) begin
        failures++;
        if (failures < 10) $display("dec ct=%h got %h exp %h", ct, dout, pt);
      end
      if (rs_out.rs1 !== st.rs[1] || rs_out.rs2 !== st.rs[2] ||
          rs_out.rs3 !== st.rs[3] || rs_out.rs4 !== st.rs[4]) begin
        failures++;
        if (failures < 10) $display("dec state mismatch");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
