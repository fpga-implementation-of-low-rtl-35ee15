// tb_hb_init: applies the initialization round four times, starting from a
// random nonce, and compares the final state and TV with the reference
// initialization; single rounds are compared on the way as well.
module tb_hb_init;
  import hb_pkg::*;
  import hb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  state_t rs_in, rs_out;
  key_t   key;
  word_t  tv;

  hb_init dut (.rs_in(rs_in), .key(key), .rs_out(rs_out), .tv(tv));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] nonce [4];
    ref_state_t  st;
    logic [15:0] v12, v23, v34, etv;
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < 4; i++) nonce[i] = 16'($urandom);
      for (int i = 0; i < 8; i++) key[32*i +: 32] = $urandom;
      rs_in = '{rs1: nonce[0], rs2: nonce[1], rs3: nonce[2], rs4: nonce[3]};
      for (int t = 0; t < 4; t++) begin
        // one round worked out here from the reference cipher
        v12 = ref_e(16'(rs_in.rs1 + rs_in.rs3), ref_subkey(key, 1), 1'b1);
        v23 = ref_e(16'(v12 + rs_in.rs2),       ref_subkey(key, 2), 1'b1);
        v34 = ref_e(16'(v23 + rs_in.rs3),       ref_subkey(key, 3), 1'b1);
        etv = ref_e(16'(v34 + rs_in.rs4),       ref_subkey(key, 4), 1'b1);
        #1;
        checks++;
        if (tv !== etv || rs_out.rs1 !== 16'(rs_in.rs1 + etv) || rs_out.rs2 !== 16'(rs_in.rs2 + v12) ||
            rs_out.rs3 !== 16'(rs_in.rs3 + v23) || rs_out.rs4 !== 16'(rs_in.rs4 + v34)) begin
          failures++;
          if (failures < 10) $display("round %0d mismatch tv %h/%h", t, tv, etv);
        end
        rs_in = rs_out;
      end
      ref_init(st, nonce, key, 1'b1);
      checks++;
      if (rs_in.rs1 !== st.rs[1] || rs_in.rs2 !== st.rs[2] || rs_in.rs3 !== st.rs[3] ||
          rs_in.rs4 !== st.rs[4] || tv !== st.tv3) begin
        failures++;
        if (failures < 10) $display("final state mismatch");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
