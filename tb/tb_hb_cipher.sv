// tb_hb_cipher: random and corner checks of the 16-bit block cipher E_k
// against the reference model, for both readings of "<<". Also checks that
// for one fixed key E_k is a permutation of all 65536 words.
module tb_hb_cipher;
  import hb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] m, cr, cs;
  logic [63:0] k;

  hb_cipher #(.ROTATE(1'b1)) dut_rot (.m(m), .k(k), .c(cr));
  hb_cipher #(.ROTATE(1'b0)) dut_shf (.m(m), .k(k), .c(cs));

  task automatic check_one;
    #1;
    checks += 2;
    if (cr !== ref_e(m, k, 1'b1)) begin
      failures++;
      if (failures < 10) $display("rot m=%h k=%h got %h exp %h", m, k, cr, ref_e(m, k, 1'b1));
    end
    if (cs !== ref_e(m, k, 1'b0)) begin
      failures++;
      if (failures < 10) $display("shift m=%h k=%h got %h exp %h", m, k, cs, ref_e(m, k, 1'b0));
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [65536];
    m = '0; k = '0; check_one();
    m = '1; k = '1; check_one();
    for (int j = 0; j < 64; j++) begin m = 16'h1234; k = 64'd1 << j; check_one(); end
    for (int n = 0; n < 5000; n++) begin
      m = 16'($urandom);
      k = {$urandom, $urandom};
      check_one();
    end
    // bijectivity for one key
    k = 64'h0123_4567_89AB_CDEF;
    for (int v = 0; v < 65536; v++) seen[v] = 1'b0;
    for (int v = 0; v < 65536; v++) begin
      m = 16'(v);
      #1;
      seen[cr] = 1'b1;
    end
    for (int v = 0; v < 65536; v++) begin
      checks++;
      if (!seen[v]) begin failures++; if (failures < 10) $display("value %h never produced", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
