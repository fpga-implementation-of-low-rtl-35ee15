// tb_hb_decipher: the inverse block cipher must return the word that the
// reference cipher encrypted, for random words and keys and both readings
// of "<<".
module tb_hb_decipher;
  import hb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] m, cr, cs, mr, ms;
  logic [63:0] k;

  hb_decipher #(.ROTATE(1'b1)) dut_rot (.c(cr), .k(k), .m(mr));
  hb_decipher #(.ROTATE(1'b0)) dut_shf (.c(cs), .k(k), .m(ms));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 8000; n++) begin
      m  = 16'($urandom);
      k  = (n < 2) ? {64{n[0]}} : {$urandom, $urandom};
      cr = ref_e(m, k, 1'b1);
      cs = ref_e(m, k, 1'b0);
      #1;
      checks += 2;
      if (mr !== m) begin failures++; if (failures < 10) $display("rot c=%h k=%h got %h exp %h", cr, k, mr, m); end
      if (ms !== m) begin failures++; if (failures < 10) $display("shift c=%h k=%h got %h exp %h", cs, k, ms, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
