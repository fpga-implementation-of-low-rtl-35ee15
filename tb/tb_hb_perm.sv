// tb_hb_perm: exhaustive check of the linear transform L and its inverse,
// for both readings of "<<" (rotation and shift). The forward result is
// compared with the reference model; the inverse must undo it.
module tb_hb_perm;
  import hb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] d, qr, qs, br, bs;

  hb_perm #(.INVERSE(1'b0), .ROTATE(1'b1)) dut_rot     (.d(d),  .q(qr));
  hb_perm #(.INVERSE(1'b1), .ROTATE(1'b1)) dut_rot_inv (.d(qr), .q(br));
  hb_perm #(.INVERSE(1'b0), .ROTATE(1'b0)) dut_shf     (.d(d),  .q(qs));
  hb_perm #(.INVERSE(1'b1), .ROTATE(1'b0)) dut_shf_inv (.d(qs), .q(bs));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      d = 16'(v);
      #1;
      checks += 4;
      if (qr !== ref_lin(d, 1'b1)) begin
        failures++;
        if (failures < 10) $display("rot %h: got %h exp %h", d, qr, ref_lin(d, 1'b1));
      end
      if (qs !== ref_lin(d, 1'b0)) begin
        failures++;
        if (failures < 10) $display("shift %h: got %h exp %h", d, qs, ref_lin(d, 1'b0));
      end
      if (br !== d) begin failures++; if (failures < 10) $display("rot inv %h: got %h", d, br); end
      if (bs !== d) begin failures++; if (failures < 10) $display("shift inv %h: got %h", d, bs); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
