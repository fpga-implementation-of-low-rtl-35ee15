// tb_hb_sbox_layer: exhaustive check of the S-box layer and its inverse.
// Every 16-bit input goes through the forward layer, compared with the
// reference model, and back through the inverse layer, which must restore it.
// The four tables are also checked to be permutations.
module tb_hb_sbox_layer;
  import hb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] d, q, back;

  hb_sbox_layer #(.INVERSE(1'b0)) dut_fwd (.d(d),  .q(q));
  hb_sbox_layer #(.INVERSE(1'b1)) dut_inv (.d(q),  .q(back));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // each table is a bijection
    for (int b = 0; b < 4; b++) begin
      bit seen [16];
      for (int x = 0; x < 16; x++) seen[x] = 1'b0;
      for (int x = 0; x < 16; x++) seen[SB[b][x]] = 1'b1;
      for (int x = 0; x < 16; x++) begin
        checks++;
        if (!seen[x]) begin failures++; $display("S%0d misses %0d", b + 1, x); end
      end
    end
    for (int v = 0; v < 65536; v++) begin
      d = 16'(v);
      #1;
      checks += 2;
      if (q !== ref_sub(d)) begin
        failures++;
        if (failures < 10) $display("fwd %h: got %h exp %h", d, q, ref_sub(d));
      end
      if (back !== d) begin
        failures++;
        if (failures < 10) $display("inv %h: got %h", d, back);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
