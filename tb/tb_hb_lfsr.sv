// tb_hb_lfsr: steps the LFSR against the recurrence of its feedback
// polynomial, checks q_next, that load wins over step, that holding (no
// load, no step) keeps the value, and that the sequence from 0x1000 has the
// full period 2^16 - 1 (the polynomial is primitive).
module tb_hb_lfsr;
  import hb_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic        rst_n, load, step;
  logic [15:0] seed, q, q_next, expv;

  hb_lfsr dut (.clk(clk), .rst_n(rst_n), .load(load), .seed(seed), .step(step),
               .q(q), .q_next(q_next));

  task automatic expect_q(input logic [15:0] e, input string what);
    checks++;
    if (q !== e) begin
      failures++;
      if (failures < 10) $display("%s: got %h exp %h", what, q, e);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int period;
    rst_n = 1'b0; load = 1'b0; step = 1'b0; seed = '0;
    @(posedge clk); #1;
    expect_q(16'h0000, "reset");
    rst_n = 1'b1;
    // load wins over step
    seed = 16'hBEEF; load = 1'b1; step = 1'b1;
    @(posedge clk); #1;
    expect_q(16'hBEEF, "load");
    load = 1'b0; step = 1'b0;
    @(posedge clk); #1;
    expect_q(16'hBEEF, "hold");
    // random stepping against the recurrence
    expv = q;
    for (int n = 0; n < 2000; n++) begin
      step = 1'($urandom);
      checks++;
      if (q_next !== ref_lfsr_step(q)) begin
        failures++;
        if (failures < 10) $display("q_next of %h: got %h", q, q_next);
      end
      if (step) expv = ref_lfsr_step(expv);
      @(posedge clk); #1;
      expect_q(expv, "step");
    end
    // full period from the initialization constant
    seed = 16'h1000; load = 1'b1;
    @(posedge clk); #1;
    load = 1'b0; step = 1'b1;
    period = 0;
    do begin
      @(posedge clk); #1;
      period++;
    end while (q != 16'h1000 && period < 70000);
    step = 1'b0;
    checks++;
    if (period != 65535) begin failures++; $display("period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
