// tb_assert_unit: checks the bit-serial ASSERT unit against a direct integer
// evaluation of 20(HN*CD + CN*HD) - 13(HD*CD) >= 0, on random operands, on
// operands made from random TEMPERATURE sums, on cases that sit exactly on
// the 13/20 threshold, and at full-scale values. Each decision must arrive
// exactly 17 cycles after start, with ready low in between.
module tb_assert_unit;
  import atr_pkg::*;
  `include "atr_ref.svh"

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  start, ready, out_valid, roi;
  conv_t in;

  assert_unit dut (.*);

  int checks = 0, failures = 0, n_true = 0, n_false = 0;
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input conv_t c);
    int lat = 0;
    bit exp;
    exp = ref_assert(c);
    in = c; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    in = '0;
    while (!out_valid) begin
      lat++;
      if (ready) begin failures++; $display("ready high while busy"); end
      @(negedge clk);
      if (lat > 100) break;
    end
    checks += 2;
    if (lat != T30_W + 1) begin
      failures++; $display("latency %0d", lat);
    end
    if (roi !== exp) begin
      failures++; $display("roi %0d exp %0d for %h", roi, exp, c);
    end
    if (exp) n_true++; else n_false++;
  endtask

  initial begin
    conv_t c;
    temp_t t;
    start = 1'b0; in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // random sums through CONVERT
    for (int k = 0; k < 300; k++) begin
      t.bkg_hot  = 16'($urandom_range(27900));
      t.bkg_cold = 16'($urandom_range(27900));
      t.trg_hot  = 16'($urandom_range(27900));
      t.trg_cold = 16'($urandom_range(27900));
      run(ref_conv(t));
    end
    // exactly on the threshold: HN/HD = 13/20, CN = 0
    for (int k = 1; k < 50; k++) begin
      c.hot_n = 16'(13 * k); c.hot_d = 16'(20 * k);
      c.cold_n = 16'd0; c.cold_d = 16'($urandom_range(1000, 1));
      run(c);
      c.hot_n = 16'(13 * k - 1);          // just below
      run(c);
    end
    // full scale and zero
    c = '{hot_n: 16'd55800, hot_d: 16'd55800, cold_n: 16'd0, cold_d: 16'd55800};
    run(c);
    c = '0;
    run(c);
    c = '{hot_n: 16'd0, hot_d: 16'hffff, cold_n: 16'd0, cold_d: 16'hffff};
    run(c);
    checks++;
    if (n_true < 10 || n_false < 10) begin
      failures++; $display("poor coverage %0d/%0d", n_true, n_false);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
