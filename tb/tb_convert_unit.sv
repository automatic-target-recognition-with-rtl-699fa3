// tb_convert_unit: checks the CONVERT stage against the reference equations
// for random and corner-case TEMPERATURE sums (equal, zero, one side larger),
// and that the output follows the input by exactly one cycle.
module tb_convert_unit;
  import atr_pkg::*;
  `include "atr_ref.svh"

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  in_valid, out_valid;
  temp_t in;
  conv_t out;

  convert_unit dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    temp_t t;
    in_valid = 1'b0; in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 400; k++) begin
      t.bkg_hot  = 16'($urandom_range(27900));
      t.bkg_cold = 16'($urandom_range(27900));
      t.trg_hot  = (k % 4 == 0) ? t.bkg_hot  : 16'($urandom_range(27900));
      t.trg_cold = (k % 5 == 0) ? 16'd0      : 16'($urandom_range(27900));
      in = t; in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid || out !== ref_conv(t)) begin
        failures++;
        $display("k=%0d got %h exp %h v=%0d", k, out, ref_conv(t), out_valid);
      end
      if (k % 3 == 0) begin
        @(negedge clk);
        checks++;
        if (out_valid) begin failures++; $display("spurious out_valid"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
