// tb_atr_top: end-to-end test of the board on a small strip (14 rows loaded,
// a 41 x 5 area), see atr_top_body.svh for the sequence and the checks.
module tb_atr_top;
  localparam int ROWS = 14, AREA_R0 = 4, AREA_C0 = 20, DX = 41, DY = 5, N_R1 = 12;
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  `include "atr_top_body.svh"
endmodule
