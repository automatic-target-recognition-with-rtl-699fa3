// tb_atr_full: the board at its default parameters on one complete image
// strip: 90 rows of 640 pixels are broadcast to the six Round 0 chips and a
// 619 x 84 area (all pixels whose templates stay inside the strip) is tested
// against six template pairs at once, followed by Round 1 on 20 ROIs. See
// atr_top_body.svh for the sequence and the checks.
module tb_atr_full;
  localparam int ROWS = 90, AREA_R0 = 3, AREA_C0 = 10, DX = 619, DY = 84, N_R1 = 20;
  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  `include "atr_top_body.svh"
endmodule
