// tb_r0_chip: one Round 0 chip with its SRAM, driven through the host bus.
// Loads a synthetic image strip, a template pair and an area, starts the
// test, waits for the interrupt, reads the ROI count and the ROI list back
// and compares them with the reference equations. Done for two template
// pairs and two areas (one with an odd width). Also checks the test time
// against ceil(dx/2) * dy * 60 cycles plus one per ROI, the status
// register, and that the interrupt is cleared by its acknowledge.
module tb_r0_chip;
  import atr_pkg::*;
  `include "atr_ref.svh"
  `include "r0_scene.svh"

  localparam int W = 640;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  hbus_req_t         hb_req;
  hbus_rsp_t         hb_rsp;
  logic              irq;
  sram_req_t         sram;
  logic [DATA_W-1:0] sram_rdata;

  r0_chip     dut (.*);
  sram_64kx16 u_mem (.clk, .req(sram), .rdata(sram_rdata));

  `include "hb_host.svh"

  int checks = 0, failures = 0;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_test(input int base, input int dx, input int dy, input int roi_base);
    int exp_list [$];
    logic [15:0] r;
    int t0, cyc;
    ref_rois(base, dx, dy, W);
    exp_list = scene_rois;
    hb_write(R0_CMD, 16'h2);                   // clear test points
    foreach (scene_off[i]) hb_write(R0_TP_DATA, scene_off[i]);
    hb_write(R0_BASE, 16'(base));
    hb_write(R0_DX, 16'(dx));
    hb_write(R0_DY, 16'(dy));
    hb_write(R0_ROI_BASE, 16'(roi_base));
    hb_read(R0_STATUS, r);
    check(r == 16'h3c00, $sformatf("status before start %h", r));
    hb_write(R0_CMD, 16'h1);
    cyc = 0;
    while (!irq) begin @(negedge clk); cyc++; end
    // one cycle of the start write, read stream, ROI writes, drain
    check(cyc >= (dx + 1) / 2 * dy * 60 + exp_list.size() &&
          cyc <= (dx + 1) / 2 * dy * 60 + exp_list.size() + 45,
          $sformatf("test time %0d for %0d pairs, %0d ROIs", cyc, (dx + 1) / 2 * dy,
                    exp_list.size()));
    hb_read(R0_ROI_COUNT, r);
    check(r == 16'(exp_list.size()), $sformatf("ROI count %0d exp %0d", r, exp_list.size()));
    hb_write(R0_RD_ADDR, 16'(roi_base));
    foreach (exp_list[i]) begin
      hb_read(R0_RD_DATA, r);
      check(r == 16'(exp_list[i]), $sformatf("ROI %0d: %0d exp %0d", i, r, exp_list[i]));
    end
    hb_read(R0_STATUS, r);
    check(r[1:0] == 2'b10, "irq set, not busy");
    hb_write(R0_CMD, 16'h4);
    check(!irq, "irq acknowledged");
    $display("area %0d x %0d: %0d ROIs in %0d cycles", dx, dy, exp_list.size(), cyc);
  endtask

  initial begin
    hb_req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    make_image(12, W, 1);
    hb_write(R0_IMG_ADDR, 16'h0);
    foreach (scene_img[i]) hb_write(R0_IMG_DATA, {8'h0, scene_img[i]});
    // check the redundant byte layout of a few words
    for (int k = 100; k < 104; k++)
      check(u_mem.mem[k] == {3'b0, scene_img[k+1][7:3], 3'b0, scene_img[k][7:3]},
            "image layout");
    make_template(W);
    run_test(3 * W + 10, 60, 4, 16'h4000);
    make_template(W);
    run_test(4 * W + 100, 37, 3, 16'h5000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
