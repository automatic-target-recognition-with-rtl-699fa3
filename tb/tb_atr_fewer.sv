// tb_atr_fewer: Round 0 on a board with fewer Round 0 chips than template
// pairs, as when only part of the board is given to this program. The top
// is built with N_R0 = 2, so the Round 1 chip becomes chip 2. The host runs
// the six template pairs in three passes of two chips each over the same
// strip. The strip is broadcast once. Between passes only the test points
// are cleared and reloaded.
//
// Each pass checks both chips' ROI lists against the reference equations.
// The run then checks four things:
//   * every template pair was applied once;
//   * each pass took at least 60 cycles per pixel pair;
//   * each chip raised one interrupt per pass;
//   * the Round 1 chip answers at its new chip number.
// The pass schedule is host behaviour and this testbench's own.
module tb_atr_fewer;
  import atr_pkg::*;
  `include "atr_ref.svh"
  `include "r0_scene.svh"

  localparam int W = 640, NC = 2, NT = 6, ROWS = 12, R0 = 3, C0 = 9, DX = 40, DY = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  hbus_req_t            hb_req;
  hbus_rsp_t            hb_rsp;
  logic [HB_CHIP_W-1:0] host_chip;
  logic [NC-1:0]        irq;
  sram_req_t            sram [NC];
  logic [DATA_W-1:0]    sram_rdata [NC];

  atr_top #(.N_R0(NC)) dut (.clk, .rst_n, .host_req(hb_req), .host_chip,
                            .host_rsp(hb_rsp), .irq, .sram, .sram_rdata);

  for (genvar i = 0; i < NC; i++) begin : g_mem
    sram_64kx16 u_mem (.clk, .req(sram[i]), .rdata(sram_rdata[i]));
  end

  `include "hb_host.svh"

  int checks = 0, failures = 0, n_irq = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [NC-1:0] irq_q;
  always @(posedge clk) begin
    irq_q <= irq;
    if (rst_n) n_irq += $countones(irq & ~irq_q);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] r;
    int applied, cyc;
    hb_req = '0; host_chip = '0; irq_q = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    make_image(ROWS, W, 5);
    host_chip = HB_BROADCAST;
    hb_write(R0_IMG_ADDR, 16'h0);
    foreach (scene_img[i]) hb_write(R0_IMG_DATA, {8'h0, scene_img[i]});
    hb_write(R0_BASE, 16'(R0 * W + C0));
    hb_write(R0_DX, 16'(DX));
    hb_write(R0_DY, 16'(DY));
    hb_write(R0_ROI_BASE, 16'(ROWS * W + 8));

    applied = 0;
    for (int pass = 0; pass < NT / NC; pass++) begin
      int lists [NC][$];
      host_chip = HB_BROADCAST;
      hb_write(R0_CMD, 16'h2);
      for (int c = 0; c < NC; c++) begin
        make_template(W);
        host_chip = 4'(c);
        foreach (scene_off[k]) hb_write(R0_TP_DATA, scene_off[k]);
        ref_rois(R0 * W + C0, DX, DY, W);
        lists[c] = scene_rois;
      end
      host_chip = HB_BROADCAST;
      hb_write(R0_CMD, 16'h1);
      cyc = 0;
      while (irq != '1) begin @(negedge clk); cyc++; end
      check(cyc >= DX / 2 * DY * 60, $sformatf("pass %0d: 60 cycles per pair", pass));
      for (int c = 0; c < NC; c++) begin
        host_chip = 4'(c);
        hb_read(R0_ROI_COUNT, r);
        check(r == 16'(lists[c].size()), $sformatf("pass %0d chip %0d ROI count %0d exp %0d",
                                                   pass, c, r, lists[c].size()));
        hb_write(R0_RD_ADDR, 16'(ROWS * W + 8));
        foreach (lists[c][i]) begin
          hb_read(R0_RD_DATA, r);
          check(r == 16'(lists[c][i]), $sformatf("pass %0d chip %0d ROI %0d", pass, c, i));
        end
        hb_write(R0_CMD, 16'h4);
        $display("pass %0d, template pair %0d on chip %0d: %0d ROIs, %0d cycles", pass,
                 applied, c, lists[c].size(), cyc);
        applied++;
      end
    end
    check(applied == NT, "all six template pairs applied");
    check(n_irq == NT, $sformatf("one interrupt per chip and pass, saw %0d", n_irq));

    // Round 1 chip is now chip NC: one template whose SumP half has contrast
    host_chip = 4'(NC);
    for (int w = 0; w < 20; w++) hb_write(R1_PAIRS_IN, {4'(w % 16), 4'((w % 16) ^ 8), 8'h33});
    repeat (R1_LAT) @(negedge clk);
    hb_read(R1_RESULT, r);
    check(r[1:0] == 2'b11, "Round 1 chip at chip number N_R0 passes a high-contrast set");
    host_chip = 4'(NC + 1);
    hb_read(R0_STATUS, r);
    check(r == '0, "no chip beyond the Round 1 chip");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
