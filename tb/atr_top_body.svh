// atr_top_body.svh: body of the board-level testbenches, for inclusion in a
// testbench module that defines ROWS (image rows loaded), AREA_R0/AREA_C0
// (first row and column tested), DX, DY (area size) and N_R1 (ROIs sent to
// Round 1). The top runs at its default parameters: six Round 0 chips,
// 640-pixel rows.
//
// Sequence: the image strip is broadcast once to all Round 0 chips; each chip
// gets its own template pair; area registers are broadcast and all chips are
// started with one broadcast command; the test waits for all six interrupts,
// reads each chip's ROI list and compares it with the reference equations.
// Then N_R1 ROIs found by chip 0 are passed through the Round 1 chip (40
// point pairs taken around each ROI; every third set altered so that it
// passes) and its decisions compared with the reference Round 1 test.
// The mechanisms counted (each must occur): broadcast writes, ROI writes
// that hold back the test-point stream, pixel pairs whose two ROI decisions
// went through the shared ASSERT unit, interrupts, dropped odd pixels at the
// end of a row, Round 1 passes and Round 1 rejections.

  import atr_pkg::*;
  `include "atr_ref.svh"
  `include "r0_scene.svh"

  localparam int W = 640, NC = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  hbus_req_t            hb_req;
  hbus_rsp_t            hb_rsp;
  logic [HB_CHIP_W-1:0] host_chip;
  logic [NC-1:0]        irq;
  sram_req_t            sram [NC];
  logic [DATA_W-1:0]    sram_rdata [NC];

  atr_top dut (.clk, .rst_n, .host_req(hb_req), .host_chip, .host_rsp(hb_rsp),
               .irq, .sram, .sram_rdata);

  for (genvar i = 0; i < NC; i++) begin : g_mem
    sram_64kx16 u_mem (.clk, .req(sram[i]), .rdata(sram_rdata[i]));
  end

  `include "hb_host.svh"

  int checks = 0, failures = 0;
  int n_bcast = 0, n_stall = 0, n_pairs = 0, n_irq = 0, n_r1_pass = 0, n_r1_fail = 0;
  int n_odd = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // mechanism monitors
  logic [NC-1:0] irq_q;
  always @(posedge clk) begin
    irq_q <= irq;
    if (rst_n) n_irq += $countones(irq & ~irq_q);
    if (hb_req.req && hb_req.we && host_chip == HB_BROADCAST && hb_rsp.ack) n_bcast++;
  end
  for (genvar i = 0; i < NC; i++) begin : g_mon
    always @(posedge clk) begin
      if (dut.g_r0[i].u_r0.u_seq.rd_req && dut.g_r0[i].u_r0.u_seq.roi_req) n_stall++;
      if (rst_n && dut.g_r0[i].u_r0.u_cu.res_valid) n_pairs++;
    end
  end

  task automatic sel(input logic [HB_CHIP_W-1:0] c);
    host_chip = c;
  endtask

  logic [15:0] tpl [NC][60];

  initial begin
    int lists [NC][$];
    logic [15:0] r;
    int cyc;
    hb_req = '0; host_chip = '0; irq_q = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    make_image(ROWS, W, 7);
    sel(HB_BROADCAST);
    hb_write(R0_IMG_ADDR, 16'h0);
    foreach (scene_img[i]) hb_write(R0_IMG_DATA, {8'h0, scene_img[i]});
    hb_write(R0_BASE, 16'(AREA_R0 * W + AREA_C0));
    hb_write(R0_DX, 16'(DX));
    hb_write(R0_DY, 16'(DY));
    hb_write(R0_ROI_BASE, 16'(ROWS * W + 8));
    hb_write(R0_CMD, 16'h2);
    for (int c = 0; c < NC; c++) begin
      make_template(W);
      foreach (scene_off[k]) tpl[c][k] = scene_off[k];
      sel(4'(c));
      foreach (scene_off[k]) hb_write(R0_TP_DATA, scene_off[k]);
      ref_rois(AREA_R0 * W + AREA_C0, DX, DY, W);
      lists[c] = scene_rois;
    end
    if (DX % 2 == 1) n_odd = DY * NC;
    sel(HB_BROADCAST);
    hb_write(R0_CMD, 16'h1);
    cyc = 0;
    while (irq != '1) begin @(negedge clk); cyc++; end
    $display("all %0d chips done after %0d cycles (%0d pixel pairs each)", NC, cyc,
             (DX + 1) / 2 * DY);
    check(cyc >= (DX + 1) / 2 * DY * 60, "no chip can be faster than 60 cycles per pair");

    for (int c = 0; c < NC; c++) begin
      sel(4'(c));
      hb_read(R0_ROI_COUNT, r);
      check(r == 16'(lists[c].size()), $sformatf("chip %0d ROI count %0d exp %0d", c, r,
                                                 lists[c].size()));
      hb_write(R0_RD_ADDR, 16'(ROWS * W + 8));
      foreach (lists[c][i]) begin
        hb_read(R0_RD_DATA, r);
        check(r == 16'(lists[c][i]), $sformatf("chip %0d ROI %0d", c, i));
      end
      hb_write(R0_CMD, 16'h4);
      $display("chip %0d: %0d ROIs", c, lists[c].size());
    end
    check(irq == '0, "interrupts acknowledged");

    // Round 1 on ROIs of chip 0: 40 point pairs around each ROI, 4 bits
    sel(4'(NC));
    for (int k = 0; k < N_R1; k++) begin
      int p [40], q [40], roi;
      bit exp;
      roi = (lists[0].size() != 0) ? lists[0][k % lists[0].size()] : AREA_R0 * W + AREA_C0 + k;
      for (int i = 0; i < 40; i++) begin
        int a, b;
        a = roi + ($urandom_range(2) - 1) * W + $urandom_range(4) - 2;
        b = roi + ($urandom_range(6) - 3) * W + (k % 2 == 0 ? -8 : $urandom_range(16) - 8);
        p[i] = int'(scene_img[a][7:4]);
        q[i] = int'(scene_img[b][7:4]);
        // every third set: contrast only in the SumP half, so the test passes
        if (k % 3 == 2) q[i] = (i < 20) ? p[i] ^ 8 : p[i];
      end
      exp = ref_r1(p, q);
      for (int w = 0; w < 20; w++)
        hb_write(R1_PAIRS_IN, {4'(p[w]), 4'(q[w]), 4'(p[w+20]), 4'(q[w+20])});
      repeat (R1_LAT) @(negedge clk);
      hb_read(R1_RESULT, r);
      check(r[1:0] == {exp, 1'b1}, $sformatf("Round 1 on ROI %0d", roi));
      if (r[1]) n_r1_pass++; else n_r1_fail++;
    end

    $display("broadcasts %0d, stalls %0d, pairs %0d, irqs %0d, odd %0d, r1 pass %0d fail %0d",
             n_bcast, n_stall, n_pairs, n_irq, n_odd, n_r1_pass, n_r1_fail);
    check(n_bcast > 0, "broadcast used");
    check(n_stall > 0, "ROI write held back the read stream");
    check(n_pairs == NC * (DX + 1) / 2 * DY, "every pair decided by the shared ASSERT unit");
    check(n_irq == NC, "one interrupt per chip");
    check(n_odd > 0, "odd pixel at row end dropped");
    check(n_r1_pass > 0, "Round 1 pass seen");
    check(n_r1_fail > 0, "Round 1 rejection seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
