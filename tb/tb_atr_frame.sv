// tb_atr_frame: Round 0 on one whole 480 x 640 frame with the board at its
// default parameters (six Round 0 chips, 640-pixel rows, 64K-word SRAMs).
//
// The frame is cut into five horizontal strips of different heights, each
// with its own six template pairs, as a range-dependent template scaling
// would require. A strip taller than the SRAM can hold is cut again into
// chunks of at most 84 tested rows. A chunk is loaded with 3 margin rows
// above and below, so rows next to a chunk border are broadcast twice. All
// pixels whose templates stay inside the frame are tested: rows 3..476,
// columns 8..631.
//
// For every chunk the testbench broadcasts the rows and the area registers,
// loads new templates at the start of a strip, starts all chips with one
// broadcast, waits for all six interrupts, then reads back and compares
// every chip's ROI list with the reference equations. It checks that:
//   * each chip decides every pixel pair of the frame exactly once;
//   * each chunk takes at least 60 cycles per pixel pair;
//   * the compute time summed over the frame lies between 60 cycles per pair
//     and that plus one cycle per ROI and a small drain per chunk.
// Each chip's ROI set is also compared pixel by pixel with the original
// algorithm: a real-valued MEAN, real divisions and a 0.65 threshold, on the
// same 5-bit pixels. Pixels where that algorithm divides by zero, or lands
// within 1e-9 of the threshold, are left out of this comparison.
// It also prints the total cycle count against the 9.2 M cycles the
// 60-cycles-per-pair rate gives for the frame. Strip heights, the chunk
// size and the synthetic scene are this testbench's own choices.
module tb_atr_frame;
  import atr_pkg::*;
  `include "atr_ref.svh"
  `include "r0_scene.svh"

  localparam int W = 640, H = 480, NC = 6, M = 3, C0 = 8, DX = W - 2 * C0;
  localparam int MAX_DY = 84;
  localparam int STRIP_H [5] = '{60, 84, 96, 110, 124};  // sums to H - 2 * M

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
  int n_pairs [NC];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  for (genvar i = 0; i < NC; i++) begin : g_mon
    always @(posedge clk)
      if (rst_n && dut.g_r0[i].u_r0.u_cu.res_valid) n_pairs[i]++;
  end

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The original algorithm with a real-valued MEAN and real divisions, on the
  // same 5-bit pixels; -1 where it is undefined (a zero denominator) or within
  // 1e-9 of the 0.65 threshold, where the two forms need not agree.
  function automatic int orig_pixel(input int p);
    real b [30], t [30], mean, bh, bc, th, tc, hc, cc;
    logic [15:0] a;
    logic [7:0]  v;
    mean = 0.0;
    for (int i = 0; i < 30; i++) begin
      a = 16'(p) + scene_off[i];      v = scene_img[a]; b[i] = real'(v[7:3]);
      a = 16'(p) + scene_off[30 + i]; v = scene_img[a]; t[i] = real'(v[7:3]);
      mean += b[i] / 30.0;
    end
    bh = 0.0; bc = 0.0; th = 0.0; tc = 0.0;
    for (int i = 0; i < 30; i++) begin
      if (b[i] > mean) bh += b[i] - mean; else bc += mean - b[i];
      if (t[i] > mean) th += t[i] - mean; else tc += mean - t[i];
    end
    if (th + bh < 1e-9 || tc + bc < 1e-9) return -1;
    hc = (th - bh) / (th + bh); if (hc < 0.0) hc = 0.0;
    cc = (tc - bc) / (tc + bc); if (cc < 0.0) cc = 0.0;
    if (hc + cc - 0.65 < 1e-9 && 0.65 - (hc + cc) < 1e-9) return -1;
    return (hc + cc >= 0.65) ? 1 : 0;
  endfunction

  logic [7:0] frame [];
  logic [15:0] tpl [NC][60];

  initial begin
    int row, n_chunks, total_cyc, total_rois, total_sent, n_orig, n_orig_bad;
    logic [15:0] r;
    hb_req = '0; host_chip = '0;
    foreach (n_pairs[i]) n_pairs[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    make_image(H, W, 11);
    frame = scene_img;
    row = M; n_chunks = 0; total_cyc = 0; total_rois = 0; total_sent = 0;
    n_orig = 0; n_orig_bad = 0;

    for (int s = 0; s < 5; s++) begin
      int left;
      // new template pairs for this range strip
      for (int c = 0; c < NC; c++) begin
        make_template(W);
        foreach (scene_off[k]) tpl[c][k] = scene_off[k];
      end
      left = STRIP_H[s];
      while (left > 0) begin
        int dy, rows, cyc, lists [NC][$];
        bit hw_roi [int];
        dy   = (left > MAX_DY) ? MAX_DY : left;
        rows = dy + 2 * M;
        // chunk image: frame rows row-M .. row+dy+M-1, stored from address 0
        scene_img = new[rows * W + 1];
        foreach (scene_img[i]) scene_img[i] = (i < rows * W) ? frame[(row - M) * W + i] : 8'h0;
        host_chip = HB_BROADCAST;
        hb_write(R0_IMG_ADDR, 16'h0);
        for (int i = 0; i < rows * W; i++) hb_write(R0_IMG_DATA, {8'h0, scene_img[i]});
        total_sent += rows * W;
        hb_write(R0_BASE, 16'(M * W + C0));
        hb_write(R0_DX, 16'(DX));
        hb_write(R0_DY, 16'(dy));
        hb_write(R0_ROI_BASE, 16'(rows * W + 8));
        if (left == STRIP_H[s]) begin
          hb_write(R0_CMD, 16'h2);
          for (int c = 0; c < NC; c++) begin
            host_chip = 4'(c);
            foreach (tpl[c][k]) hb_write(R0_TP_DATA, tpl[c][k]);
          end
        end
        for (int c = 0; c < NC; c++) begin
          foreach (tpl[c][k]) scene_off[k] = tpl[c][k];
          ref_rois(M * W + C0, DX, dy, W);
          lists[c] = scene_rois;
        end
        host_chip = HB_BROADCAST;
        hb_write(R0_CMD, 16'h1);
        cyc = 0;
        while (irq != '1) begin @(negedge clk); cyc++; end
        check(cyc >= DX / 2 * dy * 60, $sformatf("chunk %0d: 60 cycles per pair", n_chunks));
        total_cyc += cyc;
        for (int c = 0; c < NC; c++) begin
          host_chip = 4'(c);
          hb_read(R0_ROI_COUNT, r);
          check(r == 16'(lists[c].size()), $sformatf("chunk %0d chip %0d ROI count %0d exp %0d",
                                                     n_chunks, c, r, lists[c].size()));
          hb_write(R0_RD_ADDR, 16'(rows * W + 8));
          hw_roi.delete();
          foreach (lists[c][i]) begin
            hb_read(R0_RD_DATA, r);
            check(r == 16'(lists[c][i]), $sformatf("chunk %0d chip %0d ROI %0d", n_chunks, c, i));
            hw_roi[int'(r)] = 1'b1;
          end
          // the chip's ROI set against the original real-valued algorithm
          foreach (tpl[c][k]) scene_off[k] = tpl[c][k];
          for (int y = 0; y < dy; y++)
            for (int x = 0; x < DX; x++) begin
              int px, o;
              px = (M + y) * W + C0 + x;
              o  = orig_pixel(px);
              if (o >= 0) begin
                n_orig++;
                if ((o == 1) != hw_roi.exists(px)) n_orig_bad++;
              end
            end
          hb_write(R0_CMD, 16'h4);
          total_rois += lists[c].size();
        end
        $display("strip %0d chunk %0d: rows %0d..%0d, %0d cycles", s, n_chunks, row,
                 row + dy - 1, cyc);
        row += dy; left -= dy; n_chunks++;
      end
    end

    check(row == H - M, "whole frame covered");
    check(n_orig_bad == 0, $sformatf("%0d of %0d decisions differ from the real-valued algorithm",
                                     n_orig_bad, n_orig));
    check(n_orig > 6 * DX * (H - 2 * M) * 9 / 10, "most decisions compared with the original");
    $display("%0d decisions compared with the real-valued algorithm, %0d differ", n_orig,
             n_orig_bad);
    for (int c = 0; c < NC; c++)
      check(n_pairs[c] == DX / 2 * (H - 2 * M), $sformatf("chip %0d decided %0d pairs", c,
                                                          n_pairs[c]));
    check(total_cyc >= DX / 2 * (H - 2 * M) * 60, "frame compute time at least 60 per pair");
    check(total_cyc <= DX / 2 * (H - 2 * M) * 60 + total_rois + 100 * n_chunks,
          "frame compute time within 60 per pair plus ROI writes and drain");
    $display("frame: %0d chunks, %0d pixels sent (%0d in the frame), %0d ROIs over six chips",
             n_chunks, total_sent, H * W, total_rois);
    $display("frame: %0d compute cycles; 60 cycles per pixel pair give %0d for all %0d pixels",
             total_cyc, H * W / 2 * 60, H * W);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
