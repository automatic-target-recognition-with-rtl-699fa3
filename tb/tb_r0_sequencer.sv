// tb_r0_sequencer: the Round 0 sequencer with its test-point buffer, an
// SRAM port that grants every read not displaced by an ROI write, and a
// stand-in for the computation unit that answers each pixel pair 40 cycles
// after its last word with random decisions. Checks the order of the read
// addresses (pixel + offset, pixel pairs in scan order, rows IMG_W apart),
// the background/target tags, that every ROI write carries the right pixel
// and goes to roi_base + n, that the second pixel of a pair beyond an odd
// dx is dropped, and that done comes once everything is written.
module tb_r0_sequencer;
  import atr_pkg::*;

  localparam int W = 64;
  localparam int IW = $clog2(NTP + 1);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              start, busy, done;
  logic [ADDR_W-1:0] base, dx, dy, roi_base, roi_count;
  logic [ADDR_W-1:0] tp_off, rd_addr, roi_addr, roi_data;
  logic [IW-1:0]     tp_idx, tp_count;
  logic              tp_last, tp_next, tp_rewind;
  logic              rd_req, rd_gnt, rd_rvalid;
  logic              cu_valid, cu_first, cu_trg, cu_res_valid, cu_roi_a, cu_roi_b;
  logic              roi_req, roi_gnt;
  logic              push;
  logic [ADDR_W-1:0] push_data;

  r0_sequencer #(.IMG_W(W)) dut (.*);
  tp_buffer u_tp (.clk, .rst_n, .clear(1'b0), .push, .push_data, .rewind(tp_rewind),
                  .next(tp_next), .rd_data(tp_off), .rd_idx(tp_idx), .rd_last(tp_last),
                  .count(tp_count));

  // SRAM port stand-in: ROI writes first
  assign roi_gnt = roi_req;
  assign rd_gnt  = rd_req && !roi_req;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rd_rvalid <= 1'b0; else rd_rvalid <= rd_gnt;

  int checks = 0, failures = 0, stalls = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] off [60];
  int exp_addr [$], exp_roi [$];
  int words = 0, cyc = 0;
  int due [$];              // cycles at which a result is due
  int pair_pix [$];         // pixel of each pair still to answer
  int cur_dx;

  always @(posedge clk) begin
    cyc++;
    cu_res_valid <= 1'b0;
    if (rst_n && rd_gnt) begin
      checks++;
      if (exp_addr.size() == 0 || rd_addr != 16'(exp_addr[0])) begin
        failures++; $display("read address %0d", rd_addr);
      end
      void'(exp_addr.pop_front());
    end
    if (rst_n && rd_req && roi_req) stalls++;
    if (rst_n && cu_valid) begin
      checks++;
      if (cu_first != (words % 60 == 0) || cu_trg != (words % 60 >= 30)) begin
        failures++; $display("tags at word %0d", words);
      end
      words++;
      if (words % 60 == 0) due.push_back(cyc + 40);
    end
    if (due.size() != 0 && due[0] == cyc) begin
      bit a, b;
      int p;
      void'(due.pop_front());
      p = pair_pix.pop_front();
      a = $urandom_range(2) == 0;
      b = $urandom_range(2) == 0;
      cu_res_valid <= 1'b1;
      cu_roi_a <= a;
      cu_roi_b <= b;
      if (a) exp_roi.push_back(p);
      if (b && ((p - int'(base)) % W) + 1 < cur_dx) exp_roi.push_back(p + 1);
    end
    if (rst_n && roi_req) begin
      checks++;
      if (exp_roi.size() == 0 || roi_data != 16'(exp_roi[0]) ||
          roi_addr != roi_base + roi_count) begin
        failures++; $display("ROI write %0d at %h", roi_data, roi_addr);
      end
      void'(exp_roi.pop_front());
    end
  end

  task automatic run(input int b, input int x, input int y);
    base = 16'(b); dx = 16'(x); dy = 16'(y); roi_base = 16'h9000; cur_dx = x;
    exp_addr.delete(); pair_pix.delete();
    for (int r = 0; r < y; r++)
      for (int c = 0; c < x; c += 2) begin
        pair_pix.push_back(b + r * W + c);
        for (int k = 0; k < 60; k++) exp_addr.push_back(int'(16'(b + r * W + c) + off[k]));
      end
    start = 1'b1; @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (exp_addr.size() != 0 || exp_roi.size() != 0 || pair_pix.size() != 0 || busy) begin
      failures++; $display("left: %0d %0d %0d", exp_addr.size(), exp_roi.size(), pair_pix.size());
    end
  endtask

  initial begin
    start = 0; push = 0; push_data = '0; cu_res_valid = 0; cu_roi_a = 0; cu_roi_b = 0;
    base = '0; dx = '0; dy = '0; roi_base = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 60; k++) begin
      off[k] = 16'(($urandom_range(6) - 3) * W + $urandom_range(20) - 10);
      push = 1'b1; push_data = off[k]; @(negedge clk);
    end
    push = 1'b0;
    run(5 * W + 12, 10, 3);
    run(4 * W + 20, 7, 4);      // odd width
    run(4 * W + 20, 1, 1);      // a single pixel
    checks++;
    if (stalls == 0) begin failures++; $display("no ROI write ever stalled a read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
