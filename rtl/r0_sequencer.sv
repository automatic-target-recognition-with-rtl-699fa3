// r0_sequencer: runs one Round 0 test of an image area against the template
// pair held in the test-point buffer.
//
// The area is given by a base address (SRAM word of its first pixel), dx
// pixels per row and dy rows; rows are IMG_W words apart, the image strip
// being stored row after row. Pixels are taken two at a time (n, n+1). For
// each pair the sequencer issues 60 SRAM reads, one per test-point offset,
// at address n + offset; the low byte of each word is the point for pixel n
// and the high byte the point for pixel n+1. Reads are issued back to back,
// one per cycle, so a pair costs 60 cycles and the whole area
// ceil(dx/2) * dy * 60 cycles plus one cycle for every ROI written.
//
// The decisions come back from the computation unit in pair order. Every
// pixel found to be a region of interest (ROI) has its address queued and
// written to the SRAM list that starts at roi_base; an ROI write takes the
// SRAM for one cycle and holds back the read stream. When the last pair is
// decided and the last ROI written, done pulses for one cycle. If dx is odd
// the second pixel of the last pair in a row is outside the area and its
// decision is dropped.
//
// The use of base address, dx, dy and of base + offset addressing is the
// document's; the row pitch, the ROI list at roi_base, the queues and the
// completion rule are this design's.
// Lint: rst_n also feeds the assertions' disable clause, which Verilator
// reports as a reset used both synchronously and asynchronously.
module r0_sequencer
  import atr_pkg::*;
#(
  parameter int unsigned IMG_W = 640     // pixels per image row
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [ADDR_W-1:0]        base,
  input  logic [ADDR_W-1:0]        dx,
  input  logic [ADDR_W-1:0]        dy,
  input  logic [ADDR_W-1:0]        roi_base,
  output logic                     busy,
  output logic                     done,
  output logic [ADDR_W-1:0]        roi_count,
  // test-point buffer
  input  logic [ADDR_W-1:0]        tp_off,
  input  logic [$clog2(NTP+1)-1:0] tp_idx,
  input  logic                     tp_last,
  output logic                     tp_next,
  output logic                     tp_rewind,
  // SRAM controller, test-point reads
  output logic                     rd_req,
  output logic [ADDR_W-1:0]        rd_addr,
  input  logic                     rd_gnt,
  input  logic                     rd_rvalid,
  // computation unit
  output logic                     cu_valid,
  output logic                     cu_first,
  output logic                     cu_trg,
  input  logic                     cu_res_valid,
  input  logic                     cu_roi_a,
  input  logic                     cu_roi_b,
  // SRAM controller, ROI writes
  output logic                     roi_req,
  output logic [ADDR_W-1:0]        roi_addr,
  output logic [ADDR_W-1:0]        roi_data,
  input  logic                     roi_gnt
);

  localparam int unsigned QD = 4;   // depth of the pair and ROI queues

  // ---------------- address generation ----------------
  logic              issuing;
  logic [ADDR_W-1:0] row_addr, col, row;
  logic [ADDR_W-1:0] pix;
  assign pix       = row_addr + col;
  assign rd_req    = issuing;
  assign rd_addr   = pix + tp_off;
  assign tp_next   = issuing && rd_gnt;
  assign tp_rewind = start;

  logic pair_end, row_end, area_end;
  assign pair_end = issuing && rd_gnt && tp_last;
  assign row_end  = (ADDR_W+1)'(col) + 2 >= (ADDR_W+1)'(dx);
  assign area_end = row_end && (row + 1'b1 >= dy);

  // stream tags, aligned with the read data one cycle after the grant
  logic tag_first, tag_trg;
  assign cu_valid = rd_rvalid;
  assign cu_first = tag_first;
  assign cu_trg   = tag_trg;

  // ---------------- pending pairs ----------------
  typedef struct packed {
    logic [ADDR_W-1:0] pix;
    logic              b_ok;
  } pair_t;
  pair_t pq [QD];
  logic [$clog2(QD):0] pq_cnt;
  logic [$clog2(QD)-1:0] pq_wp, pq_rp;

  // ---------------- ROI queue ----------------
  logic [ADDR_W-1:0] rq [QD];
  logic [$clog2(QD):0] rq_cnt;
  logic [$clog2(QD)-1:0] rq_wp, rq_rp;

  assign roi_req  = rq_cnt != 0;
  assign roi_addr = roi_base + roi_count;
  assign roi_data = rq[rq_rp];

  // results of the oldest pair: up to two ROI locations to queue
  pair_t head;
  logic  push_a, push_b;
  assign head   = pq[pq_rp];
  assign push_a = cu_res_valid && cu_roi_a;
  assign push_b = cu_res_valid && cu_roi_b && head.b_ok;

  logic pop_r;
  assign pop_r = roi_req && roi_gnt;

  always_ff @(posedge clk) begin
    if (pair_end) pq[pq_wp] <= '{pix: pix, b_ok: (ADDR_W+1)'(col) + 1 < (ADDR_W+1)'(dx)};
    if (push_a && push_b) begin
      rq[rq_wp]      <= head.pix;
      rq[rq_wp + 1'b1] <= head.pix + 1'b1;
    end else if (push_a) begin
      rq[rq_wp] <= head.pix;
    end else if (push_b) begin
      rq[rq_wp] <= head.pix + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0; busy <= 1'b0; done <= 1'b0;
      row_addr <= '0; col <= '0; row <= '0;
      tag_first <= 1'b0; tag_trg <= 1'b0;
      pq_cnt <= '0; pq_wp <= '0; pq_rp <= '0;
      rq_cnt <= '0; rq_wp <= '0; rq_rp <= '0;
      roi_count <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy      <= 1'b1;
        issuing   <= (dx != 0) && (dy != 0);
        row_addr  <= base;
        col       <= '0;
        row       <= '0;
        roi_count <= '0;
      end else if (busy && !issuing && pq_cnt == 0 && rq_cnt == 0 && !rd_rvalid) begin
        busy <= 1'b0;
        done <= 1'b1;
      end

      if (issuing && rd_gnt) begin
        tag_first <= tp_idx == 0;
        tag_trg   <= tp_idx >= ($clog2(NTP+1))'(NPTS);
      end

      if (pair_end) begin
        if (area_end) begin
          issuing <= 1'b0;
        end else if (row_end) begin
          row_addr <= row_addr + ADDR_W'(IMG_W);
          col      <= '0;
          row      <= row + 1'b1;
        end else begin
          col      <= col + ADDR_W'(2);
        end
        pq_wp <= pq_wp + 1'b1;
      end
      if (cu_res_valid) pq_rp <= pq_rp + 1'b1;
      pq_cnt <= pq_cnt + ($clog2(QD)+1)'(pair_end) - ($clog2(QD)+1)'(cu_res_valid);

      rq_wp  <= rq_wp + ($clog2(QD))'(push_a) + ($clog2(QD))'(push_b);
      if (pop_r) begin
        rq_rp     <= rq_rp + 1'b1;
        roi_count <= roi_count + 1'b1;
      end
      rq_cnt <= rq_cnt + ($clog2(QD)+1)'(push_a) + ($clog2(QD)+1)'(push_b)
                       - ($clog2(QD)+1)'(pop_r);
    end
  end

  a_pq_ovf: assert property (@(posedge clk) disable iff (!rst_n)
                             pq_cnt <= ($clog2(QD)+1)'(QD));
  a_rq_ovf: assert property (@(posedge clk) disable iff (!rst_n)
                             rq_cnt <= ($clog2(QD)+1)'(QD));
  a_res_has_pair: assert property (@(posedge clk) disable iff (!rst_n)
                             cu_res_valid |-> pq_cnt != 0);

endmodule
