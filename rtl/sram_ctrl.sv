// sram_ctrl: the SRAM controller of a Round 0 chip.
//
// The chip has one 64K x 16-bit SRAM next to it. This controller is its only
// user and serves four clients, one access per cycle, highest priority first:
//   1. ROI write: stores the 16-bit location of a pixel found to be a region
//      of interest (ROI) at the address the sequencer gives.
//   2. Test-point read: reads one word for the pixel pair under test; the
//      word comes back on tp_rvalid/tp_rdata one cycle after the grant.
//   3. Image load: takes the host's image strip as a stream of 8-bit pixels,
//      keeps the five most significant bits of each, and writes word k as
//      {pixel k+1, pixel k} (high byte, low byte). Every pixel but the first
//      and last is thus stored twice, so that a pixel and its right-hand
//      neighbour are always one word apart from the next pair; N+1 pixels
//      fill N words starting at the address given with img_set.
//   4. Host read-back: reads the word at the read-back pointer (set with
//      rb_set) and advances it; rb_ack/rb_data follow one cycle after the
//      grant.
// An ROI write therefore stalls the test-point stream for one cycle. The four
// functions and the redundant byte layout are the document's; the priority
// order, the 5-bit quantisation by truncation and the synchronous SRAM timing
// (read data one cycle after the address) are this design's.
// Lint: img_pix[2:0] is dropped on purpose (5-bit quantisation); rst_n also
// feeds the assertion's disable clause (reported as sync and async use).
module sram_ctrl
  import atr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // SRAM port
  output sram_req_t         sram,
  input  logic [DATA_W-1:0] sram_rdata,
  // ROI writes
  input  logic              roi_req,
  input  logic [ADDR_W-1:0] roi_addr,
  input  logic [ADDR_W-1:0] roi_data,
  output logic              roi_gnt,
  // test-point reads
  input  logic              tp_req,
  input  logic [ADDR_W-1:0] tp_addr,
  output logic              tp_gnt,
  output logic              tp_rvalid,
  output logic [DATA_W-1:0] tp_rdata,
  // image load
  input  logic              img_set,
  input  logic [ADDR_W-1:0] img_addr,
  input  logic              img_req,
  input  logic [7:0]        img_pix,
  output logic              img_ack,
  // host read-back
  input  logic              rb_set,
  input  logic [ADDR_W-1:0] rb_addr,
  input  logic              rb_req,
  output logic              rb_ack,
  output logic [DATA_W-1:0] rb_data
);

  logic [ADDR_W-1:0] img_ptr, rb_ptr;
  logic [PIX_W-1:0]  prev_pix;
  logic              have_prev;
  logic              tp_pend, rb_pend;
  logic [PIX_W-1:0]  pix5;

  assign pix5 = img_pix[7 -: PIX_W];

  logic img_gnt, rb_gnt, img_need_sram;
  assign img_need_sram = img_req && have_prev;

  always_comb begin
    roi_gnt = roi_req;
    tp_gnt  = tp_req  && !roi_req;
    img_gnt = img_need_sram && !roi_req && !tp_req;
    rb_gnt  = rb_req && !img_req && !roi_req && !tp_req && !rb_pend;

    sram = '0;
    if (roi_gnt) begin
      sram.en = 1'b1; sram.we = 1'b1; sram.addr = roi_addr; sram.wdata = roi_data;
    end else if (tp_gnt) begin
      sram.en = 1'b1; sram.addr = tp_addr;
    end else if (img_gnt) begin
      sram.en    = 1'b1; sram.we = 1'b1; sram.addr = img_ptr;
      sram.wdata = {{(8-PIX_W){1'b0}}, pix5, {(8-PIX_W){1'b0}}, prev_pix};
    end else if (rb_gnt) begin
      sram.en = 1'b1; sram.addr = rb_ptr;
    end
  end

  assign tp_rvalid = tp_pend;
  assign tp_rdata  = sram_rdata;
  assign rb_ack    = rb_pend;
  assign rb_data   = sram_rdata;
  // the first pixel of a load needs no SRAM access
  assign img_ack   = img_req && (!have_prev || img_gnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      img_ptr <= '0; rb_ptr <= '0; prev_pix <= '0; have_prev <= 1'b0;
      tp_pend <= 1'b0; rb_pend <= 1'b0;
    end else begin
      tp_pend <= tp_gnt;
      rb_pend <= rb_gnt;
      if (img_set) begin
        img_ptr   <= img_addr;
        have_prev <= 1'b0;
      end else if (img_ack) begin
        prev_pix  <= pix5;
        have_prev <= 1'b1;
        if (have_prev) img_ptr <= img_ptr + 1'b1;
      end
      if (rb_set)      rb_ptr <= rb_addr;
      else if (rb_gnt) rb_ptr <= rb_ptr + 1'b1;
    end
  end

  // only one client drives the SRAM in any cycle
  a_one_client: assert property (@(posedge clk) disable iff (!rst_n)
                                 $onehot0({roi_gnt, tp_gnt, img_gnt, rb_gnt}));

endmodule
