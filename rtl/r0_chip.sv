// r0_chip: one Round 0 chip of the target-recognition accelerator.
//
// Each chip tests every pixel of an image area against one template pair
// and lists the pixels that are regions of interest (ROIs). The host loads
// the image strip into the chip's SRAM (through the SRAM controller, which
// stores each pixel with its right-hand neighbour), pushes the 60 test-point
// offsets of the template pair, writes base address, dx and dy, and starts
// the test. The sequencer then streams 60 SRAM words per pixel pair into the
// computation unit (two TEMPERATURE units, a shared CONVERT and a shared
// bit-serial ASSERT unit) and writes the address of every ROI into the SRAM
// list at ROI_BASE. At the end irq rises; the host reads ROI_COUNT and then
// the list through RD_ADDR/RD_DATA.
//
// Host interface: hbus_req_t/hbus_rsp_t, a request held until a one-cycle
// acknowledge; rdata is valid with the acknowledge. Register accesses take
// two cycles; image writes and read-back wait for the SRAM while a test is
// running. The register map is in atr_pkg. Timing of a test:
// ceil(dx/2) * dy * 60 cycles plus one per ROI plus about 40 to drain.
// The partition into SRAM controller, test-point buffer and computation
// unit is the document's; the register map and handshake are this design's.
// Lint: rst_n reaches assertions in the submodules (reported as sync and
// async use); no other warnings are expected.
module r0_chip
  import atr_pkg::*;
#(
  parameter int unsigned IMG_W = 640     // pixels per image row
) (
  input  logic              clk,
  input  logic              rst_n,
  input  hbus_req_t         hb_req,
  output hbus_rsp_t         hb_rsp,
  output logic              irq,
  output sram_req_t         sram,
  input  logic [DATA_W-1:0] sram_rdata
);

  localparam int unsigned IW = $clog2(NTP + 1);

  // ---------------- host registers ----------------
  logic [ADDR_W-1:0] base_q, dx_q, dy_q, roi_base_q;
  logic              act;          // a new host access this cycle
  logic              wr, rd;
  r0_reg_e           ra;
  assign act = hb_req.req && !hb_rsp.ack;
  assign wr  = act &&  hb_req.we;
  assign rd  = act && !hb_req.we;
  assign ra  = r0_reg_e'(hb_req.addr);

  logic seq_busy, seq_done, start;
  logic [ADDR_W-1:0] roi_count;
  assign start = wr && ra == R0_CMD && hb_req.wdata[0] && !seq_busy;

  // ---------------- test-point buffer ----------------
  logic [ADDR_W-1:0] tp_off;
  logic [IW-1:0]     tp_idx, tp_count;
  logic              tp_last, tp_next, tp_rewind;

  tp_buffer #(.DEPTH(NTP)) u_tp (
    .clk, .rst_n,
    .clear(wr && ra == R0_CMD && hb_req.wdata[1] && !seq_busy),
    .push(wr && ra == R0_TP_DATA && !seq_busy), .push_data(hb_req.wdata),
    .rewind(tp_rewind), .next(tp_next),
    .rd_data(tp_off), .rd_idx(tp_idx), .rd_last(tp_last), .count(tp_count)
  );

  // ---------------- SRAM controller ----------------
  logic              roi_req, roi_gnt;
  logic [ADDR_W-1:0] roi_addr, roi_data;
  logic              rd_req, rd_gnt, rd_rvalid;
  logic [ADDR_W-1:0] rd_addr;
  logic [DATA_W-1:0] rd_rdata;
  logic              img_req, img_ack, rb_req, rb_ack;
  logic [DATA_W-1:0] rb_data;

  assign img_req = wr && ra == R0_IMG_DATA;
  assign rb_req  = rd && ra == R0_RD_DATA;

  sram_ctrl u_sram_ctrl (
    .clk, .rst_n, .sram, .sram_rdata,
    .roi_req, .roi_addr, .roi_data, .roi_gnt,
    .tp_req(rd_req), .tp_addr(rd_addr), .tp_gnt(rd_gnt),
    .tp_rvalid(rd_rvalid), .tp_rdata(rd_rdata),
    .img_set(wr && ra == R0_IMG_ADDR), .img_addr(hb_req.wdata),
    .img_req, .img_pix(hb_req.wdata[7:0]), .img_ack,
    .rb_set(wr && ra == R0_RD_ADDR), .rb_addr(hb_req.wdata),
    .rb_req, .rb_ack, .rb_data
  );

  // ---------------- sequencer and computation unit ----------------
  logic cu_valid, cu_first, cu_trg, cu_res_valid, cu_roi_a, cu_roi_b;

  r0_sequencer #(.IMG_W(IMG_W)) u_seq (
    .clk, .rst_n, .start, .base(base_q), .dx(dx_q), .dy(dy_q),
    .roi_base(roi_base_q), .busy(seq_busy), .done(seq_done), .roi_count,
    .tp_off, .tp_idx, .tp_last, .tp_next, .tp_rewind,
    .rd_req, .rd_addr, .rd_gnt, .rd_rvalid,
    .cu_valid, .cu_first, .cu_trg, .cu_res_valid, .cu_roi_a, .cu_roi_b,
    .roi_req, .roi_addr, .roi_data, .roi_gnt
  );

  compute_unit u_cu (
    .clk, .rst_n, .in_valid(cu_valid), .in_first(cu_first), .in_trg(cu_trg),
    .in_word(rd_rdata), .res_valid(cu_res_valid), .roi_a(cu_roi_a),
    .roi_b(cu_roi_b)
  );

  // ---------------- register file and responses ----------------
  logic [15:0] reg_rdata;
  always_comb begin
    unique case (ra)
      R0_STATUS:    reg_rdata = {8'(tp_count), 6'b0, irq, seq_busy};
      R0_BASE:      reg_rdata = base_q;
      R0_DX:        reg_rdata = dx_q;
      R0_DY:        reg_rdata = dy_q;
      R0_ROI_BASE:  reg_rdata = roi_base_q;
      R0_ROI_COUNT: reg_rdata = roi_count;
      default:      reg_rdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base_q <= '0; dx_q <= '0; dy_q <= '0; roi_base_q <= '0;
      irq <= 1'b0; hb_rsp <= '0;
    end else begin
      hb_rsp.ack <= 1'b0;
      if (wr) begin
        unique case (ra)
          R0_BASE:     if (!seq_busy) base_q     <= hb_req.wdata;
          R0_DX:       if (!seq_busy) dx_q       <= hb_req.wdata;
          R0_DY:       if (!seq_busy) dy_q       <= hb_req.wdata;
          R0_ROI_BASE: if (!seq_busy) roi_base_q <= hb_req.wdata;
          default: ;
        endcase
        // image data waits for its SRAM write, all else is done at once
        if (ra != R0_IMG_DATA || img_ack) hb_rsp.ack <= 1'b1;
      end else if (rb_ack) begin
        hb_rsp.ack   <= 1'b1;
        hb_rsp.rdata <= rb_data;
      end else if (rd && ra != R0_RD_DATA) begin
        hb_rsp.ack   <= 1'b1;
        hb_rsp.rdata <= reg_rdata;
      end
      if (seq_done) irq <= 1'b1;
      else if (start || (wr && ra == R0_CMD && hb_req.wdata[2])) irq <= 1'b0;
    end
  end

endmodule
