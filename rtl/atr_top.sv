// atr_top: the target-recognition accelerator board.
//
// Round 0 of the recognition algorithm tests every pixel of an infrared image
// against six template pairs. The board gives each template pair its own
// chip: an image strip is broadcast to N_R0 = 6 Round 0 chips, each chip is
// given one template pair, all chips test the strip in parallel, each lists
// its regions of interest (ROIs) in its own SRAM and raises its interrupt
// when done. A separate Round 1 chip evaluates the finer correlation test of
// one ROI against one template from point pairs sent by the host.
//
// Ports: the host bus (request, chip number, response), one interrupt per
// Round 0 chip, and one SRAM port per Round 0 chip; the 64K x 16 SRAMs are
// board parts outside this design. The host's PCI bridge, the clock and
// configuration controller and the DRAM of the board are not part of it.
// The six-chip arrangement and the broadcast are the document's; the host
// bus handshake is this design's. Timing: see r0_chip and r1_chip.
// Lint: rst_n reaches assertions in the submodules (reported as sync and
// async use); no other warnings are expected.
module atr_top
  import atr_pkg::*;
#(
  parameter int unsigned N_R0  = 6,      // Round 0 chips, one per template pair
  parameter int unsigned IMG_W = 640     // pixels per image row
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  hbus_req_t            host_req,
  input  logic [HB_CHIP_W-1:0] host_chip,
  output hbus_rsp_t            host_rsp,
  output logic [N_R0-1:0]      irq,
  output sram_req_t            sram       [N_R0],
  input  logic [DATA_W-1:0]    sram_rdata [N_R0]
);

  hbus_req_t chip_req [N_R0+1];
  hbus_rsp_t chip_rsp [N_R0+1];

  hbus_decoder #(.N_R0(N_R0)) u_dec (
    .clk, .rst_n, .host_req, .host_chip, .host_rsp, .chip_req, .chip_rsp
  );

  for (genvar i = 0; i < N_R0; i++) begin : g_r0
    r0_chip #(.IMG_W(IMG_W)) u_r0 (
      .clk, .rst_n, .hb_req(chip_req[i]), .hb_rsp(chip_rsp[i]),
      .irq(irq[i]), .sram(sram[i]), .sram_rdata(sram_rdata[i])
    );
  end

  r1_chip u_r1 (
    .clk, .rst_n, .hb_req(chip_req[N_R0]), .hb_rsp(chip_rsp[N_R0])
  );

endmodule
