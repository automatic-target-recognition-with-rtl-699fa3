// hbus_decoder: the host side of the board bus.
//
// The host addresses one chip at a time with a chip number and a register
// request. Chips 0 .. N_R0-1 are the Round 0 chips and chip N_R0 the Round 1
// chip. Chip number HB_BROADCAST writes to all Round 0 chips at once, which
// is how an image strip is sent to every chip in one pass. The decoder
// forwards the request to each addressed chip until that chip acknowledges,
// and acknowledges the host one cycle after the last of them, returning the
// read data of the addressed chip. A request to a chip that does not exist
// is acknowledged at once with zero data, so the host never hangs.
// Broadcasting the strip is the document's; the handshake is this design's.
module hbus_decoder
  import atr_pkg::*;
#(
  parameter int unsigned N_R0 = 6,          // Round 0 chips
  parameter int unsigned N    = N_R0 + 1    // all chips
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  hbus_req_t            host_req,
  input  logic [HB_CHIP_W-1:0] host_chip,
  output hbus_rsp_t            host_rsp,
  output hbus_req_t            chip_req [N],
  input  hbus_rsp_t            chip_rsp [N]
);

  logic [N-1:0] sel, got, now;
  logic         bcast;
  assign bcast = host_chip == HB_BROADCAST;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      sel[i] = (host_chip == HB_CHIP_W'(i)) ||
               (bcast && host_req.we && i < N_R0);
      now[i] = chip_rsp[i].ack;
      chip_req[i]     = host_req;
      chip_req[i].req = host_req.req && sel[i] && !got[i] && !host_rsp.ack;
    end
  end

  logic        all_done;
  logic [15:0] rd_or;
  always_comb begin
    all_done = &(got | (now & sel) | ~sel);
    rd_or    = '0;
    for (int i = 0; i < N; i++)
      if (sel[i] && now[i]) rd_or |= chip_rsp[i].rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      got      <= '0;
      host_rsp <= '0;
    end else begin
      host_rsp.ack <= 1'b0;
      if (host_req.req && !host_rsp.ack) begin
        if (all_done) begin
          got          <= '0;
          host_rsp.ack <= 1'b1;
        end else begin
          got <= got | (now & sel);
        end
      end
      if (host_req.req && !host_rsp.ack && !host_req.we && |(now & sel))
        host_rsp.rdata <= rd_or;
      else if (host_req.req && !host_rsp.ack && all_done && sel == '0)
        host_rsp.rdata <= '0;
    end
  end

endmodule
