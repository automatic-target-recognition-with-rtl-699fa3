// sram_64kx16: behavioural model of the 128 KB board SRAM (64K words of
// 16 bits) next to each Round 0 chip, for simulation only. One access per
// cycle; a read returns the word on rdata one cycle after the request,
// a write stores wdata at the clock edge. Contents start at zero.
module sram_64kx16
  import atr_pkg::*;
(
  input  logic              clk,
  input  sram_req_t         req,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [2**ADDR_W];
  initial begin
    foreach (mem[i]) mem[i] = '0;
    rdata = '0;
  end
  always @(posedge clk) begin
    if (req.en && req.we)  mem[req.addr] <= req.wdata;
    if (req.en && !req.we) rdata <= mem[req.addr];
  end
endmodule
