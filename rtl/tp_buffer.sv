// tp_buffer: on-chip store of the test-point locations of one template pair.
//
// The host pushes the 60 points of a template pair (30 background points
// first, then 30 target points), each a 16-bit SRAM address offset relative
// to the pixel under test. During the test the buffer is read as a circular
// FIFO: rd_data is the entry at the read pointer, and next advances the
// pointer, wrapping from the last written entry back to the first, so the
// same 60 offsets recur for every pixel pair without being rewritten.
//
// Interface: clear empties the buffer; push/push_data append (ignored when
// full); rewind returns the read pointer to entry 0. rd_idx is the read
// pointer, rd_last marks the last entry, count the number held. Reads are
// combinational, writes take effect on the next edge. The 60-entry depth and
// 16-bit width are the document's; the circular read is this design's.
module tp_buffer
  import atr_pkg::*;
#(
  parameter int unsigned DEPTH = NTP
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       push,
  input  logic [ADDR_W-1:0]          push_data,
  input  logic                       rewind,
  input  logic                       next,
  output logic [ADDR_W-1:0]          rd_data,
  output logic [$clog2(DEPTH+1)-1:0] rd_idx,
  output logic                       rd_last,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned IW = $clog2(DEPTH + 1);

  logic [ADDR_W-1:0] mem [DEPTH];

  assign rd_data = mem[rd_idx[$clog2(DEPTH)-1:0]];
  assign rd_last = (rd_idx == count - 1'b1);

  always_ff @(posedge clk) begin
    if (push && !clear && count < IW'(DEPTH))
      mem[count[$clog2(DEPTH)-1:0]] <= push_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      rd_idx <= '0;
    end else if (clear) begin
      count  <= '0;
      rd_idx <= '0;
    end else begin
      if (push && count < IW'(DEPTH)) count <= count + 1'b1;
      if (rewind)          rd_idx <= '0;
      else if (next)       rd_idx <= rd_last ? '0 : rd_idx + 1'b1;
    end
  end

endmodule
