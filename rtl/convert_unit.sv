// convert_unit: the CONVERT step of Round 0, one registered stage.
//
// From the four TEMPERATURE sums of one pixel it forms the numerators and
// denominators of the hot and cold correlations, clamping a negative
// numerator to zero:
//   Hot_N  = max(TRG_Hot30  - BKG_Hot30,  0)   Hot_D  = TRG_Hot30  + BKG_Hot30
//   Cold_N = max(TRG_Cold30 - BKG_Cold30, 0)   Cold_D = TRG_Cold30 + BKG_Cold30
// The equations are the document's. Interface: in_valid/in qualify one set
// of sums; out_valid/out follow one cycle later. No stall.
module convert_unit
  import atr_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  temp_t in,
  output logic  out_valid,
  output conv_t out
);

  conv_t nxt;
  always_comb begin
    nxt.hot_n  = (in.trg_hot  < in.bkg_hot)  ? '0 : in.trg_hot  - in.bkg_hot;
    nxt.hot_d  = in.trg_hot  + in.bkg_hot;
    nxt.cold_n = (in.trg_cold < in.bkg_cold) ? '0 : in.trg_cold - in.bkg_cold;
    nxt.cold_d = in.trg_cold + in.bkg_cold;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out <= nxt;
    end
  end

endmodule
