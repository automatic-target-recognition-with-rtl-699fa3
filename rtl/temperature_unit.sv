// temperature_unit: the TEMPERATURE step of Round 0 for one pixel location.
//
// The unit sees the 60 test points of one template pair as a stream: first
// the 30 background points, then the 30 target points. While the background
// points arrive it adds them into SUM and stores them in a 30-entry buffer.
// While the target points arrive, each target point t[i] is paired with the
// buffered background point b[i], and both are compared with SUM after being
// scaled by 30 (30*p = 32p - 2p, a shift and a subtract):
//   30*p > SUM : Hot30  += 30*p - SUM
//   otherwise  : Cold30 += SUM - 30*p
// so the background and target sums grow side by side, one point per cycle.
// This avoids the division of the original mean.
//
// Interface: in_valid qualifies one point; in_trg says it is a target point;
// in_first marks the first background point of a new pair and clears the
// sums. done pulses for one cycle after the 30th target point has been
// added; res holds the four sums from then until the next in_first.
// Throughput one point per cycle, no stall. The split into accumulator,
// buffer and comparator/adders follows the document; the replay of the
// buffer alongside the target stream is this design's choice.
module temperature_unit
  import atr_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_first,
  input  logic             in_trg,
  input  logic [PIX_W-1:0] in_pix,
  output logic             done,
  output temp_t            res
);

  localparam int unsigned CNT_W = $clog2(NPTS);

  logic [PIX_W-1:0] bkg_buf [NPTS];
  logic [SUM_W-1:0] sum;
  logic [CNT_W-1:0] bcnt, tcnt;

  // 30 * p, both operands of the current target step
  logic [SUM_W-1:0] t30, b30;
  logic [PIX_W-1:0] b_pix;
  assign b_pix = bkg_buf[tcnt];
  assign t30   = SUM_W'({in_pix, 5'b0}) - SUM_W'({in_pix, 1'b0});
  assign b30   = SUM_W'({b_pix,  5'b0}) - SUM_W'({b_pix,  1'b0});

  logic t_hot, b_hot;
  logic [SUM_W-1:0] t_dif, b_dif;
  always_comb begin
    t_hot = t30 > sum;
    b_hot = b30 > sum;
    t_dif = t_hot ? (t30 - sum) : (sum - t30);
    b_dif = b_hot ? (b30 - sum) : (sum - b30);
  end

  always_ff @(posedge clk) begin
    if (in_valid && !in_trg)
      bkg_buf[in_first ? '0 : bcnt] <= in_pix;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum  <= '0;
      bcnt <= '0;
      tcnt <= '0;
      res  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (in_valid && !in_trg) begin
        if (in_first) begin
          sum  <= SUM_W'(in_pix);
          bcnt <= CNT_W'(1);
          tcnt <= '0;
          res  <= '0;
        end else begin
          sum  <= sum + SUM_W'(in_pix);
          bcnt <= bcnt + 1'b1;
        end
      end else if (in_valid && in_trg) begin
        if (t_hot) res.trg_hot  <= res.trg_hot  + T30_W'(t_dif);
        else       res.trg_cold <= res.trg_cold + T30_W'(t_dif);
        if (b_hot) res.bkg_hot  <= res.bkg_hot  + T30_W'(b_dif);
        else       res.bkg_cold <= res.bkg_cold + T30_W'(b_dif);
        if (tcnt == CNT_W'(NPTS - 1)) begin
          tcnt <= '0;
          done <= 1'b1;
        end else begin
          tcnt <= tcnt + 1'b1;
        end
      end
    end
  end

endmodule
