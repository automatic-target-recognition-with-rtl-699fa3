// assert_unit: the ASSERT step of Round 0 with bit-serial multipliers.
//
// A pixel is a region of interest (ROI) when
//   20 * (Hot_N*Cold_D + Cold_N*Hot_D) - 13 * (Hot_D*Cold_D) >= 0,
// the division-free form of (hot correlation + cold correlation) >= 0.65.
// The three products are formed by three shift-and-add multipliers that
// consume one bit of the multipliers Cold_D and Hot_D per cycle, so a
// decision takes T30_W cycles of accumulation and one cycle for the final
// comparison, in which the constants 20 and 13 are applied as shifts and
// adds (20X = 16X + 4X, 13Y = 8Y + 4Y + Y).
//
// Interface: start (with ready high) loads one conv_t; ready is low while a
// decision is being formed; out_valid pulses with roi exactly T30_W + 1
// cycles after start. The document runs this unit from a clock twice the
// chip clock; here it shares the chip clock, which is enough because two
// decisions (T30_W + 1 = 17 cycles each) fit in the 60 cycles a pixel pair
// takes.
module assert_unit
  import atr_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  conv_t in,
  output logic  ready,
  output logic  out_valid,
  output logic  roi
);

  localparam int unsigned P_W = 2 * T30_W + 1;   // sum of two products
  localparam int unsigned C_W = P_W + 5;         // 20 * that sum
  localparam int unsigned CNT_W = $clog2(T30_W + 1);

  logic [P_W-1:0]   hn_sh, cn_sh, hd_sh;   // multiplicands, shifted left
  logic [T30_W-1:0] cd_sr, hd_sr;          // multipliers, shifted right
  logic [P_W-1:0]   acc_x, acc_y;          // X = HN*CD + CN*HD, Y = HD*CD
  logic [CNT_W-1:0] cnt;
  logic             busy, fin;

  assign ready = !busy;

  logic [C_W-1:0] x20, y13;
  always_comb begin
    x20 = (C_W'(acc_x) << 4) + (C_W'(acc_x) << 2);
    y13 = (C_W'(acc_y) << 3) + (C_W'(acc_y) << 2) + C_W'(acc_y);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; fin <= 1'b0; cnt <= '0;
      hn_sh <= '0; cn_sh <= '0; hd_sh <= '0; cd_sr <= '0; hd_sr <= '0;
      acc_x <= '0; acc_y <= '0;
      out_valid <= 1'b0; roi <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      fin       <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        cnt   <= '0;
        hn_sh <= P_W'(in.hot_n);
        cn_sh <= P_W'(in.cold_n);
        hd_sh <= P_W'(in.hot_d);
        cd_sr <= in.cold_d;
        hd_sr <= in.hot_d;
        acc_x <= '0;
        acc_y <= '0;
      end else if (busy && !fin) begin
        // one multiplier bit per cycle for all three products
        acc_x <= acc_x + (cd_sr[0] ? hn_sh : '0) + (hd_sr[0] ? cn_sh : '0);
        acc_y <= acc_y + (cd_sr[0] ? hd_sh : '0);
        hn_sh <= hn_sh << 1;
        cn_sh <= cn_sh << 1;
        hd_sh <= hd_sh << 1;
        cd_sr <= cd_sr >> 1;
        hd_sr <= hd_sr >> 1;
        cnt   <= cnt + 1'b1;
        if (cnt == CNT_W'(T30_W - 1)) fin <= 1'b1;
      end else if (fin) begin
        busy      <= 1'b0;
        out_valid <= 1'b1;
        roi       <= x20 >= y13;
      end
    end
  end

endmodule
