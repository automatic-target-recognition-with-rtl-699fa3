// r1_chip: the Round 1 correlation test of one region of interest (ROI)
// against one template.
//
// The host sends the 40 point pairs (P_i, Q_i) of the template, two pairs
// per 16-bit write: {P_i, Q_i} for i in 1..20 (the SumP half) and
// {P_j, Q_j} for j in 21..40 (the SumM half), 4 bits per point. Each write
// adds |P-Q| to SumP and SumM and both squared differences to SSum. The
// write that completes the 20th word starts a five-stage pipeline that
// evaluates the division- and root-free form of correlation >= 0.45:
//   Sum = SumP + SumM,  SM = 40*SSum - Sum*Sum,
//   pass = (SumP > SumM) and 400*(SumP - SumM)^2 >= 81*SM
// so the result is valid exactly R1_LAT = 5 cycles after that write is
// taken; the host reads it after a fixed delay and needs no interrupt.
// The first write of the next template clears the sums (CMD bit 0 does so
// at any time). With DBG_READ = 1 the three sums can be read back.
//
// Host interface: hbus_req_t/hbus_rsp_t as in r0_chip, register map in
// atr_pkg. The equations, 4-bit points, two pairs per transfer and the
// five-cycle latency are the document's; the word layout, the register map
// and the split of the work over the five stages are this design's.
module r1_chip
  import atr_pkg::*;
#(
  parameter bit DBG_READ = 1'b0    // host read-back of SumP, SumM, SSum
) (
  input  logic      clk,
  input  logic      rst_n,
  input  hbus_req_t hb_req,
  output hbus_rsp_t hb_rsp
);

  localparam int unsigned SP_W = 9;    // SumP, SumM <= 20 * 15 = 300
  localparam int unsigned S_W  = 10;   // Sum <= 600
  localparam int unsigned SS_W = 14;   // SSum <= 40 * 225 = 9000
  localparam int unsigned W_W  = 5;    // word counter, 20 words
  localparam int unsigned WORDS = R1_PAIRS / 2;

  logic act, wr, rd;
  r1_reg_e ra;
  assign act = hb_req.req && !hb_rsp.ack;
  assign wr  = act &&  hb_req.we;
  assign rd  = act && !hb_req.we;
  assign ra  = r1_reg_e'(hb_req.addr);

  // ---------------- accumulation ----------------
  logic [R1_PT_W-1:0] p1, q1, p2, q2;
  assign {p1, q1, p2, q2} = hb_req.wdata;

  logic [R1_PT_W-1:0] d1, d2;
  logic [2*R1_PT_W-1:0] d1sq, d2sq;
  always_comb begin
    d1   = (p1 > q1) ? p1 - q1 : q1 - p1;
    d2   = (p2 > q2) ? p2 - q2 : q2 - p2;
    d1sq = d1 * d1;
    d2sq = d2 * d2;
  end

  logic [SP_W-1:0] sump, summ;
  logic [SS_W-1:0] ssum;
  logic [W_W-1:0]  words;
  logic            take, last_word, clr;
  assign take      = wr && ra == R1_PAIRS_IN;
  assign last_word = words == W_W'(WORDS - 1);
  assign clr       = wr && ra == R1_CMD && hb_req.wdata[0];

  // ---------------- five-stage decision pipeline ----------------
  logic [R1_LAT-1:0] v;                      // stage valid bits
  logic              pos1, pos2, pos3, pos4;
  logic [S_W-1:0]    sum1;
  logic [SP_W-1:0]   dif1;
  logic [SS_W+5:0]   ss40_1, ss40_2;
  logic [2*S_W-1:0]  sumsq2;
  logic [2*SP_W-1:0] dsq2, dsq3;
  logic [SS_W+5:0]   sm3;
  logic [31:0]       lhs4, rhs4;
  logic              res_valid, res_pass;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sump <= '0; summ <= '0; ssum <= '0; words <= '0;
      v <= '0; pos1 <= 1'b0; pos2 <= 1'b0; pos3 <= 1'b0; pos4 <= 1'b0;
      sum1 <= '0; dif1 <= '0; ss40_1 <= '0; ss40_2 <= '0; sumsq2 <= '0;
      dsq2 <= '0; dsq3 <= '0; sm3 <= '0; lhs4 <= '0; rhs4 <= '0;
      res_valid <= 1'b0; res_pass <= 1'b0;
    end else begin
      if (clr) begin
        sump <= '0; summ <= '0; ssum <= '0; words <= '0;
        res_valid <= 1'b0;
      end else if (take) begin
        if (words == '0) begin
          sump <= SP_W'(d1);
          summ <= SP_W'(d2);
          ssum <= SS_W'(d1sq) + SS_W'(d2sq);
          res_valid <= 1'b0;
        end else begin
          sump <= sump + SP_W'(d1);
          summ <= summ + SP_W'(d2);
          ssum <= ssum + SS_W'(d1sq) + SS_W'(d2sq);
        end
        words <= last_word ? '0 : words + 1'b1;
      end

      v <= {v[R1_LAT-2:0], take && last_word && !clr};
      // stage 1: Sum, SumP - SumM, 40*SSum = 32*SSum + 8*SSum
      pos1   <= sump > summ;
      sum1   <= S_W'(sump) + S_W'(summ);
      dif1   <= sump - summ;
      ss40_1 <= ((SS_W+6)'(ssum) << 5) + ((SS_W+6)'(ssum) << 3);
      // stage 2: the two squares
      pos2   <= pos1;
      sumsq2 <= sum1 * sum1;
      dsq2   <= dif1 * dif1;
      ss40_2 <= ss40_1;
      // stage 3: SM
      pos3   <= pos2;
      sm3    <= ss40_2 - (SS_W+6)'(sumsq2);
      dsq3   <= dsq2;
      // stage 4: 400*D^2 = 256+128+16 times, 81*SM = 64+16+1 times
      pos4   <= pos3;
      lhs4   <= (32'(dsq3) << 8) + (32'(dsq3) << 7) + (32'(dsq3) << 4);
      rhs4   <= (32'(sm3) << 6) + (32'(sm3) << 4) + 32'(sm3);
      // stage 5: decision
      if (v[R1_LAT-1]) begin
        res_valid <= 1'b1;
        res_pass  <= pos4 && (lhs4 >= rhs4);
      end
    end
  end

  // ---------------- host responses ----------------
  logic [15:0] rdata;
  always_comb begin
    rdata = '0;
    unique case (ra)
      R1_RESULT:   rdata = {14'b0, res_pass, res_valid};
      R1_DBG_SUMP: if (DBG_READ) rdata = 16'(sump);
      R1_DBG_SUMM: if (DBG_READ) rdata = 16'(summ);
      R1_DBG_SSUM: if (DBG_READ) rdata = 16'(ssum);
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hb_rsp <= '0;
    else begin
      hb_rsp.ack <= act;
      if (rd) hb_rsp.rdata <= rdata;
    end
  end

endmodule
