// compute_unit: the Round 0 computation unit for one pixel pair.
//
// Each SRAM word read during the test holds the test point for pixel n in
// its low byte and for the neighbouring pixel n+1 in its high byte, so two
// TEMPERATURE units (A for pixel n, B for pixel n+1) take the same stream of
// 60 words, one byte each. When both finish, their sums are latched and a
// multiplexer passes first A's and then B's sums through a single CONVERT
// unit into a single ASSERT unit; sharing those two units between the two
// TEMPERATURE units is the document's arrangement. res_valid then pulses
// with the ROI decisions for pixels n (roi_a) and n+1 (roi_b).
//
// Interface: in_valid/in_first/in_trg/in_word stream the 60 points of a pair
// (background first, in_first on the first). The next pair may follow
// directly. Timing: res_valid rises 40 cycles after the last point of a
// pair was taken (1 for the TEMPERATURE units, 1 to start, and twice 1 for
// CONVERT plus 17 for ASSERT, plus 1 to report), well inside the 60 cycles
// the next pair needs, so the latch is always free when the next results arrive (checked
// by an assertion).
// Lint: bits 7:5 and 15:13 of in_word (the zero padding of each stored
// byte) are not read; rst_n also feeds the assertions' disable clause, which the
// linter reports as a reset used both synchronously and asynchronously.
module compute_unit
  import atr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_first,
  input  logic              in_trg,
  input  logic [DATA_W-1:0] in_word,
  output logic              res_valid,
  output logic              roi_a,
  output logic              roi_b
);

  logic  done_a, done_b;
  temp_t res_a, res_b;

  temperature_unit u_temp_a (
    .clk, .rst_n, .in_valid, .in_first, .in_trg,
    .in_pix(in_word[PIX_W-1:0]), .done(done_a), .res(res_a)
  );
  temperature_unit u_temp_b (
    .clk, .rst_n, .in_valid, .in_first, .in_trg,
    .in_pix(in_word[8 +: PIX_W]), .done(done_b), .res(res_b)
  );

  // latched TEMPERATURE results and the multiplexer in front of CONVERT
  temp_t lat_a, lat_b;
  logic  full;
  logic  sel_b;
  temp_t conv_in;
  assign conv_in = sel_b ? lat_b : lat_a;

  typedef enum logic [2:0] {S_IDLE, S_CONV_A, S_RUN_A, S_CONV_B, S_RUN_B} state_e;
  state_e state;

  logic  conv_in_valid, conv_out_valid;
  conv_t conv_out;
  logic  as_ready, as_valid, as_roi;
  logic  as_start;

  assign conv_in_valid = (state == S_IDLE && full) ||
                         (state == S_RUN_A && as_valid);
  assign as_start      = conv_out_valid;

  convert_unit u_convert (
    .clk, .rst_n, .in_valid(conv_in_valid), .in(conv_in),
    .out_valid(conv_out_valid), .out(conv_out)
  );

  assert_unit u_assert (
    .clk, .rst_n, .start(as_start), .in(conv_out),
    .ready(as_ready), .out_valid(as_valid), .roi(as_roi)
  );

  logic roi_a_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lat_a <= '0; lat_b <= '0; full <= 1'b0; sel_b <= 1'b0;
      state <= S_IDLE; roi_a_q <= 1'b0;
      res_valid <= 1'b0; roi_a <= 1'b0; roi_b <= 1'b0;
    end else begin
      res_valid <= 1'b0;
      if (done_a) begin
        lat_a <= res_a;
        lat_b <= res_b;
      end
      case (state)
        S_IDLE:   if (full) begin sel_b <= 1'b1; state <= S_CONV_A; end
        S_CONV_A: if (conv_out_valid) state <= S_RUN_A;
        S_RUN_A:  if (as_valid) begin roi_a_q <= as_roi; state <= S_CONV_B; end
        S_CONV_B: if (conv_out_valid) state <= S_RUN_B;
        S_RUN_B:  if (as_valid) begin
                    res_valid <= 1'b1;
                    roi_a     <= roi_a_q;
                    roi_b     <= as_roi;
                    sel_b     <= 1'b0;
                    state     <= S_IDLE;
                  end
        default:  state <= S_IDLE;
      endcase
      // latch is free once B's sums have entered CONVERT
      if (done_a)                                  full <= 1'b1;
      else if (state == S_RUN_A && as_valid)       full <= 1'b0;
    end
  end

  // new TEMPERATURE results must never overwrite ones not yet converted
  a_latch_free: assert property (@(posedge clk) disable iff (!rst_n)
                                 done_a |-> !full);
  a_pair_sync:  assert property (@(posedge clk) disable iff (!rst_n)
                                 done_a == done_b);
  a_assert_rdy: assert property (@(posedge clk) disable iff (!rst_n)
                                 as_start |-> as_ready);

endmodule
