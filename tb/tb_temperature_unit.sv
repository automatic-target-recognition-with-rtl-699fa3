// tb_temperature_unit: self-checking test of the TEMPERATURE unit.
// Streams random template pairs (30 background then 30 target five-bit
// points, several pairs back to back and some with gaps), and compares the
// four Hot30/Cold30 sums with a direct evaluation of the reformulated
// Round 0 equations. Also checks that done comes one cycle after the 30th
// target point.
module tb_temperature_unit;
  import atr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             in_valid, in_first, in_trg, done;
  logic [PIX_W-1:0] in_pix;
  temp_t            res;

  temperature_unit dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned bk [NPTS], tg [NPTS];
  temp_t exp_q [$];

  function automatic temp_t model(input int unsigned b[NPTS], input int unsigned t[NPTS]);
    int s = 0;
    temp_t r = '0;
    foreach (b[i]) s += b[i];
    foreach (b[i]) begin
      if (30 * b[i] > s) r.bkg_hot += 16'(30 * b[i] - s); else r.bkg_cold += 16'(s - 30 * b[i]);
      if (30 * t[i] > s) r.trg_hot += 16'(30 * t[i] - s); else r.trg_cold += 16'(s - 30 * t[i]);
    end
    return r;
  endfunction

  // check results as they appear
  int last_trg_cycle, cyc;
  // one monitor: counts cycles, remembers the last sampled target point,
  // checks each result against the model and its timing
  always @(posedge clk) begin
    cyc++;
    if (rst_n && done) begin
      temp_t e;
      e = exp_q.pop_front();
      checks++;
      if (res !== e) begin
        failures++;
        $display("mismatch: got %h exp %h", res, e);
      end
      checks++;
      if (cyc != last_trg_cycle + 1) begin
        failures++;
        $display("done latency wrong: %0d vs %0d", cyc, last_trg_cycle);
      end
    end
    if (in_valid && in_trg) last_trg_cycle = cyc;
  end

  initial begin
    in_valid = 0; in_first = 0; in_trg = 0; in_pix = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 40; p++) begin
      int mode = p % 4;
      foreach (bk[i]) begin
        case (mode)
          0: begin bk[i] = $urandom_range(31); tg[i] = $urandom_range(31); end
          1: begin bk[i] = $urandom_range(10); tg[i] = $urandom_range(31, 20); end
          2: begin bk[i] = 31; tg[i] = 31; end
          default: begin bk[i] = $urandom_range(31, 15); tg[i] = $urandom_range(8); end
        endcase
      end
      exp_q.push_back(model(bk, tg));
      for (int i = 0; i < NTP; i++) begin
        if (p % 3 == 2 && i == 35) begin
          in_valid <= 1'b0;
          @(negedge clk);
        end
        in_valid <= 1'b1;
        in_first <= (i == 0);
        in_trg   <= (i >= NPTS);
        in_pix   <= PIX_W'(i < NPTS ? bk[i] : tg[i - NPTS]);
        @(negedge clk);
      end
      if (p % 5 == 4) begin
        in_valid <= 1'b0;
        repeat (3) @(negedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
