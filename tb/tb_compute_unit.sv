// tb_compute_unit: streams pixel pairs back to back into the computation
// unit, one 16-bit word per cycle (low byte: point of pixel n, high byte:
// point of pixel n+1), and compares both ROI decisions of each pair with the
// reference TEMPERATURE/CONVERT/ASSERT equations. Data sets are chosen so
// that both decisions occur often. Checks that each result appears 40
// cycles after the last point of its pair, i.e. before the next pair ends.
module tb_compute_unit;
  import atr_pkg::*;
  `include "atr_ref.svh"

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              in_valid, in_first, in_trg, res_valid, roi_a, roi_b;
  logic [DATA_W-1:0] in_word;

  compute_unit dut (.*);

  int checks = 0, failures = 0, n_roi = 0, n_not = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit a; bit b; int last; } exp_t;
  exp_t exp_q [$];
  int cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && res_valid) begin
      exp_t e;
      e = exp_q.pop_front();
      checks += 2;
      if (roi_a !== e.a || roi_b !== e.b) begin
        failures++;
        $display("pair result %0d%0d exp %0d%0d", roi_a, roi_b, e.a, e.b);
      end
      if (cyc - e.last != 41) begin  // seen one edge after it rises, 40 cycles after the last point
        failures++;
        $display("result latency %0d", cyc - e.last);
      end
      if (roi_a) n_roi++; else n_not++;
      if (roi_b) n_roi++; else n_not++;
    end
  end

  function automatic int unsigned gen(input int mode, input bit trg);
    case (mode)
      0: return $urandom_range(31);
      1: return trg ? $urandom_range(31, 22) : $urandom_range(12);
      2: return trg ? $urandom_range(6) : $urandom_range(31, 18);
      default: return trg ? ($urandom_range(1) ? 31 : 0) : $urandom_range(20, 10);
    endcase
  endfunction

  initial begin
    int unsigned ba [30], ta [30], bb [30], tb_ [30];
    exp_t e;
    in_valid = 0; in_first = 0; in_trg = 0; in_word = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 80; p++) begin
      for (int i = 0; i < 30; i++) begin
        ba[i] = gen(p % 4, 0);  ta[i]  = gen(p % 4, 1);
        bb[i] = gen((p / 4) % 4, 0); tb_[i] = gen((p / 4) % 4, 1);
      end
      e.a = ref_assert(ref_conv(ref_temp(ba, ta)));
      e.b = ref_assert(ref_conv(ref_temp(bb, tb_)));
      for (int i = 0; i < NTP; i++) begin
        in_valid = 1'b1;
        in_first = (i == 0);
        in_trg   = (i >= NPTS);
        in_word  = (i < NPTS) ? {8'(bb[i]), 8'(ba[i])}
                              : {8'(tb_[i-NPTS]), 8'(ta[i-NPTS])};
        @(negedge clk);
      end
      e.last = cyc;          // edge that took the last point
      exp_q.push_back(e);
    end
    in_valid = 1'b0;
    repeat (60) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_roi < 10 || n_not < 10) begin
      failures++;
      $display("left %0d, roi %0d, not %0d", exp_q.size(), n_roi, n_not);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
