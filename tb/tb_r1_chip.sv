// tb_r1_chip: sends random and biased Round 1 templates (40 point pairs, two
// pairs per write) to the Round 1 chip and checks the pass/fail decision
// against the reference correlation test, and that the result becomes valid
// exactly five cycles after the last write is taken and not earlier. A
// second instance with debug read-back enabled must return SumP, SumM and
// SSum; the default instance must return zero there.
module tb_r1_chip;
  import atr_pkg::*;
  `include "atr_ref.svh"

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  hbus_req_t hb_req, hb_req_d;
  hbus_rsp_t hb_rsp, hb_rsp_d;

  r1_chip dut (.clk, .rst_n, .hb_req, .hb_rsp);
  r1_chip #(.DBG_READ(1'b1)) dut_dbg (.clk, .rst_n, .hb_req(hb_req_d), .hb_rsp(hb_rsp_d));
  // the debug instance sees the same writes; its sums are compared directly
  assign hb_req_d = hb_req;

  `include "hb_host.svh"

  int checks = 0, failures = 0, n_pass = 0, n_fail = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p [40], q [40];
    int sump, summ, ssum, d;
    logic [15:0] r;
    bit exp;
    hb_req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 150; t++) begin
      sump = 0; summ = 0; ssum = 0;
      for (int i = 0; i < 40; i++) begin
        case (t % 3)
          0: begin p[i] = $urandom_range(15); q[i] = $urandom_range(15); end
          1: begin p[i] = (i < 20) ? $urandom_range(15, 8) : $urandom_range(7);
                   q[i] = (i < 20) ? $urandom_range(5) : $urandom_range(7); end
          default: begin p[i] = $urandom_range(15); q[i] = (i < 20) ? p[i] ^ 8 : p[i]; end
        endcase
        d = p[i] > q[i] ? p[i] - q[i] : q[i] - p[i];
        if (i < 20) sump += d; else summ += d;
        ssum += d * d;
      end
      exp = ref_r1(p, q);
      for (int w = 0; w < 20; w++) begin
        hb_write(R1_PAIRS_IN, {4'(p[w]), 4'(q[w]), 4'(p[w+20]), 4'(q[w+20])});
        // the write was taken one edge ago; result valid after 5 edges
        if (w == 19) begin
          repeat (4) @(negedge clk);
          checks++;
          if (dut.res_valid) begin failures++; $display("result too early"); end
          @(negedge clk);
          checks++;
          if (!dut.res_valid) begin failures++; $display("result not valid after 5 cycles"); end
        end else if (w == 10) begin
          checks++;
          if (dut.res_valid) begin failures++; $display("stale result valid"); end
        end
      end
      hb_read(R1_RESULT, r);
      checks++;
      if (r[1:0] !== {exp, 1'b1}) begin
        failures++;
        $display("t=%0d result %b exp pass=%0d", t, r[1:0], exp);
      end
      if (exp) n_pass++; else n_fail++;
      checks++;
      if (dut_dbg.sump != 9'(sump) || dut_dbg.summ != 9'(summ) || dut_dbg.ssum != 14'(ssum)) begin
        failures++; $display("sums wrong");
      end
    end
    // debug read-back through the bus of each instance
    hb_read(R1_DBG_SUMP, r);
    checks++;
    if (r != 16'h0) begin failures++; $display("debug read-back must be off by default"); end
    checks++;
    if (n_pass < 10 || n_fail < 10) begin failures++; $display("coverage %0d %0d", n_pass, n_fail); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
