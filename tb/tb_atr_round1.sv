// tb_atr_round1: Round 1 workload of one frame through the board at its
// default parameters. 5,627 ROIs go through five templates each and 8,154
// ROIs through two, 44,443 templates in all; these are the counts of one
// test frame of the original application.
//
// For each template the testbench sends the 40 point pairs as 20 host writes
// to the Round 1 chip (chip 6), one write every 5 cycles. It waits the fixed
// 5-cycle latency and reads the result without polling. That makes
// 20 x 5 + 5 = 105 cycles per template, and the testbench checks this rate.
//
// Every decision is checked against two references:
//   * the division-free integer test;
//   * the original real-valued correlation (SumP - SumM) / sqrt(SM) >= 0.45,
//     with correlation 0 when SM = 0. Cases within 1e-9 of the threshold are
//     not compared here.
// The points are random 4-bit values. Some point sets get a contrast between
// the two halves, so that passes and rejections both occur. The five/two
// template split and the ROI counts are the workload's. The 5-cycle write
// spacing models a host that needs five chip cycles per transfer. The data
// are synthetic.
module tb_atr_round1;
  import atr_pkg::*;
  `include "atr_ref.svh"

  localparam int NC = 6, N_ROI5 = 5627, N_ROI2 = 8154, WR_CYC = 5;
  localparam int TPL_CYC = 20 * WR_CYC + R1_LAT;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  hbus_req_t            hb_req;
  hbus_rsp_t            hb_rsp;
  logic [HB_CHIP_W-1:0] host_chip;
  logic [NC-1:0]        irq;
  sram_req_t            sram [NC];
  logic [DATA_W-1:0]    sram_rdata [NC];

  atr_top dut (.clk, .rst_n, .host_req(hb_req), .host_chip, .host_rsp(hb_rsp),
               .irq, .sram, .sram_rdata);

  for (genvar i = 0; i < NC; i++) begin : g_mem
    sram_64kx16 u_mem (.clk, .req(sram[i]), .rdata(sram_rdata[i]));
  end

  `include "hb_host.svh"

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(negedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real orig_corr(input int p[40], input int q[40]);
    real sump = 0.0, summ = 0.0, ssum = 0.0, sum, sm, d;
    for (int i = 0; i < 40; i++) begin
      d = (p[i] > q[i]) ? real'(p[i] - q[i]) : real'(q[i] - p[i]);
      if (i < 20) sump += d; else summ += d;
      ssum += d * d;
    end
    sum = sump + summ;
    sm  = 40.0 * ssum - sum * sum;
    return (sm == 0.0) ? 0.0 : (sump - summ) / $sqrt(sm);
  endfunction

  initial begin
    int n_tpl, n_pass, n_fail, n_rate_bad, n_orig_cmp;
    longint t0, t_first;
    logic [15:0] r;
    hb_req = '0; host_chip = 4'(NC);
    n_tpl = 0; n_pass = 0; n_fail = 0; n_rate_bad = 0; n_orig_cmp = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    t_first = cyc;

    for (int roi = 0; roi < N_ROI5 + N_ROI2; roi++) begin
      int ntpl;
      ntpl = (roi < N_ROI5) ? 5 : 2;
      for (int t = 0; t < ntpl; t++) begin
        int p [40], q [40], mode;
        bit exp, got;
        real corr;
        mode = $urandom_range(3);
        for (int i = 0; i < 40; i++) begin
          p[i] = $urandom_range(15);
          q[i] = $urandom_range(15);
          // mode 0: strong contrast in the SumP half, mode 1: mild contrast
          if (mode == 0) q[i] = (i < 20) ? (p[i] ^ 8) : p[i];
          if (mode == 1) q[i] = (i < 20) ? q[i] : ((p[i] + $urandom_range(2)) & 15);
        end
        exp = ref_r1(p, q);
        t0 = cyc;
        for (int w = 0; w < 20; w++) begin
          longint tw;
          tw = cyc;
          hb_write(R1_PAIRS_IN, {4'(p[w]), 4'(q[w]), 4'(p[w+20]), 4'(q[w+20])});
          if (cyc - tw > WR_CYC) n_rate_bad++;
          while (cyc - tw < WR_CYC) @(negedge clk);
        end
        repeat (R1_LAT) @(negedge clk);
        check(cyc - t0 == TPL_CYC, $sformatf("template %0d took %0d cycles", n_tpl, cyc - t0));
        hb_read(R1_RESULT, r);
        got = r[1];
        check(r[0] && got == exp, $sformatf("template %0d: valid %0b pass %0b exp %0b",
                                            n_tpl, r[0], got, exp));
        corr = orig_corr(p, q);
        if (corr - 0.45 > 1e-9 || 0.45 - corr > 1e-9) begin
          n_orig_cmp++;
          check(got == (corr >= 0.45), $sformatf("template %0d: corr %f vs decision %0b",
                                                 n_tpl, corr, got));
        end
        if (got) n_pass++; else n_fail++;
        n_tpl++;
      end
    end

    $display("%0d templates (%0d ROIs x 5 + %0d ROIs x 2): %0d pass, %0d rejected",
             n_tpl, N_ROI5, N_ROI2, n_pass, n_fail);
    $display("%0d decisions also compared with the real-valued correlation", n_orig_cmp);
    $display("%0d cycles in all; %0d cycles per template without the result read",
             cyc - t_first, TPL_CYC);
    check(n_tpl == N_ROI5 * 5 + N_ROI2 * 2, "template count");
    check(n_rate_bad == 0, $sformatf("%0d writes slower than %0d cycles", n_rate_bad, WR_CYC));
    check(n_pass > 0 && n_fail > 0, "passes and rejections both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
