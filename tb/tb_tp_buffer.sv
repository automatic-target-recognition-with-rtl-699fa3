// tb_tp_buffer: fills the test-point buffer with 60 random offsets, reads it
// round several times through next (checking index, data and the last flag
// and the wrap back to entry 0), checks that pushes beyond 60 are ignored,
// that rewind and clear work, and a short buffer of 7 entries.
module tb_tp_buffer;
  import atr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned IW = $clog2(NTP + 1);
  logic              clear, push, rewind, next, rd_last;
  logic [ADDR_W-1:0] push_data, rd_data;
  logic [IW-1:0]     rd_idx, count;

  tp_buffer dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [ADDR_W-1:0] ref_q [$];

  task automatic fill(input int n);
    ref_q.delete();
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    for (int i = 0; i < n; i++) begin
      push = 1'b1; push_data = 16'($urandom);
      if (i < NTP) ref_q.push_back(push_data);
      @(negedge clk);
    end
    push = 1'b0;
  endtask

  task automatic walk(input int rounds);
    for (int r = 0; r < rounds; r++)
      for (int i = 0; i < ref_q.size(); i++) begin
        checks++;
        if (rd_idx != IW'(i) || rd_data !== ref_q[i] ||
            rd_last != (i == ref_q.size() - 1)) begin
          failures++;
          $display("r%0d i%0d idx=%0d data=%h exp=%h last=%0d", r, i, rd_idx,
                   rd_data, ref_q[i], rd_last);
        end
        next = 1'b1; @(negedge clk); next = 1'b0;
      end
  endtask

  initial begin
    clear = 0; push = 0; rewind = 0; next = 0; push_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    fill(65);                       // five too many
    checks++;
    if (count != IW'(NTP)) begin failures++; $display("count %0d", count); end
    walk(3);
    // advance part way, then rewind
    repeat (17) begin next = 1'b1; @(negedge clk); end
    next = 1'b0;
    rewind = 1'b1; @(negedge clk); rewind = 1'b0;
    walk(1);
    fill(7);
    checks++;
    if (count != IW'(7)) begin failures++; $display("count %0d", count); end
    walk(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
