// tb_hbus_decoder: the host bus decoder with seven simple register chips
// modelled in the testbench, each acknowledging after its own random delay.
// Checks that a write reaches only the addressed chip, that a broadcast
// write reaches every Round 0 chip but not the Round 1 chip and is
// acknowledged only after the slowest one, that reads return the addressed
// chip's data, and that a request to a missing chip is acknowledged.
module tb_hbus_decoder;
  import atr_pkg::*;

  localparam int N_R0 = 6, N = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  hbus_req_t            host_req, chip_req [N];
  hbus_rsp_t            host_rsp, chip_rsp [N];
  logic [HB_CHIP_W-1:0] host_chip;

  hbus_decoder #(.N_R0(N_R0)) dut (.*);

  // chip models: one 16-bit register each, random acknowledge delay
  logic [15:0] regs [N];
  int          writes [N];
  for (genvar i = 0; i < N; i++) begin : g_chip
    int wait_c = 0;
    always @(posedge clk) begin
      chip_rsp[i].ack <= 1'b0;
      if (chip_req[i].req && !chip_rsp[i].ack) begin
        if (wait_c == 0) wait_c = $urandom_range(4) + 1;
        wait_c--;
        if (wait_c == 0) begin
          chip_rsp[i].ack <= 1'b1;
          if (chip_req[i].we) begin regs[i] <= chip_req[i].wdata; writes[i]++; end
          else chip_rsp[i].rdata <= regs[i] ^ 16'(i);
        end
      end
    end
  end

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input logic [3:0] chip, input bit we, input logic [15:0] d,
                        output logic [15:0] q);
    host_chip = chip;
    host_req.req = 1'b1; host_req.we = we; host_req.addr = 4'h5; host_req.wdata = d;
    do @(negedge clk); while (!host_rsp.ack);
    q = host_rsp.rdata;
    host_req.req = 1'b0;
  endtask

  initial begin
    logic [15:0] q, v;
    int prev_w [N];
    host_req = '0; host_chip = '0;
    for (int i = 0; i < N; i++) begin regs[i] = '0; writes[i] = 0; chip_rsp[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 200; k++) begin
      int c;
      c = $urandom_range(8);            // 7 = missing chip, 8 = broadcast
      prev_w = writes;
      v = 16'($urandom);
      if (c == 8) begin
        access(HB_BROADCAST, 1'b1, v, q);
        for (int i = 0; i < N; i++) begin
          checks++;
          if (i < N_R0 ? (writes[i] != prev_w[i] + 1 || regs[i] != v)
                       : writes[i] != prev_w[i]) begin
            failures++; $display("broadcast chip %0d", i);
          end
        end
      end else if (c == 7) begin
        access(4'(c), $urandom_range(1), v, q);
        checks++;
        if (writes != prev_w || q != 16'h0) begin failures++; $display("missing chip"); end
      end else begin
        access(4'(c), 1'b1, v, q);
        access(4'(c), 1'b0, 16'h0, q);
        for (int i = 0; i < N; i++) begin
          checks++;
          if (writes[i] != prev_w[i] + (i == c)) begin failures++; $display("write to %0d hit %0d", c, i); end
        end
        checks++;
        if (q != (v ^ 16'(c))) begin failures++; $display("read %h", q); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
