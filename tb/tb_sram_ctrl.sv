// tb_sram_ctrl: drives the SRAM controller with its SRAM model.
//  - image load: a stream of 8-bit pixels must appear as words
//    {pixel k+1, pixel k}, five bits per byte, from the load address on;
//  - host read-back: consecutive words through the auto-incremented pointer;
//  - arbitration: with all clients requesting, ROI write wins, then the
//    test-point read, then image load, then read-back; a test-point read
//    returns its word one cycle after the grant;
//  - a random mix of ROI writes and test-point reads against a memory model.
module tb_sram_ctrl;
  import atr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  sram_req_t         sram;
  logic [DATA_W-1:0] sram_rdata;
  logic              roi_req, roi_gnt, tp_req, tp_gnt, tp_rvalid;
  logic [ADDR_W-1:0] roi_addr, roi_data, tp_addr, img_addr, rb_addr;
  logic [DATA_W-1:0] tp_rdata, rb_data;
  logic              img_set, img_req, img_ack, rb_set, rb_req, rb_ack;
  logic [7:0]        img_pix;

  sram_ctrl   dut (.*);
  sram_64kx16 u_mem (.clk, .req(sram), .rdata(sram_rdata));

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [DATA_W-1:0] model [logic [ADDR_W-1:0]];
  logic [7:0] pix [$];

  initial begin
    logic [ADDR_W-1:0] a, exp_a;
    roi_req = 0; tp_req = 0; img_set = 0; img_req = 0; rb_set = 0; rb_req = 0;
    roi_addr = '0; roi_data = '0; tp_addr = '0; img_addr = '0; rb_addr = '0;
    img_pix = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---- image load of 101 pixels at 0x1200 ----
    img_set = 1'b1; img_addr = 16'h1200; @(negedge clk); img_set = 1'b0;
    for (int k = 0; k < 101; k++) begin
      pix.push_back(8'($urandom));
      img_req = 1'b1; img_pix = pix[k];
      #1;
      check(img_ack, "image write acknowledged at once when SRAM idle");
      @(negedge clk);
    end
    img_req = 1'b0;
    for (int k = 0; k < 100; k++)
      model[16'h1200 + 16'(k)] = {3'b0, pix[k+1][7:3], 3'b0, pix[k][7:3]};

    // ---- host read-back of the 100 words ----
    rb_set = 1'b1; rb_addr = 16'h1200; @(negedge clk); rb_set = 1'b0;
    for (int k = 0; k < 100; k++) begin
      rb_req = 1'b1;
      do @(negedge clk); while (!rb_ack);
      check(rb_data == model[16'h1200 + 16'(k)], $sformatf("read-back word %0d", k));
    end
    rb_req = 1'b0;
    @(negedge clk);

    // ---- all four clients at once ----
    roi_req = 1'b1; roi_addr = 16'h8000; roi_data = 16'hbeef;
    tp_req = 1'b1; tp_addr = 16'h1205;
    img_set = 1'b0; img_req = 1'b1; img_pix = 8'hff; rb_req = 1'b1;
    #1;
    check(roi_gnt && !tp_gnt && !img_ack && sram.we && sram.addr == 16'h8000,
          "ROI write has priority");
    @(negedge clk);
    roi_req = 1'b0;
    #1;
    check(tp_gnt && !img_ack && !sram.we && sram.addr == 16'h1205,
          "test-point read is next");
    @(negedge clk);
    check(tp_rvalid && tp_rdata == model[16'h1205], "test-point data one cycle later");
    tp_req = 1'b0;
    #1;
    check(img_ack && sram.we, "image write after the engine");
    @(negedge clk);
    img_req = 1'b0;
    do @(negedge clk); while (!rb_ack);
    rb_req = 1'b0;
    model[16'h8000] = 16'hbeef;

    // ---- random ROI writes and test-point reads ----
    for (int k = 0; k < 500; k++) begin
      roi_req = ($urandom_range(3) == 0);
      roi_addr = 16'h8000 + 16'($urandom_range(31));
      roi_data = 16'($urandom);
      tp_req = 1'b1;
      tp_addr = ($urandom_range(1) == 0) ? 16'h1200 + 16'($urandom_range(99))
                                         : 16'h8000 + 16'($urandom_range(31));
      a = tp_addr;
      #1;
      check(roi_gnt == roi_req && tp_gnt == !roi_req, "grant");
      if (roi_req) model[roi_addr] = roi_data;
      @(negedge clk);
      if (!roi_req) begin
        exp_a = a;
        check(tp_rvalid && tp_rdata == (model.exists(exp_a) ? model[exp_a] : 16'h0),
              $sformatf("random read %h", exp_a));
      end else
        check(!tp_rvalid, "no read data after a write cycle");
    end
    roi_req = 1'b0; tp_req = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
