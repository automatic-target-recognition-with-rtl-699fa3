// hb_host.svh: host-side tasks for the request/acknowledge register bus, for
// inclusion in a testbench module that has clk, a hbus_req_t named hb_req
// and a hbus_rsp_t named hb_rsp. Requests are raised after a falling edge
// and dropped after the falling edge at which the acknowledge is seen.

  task automatic hb_write(input logic [3:0] addr, input logic [15:0] data);
    hb_req.req = 1'b1; hb_req.we = 1'b1; hb_req.addr = addr; hb_req.wdata = data;
    do @(negedge clk); while (!hb_rsp.ack);
    hb_req.req = 1'b0; hb_req.we = 1'b0;
  endtask

  task automatic hb_read(input logic [3:0] addr, output logic [15:0] data);
    hb_req.req = 1'b1; hb_req.we = 1'b0; hb_req.addr = addr; hb_req.wdata = '0;
    do @(negedge clk); while (!hb_rsp.ack);
    data = hb_rsp.rdata;
    hb_req.req = 1'b0;
  endtask
