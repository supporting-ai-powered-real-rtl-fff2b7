// axil_master_bfm - AXI4-Lite master bus-functional model for the testbenches.
//
// Testbenches call write() and read() hierarchically. Signals are driven and
// ready/valid inputs inspected at the falling clock edge, so every handshake
// completes cleanly at the following rising edge. AW and W are raised
// together; each is dropped as soon as it has been accepted. A transaction
// waits at most MAX_WAIT clocks for each response, then reports a timeout.
//
// The platform description only calls the devices AXI-based; driving them
// over AXI4-Lite with this bus model is this design's choice.
module axil_master_bfm
  import io_pkg::*;
#(
  parameter int unsigned MAX_WAIT = 1000
) (
  input  logic      clk,
  output axil_req_t req,
  input  axil_rsp_t rsp
);

  int unsigned timeouts = 0;

  initial req = '0;

  task automatic write(input axil_addr_t addr, input axil_data_t data,
                       output axi_resp_e resp);
    bit aw_done = 0, w_done = 0, a, w;
    int unsigned n = 0;
    @(negedge clk);
    req.awvalid = 1'b1; req.awaddr = addr;
    req.wvalid  = 1'b1; req.wdata  = data; req.wstrb = 4'hF;
    req.bready  = 1'b1;
    while (!(aw_done && w_done) && n < MAX_WAIT) begin
      a = req.awvalid && rsp.awready;
      w = req.wvalid  && rsp.wready;
      @(negedge clk);
      n++;
      if (a) begin aw_done = 1; req.awvalid = 1'b0; end
      if (w) begin w_done  = 1; req.wvalid  = 1'b0; end
    end
    while (!rsp.bvalid && n < MAX_WAIT) begin
      @(negedge clk);
      n++;
    end
    resp = rsp.bresp;
    if (n >= MAX_WAIT) timeouts++;
    @(negedge clk);
    req.bready = 1'b0; req.awvalid = 1'b0; req.wvalid = 1'b0;
  endtask

  task automatic read(input axil_addr_t addr, output axil_data_t data,
                      output axi_resp_e resp);
    int unsigned n = 0;
    @(negedge clk);
    req.arvalid = 1'b1; req.araddr = addr; req.rready = 1'b1;
    while (!(rsp.arready) && n < MAX_WAIT) begin
      @(negedge clk);
      n++;
    end
    @(negedge clk);
    req.arvalid = 1'b0;
    while (!rsp.rvalid && n < MAX_WAIT) begin
      @(negedge clk);
      n++;
    end
    data = rsp.rdata;
    resp = rsp.rresp;
    if (n >= MAX_WAIT) timeouts++;
    @(negedge clk);
    req.rready = 1'b0;
  endtask

endmodule
