// axil_reg_slave - AXI4-Lite slave front end shared by the I/O peripherals.
//
// Turns AXI4-Lite transactions into single-cycle register strobes:
//   * write: the AW and W channels are accepted independently, in any order;
//     once both are held, reg_wr pulses for one clock with reg_waddr,
//     reg_wdata and reg_wstrb, and the B response (OKAY) is raised in the
//     same clock. A new write is accepted only after B has been taken.
//   * read: AR is accepted when no R response is pending; in that clock
//     reg_rd pulses with reg_raddr and the peripheral must present reg_rdata
//     combinationally. The data are registered and returned on R one clock
//     later, so a read has one clock of latency. reg_rd lets a peripheral give
//     a read a side effect (popping a FIFO).
// One write and one read may be in flight at the same time. Reset is
// synchronous and active low. The protocol details are this design's choice.
module axil_reg_slave
  import io_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   s_req,
  output axil_rsp_t   s_rsp,
  output logic        reg_wr,
  output axil_addr_t  reg_waddr,
  output axil_data_t  reg_wdata,
  output logic [3:0]  reg_wstrb,
  output logic        reg_rd,
  output axil_addr_t  reg_raddr,
  input  axil_data_t  reg_rdata
);

  logic       aw_held, w_held, bvalid_q;
  logic       rvalid_q;
  axil_data_t rdata_q;

  logic aw_hs, w_hs, ar_hs;
  assign aw_hs = s_req.awvalid && s_rsp.awready;
  assign w_hs  = s_req.wvalid  && s_rsp.wready;
  assign ar_hs = s_req.arvalid && s_rsp.arready;

  always_comb begin
    s_rsp         = '0;
    s_rsp.awready = !aw_held && !bvalid_q;
    s_rsp.wready  = !w_held  && !bvalid_q;
    s_rsp.bvalid  = bvalid_q;
    s_rsp.bresp   = RESP_OKAY;
    s_rsp.arready = !rvalid_q;
    s_rsp.rvalid  = rvalid_q;
    s_rsp.rdata   = rdata_q;
    s_rsp.rresp   = RESP_OKAY;
  end

  assign reg_wr    = aw_held && w_held && !bvalid_q;
  assign reg_rd    = ar_hs;
  assign reg_raddr = s_req.araddr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      aw_held   <= 1'b0;
      w_held    <= 1'b0;
      bvalid_q  <= 1'b0;
      reg_waddr <= '0;
      reg_wdata <= '0;
      reg_wstrb <= '0;
    end else begin
      if (aw_hs) begin
        aw_held   <= 1'b1;
        reg_waddr <= s_req.awaddr;
      end
      if (w_hs) begin
        w_held    <= 1'b1;
        reg_wdata <= s_req.wdata;
        reg_wstrb <= s_req.wstrb;
      end
      if (reg_wr) begin
        aw_held  <= 1'b0;
        w_held   <= 1'b0;
        bvalid_q <= 1'b1;
      end else if (bvalid_q && s_req.bready) begin
        bvalid_q <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else if (ar_hs) begin
      rvalid_q <= 1'b1;
      rdata_q  <= reg_rdata;
    end else if (rvalid_q && s_req.rready) begin
      rvalid_q <= 1'b0;
    end
  end

  // A response, once raised, is held until the master takes it.
  a_b_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_rsp.bvalid && !s_req.bready |=> s_rsp.bvalid);
  a_r_stable: assert property (@(posedge clk) disable iff (!rst_n)
    s_rsp.rvalid && !s_req.rready |=> s_rsp.rvalid && $stable(s_rsp.rdata));

endmodule
