// axil_decoder - AXI4-Lite 1-to-N address decoder for the I/O subsystem.
//
// Connects the one AXI4-Lite master port of the processing system to N_SLAVES
// peripheral slaves. Address bits [SEL_LSB+2:SEL_LSB] pick the slave; an index
// at or above N_SLAVES is unmapped and is answered locally with DECERR.
//
// Writes and reads are routed independently, one transaction of each kind at
// a time. In the idle state the decoder accepts nothing; when AWVALID (or
// ARVALID) appears it latches the target from the address and, from the next
// clock on, passes all channels of that transaction straight through to that
// slave (or to the local error responder) until the B (or R) handshake ends it.
// This costs one clock per transaction and needs no buffering. The
// interconnect is not specified beyond the devices being AXI-based; this
// structure is this design's own choice.
module axil_decoder
  import io_pkg::*;
#(
  parameter int unsigned N_SLAVES = 5,
  parameter int unsigned SEL_LSB  = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  axil_req_t  s_req,
  output axil_rsp_t  s_rsp,
  output axil_req_t  m_req [N_SLAVES],
  input  axil_rsp_t  m_rsp [N_SLAVES]
);

  typedef enum logic [1:0] {CH_IDLE, CH_FWD, CH_ERR} ch_state_e;

  ch_state_e  wr_st, rd_st;
  logic [2:0] wr_sel, rd_sel;
  logic       err_aw_done, err_w_done, err_bvalid;
  logic       err_rvalid;

  logic [2:0] aw_idx, ar_idx;
  assign aw_idx = s_req.awaddr[SEL_LSB +: 3];
  assign ar_idx = s_req.araddr[SEL_LSB +: 3];

  // ---------------------------------------------------------------- routing
  always_comb begin
    s_rsp = '0;
    for (int i = 0; i < int'(N_SLAVES); i++) begin
      m_req[i] = '0;
      // address and data fields go to every slave; only valids are gated
      m_req[i].awaddr = s_req.awaddr;
      m_req[i].wdata  = s_req.wdata;
      m_req[i].wstrb  = s_req.wstrb;
      m_req[i].araddr = s_req.araddr;
    end

    // write channels
    if (wr_st == CH_FWD) begin
      for (int i = 0; i < int'(N_SLAVES); i++) begin
        if (wr_sel == 3'(i)) begin
          m_req[i].awvalid = s_req.awvalid;
          m_req[i].wvalid  = s_req.wvalid;
          m_req[i].bready  = s_req.bready;
          s_rsp.awready    = m_rsp[i].awready;
          s_rsp.wready     = m_rsp[i].wready;
          s_rsp.bvalid     = m_rsp[i].bvalid;
          s_rsp.bresp      = m_rsp[i].bresp;
        end
      end
    end else if (wr_st == CH_ERR) begin
      s_rsp.awready = !err_aw_done;
      s_rsp.wready  = !err_w_done;
      s_rsp.bvalid  = err_bvalid;
      s_rsp.bresp   = RESP_DECERR;
    end

    // read channels
    if (rd_st == CH_FWD) begin
      for (int i = 0; i < int'(N_SLAVES); i++) begin
        if (rd_sel == 3'(i)) begin
          m_req[i].arvalid = s_req.arvalid;
          m_req[i].rready  = s_req.rready;
          s_rsp.arready    = m_rsp[i].arready;
          s_rsp.rvalid     = m_rsp[i].rvalid;
          s_rsp.rdata      = m_rsp[i].rdata;
          s_rsp.rresp      = m_rsp[i].rresp;
        end
      end
    end else if (rd_st == CH_ERR) begin
      s_rsp.arready = !err_rvalid;
      s_rsp.rvalid  = err_rvalid;
      s_rsp.rdata   = '0;
      s_rsp.rresp   = RESP_DECERR;
    end
  end

  // ---------------------------------------------------------- write control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_st       <= CH_IDLE;
      wr_sel      <= '0;
      err_aw_done <= 1'b0;
      err_w_done  <= 1'b0;
      err_bvalid  <= 1'b0;
    end else begin
      unique case (wr_st)
        CH_IDLE: if (s_req.awvalid) begin
          wr_sel <= aw_idx;
          wr_st  <= (32'(aw_idx) < N_SLAVES) ? CH_FWD : CH_ERR;
        end
        CH_FWD: if (s_rsp.bvalid && s_req.bready) wr_st <= CH_IDLE;
        CH_ERR: begin
          if (s_req.awvalid && s_rsp.awready) err_aw_done <= 1'b1;
          if (s_req.wvalid  && s_rsp.wready)  err_w_done  <= 1'b1;
          if (err_aw_done && err_w_done && !err_bvalid) err_bvalid <= 1'b1;
          if (err_bvalid && s_req.bready) begin
            err_bvalid  <= 1'b0;
            err_aw_done <= 1'b0;
            err_w_done  <= 1'b0;
            wr_st       <= CH_IDLE;
          end
        end
        default: wr_st <= CH_IDLE;
      endcase
    end
  end

  // ----------------------------------------------------------- read control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_st      <= CH_IDLE;
      rd_sel     <= '0;
      err_rvalid <= 1'b0;
    end else begin
      unique case (rd_st)
        CH_IDLE: if (s_req.arvalid) begin
          rd_sel <= ar_idx;
          rd_st  <= (32'(ar_idx) < N_SLAVES) ? CH_FWD : CH_ERR;
        end
        CH_FWD: if (s_rsp.rvalid && s_req.rready) rd_st <= CH_IDLE;
        CH_ERR: begin
          if (s_req.arvalid && s_rsp.arready) err_rvalid <= 1'b1;
          if (err_rvalid && s_req.rready) begin
            err_rvalid <= 1'b0;
            rd_st      <= CH_IDLE;
          end
        end
        default: rd_st <= CH_IDLE;
      endcase
    end
  end

  // The master must hold a request until it is taken.
  a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_req.awvalid && !s_rsp.awready |=> s_req.awvalid);
  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_req.arvalid && !s_rsp.arready |=> s_req.arvalid);

endmodule
