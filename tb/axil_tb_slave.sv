// axil_tb_slave - AXI4-Lite slave model for interconnect tests.
//
// Holds four 32-bit words. Its ready signals are raised on random clocks, so
// the interconnect sees stalls on every channel; B follows one clock after
// both AW and W have been taken, R one clock after AR. A read returns the
// word with bits [31:28] replaced by ID, so the testbench can tell which slave
// answered. writes and reads count the transactions it served.
//
// This stand-in slave is a test aid of this design, not part of the
// platform description.
module axil_tb_slave
  import io_pkg::*;
#(
  parameter logic [3:0] ID = 4'd0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t req,
  output axil_rsp_t rsp
);

  logic [31:0] mem [4];
  logic        aw_got, w_got;
  logic [1:0]  aw_idx;
  logic [31:0] wdata;
  logic        rnd_aw, rnd_w, rnd_ar;
  int unsigned writes, reads;
  logic        rsp_b, rsp_r;
  logic [31:0] rdata;

  always_comb begin
    rsp = '0;
    rsp.awready = rnd_aw && !aw_got && !rsp_b;
    rsp.wready  = rnd_w  && !w_got  && !rsp_b;
    rsp.bvalid  = rsp_b;
    rsp.bresp   = RESP_OKAY;
    rsp.arready = rnd_ar && !rsp_r;
    rsp.rvalid  = rsp_r;
    rsp.rdata   = rdata;
    rsp.rresp   = RESP_OKAY;
  end

  always_ff @(posedge clk) begin
    rnd_aw <= 1'($urandom);
    rnd_w  <= 1'($urandom);
    rnd_ar <= 1'($urandom);
    if (!rst_n) begin
      aw_got <= 1'b0; w_got <= 1'b0; rsp_b <= 1'b0; rsp_r <= 1'b0;
      aw_idx <= '0; wdata <= '0; rdata <= '0;
      writes <= 0; reads <= 0;
      for (int i = 0; i < 4; i++) mem[i] <= '0;
    end else begin
      if (req.awvalid && rsp.awready) begin aw_got <= 1'b1; aw_idx <= req.awaddr[3:2]; end
      if (req.wvalid  && rsp.wready)  begin w_got  <= 1'b1; wdata  <= req.wdata; end
      if (aw_got && w_got && !rsp_b) begin
        mem[aw_idx] <= wdata;
        rsp_b  <= 1'b1;
        aw_got <= 1'b0;
        w_got  <= 1'b0;
        writes <= writes + 1;
      end
      if (rsp_b && req.bready) rsp_b <= 1'b0;
      if (req.arvalid && rsp.arready) begin
        rsp_r <= 1'b1;
        rdata <= {ID, mem[req.araddr[3:2]][27:0]};
        reads <= reads + 1;
      end else if (rsp_r && req.rready) rsp_r <= 1'b0;
    end
  end

endmodule
