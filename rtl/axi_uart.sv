// axi_uart - AXI4-Lite UART for a LiDAR range sensor.
//
// One instance serves each of the two directional LiDARs. The serial side runs
// at BAUD (115,200 bit/s, the LiDAR rate) with 8 data bits, no parity and one
// stop bit; the bit time is CLK_HZ/BAUD clocks, rounded to the nearest clock.
// Received bytes are queued in a FIFO_DEPTH-entry receive FIFO so software can
// read a whole sensor frame at once; bytes to send are queued in a transmit
// FIFO that feeds the transmitter.
//
// Registers (32-bit, byte offsets):
//   0x0 RXDATA  read: {rx_valid[8], byte[7:0]}; a read pops the FIFO
//   0x4 TXDATA  write: byte[7:0] is queued (dropped when the FIFO is full)
//   0x8 STATUS  read: {rx_count[15:8], overrun[5], frame_err[4], tx_full[3],
//               tx_empty[2], rx_full[1], rx_valid[0]}
//   0xC CTRL    read/write: rx_irq_en[0]; writing 1 to bit 1 clears the
//               sticky overrun and frame_err flags
// irq is high while rx_irq_en is set and the receive FIFO holds data.
// A byte received into a full FIFO is dropped and sets overrun; a byte whose
// stop bit is low is dropped and sets frame_err.
//
// The bit rate follows the platform description; the frame format, FIFOs,
// register map and interrupt are this design's choices.
module axi_uart
  import io_pkg::*;
#(
  parameter int unsigned CLK_HZ     = PL_CLK_HZ,
  parameter int unsigned BAUD       = 115_200,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_axil_req,
  output axil_rsp_t s_axil_rsp,
  input  logic      rx,
  output logic      tx,
  output logic      irq
);

  localparam int unsigned CLKS_PER_BIT = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned CNTW = $clog2(FIFO_DEPTH) + 1;

  // register bus
  logic       reg_wr, reg_rd;
  axil_addr_t reg_waddr, reg_raddr;
  axil_data_t reg_wdata, reg_rdata;
  logic [3:0] reg_wstrb;

  axil_reg_slave u_bus (
    .clk, .rst_n,
    .s_req(s_axil_req), .s_rsp(s_axil_rsp),
    .reg_wr, .reg_waddr, .reg_wdata, .reg_wstrb,
    .reg_rd, .reg_raddr, .reg_rdata
  );

  // receiver and its FIFO
  logic            rx_byte_valid, rx_frame_err;
  logic [7:0]      rx_byte, rxf_data;
  logic            rxf_full, rxf_empty, rxf_pop;
  logic [CNTW-1:0] rxf_count;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rx,
    .valid(rx_byte_valid), .data(rx_byte), .frame_err(rx_frame_err)
  );

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_rxf (
    .clk, .rst_n,
    .wr_en(rx_byte_valid), .wr_data(rx_byte),
    .rd_en(rxf_pop), .rd_data(rxf_data),
    .full(rxf_full), .empty(rxf_empty), .count(rxf_count)
  );

  // transmit FIFO and transmitter
  logic            txf_push, txf_full, txf_empty, tx_busy, tx_start;
  logic [7:0]      txf_data;
  logic [CNTW-1:0] txf_count;

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_txf (
    .clk, .rst_n,
    .wr_en(txf_push), .wr_data(reg_wdata[7:0]),
    .rd_en(tx_start), .rd_data(txf_data),
    .full(txf_full), .empty(txf_empty), .count(txf_count)
  );

  assign tx_start = !txf_empty && !tx_busy;

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .start(tx_start), .data(txf_data), .busy(tx_busy), .tx
  );

  // control and status
  logic overrun, frame_err, irq_en;

  wire sel_wr_tx   = reg_wr && (reg_waddr[3:2] == 2'd1);
  wire sel_wr_ctrl = reg_wr && (reg_waddr[3:2] == 2'd3);
  assign txf_push  = sel_wr_tx && reg_wstrb[0];
  assign rxf_pop   = reg_rd && (reg_raddr[3:2] == 2'd0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      overrun   <= 1'b0;
      frame_err <= 1'b0;
      irq_en    <= 1'b0;
    end else begin
      if (sel_wr_ctrl && reg_wstrb[0]) begin
        irq_en <= reg_wdata[0];
        if (reg_wdata[1]) begin
          overrun   <= 1'b0;
          frame_err <= 1'b0;
        end
      end
      if (rx_byte_valid && rxf_full) overrun   <= 1'b1;
      if (rx_frame_err)              frame_err <= 1'b1;
    end
  end

  always_comb begin
    reg_rdata = '0;
    unique case (reg_raddr[3:2])
      2'd0: reg_rdata = {23'd0, !rxf_empty, rxf_data};
      2'd1: reg_rdata = '0;
      2'd2: reg_rdata = {16'd0, 8'(rxf_count), 2'b00, overrun, frame_err,
                         txf_full, txf_empty, rxf_full, !rxf_empty};
      2'd3: reg_rdata = {31'd0, irq_en};
      default: reg_rdata = '0;
    endcase
  end

  assign irq = irq_en && !rxf_empty;

  // register-bus bits no register decodes
  logic unused;
  assign unused = ^{txf_count, reg_waddr[15:4], reg_waddr[1:0], reg_raddr[15:4],
                    reg_raddr[1:0], reg_wdata[31:8], reg_wstrb[3:1]};

endmodule
