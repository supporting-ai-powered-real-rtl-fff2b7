// axi_i2c_master - AXI4-Lite I2C master for the inertial measurement unit.
//
// Drives the IMU bus in Fast mode: SCL_HZ = 400 kHz. The SCL period is four
// quarters averaging ceil(CLK_HZ / (4*SCL_HZ)) clocks, so the clock never
// exceeds SCL_HZ; at 100 MHz SCL is low for 140 clocks (1.4 us) and released
// for 112 clocks plus the input delay. A slave stretching the clock, and the
// input synchronizer and filter, lengthen the high phase. The SCL and SDA inputs pass a
// glitch filter whose length (in clocks) software sets in CTRL, to reject
// noise on the lines; it resets to FILTER_DEFAULT.
//
// Software runs a transfer one byte per command (see i2c_master_core):
//   0x0 CMD     write: {nack[11], read[10], stop[9], start[8], data[7:0]};
//               ignored while busy
//   0x4 STATUS  read: {ack_err[2], done[1], busy[0]}; done is sticky, rises
//               in the clock busy falls and is cleared by the next command
//   0x8 RXDATA  read: last byte received
//   0xC CTRL    read/write: {irq_en[8], filter_len[7:0]}
// irq is high while irq_en and done are both set. The pins are open drain:
// scl_oe/sda_oe high pull the line low.
//
// The 400 kHz rate and the presence of a configurable filter follow the
// platform description; the command set, registers and filter form are this
// design's choices.
module axi_i2c_master
  import io_pkg::*;
#(
  parameter int unsigned CLK_HZ         = PL_CLK_HZ,
  parameter int unsigned SCL_HZ         = 400_000,
  parameter int unsigned FILTER_DEFAULT = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_axil_req,
  output axil_rsp_t s_axil_rsp,
  input  logic      scl_i,
  output logic      scl_oe,
  input  logic      sda_i,
  output logic      sda_oe,
  output logic      irq
);

  localparam int unsigned CLKS_PER_QTR = (CLK_HZ + 4 * SCL_HZ - 1) / (4 * SCL_HZ);

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

  logic [7:0] filt_len;
  logic       irq_en, done_flag;
  logic       scl_f, sda_f;

  glitch_filter #(.LEN_W(8), .RESET_VAL(1'b1)) u_scl_filt (
    .clk, .rst_n, .len(filt_len), .din(scl_i), .dout(scl_f)
  );
  glitch_filter #(.LEN_W(8), .RESET_VAL(1'b1)) u_sda_filt (
    .clk, .rst_n, .len(filt_len), .din(sda_i), .dout(sda_f)
  );

  logic       busy, done, ack_err, cmd_valid;
  logic [7:0] rx_data;

  assign cmd_valid = reg_wr && (reg_waddr[3:2] == 2'd0) && !busy;

  i2c_master_core #(.CLKS_PER_QTR(CLKS_PER_QTR)) u_core (
    .clk, .rst_n,
    .cmd_valid,
    .cmd_start(reg_wdata[8]), .cmd_stop(reg_wdata[9]),
    .cmd_read(reg_wdata[10]), .cmd_nack(reg_wdata[11]),
    .cmd_data(reg_wdata[7:0]),
    .busy, .done, .ack_err, .rx_data,
    .scl_in(scl_f), .sda_in(sda_f), .scl_oe, .sda_oe
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      filt_len  <= 8'(FILTER_DEFAULT);
      irq_en    <= 1'b0;
      done_flag <= 1'b0;
    end else begin
      if (reg_wr && reg_waddr[3:2] == 2'd3) begin
        if (reg_wstrb[0]) filt_len <= reg_wdata[7:0];
        if (reg_wstrb[1]) irq_en   <= reg_wdata[8];
      end
      if (cmd_valid) done_flag <= 1'b0;
      else if (done) done_flag <= 1'b1;
    end
  end

  always_comb begin
    unique case (reg_raddr[3:2])
      2'd0:    reg_rdata = '0;
      2'd1:    reg_rdata = {29'd0, ack_err, done_flag || done, busy};
      2'd2:    reg_rdata = {24'd0, rx_data};
      default: reg_rdata = {23'd0, irq_en, filt_len};
    endcase
  end

  assign irq = irq_en && (done_flag || done);

  // register-bus bits no register decodes
  logic unused;
  assign unused = ^{reg_rd, reg_waddr[15:4], reg_waddr[1:0], reg_raddr[15:4],
                    reg_raddr[1:0], reg_wdata[31:12], reg_wstrb[3:2]};

endmodule
