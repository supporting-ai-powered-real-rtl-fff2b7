// pl_io_top - I/O peripheral subsystem in the programmable logic of the
// drone's MPSoC.
//
// The flight-critical (real-time) domain reaches its sensors and actuators
// through dedicated peripherals built in the FPGA fabric instead of through
// CPU-driven GPIO or level-shifted board peripherals. This top gathers them
// behind one AXI4-Lite slave port driven by the processing system:
//   UART0 (0x0000)  forward LiDAR, 115,200 bit/s
//   UART1 (0x1000)  backward LiDAR, 115,200 bit/s
//   I2C   (0x2000)  9-DoF IMU, 400 kHz Fast mode, with input filter
//   PPM   (0x3000)  radio receiver decoder (manual control)
//   PWM   (0x4000)  four 250 Hz ESC outputs (motor control)
// axil_decoder routes each transaction by address bits [14:12]; other
// addresses are answered with DECERR. irq = {ppm, i2c, uart1, uart0}.
// The deep-learning accelerator that shares the fabric is a separate
// vendor core and is not part of this subsystem. The set of devices follows
// the platform description; the address map and the single bus port are this
// design's choices. All logic runs on clk with a synchronous active-low reset.
module pl_io_top
  import io_pkg::*;
#(
  parameter int unsigned CLK_HZ = PL_CLK_HZ
) (
  input  logic       clk,
  input  logic       rst_n,
  input  axil_req_t  s_axil_req,
  output axil_rsp_t  s_axil_rsp,
  input  logic [1:0] lidar_rx,
  output logic [1:0] lidar_tx,
  input  logic       i2c_scl_i,
  output logic       i2c_scl_oe,
  input  logic       i2c_sda_i,
  output logic       i2c_sda_oe,
  input  logic       ppm_in,
  output logic [3:0] pwm_out,
  output logic [3:0] irq
);

  axil_req_t m_req [N_SLV];
  axil_rsp_t m_rsp [N_SLV];

  axil_decoder #(.N_SLAVES(N_SLV), .SEL_LSB(SLV_SEL_LSB)) u_dec (
    .clk, .rst_n, .s_req(s_axil_req), .s_rsp(s_axil_rsp), .m_req, .m_rsp
  );

  for (genvar u = 0; u < 2; u++) begin : g_lidar_uart
    axi_uart #(.CLK_HZ(CLK_HZ), .BAUD(115_200), .FIFO_DEPTH(16)) u_uart (
      .clk, .rst_n,
      .s_axil_req(m_req[SLV_UART0 + u]), .s_axil_rsp(m_rsp[SLV_UART0 + u]),
      .rx(lidar_rx[u]), .tx(lidar_tx[u]), .irq(irq[u])
    );
  end

  axi_i2c_master #(.CLK_HZ(CLK_HZ), .SCL_HZ(400_000)) u_imu_i2c (
    .clk, .rst_n,
    .s_axil_req(m_req[SLV_I2C]), .s_axil_rsp(m_rsp[SLV_I2C]),
    .scl_i(i2c_scl_i), .scl_oe(i2c_scl_oe),
    .sda_i(i2c_sda_i), .sda_oe(i2c_sda_oe),
    .irq(irq[2])
  );

  axi_ppm_decoder #(.CLK_HZ(CLK_HZ)) u_radio (
    .clk, .rst_n,
    .s_axil_req(m_req[SLV_PPM]), .s_axil_rsp(m_rsp[SLV_PPM]),
    .ppm_in, .irq(irq[3])
  );

  axi_pwm #(.CLK_HZ(CLK_HZ), .CHANNELS(4), .PWM_HZ(250)) u_motors (
    .clk, .rst_n,
    .s_axil_req(m_req[SLV_PWM]), .s_axil_rsp(m_rsp[SLV_PWM]),
    .pwm_out
  );

endmodule
