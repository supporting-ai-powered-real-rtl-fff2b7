// io_pkg - types and constants shared by the programmable-logic I/O peripherals
// of the drone flight-control platform (LiDAR UARTs, IMU I2C master, radio PPM
// decoder, motor PWM driver).
//
// The peripherals are reached by the processing system over AXI4-Lite with a
// 32-bit data bus. The two structs below carry the five AXI4-Lite channels,
// split by direction: axil_req_t travels from master to slave, axil_rsp_t from
// slave to master. Using structs keeps the bus a single port on every module.
// The bus width, the 16-bit address and the address map are this design's
// choices; the platform description only calls the devices "AXI-based".
package io_pkg;

  localparam int unsigned AXIL_AW = 16;
  localparam int unsigned AXIL_DW = 32;

  typedef logic [AXIL_AW-1:0] axil_addr_t;
  typedef logic [AXIL_DW-1:0] axil_data_t;

  // AXI response codes
  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axi_resp_e;

  typedef struct packed {
    logic         awvalid;
    axil_addr_t   awaddr;
    logic         wvalid;
    axil_data_t   wdata;
    logic [3:0]   wstrb;
    logic         bready;
    logic         arvalid;
    axil_addr_t   araddr;
    logic         rready;
  } axil_req_t;

  typedef struct packed {
    logic         awready;
    logic         wready;
    logic         bvalid;
    axi_resp_e    bresp;
    logic         arready;
    logic         rvalid;
    axil_data_t   rdata;
    axi_resp_e    rresp;
  } axil_rsp_t;

  // Address map of the I/O subsystem: one 4 KiB window per peripheral,
  // selected by address bits [14:12].
  localparam int unsigned SLV_SEL_LSB = 12;
  localparam int unsigned SLV_UART0   = 0;  // forward LiDAR
  localparam int unsigned SLV_UART1   = 1;  // backward LiDAR
  localparam int unsigned SLV_I2C     = 2;  // IMU
  localparam int unsigned SLV_PPM     = 3;  // radio receiver
  localparam int unsigned SLV_PWM     = 4;  // motor ESCs
  localparam int unsigned N_SLV       = 5;

  // Default clock of the programmable logic.
  localparam int unsigned PL_CLK_HZ   = 100_000_000;

endpackage
