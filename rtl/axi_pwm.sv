// axi_pwm - AXI4-Lite PWM driver for the motor speed controllers.
//
// Generates one pulse train per motor ESC at PWM_HZ (250 Hz, a 4000 us
// period). A microsecond tick (CLK_HZ/1e6 clocks) advances a period counter
// from 0 to PERIOD_US-1; output i is high while the counter is below
// width[i], so the pulse width is set directly in microseconds (1000-2000 us
// for a typical ESC). Widths and the period written by software go to shadow
// registers and are taken over together at the start of the next period, so a
// pulse is never cut short or stretched by a write in mid-period. While
// disabled all outputs are low and the counter is held at 0; after enable the
// first period starts on the next microsecond tick.
//
// Registers (32-bit, byte offsets):
//   0x00       CTRL       read/write: enable[0]
//   0x04       PERIOD_US  read/write: period in microseconds (16 bit)
//   0x08       STATUS     read: periods started since reset (16 bit)
//   0x10+4*i   WIDTH[i]   read/write: pulse width in microseconds (16 bit)
//
// The 250 Hz rate and the four motor outputs follow the platform
// description; the microsecond units, shadowing and registers are this
// design's choices.
module axi_pwm
  import io_pkg::*;
#(
  parameter int unsigned CLK_HZ   = PL_CLK_HZ,
  parameter int unsigned CHANNELS = 4,
  parameter int unsigned PWM_HZ   = 250
) (
  input  logic                clk,
  input  logic                rst_n,
  input  axil_req_t           s_axil_req,
  output axil_rsp_t           s_axil_rsp,
  output logic [CHANNELS-1:0] pwm_out
);

  localparam int unsigned CLKS_PER_US = CLK_HZ / 1_000_000;
  localparam int unsigned PW          = $clog2(CLKS_PER_US + 1);
  localparam int unsigned PERIOD_DEF  = 1_000_000 / PWM_HZ;

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

  // microsecond timebase
  logic [PW-1:0] pre;
  logic          us_tick;
  always_ff @(posedge clk) begin
    if (!rst_n)                            pre <= '0;
    else if (pre == PW'(CLKS_PER_US - 1))  pre <= '0;
    else                                   pre <= pre + 1'b1;
  end
  assign us_tick = (pre == PW'(CLKS_PER_US - 1));

  // software-visible (shadow) and active registers
  logic        enable;
  logic [15:0] period_sh, period_act;
  logic [15:0] width_sh  [CHANNELS];
  logic [15:0] width_act [CHANNELS];
  logic [15:0] cnt;
  logic [15:0] period_count;
  logic        running;

  wire wr_any = reg_wr && (reg_wstrb[1:0] == 2'b11);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      enable    <= 1'b0;
      period_sh <= 16'(PERIOD_DEF);
      for (int i = 0; i < int'(CHANNELS); i++) width_sh[i] <= '0;
    end else if (wr_any) begin
      if (reg_waddr[7:2] == 6'h00) enable    <= reg_wdata[0];
      if (reg_waddr[7:2] == 6'h01) period_sh <= reg_wdata[15:0];
      for (int i = 0; i < int'(CHANNELS); i++)
        if (reg_waddr[7:2] == 6'(4 + i)) width_sh[i] <= reg_wdata[15:0];
    end
  end

  // period counter: a new period starts when the counter wraps, or on the
  // first tick after enable
  wire period_start = us_tick && enable &&
                      (!running || cnt == period_act - 16'd1 || period_act == 16'd0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running      <= 1'b0;
      cnt          <= '0;
      period_act   <= 16'(PERIOD_DEF);
      period_count <= '0;
      for (int i = 0; i < int'(CHANNELS); i++) width_act[i] <= '0;
    end else if (!enable) begin
      running <= 1'b0;
      cnt     <= '0;
    end else if (period_start) begin
      running      <= 1'b1;
      cnt          <= '0;
      period_act   <= period_sh;
      period_count <= period_count + 1'b1;
      for (int i = 0; i < int'(CHANNELS); i++) width_act[i] <= width_sh[i];
    end else if (us_tick) begin
      cnt <= cnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) pwm_out <= '0;
    else
      for (int i = 0; i < int'(CHANNELS); i++)
        pwm_out[i] <= running && (cnt < width_act[i]);
  end

  always_comb begin
    reg_rdata = '0;
    unique case (reg_raddr[7:2])
      6'h00: reg_rdata = {31'd0, enable};
      6'h01: reg_rdata = {16'd0, period_sh};
      6'h02: reg_rdata = {16'd0, period_count};
      default:
        for (int i = 0; i < int'(CHANNELS); i++)
          if (reg_raddr[7:2] == 6'(4 + i)) reg_rdata = {16'd0, width_sh[i]};
    endcase
  end

  // register-bus bits no register decodes
  logic unused;
  assign unused = ^{reg_rd, reg_waddr[15:8], reg_waddr[1:0], reg_raddr[15:8],
                    reg_raddr[1:0], reg_wdata[31:16], reg_wstrb[3:2]};

  initial assert (CHANNELS >= 1 && CHANNELS <= 32) else $error("CHANNELS must be 1..32");

endmodule
