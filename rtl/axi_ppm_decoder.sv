// axi_ppm_decoder - AXI4-Lite radio receiver (PPM) decoder.
//
// The radio receiver sends all stick and switch positions as one pulse
// position modulated (PPM) stream: a pulse per channel, the time between the
// rising edges of consecutive pulses giving the channel value, and a long gap
// between frames. This block measures the stream in hardware so the CPU takes
// no interrupt per edge and reads finished values from registers.
//
// A microsecond tick (CLK_HZ/1e6 clocks) drives an interval counter that is
// restarted at every rising edge of the synchronized input; it counts the
// ticks from one edge clock up to, not including, the next, so edges spaced
// by exactly V microseconds read V. An interval of
// SYNC_US or more marks the frame gap: when the counter reaches SYNC_US the
// channel values gathered since the previous gap are copied, all at once,
// into the CH registers, the frame counter increments and the frame interrupt
// is raised, so a read never mixes two frames. Each shorter interval is
// stored as the next channel value, in microseconds; intervals beyond
// CHANNELS are counted but not stored, and registers of channels a shorter
// frame did not carry keep their last values. No edge for TIMEOUT_US sets the lost
// flag and discards the frame in progress; decoding resumes after the next
// gap. Values reach the registers SYNC_US after the last edge of a frame.
//
// Registers (32-bit, byte offsets):
//   0x00 + 4*i  CH[i]   read: channel i in microseconds (i < CHANNELS)
//   0x40        STATUS  read: {lost[31], chans_last_frame[23:16],
//                              frame_count[15:0]}
//   0x44        CTRL    read/write: irq_en[0]; writing 1 to bit 1 clears the
//                       pending frame interrupt
// irq stays high from a frame until CTRL bit 1 is written (when irq_en).
//
// Decoding PPM into registers follows the platform description; the edge
// polarity, gap and timeout lengths, channel count and registers are this
// design's choices.
module axi_ppm_decoder
  import io_pkg::*;
#(
  parameter int unsigned CLK_HZ     = PL_CLK_HZ,
  parameter int unsigned CHANNELS   = 8,
  parameter int unsigned SYNC_US    = 3000,
  parameter int unsigned TIMEOUT_US = 50000
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_axil_req,
  output axil_rsp_t s_axil_rsp,
  input  logic      ppm_in,
  output logic      irq
);

  localparam int unsigned CLKS_PER_US = CLK_HZ / 1_000_000;
  localparam int unsigned PW  = $clog2(CLKS_PER_US + 1);
  localparam int unsigned IW  = $clog2(TIMEOUT_US + 1);

  // ------------------------------------------------------------ bus front end
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

  // ------------------------------------------------------ input and timebase
  logic [2:0]    sync;
  logic          rise;
  logic [PW-1:0] pre;
  logic          us_tick;

  always_ff @(posedge clk) begin
    if (!rst_n) sync <= '0;
    else        sync <= {sync[1:0], ppm_in};
  end
  assign rise = sync[1] && !sync[2];

  always_ff @(posedge clk) begin
    if (!rst_n)                            pre <= '0;
    else if (pre == PW'(CLKS_PER_US - 1))  pre <= '0;
    else                                   pre <= pre + 1'b1;
  end
  assign us_tick = (pre == PW'(CLKS_PER_US - 1));

  // ----------------------------------------------------------------- decoder
  logic [IW-1:0] interval;
  logic          synced, lost;
  logic [7:0]    chan_idx, chans_last;
  logic [15:0]   frame_count;
  logic [15:0]   work [CHANNELS];
  logic [15:0]   chan [CHANNELS];
  logic          frame_pulse, irq_pend, irq_en;

  wire at_sync    = us_tick && (interval == IW'(SYNC_US - 1));
  wire at_timeout = us_tick && (interval == IW'(TIMEOUT_US - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      interval    <= '0;
      synced      <= 1'b0;
      lost        <= 1'b1;
      chan_idx    <= '0;
      chans_last  <= '0;
      frame_count <= '0;
      frame_pulse <= 1'b0;
      for (int i = 0; i < int'(CHANNELS); i++) begin
        work[i] <= '0;
        chan[i] <= '0;
      end
    end else begin
      frame_pulse <= 1'b0;
      if (rise) begin
        interval <= IW'(us_tick);        // a tick in the edge clock counts for the next interval
        if (interval >= IW'(SYNC_US)) begin
          synced   <= 1'b1;               // gap ends: a new frame begins
          chan_idx <= '0;
        end else if (synced) begin
          for (int i = 0; i < int'(CHANNELS); i++)
            if (chan_idx == 8'(i)) work[i] <= 16'(interval);
          if (chan_idx != 8'hFF) chan_idx <= chan_idx + 1'b1;
        end
      end else if (us_tick && interval != IW'(TIMEOUT_US)) begin
        interval <= interval + 1'b1;
        if (at_sync && synced && chan_idx != 0) begin
          for (int i = 0; i < int'(CHANNELS); i++) chan[i] <= work[i];
          chans_last  <= chan_idx;
          frame_count <= frame_count + 1'b1;
          frame_pulse <= 1'b1;
          lost        <= 1'b0;
          chan_idx    <= '0;
        end
        if (at_timeout) begin
          lost     <= 1'b1;
          synced   <= 1'b0;
          chan_idx <= '0;
        end
      end
    end
  end

  // ------------------------------------------------------ control and status
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      irq_en   <= 1'b0;
      irq_pend <= 1'b0;
    end else begin
      if (frame_pulse) irq_pend <= 1'b1;
      else if (reg_wr && reg_waddr[6:2] == 5'h11 && reg_wstrb[0] && reg_wdata[1])
        irq_pend <= 1'b0;
      if (reg_wr && reg_waddr[6:2] == 5'h11 && reg_wstrb[0]) irq_en <= reg_wdata[0];
    end
  end

  assign irq = irq_en && irq_pend;

  always_comb begin
    reg_rdata = '0;
    if (reg_raddr[6] == 1'b0) begin
      for (int i = 0; i < int'(CHANNELS); i++)
        if (reg_raddr[5:2] == 4'(i)) reg_rdata = {16'd0, chan[i]};
    end else if (reg_raddr[5:2] == 4'h0) begin
      reg_rdata = {lost, 7'd0, chans_last, frame_count};
    end else if (reg_raddr[5:2] == 4'h1) begin
      reg_rdata = {30'd0, irq_pend, irq_en};
    end
  end

  // register-bus bits no register decodes
  logic unused;
  assign unused = ^{reg_rd, reg_waddr[15:7], reg_waddr[1:0], reg_raddr[15:7],
                    reg_raddr[1:0], reg_wdata[31:2], reg_wstrb[3:1]};

  initial begin
    assert (CHANNELS >= 1 && CHANNELS <= 16) else $error("CHANNELS must be 1..16");
    assert (SYNC_US < TIMEOUT_US) else $error("SYNC_US must be below TIMEOUT_US");
  end

endmodule
