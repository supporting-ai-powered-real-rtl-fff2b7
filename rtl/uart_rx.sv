// uart_rx - 8N1 serial receiver.
//
// The input passes a two-flop synchronizer. A falling edge on the idle-high
// line starts a frame; the start bit is checked again at its middle (a shorter
// low pulse is taken as a glitch), then each of the eight data bits (LSB
// first) and the stop bit is sampled once at its middle, CLKS_PER_BIT clocks
// apart. At the middle of the stop bit the receiver pulses valid with the byte
// if the stop bit is high, or pulses frame_err if it is low, and then waits
// for the line to return high. valid therefore comes 9.5 bit times after the
// start edge plus two clocks of synchronizer delay.
//
// The 3.3 V UART link to the LiDAR follows the platform description; the
// 8N1 frame and mid-bit sampling are this design's choices.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic       valid,
  output logic [7:0] data,
  output logic       frame_err
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT);

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_BITS, RX_WAIT_HIGH} rx_state_e;

  rx_state_e     st;
  logic [1:0]    sync;
  logic [CW-1:0] cnt;
  logic [3:0]    bitn;
  logic [7:0]    shreg;
  logic          rx_s;

  assign rx_s = sync[1];

  always_ff @(posedge clk) begin
    if (!rst_n) sync <= 2'b11;
    else        sync <= {sync[0], rx};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= RX_IDLE;
      cnt       <= '0;
      bitn      <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (st)
        RX_IDLE: if (!rx_s) begin
          st  <= RX_START;
          cnt <= '0;
        end
        RX_START: if (cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
          cnt  <= '0;
          bitn <= '0;
          st   <= rx_s ? RX_IDLE : RX_BITS;
        end else begin
          cnt <= cnt + 1'b1;
        end
        RX_BITS: if (cnt == CW'(CLKS_PER_BIT - 1)) begin
          cnt <= '0;
          if (bitn == 4'd8) begin
            if (rx_s) begin
              valid <= 1'b1;
              data  <= shreg;
              st    <= RX_IDLE;
            end else begin
              frame_err <= 1'b1;
              st        <= RX_WAIT_HIGH;
            end
          end else begin
            shreg <= {rx_s, shreg[7:1]};
            bitn  <= bitn + 1'b1;
          end
        end else begin
          cnt <= cnt + 1'b1;
        end
        RX_WAIT_HIGH: if (rx_s) st <= RX_IDLE;
        default: st <= RX_IDLE;
      endcase
    end
  end

endmodule
