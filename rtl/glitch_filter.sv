// glitch_filter - input synchronizer with a programmable glitch filter.
//
// The pin first passes a two-flop synchronizer. The filtered output takes a
// new level only after the synchronized input has differed from the output
// for more than len consecutive clocks; any shorter pulse is discarded. With
// len = 0 the output follows the synchronized input one clock later. The
// output resets to RESET_VAL. Used on the I2C SCL and SDA inputs, where the
// filter length is a software-set register.
//
// The platform description only says the I2C device has a configurable
// filter; the synchronizer-plus-counter form is this design's choice.
module glitch_filter #(
  parameter int unsigned LEN_W     = 8,
  parameter logic        RESET_VAL = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LEN_W-1:0] len,
  input  logic             din,
  output logic             dout
);

  logic [1:0]       sync;
  logic [LEN_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync <= {2{RESET_VAL}};
      cnt  <= '0;
      dout <= RESET_VAL;
    end else begin
      sync <= {sync[0], din};
      if (sync[1] == dout) begin
        cnt <= '0;
      end else if (cnt >= len) begin
        dout <= sync[1];
        cnt  <= '0;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
