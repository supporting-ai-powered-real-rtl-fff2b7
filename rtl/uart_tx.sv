// uart_tx - 8N1 serial transmitter.
//
// When idle the line is high. A byte presented with start (while busy is low)
// is sent as one low start bit, eight data bits LSB first and one high stop
// bit, each CLKS_PER_BIT clocks long, so a byte takes 10*CLKS_PER_BIT clocks.
// busy is high from the clock after start until the stop bit has been sent.
// The frame format is this design's choice; the bit rate is set by the
// enclosing peripheral (115,200 bit/s for the LiDARs).
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] data,
  output logic       busy,
  output logic       tx
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT);

  logic [CW-1:0] cnt;
  logic [3:0]    bitn;      // 0 = start bit, 1..8 = data, 9 = stop
  logic [8:0]    shreg;     // {stop, data} shifted out after the start bit

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      tx    <= 1'b1;
      cnt   <= '0;
      bitn  <= '0;
      shreg <= '1;
    end else if (!busy) begin
      tx <= 1'b1;
      if (start) begin
        busy  <= 1'b1;
        tx    <= 1'b0;
        shreg <= {1'b1, data};
        cnt   <= '0;
        bitn  <= '0;
      end
    end else if (cnt == CW'(CLKS_PER_BIT - 1)) begin
      cnt <= '0;
      if (bitn == 4'd9) begin
        busy <= 1'b0;
        tx   <= 1'b1;
      end else begin
        bitn  <= bitn + 1'b1;
        tx    <= shreg[0];
        shreg <= {1'b1, shreg[8:1]};
      end
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

endmodule
