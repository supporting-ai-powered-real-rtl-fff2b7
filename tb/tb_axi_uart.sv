// tb_axi_uart - self-checking testbench of the LiDAR UART.
//
// A serial driver in the testbench sends 8N1 frames at 115,200 bit/s into rx
// and a serial monitor decodes tx, with the bit time worked out here from the
// clock and bit rate (100 MHz / 115,200 = 868 clocks). Checks: received bytes
// come out of RXDATA in order with the right count and interrupt; a 17th byte
// into the 16-entry FIFO sets overrun; a low stop bit sets frame_err and
// queues nothing; clearing works; transmitted bytes arrive intact and a frame
// lasts ten bit times.
//
// The UART at 115,200 bit/s follows the platform description; the FIFO,
// status bits and test cases are this design's choices.
module tb_axi_uart;
  import io_pkg::*;

  localparam int unsigned CLK_HZ = 100_000_000;
  localparam int unsigned BAUD   = 115_200;
  localparam int unsigned BIT    = (CLK_HZ + BAUD / 2) / BAUD;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic rx = 1'b1, tx, irq;

  axi_uart #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .FIFO_DEPTH(16)) dut (
    .clk, .rst_n, .s_axil_req(req), .s_axil_rsp(rsp), .rx, .tx, .irq
  );

  axil_master_bfm bfm (.clk, .req, .rsp);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic [7:0] b, input bit stop_ok = 1'b1);
    logic [9:0] fr = {stop_ok, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx = fr[i];
      repeat (BIT) @(posedge clk);
    end
    rx = 1'b1;
    repeat (BIT) @(posedge clk);
  endtask

  // serial monitor on tx
  logic [7:0] tx_bytes [$];
  int unsigned tx_frame_clocks [$];
  initial begin
    forever begin
      logic [7:0] b;
      int unsigned t0, n;
      @(negedge tx);
      n = 0;
      repeat (BIT / 2) begin @(posedge clk); n++; end
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) begin @(posedge clk); n++; end
        b[i] = tx;
      end
      repeat (BIT) begin @(posedge clk); n++; end
      if (tx !== 1'b1) $display("FAIL: tx stop bit low");
      // count on until the line could carry the next start bit
      while (n < 10 * BIT) begin @(posedge clk); n++; if (!tx) break; end
      tx_bytes.push_back(b);
      tx_frame_clocks.push_back(n);
    end
  end

  axi_resp_e r;
  axil_data_t d;
  logic [7:0] lidar [3] = '{8'h59, 8'h59, 8'h34};

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    check(tx == 1'b1 && !irq, "idle line high, no interrupt");

    // receive a short sensor frame
    bfm.write(16'h000C, 32'h1, r);               // rx interrupt on
    foreach (lidar[i]) send(lidar[i]);
    bfm.read(16'h0008, d, r);
    check(d[0] && d[15:8] == 8'd3, $sformatf("3 bytes waiting, status %h", d));
    check(irq, "receive interrupt");
    foreach (lidar[i]) begin
      bfm.read(16'h0000, d, r);
      check(d[8] && d[7:0] == lidar[i], $sformatf("rx byte %0d = %02h", i, d[7:0]));
    end
    bfm.read(16'h0008, d, r);
    check(!d[0] && !irq, "FIFO empty after reads, interrupt cleared");

    // overrun: 17 bytes into a 16-entry FIFO
    for (int i = 0; i < 17; i++) send(8'(i * 7 + 1));
    bfm.read(16'h0008, d, r);
    check(d[1] && d[5], $sformatf("rx_full and overrun set, status %h", d));
    for (int i = 0; i < 16; i++) begin
      bfm.read(16'h0000, d, r);
      check(d[7:0] == 8'(i * 7 + 1), $sformatf("overrun run byte %0d", i));
    end

    // framing error
    send(8'hA5, 1'b0);
    repeat (BIT) @(posedge clk);
    bfm.read(16'h0008, d, r);
    check(d[4] && !d[0], $sformatf("frame error flagged, nothing queued, status %h", d));
    bfm.write(16'h000C, 32'h2, r);               // clear flags
    bfm.read(16'h0008, d, r);
    check(!d[4] && !d[5], "flags cleared");

    // transmit
    bfm.write(16'h0004, 32'h42, r);
    bfm.write(16'h0004, 32'hC3, r);
    bfm.read(16'h0008, d, r);
    check(!d[2], "tx FIFO busy");
    repeat (22 * BIT) @(posedge clk);
    check(tx_bytes.size() == 2, $sformatf("two bytes sent, got %0d", tx_bytes.size()));
    if (tx_bytes.size() == 2) begin
      check(tx_bytes[0] == 8'h42 && tx_bytes[1] == 8'hC3, "tx bytes intact");
      check(tx_frame_clocks[0] >= 10 * BIT - 2 && tx_frame_clocks[0] <= 10 * BIT + 2,
            $sformatf("frame length %0d clocks = 10 bits at 115200", tx_frame_clocks[0]));
    end
    bfm.read(16'h0008, d, r);
    check(d[2], "tx FIFO empty at the end");

    check(bfm.timeouts == 0, "no bus timeouts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
