// tb_axi_ppm_decoder - self-checking testbench of the radio PPM decoder.
//
// The testbench generates PPM frames: 300 us pulses whose rising edges are
// spaced by the channel values (random, 1000-2000 us), then a 6 ms frame gap.
// Checks: nothing is reported (and lost stays set) before the first gap; an
// 8-channel frame lands in CH0-7 exactly and raises the interrupt no earlier
// and no later than 3 ms after the last edge; a 10-channel frame reports 10
// channels and stores the first 8; a 6-channel frame reports 6; frames count;
// 50 ms without edges sets lost.
//
// Decoding the radio's PPM signal into registers follows the platform
// description; the frame shapes and timings tested are this design's choice.
module tb_axi_ppm_decoder;
  import io_pkg::*;

  localparam int unsigned CLK_HZ = 100_000_000;
  localparam int unsigned US     = CLK_HZ / 1_000_000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic ppm = 1'b0, irq;

  axi_ppm_decoder #(.CLK_HZ(CLK_HZ), .CHANNELS(8), .SYNC_US(3000), .TIMEOUT_US(50000)) dut (
    .clk, .rst_n, .s_axil_req(req), .s_axil_rsp(rsp), .ppm_in(ppm), .irq
  );

  axil_master_bfm bfm (.clk, .req, .rsp);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wait_us(input int unsigned n);
    repeat (n * US) @(posedge clk);
  endtask

  // n channels: n+1 pulses; leaves the line low after the last pulse
  task automatic frame(input int unsigned vals [], input int unsigned n);
    for (int i = 0; i <= int'(n); i++) begin
      ppm = 1'b1;
      wait_us(300);
      ppm = 1'b0;
      if (i < int'(n)) wait_us(vals[i] - 300);
    end
  endtask

  axi_resp_e r;
  axil_data_t d;
  int unsigned v [] = new [10];
  int unsigned irq_seen_at;

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    bfm.write(16'h0044, 32'h1, r);               // frame interrupt on

    // a frame without a preceding gap is not trusted
    foreach (v[i]) v[i] = 1000 + $urandom_range(0, 1000);
    frame(v, 8);
    wait_us(6000);
    bfm.read(16'h0040, d, r);
    check(d[15:0] == 0 && d[31], $sformatf("no frame before first gap, status %h", d));

    // 8-channel frame; interrupt timing against the 3 ms gap
    foreach (v[i]) v[i] = 1000 + $urandom_range(0, 1000);
    frame(v, 8);
    irq_seen_at = 0;
    for (int t = 0; t < 3200 && irq_seen_at == 0; t++) begin
      wait_us(1);
      if (irq) irq_seen_at = t + 1;
    end
    check(irq_seen_at >= 2999 - 300 && irq_seen_at <= 3001 - 300 + 2,
          $sformatf("frame reported %0d us after the last pulse ended", irq_seen_at));
    bfm.read(16'h0040, d, r);
    check(d[15:0] == 1 && d[23:16] == 8 && !d[31], $sformatf("one 8-channel frame, status %h", d));
    for (int i = 0; i < 8; i++) begin
      bfm.read(16'(4 * i), d, r);
      check(d == v[i], $sformatf("CH%0d = %0d, sent %0d", i, d, v[i]));
    end
    bfm.write(16'h0044, 32'h3, r);               // acknowledge interrupt
    check(!irq, "interrupt acknowledged");
    wait_us(3000);

    // 10-channel frame: 10 counted, first 8 stored
    foreach (v[i]) v[i] = 1000 + $urandom_range(0, 1000);
    frame(v, 10);
    wait_us(3500);
    bfm.read(16'h0040, d, r);
    check(d[15:0] == 2 && d[23:16] == 10, $sformatf("10-channel frame, status %h", d));
    for (int i = 0; i < 8; i++) begin
      bfm.read(16'(4 * i), d, r);
      check(d == v[i], $sformatf("CH%0d = %0d, sent %0d", i, d, v[i]));
    end
    wait_us(2500);

    // 6-channel frame
    foreach (v[i]) v[i] = 1000 + $urandom_range(0, 1000);
    frame(v, 6);
    wait_us(3500);
    bfm.read(16'h0040, d, r);
    check(d[15:0] == 3 && d[23:16] == 6, $sformatf("6-channel frame, status %h", d));
    for (int i = 0; i < 6; i++) begin
      bfm.read(16'(4 * i), d, r);
      check(d == v[i], $sformatf("CH%0d = %0d, sent %0d", i, d, v[i]));
    end

    // receiver silent: lost after 50 ms
    wait_us(47000);
    bfm.read(16'h0040, d, r);
    check(d[31], $sformatf("signal lost flagged, status %h", d));

    check(bfm.timeouts == 0, "no bus timeouts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
