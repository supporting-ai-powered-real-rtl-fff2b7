// tb_axi_pwm - self-checking testbench of the motor PWM driver.
//
// Four ESC outputs are programmed with different pulse widths and enabled.
// A monitor per output measures, in clocks, the time between rising edges
// (expected 100 MHz / 250 Hz = 400,000) and the high time (expected
// width_us * 100). Checks: the period and the widths, a width written in
// mid-pulse changes nothing before the next period and then applies in full,
// the period counter advances, and disabling drives all outputs low.
//
// The 250 Hz motor PWM follows the platform description; the shadowed
// width registers being tested are this design's choice.
module tb_axi_pwm;
  import io_pkg::*;

  localparam int unsigned CLK_HZ = 100_000_000;
  localparam int unsigned PERIOD = CLK_HZ / 250;
  localparam int unsigned US     = CLK_HZ / 1_000_000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic [3:0] pwm;

  axi_pwm #(.CLK_HZ(CLK_HZ), .CHANNELS(4), .PWM_HZ(250)) dut (
    .clk, .rst_n, .s_axil_req(req), .s_axil_rsp(rsp), .pwm_out(pwm)
  );

  axil_master_bfm bfm (.clk, .req, .rsp);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // per-output edge monitor
  longint unsigned cyc = 0;
  longint unsigned last_rise [4], last_high [4], last_period [4];
  logic [3:0] pwm_d = '0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    pwm_d <= pwm;
    for (int i = 0; i < 4; i++) begin
      if (pwm[i] && !pwm_d[i]) begin
        if (last_rise[i] != 0) last_period[i] = cyc - last_rise[i];
        last_rise[i] = cyc;
      end
      if (!pwm[i] && pwm_d[i]) last_high[i] = cyc - last_rise[i];
    end
  end

  axi_resp_e r;
  axil_data_t d;
  int unsigned w [4] = '{1000, 1250, 1500, 2000};

  initial begin
    foreach (last_rise[i]) begin last_rise[i] = 0; last_high[i] = 0; last_period[i] = 0; end
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    bfm.read(16'h0004, d, r);
    check(d == 4000, $sformatf("period resets to 4000 us (%0d)", d));
    foreach (w[i]) bfm.write(16'(16 + 4 * i), w[i], r);
    repeat (PERIOD) @(posedge clk);
    check(pwm == 4'b0000, "outputs low while disabled");

    bfm.write(16'h0000, 32'h1, r);
    repeat (2 * PERIOD + 10) @(posedge clk);
    foreach (w[i]) begin
      check(last_period[i] == PERIOD, $sformatf("ch%0d period %0d clocks", i, last_period[i]));
      check(last_high[i] == w[i] * US, $sformatf("ch%0d high %0d clocks, want %0d", i, last_high[i], w[i] * US));
    end

    // mid-pulse write: takes effect at the next period only
    wait (pwm[0] && !pwm_d[0]);
    repeat (500 * US) @(posedge clk);
    bfm.write(16'h0010, 32'd1800, r);
    last_high[0] = 0;
    wait (!pwm[0]);
    repeat (2) @(posedge clk);
    check(last_high[0] == 1000 * US, $sformatf("running pulse kept its width (%0d)", last_high[0]));
    wait (pwm[0]);
    wait (!pwm[0]);
    repeat (2) @(posedge clk);
    check(last_high[0] == 1800 * US, $sformatf("new width applied next period (%0d)", last_high[0]));

    bfm.read(16'h0008, d, r);
    check(d >= 4 && d <= 5, $sformatf("period counter %0d", d));

    bfm.write(16'h0000, 32'h0, r);
    repeat (10) @(posedge clk);
    repeat (PERIOD) begin
      @(posedge clk);
      if (pwm != 0) break;
    end
    check(pwm == 4'b0000, "outputs low after disable");

    check(bfm.timeouts == 0, "no bus timeouts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
