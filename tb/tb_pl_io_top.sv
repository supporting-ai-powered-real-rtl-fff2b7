// tb_pl_io_top - end-to-end testbench of the I/O subsystem at full size.
//
// The top runs with its default parameters (100 MHz, 115,200 bit/s LiDAR
// UARTs, 400 kHz I2C, 250 Hz PWM). Around it sit a behavioural IMU on the
// I2C bus (clock stretching enabled), two serial LiDAR sources, a PPM radio
// source, and serial and pulse monitors. The testbench then plays the
// flight-control software for one control cycle through the single AXI4-Lite
// port:
//   * wakes the IMU and reads WHO_AM_I and an accelerometer register,
//     probes an absent device (NACK);
//   * takes a 9-byte distance frame from each LiDAR on its receive
//     interrupt and sends a command byte back to the forward one;
//   * takes a radio frame on the PPM interrupt, turns channels 0-3 into motor
//     pulse widths (identity mixing) and checks that the ESC pulses last
//     exactly those microseconds at a 4 ms period, including a width change
//     applied only at the next period;
//   * accesses an unmapped address (DECERR) and lets the radio fall silent
//     (lost flag).
// Each mechanism is counted; one that never happened counts as a failure.
//
// The device set (two LiDAR UARTs, one IMU on I2C, one radio on PPM, four
// motor PWMs) follows the platform description; the sequence of one
// control cycle is this design's choice.
module tb_pl_io_top;
  import io_pkg::*;

  localparam int unsigned CLK_HZ = PL_CLK_HZ;
  localparam int unsigned US     = CLK_HZ / 1_000_000;
  localparam int unsigned BIT    = (CLK_HZ + 57_600) / 115_200;
  localparam int unsigned PERIOD = CLK_HZ / 250;

  localparam axil_addr_t UART0 = 16'h0000, UART1 = 16'h1000, I2C = 16'h2000,
                         PPM = 16'h3000, PWM = 16'h4000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic [1:0] lidar_rx = 2'b11, lidar_tx;
  logic       m_scl_oe, m_sda_oe, s_scl_oe, s_sda_oe, scl, sda;
  logic       ppm = 1'b0;
  logic [3:0] pwm, irq;

  assign scl = !(m_scl_oe || s_scl_oe);
  assign sda = !(m_sda_oe || s_sda_oe);

  pl_io_top dut (
    .clk, .rst_n, .s_axil_req(req), .s_axil_rsp(rsp),
    .lidar_rx, .lidar_tx,
    .i2c_scl_i(scl), .i2c_scl_oe(m_scl_oe), .i2c_sda_i(sda), .i2c_sda_oe(m_sda_oe),
    .ppm_in(ppm), .pwm_out(pwm), .irq
  );

  i2c_slave_model #(.ADDR7(7'h68), .STRETCH(300)) imu (
    .clk, .rst_n, .scl, .sda, .scl_oe(s_scl_oe), .sda_oe(s_sda_oe)
  );

  axil_master_bfm #(.MAX_WAIT(2000)) bfm (.clk, .req, .rsp);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int unsigned n_uart_rx = 0, n_uart_tx = 0, n_i2c_ack = 0, n_i2c_read = 0,
               n_i2c_nack = 0, n_ppm_frame = 0, n_ppm_lost = 0,
               n_pwm_shadow = 0, n_decerr = 0;

  // ------------------------------------------------------------ stimulus
  task automatic serial_send(input int u, input logic [7:0] b);
    logic [9:0] fr = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      lidar_rx[u] = fr[i];
      repeat (BIT) @(posedge clk);
    end
  endtask

  task automatic ppm_frame(input int unsigned vals [8]);
    for (int i = 0; i <= 8; i++) begin
      ppm = 1'b1;
      repeat (300 * US) @(posedge clk);
      ppm = 1'b0;
      if (i < 8) repeat ((vals[i] - 300) * US) @(posedge clk);
    end
  endtask

  // --------------------------------------------------------------- monitors
  logic [7:0] tx0_bytes [$];
  initial forever begin
    logic [7:0] b;
    @(negedge lidar_tx[0]);
    repeat (BIT / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (BIT) @(posedge clk); b[i] = lidar_tx[0]; end
    repeat (BIT) @(posedge clk);
    tx0_bytes.push_back(b);
  end

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

  // --------------------------------------------------------- software side
  axi_resp_e r;
  axil_data_t d, st;

  task automatic i2c_cmd(input logic [11:0] c, output axil_data_t status);
    bfm.write(I2C + 16'h0, {20'd0, c}, r);
    do bfm.read(I2C + 16'h4, status, r); while (status[0]);
  endtask

  localparam logic [11:0] START = 12'h100, STOP = 12'h200, RD = 12'h400, NACK = 12'h800;

  task automatic imu_read(input logic [7:0] ra, output logic [7:0] val);
    i2c_cmd(START | 12'hD0, st); if (!st[2]) n_i2c_ack++;
    i2c_cmd(12'(ra), st);        if (!st[2]) n_i2c_ack++;
    i2c_cmd(START | 12'hD1, st); if (!st[2]) n_i2c_ack++;
    i2c_cmd(RD | NACK | STOP, st);
    bfm.read(I2C + 16'h8, d, r);
    val = d[7:0];
    n_i2c_read++;
  endtask

  logic [7:0] lidar_frame [2][9];
  int unsigned radio [8];
  int unsigned radio2 [8];
  logic [7:0] v;

  initial begin
    foreach (last_rise[i]) begin last_rise[i] = 0; last_high[i] = 0; last_period[i] = 0; end
    for (int u = 0; u < 2; u++) begin
      lidar_frame[u][0] = 8'h59; lidar_frame[u][1] = 8'h59;
      for (int k = 2; k < 9; k++) lidar_frame[u][k] = 8'($urandom);
    end
    foreach (radio[i])  radio[i]  = 1000 + $urandom_range(0, 1000);
    foreach (radio2[i]) radio2[i] = 1000 + $urandom_range(0, 1000);

    repeat (10) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);

    bfm.write(UART0 + 16'hC, 32'h1, r);
    bfm.write(UART1 + 16'hC, 32'h1, r);
    bfm.write(PPM + 16'h44, 32'h1, r);

    fork
      // radio: gap, two frames, then silence
      begin
        repeat (6000 * US) @(posedge clk);
        ppm_frame(radio);
        repeat (6000 * US) @(posedge clk);
        ppm_frame(radio2);
      end
      // LiDAR distance frames
      begin
        foreach (lidar_frame[0][k]) serial_send(0, lidar_frame[0][k]);
      end
      begin
        repeat (3 * BIT) @(posedge clk);
        foreach (lidar_frame[1][k]) serial_send(1, lidar_frame[1][k]);
      end
      // flight-control software
      begin
        // IMU
        i2c_cmd(START | 12'hD0, st); if (!st[2]) n_i2c_ack++;
        i2c_cmd(12'h06B, st);        if (!st[2]) n_i2c_ack++;
        i2c_cmd(STOP | 12'h000, st); if (!st[2]) n_i2c_ack++;
        check(imu.regs[8'h6B] == 8'h00, "IMU woken (PWR_MGMT_1 = 0)");
        imu_read(8'h75, v);
        check(v == 8'h71, $sformatf("IMU WHO_AM_I %02h", v));
        imu_read(8'h3B, v);
        check(v == (8'h3B ^ 8'h5A), $sformatf("IMU ACCEL_XOUT_H %02h", v));
        i2c_cmd(START | 12'h0A0, st);
        if (st[2]) n_i2c_nack++;
        i2c_cmd(STOP | 12'h0FF, st);
        check(imu.stretch_count > 0, "IMU stretched SCL");

        // LiDARs: wait for whole frames
        for (int u = 0; u < 2; u++) begin
          do bfm.read(16'(u << 12) + 16'h8, d, r); while (d[15:8] < 9);
          check(irq[u], $sformatf("UART%0d interrupt", u));
          for (int k = 0; k < 9; k++) begin
            bfm.read(16'(u << 12), d, r);
            check(d[8] && d[7:0] == lidar_frame[u][k], $sformatf("LiDAR%0d byte %0d", u, k));
            if (d[8]) n_uart_rx++;
          end
          check(!irq[u], $sformatf("UART%0d interrupt cleared", u));
        end
        bfm.write(UART0 + 16'h4, 32'h5A, r);       // command to the forward LiDAR

        // radio frame -> motor pulse widths
        wait (irq[3]);
        bfm.read(PPM + 16'h40, d, r);
        check(d[15:0] == 1 && d[23:16] == 8, $sformatf("PPM status %h", d));
        if (d[15:0] == 1) n_ppm_frame++;
        for (int i = 0; i < 8; i++) begin
          bfm.read(PPM + 16'(4 * i), d, r);
          check(d == radio[i], $sformatf("radio CH%0d %0d, sent %0d", i, d, radio[i]));
        end
        bfm.write(PPM + 16'h44, 32'h3, r);
        for (int i = 0; i < 4; i++) bfm.write(PWM + 16'(16 + 4 * i), radio[i], r);
        bfm.write(PWM + 16'h0, 32'h1, r);
        repeat (2 * PERIOD + 10) @(posedge clk);
        for (int i = 0; i < 4; i++) begin
          check(last_period[i] == PERIOD, $sformatf("motor %0d period %0d", i, last_period[i]));
          check(last_high[i] == radio[i] * US, $sformatf("motor %0d pulse %0d clocks for %0d us", i, last_high[i], radio[i]));
        end

        // second radio frame, applied at the next PWM period
        wait (irq[3]);
        bfm.read(PPM + 16'h40, d, r);
        if (d[15:0] == 2) n_ppm_frame++;
        bfm.write(PPM + 16'h44, 32'h3, r);
        for (int i = 0; i < 4; i++) begin
          bfm.read(PPM + 16'(4 * i), d, r);
          check(d == radio2[i], $sformatf("radio frame 2 CH%0d", i));
          bfm.write(PWM + 16'(16 + 4 * i), d, r);
        end
        check(last_high[0] == radio[0] * US || last_high[0] == radio2[0] * US, "no torn pulse");
        repeat (2 * PERIOD) @(posedge clk);
        begin
          bit all_new = 1;
          for (int i = 0; i < 4; i++) all_new &= (last_high[i] == radio2[i] * US);
          check(all_new, "new widths applied at a period boundary");
          if (all_new) n_pwm_shadow++;
        end

        // forward LiDAR received the command byte
        check(tx0_bytes.size() == 1 && tx0_bytes[0] == 8'h5A, "LiDAR command byte sent");
        if (tx0_bytes.size() == 1) n_uart_tx++;

        // unmapped window
        bfm.write(16'h6000, 32'h1, r);
        if (r == RESP_DECERR) n_decerr++;
        bfm.read(16'h7004, d, r);
        if (r == RESP_DECERR) n_decerr++;
        check(n_decerr == 2, "unmapped accesses answered with DECERR");

        // radio silent long enough: lost
        repeat (50_000 * US) @(posedge clk);
        bfm.read(PPM + 16'h40, d, r);
        check(d[31], "radio signal lost flagged");
        if (d[31]) n_ppm_lost++;
      end
    join

    check(bfm.timeouts == 0, "no bus timeouts");
    check(n_uart_rx == 18,  $sformatf("mechanism UART receive: %0d", n_uart_rx));
    check(n_uart_tx > 0,    "mechanism UART transmit");
    check(n_i2c_ack > 0,    "mechanism I2C acknowledged write");
    check(n_i2c_read > 0,   "mechanism I2C read");
    check(n_i2c_nack > 0,   "mechanism I2C NACK detection");
    check(n_ppm_frame == 2, "mechanism PPM frame decode");
    check(n_ppm_lost > 0,   "mechanism PPM signal lost");
    check(n_pwm_shadow > 0, "mechanism PWM width update at period boundary");
    check(n_decerr > 0,     "mechanism decode error");
    $display("mechanisms: uart_rx=%0d uart_tx=%0d i2c_ack=%0d i2c_read=%0d i2c_nack=%0d i2c_stretch=%0d ppm_frame=%0d ppm_lost=%0d pwm_shadow=%0d decerr=%0d",
             n_uart_rx, n_uart_tx, n_i2c_ack, n_i2c_read, n_i2c_nack, imu.stretch_count,
             n_ppm_frame, n_ppm_lost, n_pwm_shadow, n_decerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (15_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
