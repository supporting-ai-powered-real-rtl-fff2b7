// tb_axi_i2c_master - self-checking testbench of the IMU I2C master.
//
// A behavioural register slave at address 0x68 (the IMU) sits on the open-
// drain bus and stretches SCL after every acknowledge. The test writes a
// register, reads one back through a repeated START, reads two bytes in a
// burst, addresses a missing device (expects NACK), measures the SCL period
// and its low and high times against the 400 kHz Fast-mode limits, and
// repeats a read with 2-clock glitches injected on the SDA seen by the master
// to exercise the input filter. Expected values come from the slave's register contents.
//
// The 400 kHz rate and the input filter follow the platform description;
// the command sequences are this design's choice.
module tb_axi_i2c_master;
  import io_pkg::*;

  localparam int unsigned CLK_HZ = 100_000_000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic m_scl_oe, m_sda_oe, s_scl_oe, s_sda_oe, irq;
  logic scl, sda, glitch_en = 1'b0, glitch;
  int unsigned cyc = 0;

  assign scl    = !(m_scl_oe || s_scl_oe);
  assign sda    = !(m_sda_oe || s_sda_oe);
  assign glitch = glitch_en && (cyc % 16 < 2);

  axi_i2c_master #(.CLK_HZ(CLK_HZ), .SCL_HZ(400_000)) dut (
    .clk, .rst_n, .s_axil_req(req), .s_axil_rsp(rsp),
    .scl_i(scl), .scl_oe(m_scl_oe), .sda_i(sda ^ glitch), .sda_oe(m_sda_oe), .irq
  );

  i2c_slave_model #(.ADDR7(7'h68), .STRETCH(300)) imu (
    .clk, .rst_n, .scl, .sda, .scl_oe(s_scl_oe), .sda_oe(s_sda_oe)
  );

  axil_master_bfm bfm (.clk, .req, .rsp);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // SCL period measurement (rising edge to rising edge, master not stalled)
  int unsigned last_rise = 0, last_fall = 0, min_period = 32'hFFFF_FFFF;
  int unsigned min_low = 32'hFFFF_FFFF, min_high = 32'hFFFF_FFFF;
  logic scl_d = 1'b1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    scl_d <= scl;
    if (scl && !scl_d) begin
      if (last_rise != 0 && cyc - last_rise < min_period) min_period = cyc - last_rise;
      if (last_fall != 0 && cyc - last_fall < min_low)    min_low    = cyc - last_fall;
      last_rise = cyc;
    end
    if (!scl && scl_d) begin
      if (last_rise != 0 && cyc - last_rise < min_high)   min_high   = cyc - last_rise;
      last_fall = cyc;
    end
  end

  localparam logic [11:0] START = 12'h100, STOP = 12'h200, RD = 12'h400, NACK = 12'h800;

  axi_resp_e r;
  axil_data_t d;

  task automatic cmd(input logic [11:0] c, output axil_data_t status);
    bfm.write(16'h0000, {20'd0, c}, r);
    do bfm.read(16'h0004, status, r); while (status[0]);
  endtask

  task automatic reg_read(input logic [7:0] ra, output logic [7:0] val);
    axil_data_t s;
    cmd(START | 12'hD0, s);
    cmd(12'(ra), s);
    cmd(START | 12'hD1, s);
    cmd(RD | NACK | STOP, s);
    bfm.read(16'h0008, d, r);
    val = d[7:0];
  endtask

  logic [7:0] v;
  axil_data_t st;

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    bfm.read(16'h000C, d, r);
    check(d[7:0] == 8'd4 && r == RESP_OKAY, "filter length resets to 4");
    bfm.write(16'h000C, 32'h0000_0104, r);        // irq enable, filter 4

    // register write: PWR_MGMT_1 (0x6B) <= 0x01
    cmd(START | 12'hD0, st); check(st[2:1] == 2'b01, "address+W acknowledged");
    check(irq, "irq raised on done");
    cmd(12'h06B, st);        check(st[2:1] == 2'b01, "register pointer acknowledged");
    cmd(STOP | 12'h001, st); check(st[2:1] == 2'b01, $sformatf("data acknowledged %h", st));
    check(imu.regs[8'h6B] == 8'h01, "slave register written");
    check(!m_scl_oe && !m_sda_oe, "bus released after STOP");

    // WHO_AM_I through a repeated START
    reg_read(8'h75, v);
    check(v == 8'h71, $sformatf("WHO_AM_I read %02h", v));

    // burst read of two registers
    cmd(START | 12'hD0, st);
    cmd(12'h03B, st);
    cmd(START | 12'hD1, st);
    cmd(RD, st);
    bfm.read(16'h0008, d, r);
    check(d[7:0] == (8'h3B ^ 8'h5A), $sformatf("burst byte 0 %02h", d[7:0]));
    cmd(RD | NACK | STOP, st);
    bfm.read(16'h0008, d, r);
    check(d[7:0] == (8'h3C ^ 8'h5A), $sformatf("burst byte 1 %02h", d[7:0]));

    // missing device: NACK reported
    cmd(START | 12'hA0, st);
    check(st[2] == 1'b1, "NACK from missing device flagged");
    cmd(STOP | 12'h0FF, st);

    // SCL rate: Fast mode, at most 400 kHz, close to it
    check(min_period >= CLK_HZ / 400_000 && min_period <= CLK_HZ / 400_000 + 20,
          $sformatf("SCL period %0d clocks", min_period));
    $display("SCL minimum period %0d, low %0d, high %0d clocks", min_period, min_low, min_high);
    check(min_low >= 130, $sformatf("SCL low %0d clocks, Fast mode needs 1.3 us", min_low));
    check(min_high >= 60, $sformatf("SCL high %0d clocks, Fast mode needs 0.6 us", min_high));
    check(imu.stretch_count > 0, "slave stretched the clock");

    // glitches on SDA shorter than the filter are rejected
    glitch_en = 1'b1;
    reg_read(8'h10, v);
    glitch_en = 1'b0;
    check(v == (8'h10 ^ 8'h5A), $sformatf("read under SDA glitches %02h", v));

    check(bfm.timeouts == 0, "no bus timeouts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
