# Drone flight-control I/O subsystem for an FPGA MPSoC

This design gives a drone's flight-critical software its sensors and actuators through small
dedicated peripherals in the programmable logic of a Zynq UltraScale+ MPSoC. The software it
serves runs on one CPU core under a real-time OS, beside a Linux domain with a deep-learning
accelerator. It does not use CPU-driven GPIO, on-chip timers or 1.8 V board peripherals.
The peripherals do the bit-level work:

* they time radio pulses,
* they clock serial and I2C bits,
* they generate motor pulses.

So the control task sees only finished register values and a few interrupts. This keeps
interrupt load and timing jitter off the real-time core. The FPGA pins can also run at the
3.3 V the sensors need, with no level shifters.

The subsystem (`pl_io_top`) holds five peripherals behind one AXI4-Lite slave port:

| Window   | Peripheral        | Serves                           | Fixed by the platform          |
|----------|-------------------|----------------------------------|--------------------------------|
| `0x0000` | `axi_uart` #0     | forward LiDAR                    | 115,200 bit/s                  |
| `0x1000` | `axi_uart` #1     | backward LiDAR                   | 115,200 bit/s                  |
| `0x2000` | `axi_i2c_master`  | 9-DoF IMU (MPU-9250 class)       | 400 kHz Fast mode, input filter|
| `0x3000` | `axi_ppm_decoder` | radio receiver (manual control)  | PPM in, channel registers out  |
| `0x4000` | `axi_pwm`         | four motor ESCs                  | 250 Hz pulse trains            |

`irq[3:0]` = {PPM frame, I2C done, UART1 receive, UART0 receive}. Other addresses get a
DECERR response. The deep-learning accelerator (a vendor core) shares the fabric but is not
part of this subsystem. The same holds for the processor, the shared-memory channels between
the two OS domains and the heartbeat health monitor: they are software or hard IP.

## What follows the platform description and what is this design's own

The platform fixes these things:

* which devices exist: two LiDAR UARTs, one IMU I2C master, a radio PPM decoder and a motor
  PWM driver;
* the UART rate (115,200 bit/s);
* the I2C rate (400 kHz Fast mode);
* the PWM rate (250 Hz);
* that the PPM decoder leaves its results in registers;
* that the I2C device has a configurable filter against noise;
* that the devices are AXI-attached.

Everything else here is this design's own choice:

* the AXI4-Lite bus, address map and register layouts;
* the 100 MHz clock;
* the 8N1 frame format and the FIFO depths;
* the I2C command model and filter form;
* the PPM edge polarity, gap, timeout and channel count;
* the PWM units and shadowing.

Each source file says so in its header.

## Reading the radio: PPM decoding (`axi_ppm_decoder`)

A PPM receiver sends all channels on one wire. Each channel is a short pulse. The time between
the rising edges of consecutive pulses is that channel's value, typically 1000–2000 µs. A gap
of several milliseconds separates frames. Decoding this in software needs an interrupt on
every edge. Here it is done in hardware:

* A 1 µs tick (`CLK_HZ/1e6` clocks) drives an interval counter. The counter restarts at every
  rising edge of the synchronized input. It counts ticks from one edge clock up to, but not
  including, the next, so edges exactly V µs apart read exactly V.
* An interval shorter than `SYNC_US` (3000 µs) is stored as the next channel value.
* When the counter reaches `SYNC_US`, the frame is over. All gathered values are copied at
  once into the readable `CH[i]` registers. The frame count increments and the frame interrupt
  is raised. Because values only move at a frame end, a read never mixes two frames. Values
  become visible `SYNC_US` after the last edge.
* Decoding starts only after a gap has been seen. The first partial frame after reset or after
  a signal loss is ignored.
* `CHANNELS` (8) registers exist. Longer frames report their true channel count in `STATUS`
  but store only the first 8. After a shorter frame, the registers of the channels it did not
  carry keep their old values.
* With no edge for `TIMEOUT_US` (50 ms), `STATUS.lost` is set and the frame in progress is
  dropped. Software can use this as the radio failsafe.

| Offset | Register | Contents |
|--------|----------|----------|
| `0x00+4i` | `CH[i]` | channel i, µs |
| `0x40` | `STATUS` | `lost[31]`, channels in last frame `[23:16]`, frame count `[15:0]` |
| `0x44` | `CTRL` | `irq_en[0]`; write 1 to bit 1 to acknowledge the interrupt |

## Talking to the IMU: the I2C engine (`axi_i2c_master`, `i2c_master_core`, `glitch_filter`)

Software drives a transfer one byte per command. A write to `CMD` =
`{nack[11], read[10], stop[9], start[8], data[7:0]}` does three things in order:

1. an optional START (or repeated START);
2. one byte transfer;
3. an optional STOP.

A write sends `data` and records the slave's acknowledge in `STATUS.ack_err`. A read returns
the byte in `RXDATA` and answers ACK, or NACK when `nack` is set (for the last byte). A
register read from the IMU is therefore four commands:

* `START|0xD0` (address, write)
* the register number
* `START|0xD1` (repeated START, read)
* `READ|NACK|STOP`

`STATUS` = `{ack_err[2], done[1], busy[0]}`. `done` rises in the same clock that `busy` falls,
and the next command clears it. `CTRL` = `{irq_en[8], filter_len[7:0]}`, and the I2C
interrupt is `irq_en & done`. A command written while busy is ignored.

Bit timing is the part to understand before changing anything:

* Each SCL period is four *quarters* that average `Q = ceil(CLK_HZ/(4·SCL_HZ))` clocks. That
  is 63 clocks at 100 MHz, so the rate never exceeds 400 kHz.
* SCL is driven low for two quarters of `Q·9/8` clocks each (140 clocks, 1.4 µs, above the
  1.3 µs Fast-mode minimum). It is then released for two quarters of `Q·7/8` clocks each
  (112 clocks plus the input delay, above the 0.6 µs minimum). The measured rate is about
  386 kHz.
* SDA changes at the start of the first low quarter. It is sampled at the end of the first
  high quarter.
* A quarter in which SCL is released does not start counting until the master sees SCL high.
  So a slave that stretches the clock just holds the master. The input synchronizer and filter
  delay add a few clocks to every high phase the same way.
* START: SDA released, SCL released, SDA pulled low while SCL is high, then SCL pulled low.
* Every byte ends with one extra low quarter (`HOLD`). Without STOP the master then leaves SCL
  low, and the next command continues the same transfer.
* STOP: SCL released, then SDA released while SCL is high, then one quarter of bus-free time.
* The pins are open drain: `*_oe` high pulls the line low. There is one bus master and no
  arbitration.

The two inputs (SCL, SDA) pass a two-flop synchronizer and a glitch filter. A new level is
accepted only after it has been stable for more than `filter_len` clocks (reset value 4,
i.e. 50 ns). A spike shorter than that never reaches the engine.

Known limit: after a STOP the engine waits one high quarter (0.56 µs) before it reports done.
The Fast-mode bus-free time between a STOP and the next START is 1.3 µs. The rest of that time
comes from the software's own delay before the next command, which in practice is far longer.

## LiDAR serial ports (`axi_uart`, `uart_rx`, `uart_tx`, `sync_fifo`)

The bit time is `round(CLK_HZ/BAUD)`, which is 868 clocks at 100 MHz. The frame format is
8 data bits, LSB first, no parity and 1 stop bit.

The receiver:

* passes the input through a two-flop synchronizer;
* checks the start bit again at its middle, so a shorter low pulse is ignored;
* samples each bit once at its middle.

Received bytes go into a 16-entry FIFO, so software can take a whole sensor frame at once.
Transmitted bytes go through a 16-entry FIFO as well.

| Offset | Register | Contents |
|--------|----------|----------|
| `0x0` | `RXDATA` | `{valid[8], byte}`; reading pops |
| `0x4` | `TXDATA` | byte to queue |
| `0x8` | `STATUS` | count `[15:8]`, `overrun[5]`, `frame_err[4]`, `tx_full[3]`, `tx_empty[2]`, `rx_full[1]`, `rx_valid[0]` |
| `0xC` | `CTRL` | `rx_irq_en[0]`; write 1 to bit 1 to clear the sticky error flags |

* A byte that arrives at a full FIFO is dropped and sets `overrun`.
* A byte with a low stop bit is dropped and sets `frame_err`.
* The interrupt stays high while it is enabled and data is waiting.

## Motor pulses (`axi_pwm`)

A 1 µs tick advances a period counter from 0 to `PERIOD_US-1`. `PERIOD_US` resets to
1e6/250 = 4000. Output i is high while the counter is below `WIDTH[i]`, so widths are written
directly in microseconds (1000–2000 µs for a standard ESC).

Writes go to shadow registers. The whole set (period and all widths) is taken over at the
start of the next period. A pulse in progress is therefore never cut or stretched, and all
four motors change in the same period. While `CTRL.enable` is 0, the outputs are low and the
counter is held.

Registers: `0x00 CTRL`, `0x04 PERIOD_US`, `0x08 STATUS` (periods started), `0x10+4i WIDTH[i]`.

## Bus fabric (`axil_reg_slave`, `axil_decoder`, `io_pkg`)

`io_pkg` defines the AXI4-Lite channels as two packed structs: `axil_req_t` (master to slave)
and `axil_rsp_t` (slave to master). It also holds the address map.

`axil_decoder` handles one write and one read at a time, independently. When a valid address
appears, it latches the target from address bits `[14:12]`. From the next clock, it passes the
whole transaction straight through to that slave, until the response handshake. Unmapped
targets are answered locally with DECERR.

`axil_reg_slave` is the front end of every peripheral:

* it takes AW and W in either order;
* it then issues a one-clock register write strobe and raises B;
* a read strobes `reg_rd` in the AR handshake clock and returns the data one clock later.

`reg_rd` lets a read pop the UART FIFO. Assertions check that B and R stay stable until they
are taken, and that the master holds AW and AR until they are accepted.

All logic is on one clock with a synchronous, active-low reset.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M`
and has a watchdog. Example, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/io_pkg.sv tb/tb_pl_io_top.sv --top-module tb_pl_io_top -o sim
./obj_dir/sim
```

| Testbench | What it checks |
|-----------|----------------|
| `tb_axil_decoder` | 200 random accesses to five stalling slave models (`axil_tb_slave`) against a reference copy, plus DECERR on the unmapped windows |
| `tb_axi_uart` | receive order and count, interrupt, overrun, framing error, transmit contents and 10-bit frame length |
| `tb_axi_i2c_master` | register write, repeated-START read, burst read, NACK, SCL period within 400 kHz with Fast-mode low and high times, clock stretching, and a read under injected SDA glitches. It uses a behavioural register slave, `i2c_slave_model` |
| `tb_axi_ppm_decoder` | exact channel values, frame-gap timing of the interrupt, 10- and 6-channel frames, signal loss |
| `tb_axi_pwm` | 400,000-clock period, exact widths, shadowed mid-pulse update, disable |
| `tb_pl_io_top` | one full control cycle at the default parameters (about 0.1 s of simulated time, about 10 s to run) |

`tb_pl_io_top` goes through these steps and counts each mechanism:

1. wake the IMU and read it;
2. take a LiDAR frame from each UART and send a command byte back;
3. decode a radio frame and feed channels 0–3 to the motors as pulse widths, checked to the
   clock;
4. apply a second frame at a period boundary;
5. access an unmapped address (DECERR);
6. let the radio go silent until the lost flag is set.

`axil_master_bfm` is the bus master used by all testbenches.

To change the clock, set `CLK_HZ` on `pl_io_top`. The µs tick requires `CLK_HZ` to be a whole
multiple of 1 MHz.

## How far to trust it

* Every block passes its testbench, and each testbench was shown to fail against a
  deliberately broken copy of its block. All RTL passes Verilator lint with no errors and elaborates for synthesis.
* Nothing has been run on hardware.
* The I2C engine has been tested only against the behavioural slave here, not against a real
  MPU-9250.
* The UART receiver samples each bit once (no majority vote) and has no parity.
* The PPM decoder assumes positive pulses and a gap of at least 3 ms. Receivers with inverted
  PPM need an inverter at the pin.
* The DPU, the processor and all software functions are outside this RTL: YOLOv3 inference,
  LiDAR and IMU processing, the motor mixer, the PID controllers, the heartbeat checker and
  the inter-domain channels.
