// i2c_slave_model - behavioural I2C register slave standing in for the IMU.
//
// Behavioural model (not synthesizable intent): it samples the resolved bus
// lines every clock and answers at device address ADDR7 like a register-based
// sensor: the first byte written after the address sets the register pointer,
// further written bytes are stored with auto-increment, and reads return the
// registers from the pointer on, auto-incrementing, until the master NACKs.
// Register r resets to r ^ 8'h5A, except register 8'h75, which reads 8'h71.
// After every acknowledge bit it holds SCL low for STRETCH clocks (clock
// stretching); stretch_count counts how often it did.
//
// The MPU-9250 IMU on the I2C bus follows the platform description; this
// model's register contents are invented for the test, and only the
// WHO_AM_I value 8'h71 is the real part's.
module i2c_slave_model #(
  parameter logic [6:0]  ADDR7   = 7'h68,
  parameter int unsigned STRETCH = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic scl,
  input  logic sda,
  output logic scl_oe,
  output logic sda_oe
);

  typedef enum logic [1:0] {M_IDLE, M_RECV, M_SEND} mode_e;

  logic [7:0]  regs [256];
  logic [7:0]  ptr, shreg, txbyte;
  logic        scl_q, sda_q, is_addr, first_w, rw, master_ack, ack_phase;
  logic [3:0]  bitcnt;
  mode_e       mode;
  int unsigned stretch_left;
  int unsigned stretch_count;
  int unsigned starts, stops, addr_acks, addr_nacks;

  wire scl_rise = scl && !scl_q;
  wire scl_fall = !scl && scl_q;
  wire start_c  = scl && scl_q && sda_q && !sda;
  wire stop_c   = scl && scl_q && !sda_q && sda;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < 256; r++) regs[r] <= 8'(r) ^ 8'h5A;
      regs[8'h75]  <= 8'h71;
      scl_q <= 1'b1; sda_q <= 1'b1;
      mode <= M_IDLE; bitcnt <= '0; shreg <= '0; ptr <= '0; txbyte <= '0;
      is_addr <= 1'b0; first_w <= 1'b0; rw <= 1'b0; master_ack <= 1'b0; ack_phase <= 1'b0;
      sda_oe <= 1'b0; scl_oe <= 1'b0;
      stretch_left <= 0; stretch_count <= 0;
      starts <= 0; stops <= 0; addr_acks <= 0; addr_nacks <= 0;
    end else begin
      scl_q <= scl;
      sda_q <= sda;
      if (stretch_left != 0) begin
        stretch_left <= stretch_left - 1;
        if (stretch_left == 1) scl_oe <= 1'b0;
      end
      if (start_c) begin
        starts  <= starts + 1;
        mode    <= M_RECV; is_addr <= 1'b1; bitcnt <= '0; sda_oe <= 1'b0; ack_phase <= 1'b0;
      end else if (stop_c) begin
        stops <= stops + 1;
        mode  <= M_IDLE; sda_oe <= 1'b0;
      end else if (scl_rise) begin
        if (mode == M_RECV && bitcnt < 8) begin
          shreg  <= {shreg[6:0], sda};
          bitcnt <= bitcnt + 1'b1;
        end
        if (mode == M_SEND && bitcnt < 8) bitcnt <= bitcnt + 1'b1;
        if (mode == M_SEND && ack_phase)  master_ack <= !sda;
      end else if (scl_fall && mode != M_IDLE) begin
        if (bitcnt == 4'd8 && !ack_phase) begin
          // eight bits done: acknowledge slot
          ack_phase <= 1'b1;
          if (mode == M_SEND) sda_oe <= 1'b0;
          else if (is_addr) begin
            rw     <= shreg[0];
            sda_oe <= (shreg[7:1] == ADDR7);
            if (shreg[7:1] == ADDR7) addr_acks <= addr_acks + 1;
            else                     addr_nacks <= addr_nacks + 1;
          end else begin
            sda_oe <= 1'b1;
            if (first_w) ptr <= shreg;
            else begin regs[ptr] <= shreg; ptr <= ptr + 1'b1; end
            first_w <= 1'b0;
          end
        end else if (ack_phase) begin
          // acknowledge slot over
          ack_phase <= 1'b0;
          bitcnt    <= '0;
          sda_oe    <= 1'b0;
          if (STRETCH != 0) begin
            scl_oe <= 1'b1; stretch_left <= STRETCH; stretch_count <= stretch_count + 1;
          end
          if (mode == M_SEND) begin
            if (master_ack) begin
              txbyte <= regs[ptr];
              sda_oe <= !regs[ptr][7];
              ptr    <= ptr + 1'b1;
            end else mode <= M_IDLE;
          end else if (is_addr) begin
            is_addr <= 1'b0;
            if (!sda_oe) mode <= M_IDLE;           // address not ours
            else if (rw) begin
              mode   <= M_SEND;
              txbyte <= regs[ptr];
              sda_oe <= !regs[ptr][7];
              ptr    <= ptr + 1'b1;
            end else first_w <= 1'b1;
          end
        end else if (mode == M_SEND && bitcnt != 0) begin
          sda_oe <= !txbyte[3'd7 - 3'(bitcnt)];
        end
      end
    end
  end

endmodule
