// i2c_master_core - byte-level I2C bus master engine (single master).
//
// A command (cmd_valid while busy is low) does, in order: an optional START
// (or repeated START), one byte transfer, an optional STOP. A write sends
// cmd_data MSB first and samples the slave's acknowledge; a read receives a
// byte into rx_data and answers with ACK, or with NACK when cmd_nack is set
// (for the last byte of a read). done pulses for one clock at the end;
// ack_err is then high if a written byte was not acknowledged.
//
// Timing: every SCL period is four quarter phases, 4*CLKS_PER_QTR clocks in
// all: two with SCL driven low (SDA changes at the start of the first), each
// CLKS_PER_QTR*9/8 clocks, and two with SCL released high (SDA sampled at
// the end of the first high quarter), each CLKS_PER_QTR*7/8 clocks. The
// uneven split keeps the low time above the Fast-mode minimum. A quarter's
// length follows the level the master drives on SCL in it.
// A quarter with SCL released does not start counting until the filtered SCL
// input is seen high, so a slave may stretch the clock. After a byte without
// STOP the master keeps SCL low for one more quarter and leaves it low, so
// the next command continues the same transfer. The bus lines are open
// drain: *_oe high pulls the line low, low releases it.
//
// The 400 kHz Fast-mode rate follows the platform description; the
// byte-level command set and the quarter-phase scheme are this design's
// choices.
module i2c_master_core #(
  parameter int unsigned CLKS_PER_QTR = 63
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cmd_valid,
  input  logic       cmd_start,
  input  logic       cmd_stop,
  input  logic       cmd_read,
  input  logic       cmd_nack,
  input  logic [7:0] cmd_data,
  output logic       busy,
  output logic       done,
  output logic       ack_err,
  output logic [7:0] rx_data,
  input  logic       scl_in,
  input  logic       sda_in,
  output logic       scl_oe,
  output logic       sda_oe
);

  // Fast mode wants a longer low than high phase (1.3 us / 0.6 us minimum),
  // so low quarters are lengthened and high quarters shortened by 1/8.
  localparam int unsigned LOW_Q  = CLKS_PER_QTR + CLKS_PER_QTR / 8;
  localparam int unsigned HIGH_Q = CLKS_PER_QTR - CLKS_PER_QTR / 8;
  localparam int unsigned QW     = $clog2(LOW_Q + 1);

  typedef enum logic [2:0] {S_IDLE, S_START, S_BITS, S_HOLD, S_STOP} state_e;

  state_e      st;
  logic [1:0]  ph;
  logic [QW-1:0] qcnt;
  logic [3:0]  bitn;          // 0..7 data (MSB first), 8 acknowledge
  logic [7:0]  shreg;
  logic        c_stop, c_read, c_nack;

  // SCL is released in: START phases 1-3, BITS phases 2-3, STOP phases 2-3
  logic scl_rel;
  always_comb begin
    unique case (st)
      S_START: scl_rel = (ph != 2'd0) || !scl_oe;
      S_BITS:  scl_rel = ph[1];
      S_STOP:  scl_rel = ph[1];
      S_IDLE:  scl_rel = !scl_oe;
      default: scl_rel = 1'b0;
    endcase
  end

  // the quarter ends after CLKS_PER_QTR clocks, counted once SCL reads back
  // high in phases where it is released (clock stretching)
  logic q_end;
  assign q_end = scl_oe ? (qcnt == QW'(LOW_Q - 1)) : (qcnt == QW'(HIGH_Q - 1));

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      ph      <= '0;
      qcnt    <= '0;
      bitn    <= '0;
      shreg   <= '0;
      c_stop  <= 1'b0;
      c_read  <= 1'b0;
      c_nack  <= 1'b0;
      done    <= 1'b0;
      ack_err <= 1'b0;
      rx_data <= '0;
      scl_oe  <= 1'b0;
      sda_oe  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (st == S_IDLE) begin
        qcnt <= '0;
        ph   <= '0;
        if (cmd_valid) begin
          c_stop  <= cmd_stop;
          c_read  <= cmd_read;
          c_nack  <= cmd_nack;
          shreg   <= cmd_data;
          bitn    <= '0;
          ack_err <= 1'b0;
          if (cmd_start) begin
            st     <= S_START;
            sda_oe <= 1'b0;          // release SDA (SCL unchanged)
          end else begin
            st     <= S_BITS;
            scl_oe <= 1'b1;
            sda_oe <= !cmd_read && !cmd_data[7];
          end
        end
      end else if (scl_rel && !scl_in && !scl_oe) begin
        qcnt <= '0;                  // slave holds SCL low: wait
      end else if (!q_end) begin
        qcnt <= qcnt + 1'b1;
      end else begin
        qcnt <= '0;
        ph   <= ph + 1'b1;
        unique case (st)
          S_START: unique case (ph)
            2'd0: scl_oe <= 1'b0;                 // release SCL
            2'd1: sda_oe <= 1'b1;                 // SDA falls: START
            2'd2: ;                               // hold time
            2'd3: begin                           // SCL low, first bit
              st     <= S_BITS;
              scl_oe <= 1'b1;
              sda_oe <= !c_read && !shreg[7];
            end
            default: ;
          endcase
          S_BITS: unique case (ph)
            2'd0: ;
            2'd1: scl_oe <= 1'b0;                 // SCL rises
            2'd2: begin                           // sample
              if (bitn == 4'd8) ack_err <= !c_read && sda_in;
              else if (c_read)  rx_data <= {rx_data[6:0], sda_in};
            end
            2'd3: begin                           // SCL falls, next bit
              scl_oe <= 1'b1;
              if (bitn == 4'd8) begin
                st     <= S_HOLD;
                sda_oe <= c_stop;                 // STOP needs SDA low first
              end else begin
                bitn  <= bitn + 1'b1;
                shreg <= {shreg[6:0], 1'b0};
                if (bitn == 4'd7) sda_oe <= c_read && !c_nack;   // ACK slot
                else              sda_oe <= !c_read && !shreg[6];
              end
            end
            default: ;
          endcase
          S_HOLD: if (c_stop) begin
            st <= S_STOP;                         // continues in phase 1
          end else begin
            st     <= S_IDLE;
            sda_oe <= 1'b0;
            done   <= 1'b1;
          end
          S_STOP: unique case (ph)
            2'd1: scl_oe <= 1'b0;                 // SCL rises
            2'd2: sda_oe <= 1'b0;                 // SDA rises: STOP
            2'd3: begin                           // after bus free time
              st   <= S_IDLE;
              done <= 1'b1;
            end
            default: ;
          endcase
          default: st <= S_IDLE;
        endcase
      end
    end
  end

endmodule
