// i2c_master: byte-level I2C bus master for open-drain SCL/SDA.
// The master never drives a line high: 'scl_low'/'sda_low' turn on the pull-down
// and a released line is pulled up by the bus resistor, so several devices can
// share it (the pad or the testbench forms the wired AND). Each command is cut
// into bits of four quarters of QUARTER cycles:
//   START: release SDA, release SCL, pull SDA low while SCL is high, pull SCL low
//   bit  : set SDA while SCL is low, release SCL, sample SDA, pull SCL low
//   STOP : pull SDA low, release SCL, release SDA while SCL is high
// WRITE sends 'wdata' MSB first then releases SDA for the receiver's ACK
// (returned on 'ack_in', 0 = acknowledged). READ releases SDA for 8 bits,
// collects them in 'rdata' and then sends 'ack_out' (0 = ACK, 1 = NACK to end a
// read). Clock stretching: in the "release SCL" quarter the master waits until
// SCL is really high before it counts on, so a slave holding SCL low slows the
// bit down. Arbitration: when the master sends a 1 (SDA released) but reads a
// 0, another master is driving the bus; it then releases both lines, pulses
// 'arb_lost' and returns to idle. START on a bus another master already holds is
// not detected. The line behaviour follows the I2C rules; the command interface
// and quarter-based timing are this design's choices.
// Timing: 'cmd_ready' is high in idle; a command takes 4*QUARTER cycles (START,
// STOP) or 36*QUARTER cycles (WRITE, READ) plus any stretching, then 'done'
// pulses. SCL and SDA inputs pass two-flop synchronisers.
module i2c_master
  import serial_pkg::*;
#(
  parameter int unsigned QUARTER = 68   // 27 MHz / (4 * 100 kHz)
) (
  input  logic       clk,
  input  logic       rst,
  input  i2c_cmd_e   cmd,
  input  logic       cmd_valid,
  output logic       cmd_ready,
  input  logic [7:0] wdata,
  input  logic       ack_out,
  output logic [7:0] rdata,
  output logic       ack_in,
  output logic       done,
  output logic       arb_lost,
  input  logic       scl_i,
  input  logic       sda_i,
  output logic       scl_low,
  output logic       sda_low
);
  typedef enum logic [1:0] {S_IDLE, S_ACTIVE} state_e;
  localparam int unsigned CW = $clog2(QUARTER + 1);

  state_e        state;
  i2c_cmd_e      op;
  logic [1:0]    q;          // quarter inside the bit
  logic [CW-1:0] cnt;
  logic [3:0]    bit_idx;    // 0..7 data, 8 = acknowledge bit
  logic [7:0]    wsh, rsh;
  logic          ack_l;
  logic [1:0]    scl_m, sda_m;
  wire           scl_s = scl_m[1];
  wire           sda_s = sda_m[1];

  assign cmd_ready = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      scl_m <= 2'b11;
      sda_m <= 2'b11;
    end else begin
      scl_m <= {scl_m[0], scl_i};
      sda_m <= {sda_m[0], sda_i};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      op       <= I2C_START;
      q        <= '0;
      cnt      <= '0;
      bit_idx  <= '0;
      wsh      <= '0;
      rsh      <= '0;
      ack_l    <= 1'b0;
      rdata    <= '0;
      ack_in   <= 1'b1;
      done     <= 1'b0;
      arb_lost <= 1'b0;
      scl_low  <= 1'b0;
      sda_low  <= 1'b0;
    end else begin
      done     <= 1'b0;
      arb_lost <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          op      <= cmd;
          q       <= '0;
          cnt     <= '0;
          bit_idx <= '0;
          ack_l   <= ack_out;
          wsh     <= wdata << 1;
          state   <= S_ACTIVE;
          // actions of quarter 0
          unique case (cmd)
            I2C_START: sda_low <= 1'b0;
            I2C_WRITE: sda_low <= !wdata[7];
            I2C_READ:  sda_low <= 1'b0;
            I2C_STOP:  sda_low <= 1'b1;
          endcase
        end
        S_ACTIVE: begin
          if (q == 2'd1 && !scl_s) begin
            cnt <= '0;                       // SCL held low: wait (stretching)
          end else if (cnt != CW'(QUARTER - 1)) begin
            cnt <= cnt + 1'b1;
          end else begin
            cnt <= '0;
            q   <= q + 1'b1;
            unique case (q)
              2'd0: scl_low <= 1'b0;         // enter quarter 1: release SCL
              2'd1: begin                    // enter quarter 2: SCL is high
                unique case (op)
                  I2C_START: sda_low <= 1'b1;
                  I2C_STOP:  sda_low <= 1'b0;
                  I2C_WRITE: begin
                    if (bit_idx == 4'd8) ack_in <= sda_s;
                    else if (!sda_low && !sda_s) begin
                      // sent a 1, bus shows 0: another master wins
                      sda_low  <= 1'b0;
                      scl_low  <= 1'b0;
                      arb_lost <= 1'b1;
                      state    <= S_IDLE;
                    end
                  end
                  I2C_READ: if (bit_idx != 4'd8) rsh <= {rsh[6:0], sda_s};
                endcase
              end
              2'd2: if (op != I2C_STOP) scl_low <= 1'b1;  // enter quarter 3
              2'd3: begin                    // end of the bit
                if (op == I2C_START || op == I2C_STOP || bit_idx == 4'd8) begin
                  done  <= 1'b1;
                  rdata <= rsh;
                  state <= S_IDLE;
                end else begin
                  bit_idx <= bit_idx + 1'b1;
                  if (bit_idx == 4'd7)
                    sda_low <= (op == I2C_READ) ? !ack_l : 1'b0;
                  else if (op == I2C_WRITE) begin
                    sda_low <= !wsh[7];
                    wsh     <= wsh << 1;
                  end
                end
              end
            endcase
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
