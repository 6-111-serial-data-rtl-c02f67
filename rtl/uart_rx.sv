// uart_rx: RS232 (UART) receiver with 16x oversampling.
// 'rxd' is synchronised by two flops and looked at on every 'tick16' pulse.
// In idle the receiver waits for a 1->0 transition; it then counts 8 ticks to
// the middle of the start bit and checks that the line is still 0 (otherwise
// the edge was a glitch and it returns to idle). From there it counts 16 ticks
// to the middle of each data bit (LSB first), the parity bit if any, and the
// stop bit; with STOP_HALVES = 4 (two stop bits) it samples the second stop bit
// too, while for 1 or 1.5 stop bits it checks one. The byte is accepted
// ('valid' pulse) only when the start bit, the parity and the stop bits are all
// correct; otherwise 'frame_err' (a stop bit 0) or 'parity_err' pulses instead. Sampling in the middle of each bit after
// 8 then 16 ticks is the classic scheme; the error outputs and the glitch
// rejection are this design's choices.
// Timing: 'valid' rises one clock after the tick that samples the last checked
// stop bit, i.e. about half a bit before its end.
module uart_rx
  import serial_pkg::*;
#(
  parameter int unsigned DATA_BITS   = 8,
  parameter parity_e     PARITY      = PARITY_NONE,
  parameter int unsigned STOP_HALVES = 2   // 4 = two stop bits, both checked
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick16,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err,
  output logic       parity_err
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_PARITY, S_STOP, S_STOP2} state_e;

  logic       rxd_m, rxd_s, rxd_prev;
  state_e     state;
  logic [3:0] tcnt;
  logic [2:0] bit_idx;
  logic [7:0] shreg;
  logic       par;

  always_ff @(posedge clk) begin
    if (rst) begin
      rxd_m <= 1'b1;
      rxd_s <= 1'b1;
    end else begin
      rxd_m <= rxd;
      rxd_s <= rxd_m;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      rxd_prev   <= 1'b1;
      tcnt       <= '0;
      bit_idx    <= '0;
      shreg      <= '0;
      par        <= 1'b0;
      data       <= '0;
      valid      <= 1'b0;
      frame_err  <= 1'b0;
      parity_err <= 1'b0;
    end else begin
      valid      <= 1'b0;
      frame_err  <= 1'b0;
      parity_err <= 1'b0;
      if (tick16) begin
        rxd_prev <= rxd_s;
        tcnt     <= tcnt + 1'b1;
        unique case (state)
          S_IDLE: if (rxd_prev && !rxd_s) begin
            tcnt  <= 4'd1;          // this tick is the first one of the start bit
            state <= S_START;
          end
          S_START: if (tcnt == 4'd7) begin
            // about 8 ticks into the start bit: its middle
            tcnt <= '0;
            if (rxd_s) state <= S_IDLE;   // glitch, not a start bit
            else begin
              bit_idx <= '0;
              par     <= (PARITY == PARITY_ODD);
              state   <= S_DATA;
            end
          end
          S_DATA: if (tcnt == 4'd15) begin
            tcnt  <= '0;
            shreg <= {rxd_s, shreg[7:1]};
            par   <= par ^ rxd_s;
            if (bit_idx == 3'(DATA_BITS - 1))
              state <= (PARITY == PARITY_NONE) ? S_STOP : S_PARITY;
            else
              bit_idx <= bit_idx + 1'b1;
          end
          S_PARITY: if (tcnt == 4'd15) begin
            tcnt  <= '0;
            par   <= par ^ rxd_s;     // 0 when parity is right
            state <= S_STOP;
          end
          S_STOP: if (tcnt == 4'd15) begin
            tcnt  <= '0;
            data  <= shreg >> (8 - DATA_BITS);
            if (!rxd_s) begin
              frame_err <= 1'b1;
              state     <= S_IDLE;
            end else if (STOP_HALVES >= 4) state <= S_STOP2;
            else begin
              state <= S_IDLE;
              if (PARITY != PARITY_NONE && par) parity_err <= 1'b1;
              else                              valid      <= 1'b1;
            end
          end
          S_STOP2: if (tcnt == 4'd15) begin
            tcnt  <= '0;
            state <= S_IDLE;
            if (!rxd_s)                            frame_err  <= 1'b1;
            else if (PARITY != PARITY_NONE && par) parity_err <= 1'b1;
            else                                   valid      <= 1'b1;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
