// uart_tx: RS232 (UART) transmitter.
// A small FSM draws the asynchronous character frame on 'txd': the line idles
// at 1 (mark), then one start bit of 0, DATA_BITS data bits LSB first, an
// optional even or odd parity bit, and 1, 1.5 or 2 stop bits of 1. The frame
// format (5-8 data bits, parity none/even/odd, 1/1.5/2 stop bits, 8-N-1 default)
// is the standard RS232 one; the valid/ready handshake is this design's own.
// Timing: every bit lasts 16 pulses of 'tick16' (a 16x baud tick shared with
// the receiver); stop bits last STOP_HALVES*8 ticks (2 = 1 stop bit, 3 = 1.5,
// 4 = 2). 'ready' is high in idle; a cycle with valid & ready latches 'data'
// and the start bit begins on the next cycle. A frame sent from idle begins
// between two ticks, so its start bit lasts 15 ticks plus a fraction of a
// tick. That is at most 1/16 bit short, which a receiver that times from the
// start edge does not notice. Frames sent back to back keep the full
// 16-tick start bit.
module uart_tx
  import serial_pkg::*;
#(
  parameter int unsigned DATA_BITS   = 8,            // 5..8
  parameter parity_e     PARITY      = PARITY_NONE,
  parameter int unsigned STOP_HALVES = 2             // 2, 3 or 4 half bits
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick16,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_PARITY, S_STOP} state_e;

  state_e     state;
  logic [7:0] shreg;
  logic [2:0] bit_idx;
  logic [5:0] tcnt;       // ticks inside the current bit
  logic       par;        // running parity of the data bits

  wire bit_end  = tick16 && (tcnt == 6'd15);
  wire stop_end = tick16 && (tcnt == 6'(STOP_HALVES * 8 - 1));

  assign ready = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      txd     <= 1'b1;
      shreg   <= '0;
      bit_idx <= '0;
      tcnt    <= '0;
      par     <= 1'b0;
    end else begin
      if (tick16) tcnt <= tcnt + 1'b1;
      unique case (state)
        S_IDLE: begin
          txd <= 1'b1;
          if (valid) begin
            shreg <= data;
            par   <= (PARITY == PARITY_ODD);
            tcnt  <= '0;
            txd   <= 1'b0;
            state <= S_START;
          end
        end
        S_START: if (bit_end) begin
          tcnt    <= '0;
          bit_idx <= '0;
          txd     <= shreg[0];
          par     <= par ^ shreg[0];
          shreg   <= shreg >> 1;
          state   <= S_DATA;
        end
        S_DATA: if (bit_end) begin
          tcnt <= '0;
          if (bit_idx == 3'(DATA_BITS - 1)) begin
            if (PARITY == PARITY_NONE) begin
              txd   <= 1'b1;
              state <= S_STOP;
            end else begin
              txd   <= par;
              state <= S_PARITY;
            end
          end else begin
            bit_idx <= bit_idx + 1'b1;
            txd     <= shreg[0];
            par     <= par ^ shreg[0];
            shreg   <= shreg >> 1;
          end
        end
        S_PARITY: if (bit_end) begin
          tcnt  <= '0;
          txd   <= 1'b1;
          state <= S_STOP;
        end
        S_STOP: if (stop_end) begin
          tcnt  <= '0;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
