// ir_receiver: decoder for pulse-width coded infrared remote frames.
// The input is the demodulated receiver signal, 1 while a burst is present.
// A frame is a 2.4 ms start pulse followed by CMD_BITS+ADDR_BITS pulses whose
// length carries the bit: 1.2 ms for a 1, 0.6 ms for a 0, sent LSB first, the
// 7-bit command before the 5-bit address. A free-running divider gives a
// sample strobe every SAMPLE_CYCLES clocks (75 us at 27 MHz, so the start pulse
// is 32 samples, a 1 is 16 and a 0 is 8). While the line is high a counter
// counts strobes; at each falling edge the count is judged: for the start
// pulse it must exceed START_MIN-1 (the 5-bit counter saturates at 31), for a
// data pulse ONE_MIN or more samples is a 1, fewer a 0, and fewer than
// PULSE_MIN samples is a glitch that aborts the frame. A low gap longer than
// GAP_MAX samples also aborts it. The pulse lengths and bit order are the
// protocol's; the sampling period, thresholds and time-out are this design's.
// Timing: 'start' pulses for one cycle when an accepted start pulse ends;
// 'valid' pulses for one cycle a few clocks after the falling edge of the last
// pulse, with 'command' and 'address' held until the next frame.
module ir_receiver #(
  parameter int unsigned SAMPLE_CYCLES = 2025,  // 75 us at 27 MHz
  parameter int unsigned CMD_BITS      = 7,
  parameter int unsigned ADDR_BITS     = 5,
  parameter int unsigned START_MIN     = 29,    // count > 5'b11100
  parameter int unsigned ONE_MIN       = 12,    // between 8 and 16 samples
  parameter int unsigned PULSE_MIN     = 4,
  parameter int unsigned GAP_MAX       = 27,    // about 2 ms
  localparam int unsigned NB           = CMD_BITS + ADDR_BITS
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ir_in,
  output logic [CMD_BITS-1:0]  command,
  output logic [ADDR_BITS-1:0] address,
  output logic                 valid,
  output logic                 start     // pulse: a valid start pulse just ended
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_GAP, S_BIT} state_e;
  localparam int unsigned DW = $clog2(SAMPLE_CYCLES + 1);

  logic [DW-1:0]   div;
  logic            expired;
  logic [1:0]      ir_m;
  logic            ir_s, ir_p;
  state_e          state;
  logic [4:0]      cnt;        // saturating sample counter
  logic [$clog2(NB+1)-1:0] nbit;
  logic [NB-1:1]   shreg;      // bits so far; the newest enters at the top

  assign ir_s = ir_m[1];
  wire rise = ir_s && !ir_p;
  wire fall = !ir_s && ir_p;
  // shift register as it will be after taking the pulse that just ended
  wire [NB-1:0] next_sh = {(cnt >= 5'(ONE_MIN)), shreg};

  always_ff @(posedge clk) begin
    if (rst) begin
      div     <= '0;
      expired <= 1'b0;
      ir_m    <= '0;
      ir_p    <= 1'b0;
    end else begin
      ir_m    <= {ir_m[0], ir_in};
      ir_p    <= ir_s;
      expired <= (div == DW'(SAMPLE_CYCLES - 1));
      div     <= (div == DW'(SAMPLE_CYCLES - 1)) ? '0 : div + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      cnt     <= '0;
      nbit    <= '0;
      shreg   <= '0;
      command <= '0;
      address <= '0;
      valid   <= 1'b0;
      start   <= 1'b0;
    end else begin
      valid <= 1'b0;
      start <= 1'b0;
      if (expired && cnt != 5'd31) cnt <= cnt + 1'b1;
      unique case (state)
        S_IDLE: if (rise) begin
          cnt   <= '0;
          state <= S_START;
        end
        S_START: if (fall) begin
          cnt  <= '0;
          nbit <= '0;
          start <= (cnt >= 5'(START_MIN));
          state <= (cnt >= 5'(START_MIN)) ? S_GAP : S_IDLE;
        end
        S_GAP: begin
          if (rise) begin
            cnt   <= '0;
            state <= S_BIT;
          end else if (cnt > 5'(GAP_MAX)) state <= S_IDLE;
        end
        S_BIT: if (fall) begin
          cnt <= '0;
          if (cnt < 5'(PULSE_MIN)) state <= S_IDLE;
          else begin
            shreg <= next_sh[NB-1:1];
            if (nbit == ($bits(nbit))'(NB - 1)) begin
              command <= next_sh[CMD_BITS-1:0];
              address <= next_sh[NB-1:CMD_BITS];
              valid   <= 1'b1;
              state   <= S_IDLE;
            end else begin
              nbit  <= nbit + 1'b1;
              state <= S_GAP;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
