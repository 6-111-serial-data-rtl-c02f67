// dmx512_tx: DMX512 lighting-control transmitter.
// DMX512 is an asynchronous serial stream at 250 kbit/s (4 us per bit). A
// packet is a BREAK (line low, at least 88 us), a MARK AFTER BREAK (line high),
// then a start-code frame of value 0 and one frame per channel. Every frame is
// 11 bits: a low start bit, 8 data bits LSB first and 2 high stop bits. Frames
// are separated by a mark time between frames (MTBF) and packets by a mark
// time between packets (MTBP). The FSM walks MTBP -> BREAK -> MAB -> start code
// -> (MTBF -> channel frame) x NUM_CHANNELS -> MTBP. At the first cycle of each
// MTBF it issues 'request_pulse' with 'request_addr' for the next channel and
// takes 'chan_data' two cycles later, which suits a RAM with one cycle of read
// latency; after the last channel it goes to MTBP and pulses 'packet_done'.
// A new packet starts after MTBP only while 'enable' is high. The frame format
// and the 100 us break, 10 us MAB and 10 us MTBF at 27 MHz follow the lab
// design; the 10 us MTBP, the enable input and LSB-first data are this
// design's choices.
// Timing: each bit lasts BIT_CYCLES clocks, the break BREAK_CYCLES, the MAB
// MAB_CYCLES, each MTBF MTBF_CYCLES (must be 3 or more) and the MTBP
// MTBP_CYCLES clocks, exactly.
module dmx512_tx #(
  parameter int unsigned BIT_CYCLES   = 108,   // 4 us at 27 MHz
  parameter int unsigned BREAK_CYCLES = 2700,  // 100 us
  parameter int unsigned MAB_CYCLES   = 270,   // 10 us
  parameter int unsigned MTBF_CYCLES  = 270,   // 10 us
  parameter int unsigned MTBP_CYCLES  = 270,   // 10 us
  parameter int unsigned NUM_CHANNELS = 512,
  localparam int unsigned AW          = $clog2(NUM_CHANNELS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          enable,
  output logic          dmx_out,
  output logic          request_pulse,
  output logic [AW-1:0] request_addr,
  input  logic [7:0]    chan_data,
  output logic          packet_done
);
  typedef enum logic [2:0] {S_MTBP, S_BREAK, S_MAB, S_FRAME, S_MTBF} state_e;

  localparam int unsigned MAXC = (BREAK_CYCLES > MTBP_CYCLES) ? BREAK_CYCLES : MTBP_CYCLES;
  localparam int unsigned CW   = $clog2(MAXC + MAB_CYCLES + MTBF_CYCLES + BIT_CYCLES + 1);

  state_e          state;
  logic [CW-1:0]   cnt;
  logic [3:0]      bit_n;       // bit inside the frame, 0..10
  logic [10:0]     frame;       // bits still to send, LSB first
  logic [AW:0]     addr_count;  // channels sent so far
  logic [7:0]      data_l;

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= S_MTBP;
      cnt           <= '0;
      bit_n         <= '0;
      frame         <= '1;
      addr_count    <= '0;
      data_l        <= '0;
      dmx_out       <= 1'b1;
      request_pulse <= 1'b0;
      request_addr  <= '0;
      packet_done   <= 1'b0;
    end else begin
      request_pulse <= 1'b0;
      packet_done   <= 1'b0;
      cnt           <= cnt + 1'b1;
      unique case (state)
        S_MTBP: begin
          dmx_out <= 1'b1;
          if (cnt >= CW'(MTBP_CYCLES - 1)) begin
            cnt <= cnt;                       // stay ready until enabled
            if (enable) begin
              cnt     <= '0;
              dmx_out <= 1'b0;
              state   <= S_BREAK;
            end
          end
        end
        S_BREAK: if (cnt == CW'(BREAK_CYCLES - 1)) begin
          cnt     <= '0;
          dmx_out <= 1'b1;
          state   <= S_MAB;
        end
        S_MAB: if (cnt == CW'(MAB_CYCLES - 1)) begin
          // start code: value 0 framed as 0_0000_0000_11 (sent from the right)
          cnt        <= '0;
          addr_count <= '0;
          frame      <= {2'b11, 8'h00, 1'b0} >> 1;
          dmx_out    <= 1'b0;
          bit_n      <= '0;
          state      <= S_FRAME;
        end
        S_FRAME: if (cnt == CW'(BIT_CYCLES - 1)) begin
          cnt <= '0;
          if (bit_n == 4'd10) begin
            dmx_out <= 1'b1;
            state   <= S_MTBF;
          end else begin
            bit_n   <= bit_n + 1'b1;
            dmx_out <= frame[0];
            frame   <= frame >> 1;
          end
        end
        S_MTBF: begin
          if (cnt == '0) begin
            if (addr_count == (AW+1)'(NUM_CHANNELS)) begin
              packet_done <= 1'b1;
              state       <= S_MTBP;
            end else begin
              request_pulse <= 1'b1;
              request_addr  <= addr_count[AW-1:0];
              addr_count    <= addr_count + 1'b1;
            end
          end
          if (cnt == CW'(2)) data_l <= chan_data;
          if (cnt == CW'(MTBF_CYCLES - 1)) begin
            cnt     <= '0;
            frame   <= {2'b11, data_l, 1'b0} >> 1;
            dmx_out <= 1'b0;
            bit_n   <= '0;
            state   <= S_FRAME;
          end
        end
        default: state <= S_MTBP;
      endcase
    end
  end
endmodule
