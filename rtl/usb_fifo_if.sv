// usb_fifo_if: FPGA side of a USB-to-FIFO bridge module of the FT245 kind
// (UM245R). The bridge holds two FIFOs, one filled by the PC and one emptied
// toward it, and the FPGA reaches both through an 8-bit bus and four
// handshake pins:
//   rxf_n  low while the bridge has a byte from the PC to give
//   txe_n  low while the bridge has room for a byte toward the PC
//   rd_n   pulled low by the FPGA to read; the bridge drives the bus while
//          rd_n is low, and the byte is taken just before rd_n rises
//   wr     raised by the FPGA to write; the bridge takes the byte on the
//          falling edge of wr
// The bus is bidirectional on the board; here it is split into d_i, d_o and
// the output enable d_oe for a tri-state pad outside this module.
//
// How it works: rxf_n and txe_n pass two-flop synchronisers. From IDLE the
// controller starts a read when a byte is waiting and the user side can take
// it (rx_ready), or a write when there is room and the user offers a byte.
// When both are possible it takes turns, so neither direction starves. A read
// holds rd_n low for RD_PULSE clocks and latches d_i at the clock on which
// rd_n rises. A write drives d_o with wr high for WR_PULSE clocks, lowers wr,
// and keeps driving one more clock as hold time. After each access the
// controller waits RECOVER clocks before it looks at the flags again: the
// bridge needs that long to raise the flag of the byte just moved, and the
// flag needs two clocks through its synchroniser. The wait also keeps the
// bus turnaround clean, because d_oe never rises within RECOVER clocks of
// rd_n rising.
//
// User side:
//   rx_ready is a level; while it is high the controller may start a read,
//   and the byte arrives as a one-clock rx_valid pulse with rx_data
//   RD_PULSE clocks later. tx_data/tx_valid/tx_ready form a valid/ready
//   handshake. tx_ready does not depend on tx_valid, and the byte is taken on
//   the clock where both are high.
//
// Timing at the 27 MHz default clock (37 ns): the rd_n pulse and the wr pulse
// last 3 clocks (111 ns). The FT245R data sheet asks for at least 50 ns, and
// its read data is valid at most 50 ns after rd_n falls. The recovery time is
// 4 clocks (148 ns), against the 80 ns the flags may stay inactive after an
// access. Those nanosecond figures come from the bridge's data sheet, not
// from the description this design follows, which names only the module, its
// pins and its "handshake protocol". Each transfer takes
// at least 1 + RD_PULSE + RECOVER clocks to read, or 1 + WR_PULSE + 1 +
// RECOVER clocks to write (8 and 9 by default). The bridge's own flag time
// brings a steady stream to about 10 to 11 clocks a byte. That is still over
// 2.4 Mbyte/s, more than a full-speed USB link delivers.
module usb_fifo_if #(
  parameter int unsigned RD_PULSE = 3,   // clocks rd_n is held low (>= 2)
  parameter int unsigned WR_PULSE = 3,   // clocks wr is held high (>= 2)
  parameter int unsigned RECOVER  = 4    // clocks after an access (>= 3)
) (
  input  logic       clk,
  input  logic       rst,
  // bridge pins
  input  logic [7:0] d_i,
  output logic [7:0] d_o,
  output logic       d_oe,
  input  logic       rxf_n,
  input  logic       txe_n,
  output logic       rd_n,
  output logic       wr,
  // user side, from the PC
  output logic [7:0] rx_data,
  output logic       rx_valid,
  input  logic       rx_ready,
  // user side, toward the PC
  input  logic [7:0] tx_data,
  input  logic       tx_valid,
  output logic       tx_ready
);
  localparam int unsigned CW = $clog2(RD_PULSE + WR_PULSE + RECOVER + 1);

  typedef enum logic [2:0] {S_IDLE, S_READ, S_WRITE, S_HOLD, S_RECOVER} state_e;
  state_e        state;
  logic [CW-1:0] cnt;
  logic          rxf_m, rxf_s, txe_m, txe_s;
  logic          last_rd;   // the last access was a read: a write goes first now

  always_ff @(posedge clk) begin
    if (rst) {rxf_m, rxf_s, txe_m, txe_s} <= '1;
    else begin
      rxf_m <= rxf_n;  rxf_s <= rxf_m;
      txe_m <= txe_n;  txe_s <= txe_m;
    end
  end

  logic can_rd, can_wr, wr_go, rd_go;
  assign can_rd   = (state == S_IDLE) && !rxf_s && rx_ready;
  assign can_wr   = (state == S_IDLE) && !txe_s;
  assign tx_ready = can_wr && !(can_rd && !last_rd);
  assign wr_go    = tx_ready && tx_valid;
  assign rd_go    = can_rd && !wr_go;

  always_ff @(posedge clk) begin
    rx_valid <= 1'b0;
    if (rst) begin
      state   <= S_IDLE;
      cnt     <= '0;
      rd_n    <= 1'b1;
      wr      <= 1'b0;
      d_oe    <= 1'b0;
      d_o     <= '0;
      rx_data <= '0;
      last_rd <= 1'b0;
    end else begin
      case (state)
        S_IDLE: begin
          if (wr_go) begin
            d_o     <= tx_data;
            d_oe    <= 1'b1;
            wr      <= 1'b1;
            cnt     <= CW'(WR_PULSE - 1);
            last_rd <= 1'b0;
            state   <= S_WRITE;
          end else if (rd_go) begin
            rd_n    <= 1'b0;
            cnt     <= CW'(RD_PULSE - 1);
            last_rd <= 1'b1;
            state   <= S_READ;
          end
        end
        S_READ: begin
          if (cnt == '0) begin
            rx_data  <= d_i;
            rx_valid <= 1'b1;
            rd_n     <= 1'b1;
            cnt      <= CW'(RECOVER - 1);
            state    <= S_RECOVER;
          end else cnt <= cnt - 1'b1;
        end
        S_WRITE: begin
          if (cnt == '0) begin
            wr    <= 1'b0;       // bridge takes d_o on this falling edge
            state <= S_HOLD;
          end else cnt <= cnt - 1'b1;
        end
        S_HOLD: begin
          d_oe  <= 1'b0;
          cnt   <= CW'(RECOVER - 1);
          state <= S_RECOVER;
        end
        S_RECOVER: begin
          if (cnt == '0) state <= S_IDLE;
          else cnt <= cnt - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
