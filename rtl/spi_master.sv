// spi_master: SPI bus master with several active-low slave selects.
// On 'start' it pulls the selected ss_n[ss_sel] low, waits SS_SETUP cycles so
// the slave can prepare, then toggles SCLK 2*WIDTH times with a half period of
// HALF_PERIOD clocks. Data leave on MOSI from the top of the shift register
// (MSB first) and MISO bits enter at the bottom, so after WIDTH bits the
// register holds the slave's word. SCLK idles at 'cpol'. With cpha = 0 the
// first bit is on MOSI before the first (leading) edge, bits are sampled on
// leading edges and changed on trailing edges; with cpha = 1 bits change on
// leading edges and are sampled on trailing edges. After the last edge the
// master waits one more half period, releases ss_n and pulses 'done' with
// rx_data valid. Select, SCLK, MOSI and MISO roles follow the usual SPI
// description; MSB first, the mode encoding, the setup wait and the
// handshake are this design's choices.
// Timing: a transfer takes 1 + SS_SETUP + (2*WIDTH+1)*HALF_PERIOD cycles from
// start to done.
module spi_master #(
  parameter int unsigned WIDTH       = 8,
  parameter int unsigned NUM_SS      = 3,
  parameter int unsigned HALF_PERIOD = 13,   // 27 MHz / 26 = 1.04 MHz SCLK
  parameter int unsigned SS_SETUP    = 8,
  localparam int unsigned SSW        = (NUM_SS > 1) ? $clog2(NUM_SS) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [SSW-1:0]   ss_sel,
  input  logic             cpol,
  input  logic             cpha,
  input  logic [WIDTH-1:0] tx_data,
  output logic [WIDTH-1:0] rx_data,
  output logic             busy,
  output logic             done,
  output logic             sclk,
  output logic             mosi,
  input  logic             miso,
  output logic [NUM_SS-1:0] ss_n
);
  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_XFER, S_HOLD} state_e;

  localparam int unsigned CW = $clog2(HALF_PERIOD + SS_SETUP + 1);
  localparam int unsigned EW = $clog2(2 * WIDTH + 1);

  state_e           state;
  logic [CW-1:0]    cnt;
  logic [EW-1:0]    edge_n;      // SCLK edges done so far
  logic [WIDTH-1:0] tx_sr, rx_sr;
  logic             mode_cpha;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      cnt       <= '0;
      edge_n    <= '0;
      tx_sr     <= '0;
      rx_sr     <= '0;
      rx_data   <= '0;
      done      <= 1'b0;
      sclk      <= 1'b0;
      mosi      <= 1'b0;
      ss_n      <= '1;
      mode_cpha <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          sclk <= cpol;
          if (start) begin
            mode_cpha      <= cpha;
            ss_n           <= '1;
            ss_n[ss_sel]   <= 1'b0;
            cnt            <= '0;
            edge_n         <= '0;
            if (cpha) begin
              tx_sr <= tx_data;
              mosi  <= 1'b0;
            end else begin
              mosi  <= tx_data[WIDTH-1];
              tx_sr <= tx_data << 1;
            end
            state <= S_SETUP;
          end
        end
        S_SETUP: begin
          if (cnt == CW'(SS_SETUP - 1)) begin
            cnt   <= '0;
            state <= S_XFER;
          end else cnt <= cnt + 1'b1;
        end
        S_XFER: begin
          if (cnt == CW'(HALF_PERIOD - 1)) begin
            cnt    <= '0;
            sclk   <= ~sclk;
            edge_n <= edge_n + 1'b1;
            if (!edge_n[0]) begin
              // leading edge
              if (mode_cpha) begin
                mosi  <= tx_sr[WIDTH-1];
                tx_sr <= tx_sr << 1;
              end else rx_sr <= {rx_sr[WIDTH-2:0], miso};
            end else begin
              // trailing edge
              if (mode_cpha) rx_sr <= {rx_sr[WIDTH-2:0], miso};
              else if (edge_n != EW'(2 * WIDTH - 1)) begin
                mosi  <= tx_sr[WIDTH-1];
                tx_sr <= tx_sr << 1;
              end
            end
            if (edge_n == EW'(2 * WIDTH - 1)) state <= S_HOLD;
          end else cnt <= cnt + 1'b1;
        end
        S_HOLD: begin
          if (cnt == CW'(HALF_PERIOD - 1)) begin
            cnt     <= '0;
            ss_n    <= '1;
            rx_data <= rx_sr;
            done    <= 1'b1;
            state   <= S_IDLE;
          end else cnt <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
