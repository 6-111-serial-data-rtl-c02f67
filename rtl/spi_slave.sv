// spi_slave: SPI slave that runs on the system clock.
// SCLK, MOSI and SS_n pass through two-flop synchronisers and SCLK edges are
// found by comparing with the previous synchronised value, so SCLK must be
// several times slower than 'clk' (the master's HALF_PERIOD of 4 or more clock
// cycles is enough). When SS_n falls the slave loads 'tx_data'. While selected
// it shifts MOSI into its receive register and its transmit register out on
// MISO, MSB first, in the mode set by cpol/cpha (cpha = 0: sample on leading
// edge, change on trailing edge, first bit out at select; cpha = 1: change on
// leading, sample on trailing). After WIDTH sampled bits 'rx_valid' pulses with
// the received word on 'rx_data'. 'miso_oe' is high while selected so several
// slaves can share MISO. Using the system clock to oversample SCLK and loading
// at select are this design's choices.
// Timing: MISO changes 3 clock cycles after the SCLK edge at the pin.
// WIDTH must be 3 or more.
module spi_slave #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             cpol,
  input  logic             cpha,
  input  logic             sclk,
  input  logic             mosi,
  input  logic             ss_n,
  output logic             miso,
  output logic             miso_oe,
  input  logic [WIDTH-1:0] tx_data,
  output logic [WIDTH-1:0] rx_data,
  output logic             rx_valid
);
  localparam int unsigned BW = $clog2(WIDTH + 1);

  logic [1:0] sclk_m, mosi_m, ss_m;
  logic       sclk_s, mosi_s, ss_s, sclk_p, ss_p;
  logic [WIDTH-1:0] tx_sr;
  logic [WIDTH-2:0] rx_sr;       // bits received so far, the last one joins at the end
  logic [BW-1:0]    nbits;

  assign {sclk_s, mosi_s, ss_s} = {sclk_m[1], mosi_m[1], ss_m[1]};
  assign miso_oe = !ss_s;

  wire sel      = !ss_s;
  wire sel_fall = ss_p && !ss_s;
  wire toggled  = (sclk_s != sclk_p);
  wire leading  = sel && toggled && (sclk_s != cpol);
  wire trailing = sel && toggled && (sclk_s == cpol);
  wire sample   = cpha ? trailing : leading;
  wire change   = cpha ? leading  : trailing;

  always_ff @(posedge clk) begin
    if (rst) begin
      sclk_m   <= {2{cpol}};
      mosi_m   <= '0;
      ss_m     <= '1;
      sclk_p   <= cpol;
      ss_p     <= 1'b1;
      tx_sr    <= '0;
      rx_sr    <= '0;
      nbits    <= '0;
      miso     <= 1'b0;
      rx_data  <= '0;
      rx_valid <= 1'b0;
    end else begin
      sclk_m   <= {sclk_m[0], sclk};
      mosi_m   <= {mosi_m[0], mosi};
      ss_m     <= {ss_m[0], ss_n};
      sclk_p   <= sclk_s;
      ss_p     <= ss_s;
      rx_valid <= 1'b0;
      if (sel_fall) begin
        nbits <= '0;
        if (cpha) tx_sr <= tx_data;
        else begin
          miso  <= tx_data[WIDTH-1];
          tx_sr <= tx_data << 1;
        end
      end else begin
        if (change) begin
          miso  <= tx_sr[WIDTH-1];
          tx_sr <= tx_sr << 1;
        end
        if (sample) begin
          rx_sr <= {rx_sr[WIDTH-3:0], mosi_s};
          if (nbits == BW'(WIDTH - 1)) begin
            nbits    <= '0;
            rx_data  <= {rx_sr[WIDTH-2:0], mosi_s};
            rx_valid <= 1'b1;
          end else nbits <= nbits + 1'b1;
        end
      end
    end
  end
endmodule
