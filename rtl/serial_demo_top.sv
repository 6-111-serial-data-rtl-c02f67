// serial_demo_top: the serial interface examples side by side.
// Six independent links share only the clock and reset:
//  * UART: baud_gen makes the 16x tick for uart_tx and uart_rx (8-N-1 by
//    default); uart_txd and uart_rxd are the two wires of the full-duplex port.
//  * SPI: spi_master drives SCLK, MOSI and NUM_SS active-low selects. Select 0
//    goes to an on-chip spi_slave; the other selects leave the chip and
//    'spi_miso_ext' is the MISO of those external slaves. MISO is taken from
//    the on-chip slave while it is selected.
//  * I2C: i2c_master and an on-chip i2c_slave register device sit on one
//    open-drain bus. The bus level is the wired AND of every pull-down: the
//    two on-chip devices plus 'i2c_scl_ext_low'/'i2c_sda_ext_low' from devices
//    outside, and 'i2c_scl'/'i2c_sda' show the resulting line levels.
//  * IR: ir_receiver decodes remote-control frames from 'ir_in'.
//  * DMX512: dmx512_tx sends the levels held in dmx_channel_ram, which the
//    host fills through the dmx_wr_* port.
//  * USB: usb_fifo_if moves bytes between the user-side usb_rx_*/usb_tx_*
//    ports and an FT245-type USB-to-FIFO bridge on the usb_d_*, usb_rxf_n,
//    usb_txe_n, usb_rd_n and usb_wr pins; usb_d_oe enables the bus pads.
// Default parameters give the rates described in each block at a 27 MHz clock;
// they can be lowered for fast simulation.
module serial_demo_top
  import serial_pkg::*;
#(
  parameter int unsigned UART_BAUD     = 9600,
  parameter parity_e     UART_PARITY   = PARITY_NONE,
  parameter int unsigned UART_STOP_HALVES = 2,
  parameter int unsigned SPI_NUM_SS    = 3,
  parameter int unsigned SPI_HALF      = 13,
  parameter int unsigned SPI_SETUP     = 8,
  parameter int unsigned I2C_QUARTER   = 68,
  parameter logic [6:0]  I2C_ADDR      = 7'h42,
  parameter int unsigned I2C_STRETCH   = 0,
  parameter int unsigned IR_SAMPLE     = 2025,
  parameter int unsigned DMX_BIT       = 108,
  parameter int unsigned DMX_BREAK     = 2700,
  parameter int unsigned DMX_MARK      = 270,
  parameter int unsigned DMX_CHANNELS  = 512,
  localparam int unsigned SSW = (SPI_NUM_SS > 1) ? $clog2(SPI_NUM_SS) : 1,
  localparam int unsigned DAW = $clog2(DMX_CHANNELS)
) (
  input  logic clk,
  input  logic rst,
  // UART
  input  logic [7:0] uart_tx_data,
  input  logic       uart_tx_valid,
  output logic       uart_tx_ready,
  output logic       uart_txd,
  input  logic       uart_rxd,
  output logic [7:0] uart_rx_data,
  output logic       uart_rx_valid,
  output logic       uart_rx_frame_err,
  output logic       uart_rx_parity_err,
  // SPI
  input  logic                  spi_start,
  input  logic [SSW-1:0]        spi_ss_sel,
  input  logic                  spi_cpol,
  input  logic                  spi_cpha,
  input  logic [7:0]            spi_tx_data,
  output logic [7:0]            spi_rx_data,
  output logic                  spi_busy,
  output logic                  spi_done,
  output logic                  spi_sclk,
  output logic                  spi_mosi,
  output logic [SPI_NUM_SS-1:0] spi_ss_n,
  input  logic                  spi_miso_ext,
  input  logic [7:0]            spis_tx_data,
  output logic [7:0]            spis_rx_data,
  output logic                  spis_rx_valid,
  // I2C
  input  i2c_cmd_e   i2c_cmd,
  input  logic       i2c_cmd_valid,
  output logic       i2c_cmd_ready,
  input  logic [7:0] i2c_wdata,
  input  logic       i2c_ack_out,
  output logic [7:0] i2c_rdata,
  output logic       i2c_ack_in,
  output logic       i2c_done,
  output logic       i2c_arb_lost,
  input  logic       i2c_scl_ext_low,
  input  logic       i2c_sda_ext_low,
  output logic       i2c_scl,
  output logic       i2c_sda,
  output logic [15:0][7:0] i2c_regs,
  // IR
  input  logic       ir_in,
  output logic [6:0] ir_command,
  output logic [4:0] ir_address,
  output logic       ir_valid,
  output logic       ir_start,
  // DMX512
  input  logic           dmx_enable,
  input  logic           dmx_wr_en,
  input  logic [DAW-1:0] dmx_wr_addr,
  input  logic [7:0]     dmx_wr_data,
  output logic           dmx_out,
  output logic           dmx_packet_done,
  // USB FIFO bridge
  input  logic [7:0]     usb_d_i,
  output logic [7:0]     usb_d_o,
  output logic           usb_d_oe,
  input  logic           usb_rxf_n,
  input  logic           usb_txe_n,
  output logic           usb_rd_n,
  output logic           usb_wr,
  output logic [7:0]     usb_rx_data,
  output logic           usb_rx_valid,
  input  logic           usb_rx_ready,
  input  logic [7:0]     usb_tx_data,
  input  logic           usb_tx_valid,
  output logic           usb_tx_ready
);
  // ---------------- UART ----------------
  logic tick16;
  baud_gen #(.BAUD(UART_BAUD)) u_baud (.clk, .rst, .tick(tick16));

  uart_tx #(.PARITY(UART_PARITY), .STOP_HALVES(UART_STOP_HALVES)) u_uart_tx (
    .clk, .rst, .tick16, .data(uart_tx_data), .valid(uart_tx_valid),
    .ready(uart_tx_ready), .txd(uart_txd));

  uart_rx #(.PARITY(UART_PARITY), .STOP_HALVES(UART_STOP_HALVES)) u_uart_rx (
    .clk, .rst, .tick16, .rxd(uart_rxd), .data(uart_rx_data), .valid(uart_rx_valid),
    .frame_err(uart_rx_frame_err), .parity_err(uart_rx_parity_err));

  // ---------------- SPI ----------------
  logic spi_miso, spis_miso, spis_miso_oe;

  spi_master #(.NUM_SS(SPI_NUM_SS), .HALF_PERIOD(SPI_HALF), .SS_SETUP(SPI_SETUP)) u_spi_m (
    .clk, .rst, .start(spi_start), .ss_sel(spi_ss_sel), .cpol(spi_cpol), .cpha(spi_cpha),
    .tx_data(spi_tx_data), .rx_data(spi_rx_data), .busy(spi_busy), .done(spi_done),
    .sclk(spi_sclk), .mosi(spi_mosi), .miso(spi_miso), .ss_n(spi_ss_n));

  spi_slave u_spi_s (
    .clk, .rst, .cpol(spi_cpol), .cpha(spi_cpha), .sclk(spi_sclk), .mosi(spi_mosi),
    .ss_n(spi_ss_n[0]), .miso(spis_miso), .miso_oe(spis_miso_oe),
    .tx_data(spis_tx_data), .rx_data(spis_rx_data), .rx_valid(spis_rx_valid));

  assign spi_miso = spis_miso_oe ? spis_miso : spi_miso_ext;

  // ---------------- I2C ----------------
  logic m_scl_low, m_sda_low, s_scl_low, s_sda_low;

  // open-drain bus: high unless someone pulls it low
  assign i2c_scl = !(m_scl_low || s_scl_low || i2c_scl_ext_low);
  assign i2c_sda = !(m_sda_low || s_sda_low || i2c_sda_ext_low);

  i2c_master #(.QUARTER(I2C_QUARTER)) u_i2c_m (
    .clk, .rst, .cmd(i2c_cmd), .cmd_valid(i2c_cmd_valid), .cmd_ready(i2c_cmd_ready),
    .wdata(i2c_wdata), .ack_out(i2c_ack_out), .rdata(i2c_rdata), .ack_in(i2c_ack_in),
    .done(i2c_done), .arb_lost(i2c_arb_lost), .scl_i(i2c_scl), .sda_i(i2c_sda),
    .scl_low(m_scl_low), .sda_low(m_sda_low));

  i2c_slave #(.ADDR(I2C_ADDR), .NUM_REGS(16), .STRETCH(I2C_STRETCH)) u_i2c_s (
    .clk, .rst, .scl_i(i2c_scl), .sda_i(i2c_sda), .scl_low(s_scl_low), .sda_low(s_sda_low),
    .regs(i2c_regs));

  // ---------------- IR ----------------
  ir_receiver #(.SAMPLE_CYCLES(IR_SAMPLE)) u_ir (
    .clk, .rst, .ir_in, .command(ir_command), .address(ir_address), .valid(ir_valid), .start(ir_start));

  // ---------------- DMX512 ----------------
  logic           dmx_req;
  logic [DAW-1:0] dmx_req_addr;
  logic [7:0]     dmx_chan;

  dmx_channel_ram #(.DEPTH(DMX_CHANNELS)) u_dmx_ram (
    .clk, .wr_en(dmx_wr_en), .wr_addr(dmx_wr_addr), .wr_data(dmx_wr_data),
    .rd_en(dmx_req), .rd_addr(dmx_req_addr), .rd_data(dmx_chan));

  dmx512_tx #(.BIT_CYCLES(DMX_BIT), .BREAK_CYCLES(DMX_BREAK), .MAB_CYCLES(DMX_MARK),
              .MTBF_CYCLES(DMX_MARK), .MTBP_CYCLES(DMX_MARK), .NUM_CHANNELS(DMX_CHANNELS)) u_dmx (
    .clk, .rst, .enable(dmx_enable), .dmx_out, .request_pulse(dmx_req),
    .request_addr(dmx_req_addr), .chan_data(dmx_chan), .packet_done(dmx_packet_done));

  // ---------------- USB FIFO bridge ----------------
  usb_fifo_if u_usb (
    .clk, .rst, .d_i(usb_d_i), .d_o(usb_d_o), .d_oe(usb_d_oe), .rxf_n(usb_rxf_n),
    .txe_n(usb_txe_n), .rd_n(usb_rd_n), .wr(usb_wr), .rx_data(usb_rx_data),
    .rx_valid(usb_rx_valid), .rx_ready(usb_rx_ready), .tx_data(usb_tx_data),
    .tx_valid(usb_tx_valid), .tx_ready(usb_tx_ready));
endmodule
