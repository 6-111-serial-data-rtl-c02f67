// spi_slave_tb: a master model in the testbench clocks 8-bit words through
// spi_slave in all four cpol/cpha modes, with SCLK half periods of 8 system
// clocks and a 6-cycle wait after select. Checks: the word the slave received
// (rx_data with one rx_valid per word), the word the model read back on MISO
// (the slave's tx_data, MSB first), and miso_oe following the select.
module spi_slave_tb;
  localparam int HALF = 8, SETUP = 6;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic cpol = 0, cpha = 0, sclk = 0, mosi = 0, ss_n = 1, miso, miso_oe, rx_valid;
  logic [7:0] tx_data = 0, rx_data;
  spi_slave dut (.clk, .rst, .cpol, .cpha, .sclk, .mosi, .ss_n, .miso, .miso_oe, .tx_data, .rx_data, .rx_valid);

  int nvalid = 0;
  always @(posedge clk) if (!rst && rx_valid) nvalid++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(input logic [7:0] m_tx, output logic [7:0] m_rx);
    logic [7:0] sh;
    sh = m_tx; m_rx = 0;
    sclk <= cpol;
    ss_n <= 0;
    if (!cpha) begin mosi <= sh[7]; sh = sh << 1; end
    repeat (SETUP) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      // leading edge
      sclk <= ~cpol;
      if (cpha) begin mosi <= sh[7]; sh = sh << 1; end
      else m_rx = {m_rx[6:0], miso};
      repeat (HALF) @(posedge clk);
      // trailing edge
      sclk <= cpol;
      if (cpha) m_rx = {m_rx[6:0], miso};
      else if (i != 7) begin mosi <= sh[7]; sh = sh << 1; end
      repeat (HALF) @(posedge clk);
    end
    ss_n <= 1;
    repeat (HALF) @(posedge clk);
  endtask

  initial begin
    logic [7:0] a, b, got; int nv;
    repeat (4) @(posedge clk);
    rst = 0;
    for (int m = 0; m < 4; m++) begin
      cpol <= m[1]; cpha <= m[0]; sclk <= m[1];
      repeat (10) @(posedge clk);
      for (int k = 0; k < 4; k++) begin
        a = 8'($urandom); b = 8'($urandom);
        tx_data <= b;
        nv = nvalid;
        xfer(a, got);
        checks++;
        if (rx_data !== a || nvalid != nv + 1) begin
          failures++; $display("mode %0d: slave got %h (%0d valid), sent %h", m, rx_data, nvalid - nv, a);
        end
        checks++;
        if (got !== b) begin failures++; $display("mode %0d: MISO gave %h, expected %h", m, got, b); end
        checks++;
        if (miso_oe) begin failures++; $display("miso_oe high while deselected"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
