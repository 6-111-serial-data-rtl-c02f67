// spi_master_fast_tb: spi_master at its fastest setting, HALF_PERIOD 1, where
// SCLK toggles on every clock (13.5 MHz at a 27 MHz clock), with SS_SETUP 1.
// The slave model runs on the SCLK edges themselves rather than on the system
// clock. It shifts MOSI in on the sampling edge and presents the next MISO bit
// on the launching edge of the selected mode; with cpha = 0 the first MISO bit
// is presented when the select falls. For 40 random word pairs in each of the
// four cpol/cpha modes, checked: the word the model received, the word
// returned in rx_data, 16 SCLK edges per transfer, and the start-to-done time
// of 1 + SS_SETUP + 17 * HALF_PERIOD = 19 clocks.
module spi_master_fast_tb;
  localparam int HALF = 1, SETUP = 1;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic start = 0, cpol = 0, cpha = 0, busy, done, sclk, mosi, miso;
  logic [1:0] ss_sel = 0;
  logic [7:0] tx_data = 0, rx_data;
  logic [2:0] ss_n;

  spi_master #(.HALF_PERIOD(HALF), .SS_SETUP(SETUP)) dut (
    .clk, .rst, .start, .ss_sel, .cpol, .cpha, .tx_data, .rx_data, .busy, .done,
    .sclk, .mosi, .miso, .ss_n);

  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // slave model on select 0, clocked by SCLK
  logic [7:0] s_tx = 0, s_rx = 0, s_out = 0;
  int edges = 0;
  wire sel = !ss_n[0];
  assign miso = s_out[7];

  always @(posedge sel) begin
    edges = 0;
    // cpha = 0: first bit out at select; cpha = 1: at the first edge
    s_out = cpha ? 8'h00 : s_tx;
  end

  always @(sclk) if (sel) begin
    bit lead;
    lead = (sclk != cpol);
    edges++;
    if (lead == !cpha) s_rx = {s_rx[6:0], mosi};        // sampling edge
    else if (cpha && edges == 1) s_out = s_tx;          // first launch, cpha = 1
    else s_out = s_out << 1;                            // next bit
  end

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);
    for (int mode = 0; mode < 4; mode++) begin
      cpol <= mode[1];
      cpha <= mode[0];
      repeat (3) @(posedge clk);
      for (int n = 0; n < 40; n++) begin
        logic [7:0] m, s;
        int t;
        m = 8'($urandom);
        s = 8'($urandom);
        s_tx    = s;
        tx_data <= m;
        start   <= 1;
        @(posedge clk);
        start   <= 0;
        t = 0;   // clocks after the one that takes start
        while (!done && t < 100) begin @(posedge clk); t++; end
        check(t == 1 + SETUP + 17 * HALF,
              $sformatf("mode %0d: start to done %0d clocks", mode, t));
        check(s_rx == m, $sformatf("mode %0d: slave got %h, master sent %h", mode, s_rx, m));
        check(rx_data == s, $sformatf("mode %0d: master got %h, slave sent %h", mode, rx_data, s));
        check(edges == 16, $sformatf("mode %0d: %0d SCLK edges", mode, edges));
        repeat (2) @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
