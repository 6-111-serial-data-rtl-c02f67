// spi_master_tb: runs spi_master (HALF_PERIOD 4, SS_SETUP 6, 3 selects)
// against a slave model written in the testbench, in all four cpol/cpha modes
// and for every select. The model samples MOSI and changes MISO on the edges
// the mode prescribes and records the word it received. Checks: word received
// by the model, word returned in rx_data, only the chosen select low during
// the transfer, SCLK at its idle level outside transfers, exactly 16 SCLK
// edges, first edge no earlier than SS_SETUP cycles after select, and the
// start-to-done time of 1 + SS_SETUP + 17*HALF_PERIOD cycles. Last, the
// synchronous-transmission example 0x61 in mode 0: bits read on rising edges
// must be 0,1,1,0,0,0,0,1 and MOSI may change only on falling edges.
module spi_master_tb;
  localparam int HALF = 4, SETUP = 6;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic start = 0, cpol = 0, cpha = 0, busy, done, sclk, mosi, miso = 0;
  logic [1:0] ss_sel = 0;
  logic [7:0] tx_data = 0, rx_data;
  logic [2:0] ss_n;

  spi_master #(.HALF_PERIOD(HALF), .SS_SETUP(SETUP)) dut (
    .clk, .rst, .start, .ss_sel, .cpol, .cpha, .tx_data, .rx_data, .busy, .done,
    .sclk, .mosi, .miso, .ss_n);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // slave model
  logic [7:0] s_tx, s_rx, s_out;
  logic sclk_p = 0, sel_p = 0, cpol_p = 0;
  int edges, first_edge, sel_time, cyc = 0;
  always @(posedge clk) begin
    logic sel, lead, trail;
    cyc++;
    sel = (ss_n != 3'b111);
    if (sel && !sel_p) begin
      edges = 0; sel_time = cyc; first_edge = -1;
      s_out = s_tx;
      if (!cpha) begin miso = s_out[7]; s_out = s_out << 1; end
    end
    if (sel && sclk != sclk_p) begin
      lead  = (sclk != cpol);
      trail = !lead;
      if (first_edge < 0) first_edge = cyc;
      edges++;
      if ((cpha == 0 && lead) || (cpha == 1 && trail)) s_rx = {s_rx[6:0], mosi};
      if ((cpha == 0 && trail) || (cpha == 1 && lead)) begin miso = s_out[7]; s_out = s_out << 1; end
    end
    if (!sel && !rst && !busy) begin
      if (sclk != cpol_p) begin failures++; $display("SCLK not idle at cpol"); end
    end
    sclk_p = sclk;
    cpol_p = cpol;
    sel_p = sel;
  end

  initial begin
    int t0, t1;
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (4) @(posedge clk);
    for (int m = 0; m < 4; m++) begin
      for (int s = 0; s < 3; s++) begin
        repeat (2) begin
          cpol <= m[1]; cpha <= m[0];
          repeat (3) @(posedge clk);
          s_tx = 8'($urandom);
          tx_data <= 8'($urandom); ss_sel <= 2'(s);
          start <= 1; @(posedge clk); start <= 0;
          t0 = cyc;
          while (!done) begin
            @(posedge clk);
            if (busy && ss_n !== ~(3'b1 << s) && cyc > t0 + 1 && !done) begin
              failures++; $display("ss_n %b for select %0d", ss_n, s); break;
            end
          end
          t1 = cyc;
          checks++;
          if (s_rx !== tx_data) begin failures++; $display("mode %0d: slave got %h, sent %h", m, s_rx, tx_data); end
          checks++;
          if (rx_data !== s_tx) begin failures++; $display("mode %0d: master got %h, slave sent %h", m, rx_data, s_tx); end
          checks++;
          if (edges != 16) begin failures++; $display("%0d SCLK edges", edges); end
          checks++;
          if (first_edge - sel_time < SETUP) begin failures++; $display("first edge %0d cycles after select", first_edge - sel_time); end
          checks++;
          if (t1 - t0 != 1 + SETUP + 17 * HALF) begin
            failures++; $display("transfer took %0d cycles, expected %0d", t1 - t0, 1 + SETUP + 17 * HALF);
          end
          @(posedge clk);
          checks++;
          if (ss_n !== 3'b111) begin failures++; $display("select not released"); end
        end
      end
    end
    // synchronous-transmission example: 0x61 sent MSB first, data changed on
    // falling SCLK edges and read on rising ones (mode 0)
    cpol <= 0; cpha <= 0;
    repeat (3) @(posedge clk);
    tx_data <= 8'h61; ss_sel <= 0; s_tx = 8'h00;
    start <= 1; @(posedge clk); start <= 0;
    begin
      logic [7:0] seen; logic sp, mp; int nrise, bad;
      seen = 0; sp = 0; mp = mosi; nrise = 0; bad = 0;
      while (!done) begin
        @(posedge clk);
        if (!ss_n[0] && sclk && !sp) begin seen = {seen[6:0], mosi}; nrise++; end
        if (!ss_n[0] && mosi != mp && sclk && nrise > 0 && sp == sclk) bad++;   // MOSI moved while SCLK high
        if (!ss_n[0] && mosi != mp && sclk && !sp) bad++;                         // MOSI moved on a rising edge
        sp = sclk; mp = mosi;
      end
      checks++;
      if (seen !== 8'h61 || nrise != 8) begin failures++; $display("0x61 example: read %h on %0d rising edges", seen, nrise); end
      checks++;
      if (bad != 0) begin failures++; $display("0x61 example: MOSI changed %0d times away from a falling edge", bad); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
