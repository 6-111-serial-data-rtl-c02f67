// uart_rx_tb: drives hand-built RS232 frames into two receivers (8-N-1 and
// 8-E-1) and checks the decoded bytes and error pulses. Cases: random bytes
// with exact bit timing, bytes sent 3% fast and 3% slow, a short low glitch
// that must not start a frame, a frame with a 0 stop bit (frame error) and a
// frame with the wrong parity bit (parity error). A tick comes every 4 clocks,
// so one bit is 64 clocks; 'valid' must come within one bit time of the
// middle of the stop bit. A third receiver set to 7 data bits, even parity
// and two stop bits decodes the character 'A' (line levels 0 1000001 0 11)
// and flags the same frame with its second stop bit 0.
module uart_rx_tb;
  import serial_pkg::*;
  logic clk = 0, rst = 1, tick16 = 0;
  int checks = 0, failures = 0;
  localparam int TB = 64;

  always #5 clk = ~clk;
  int tc = 0;
  always @(posedge clk) begin tc <= (tc + 1) % 4; tick16 <= (tc == 3); end

  logic rxd = 1;
  logic [7:0] d0, d1;
  logic v0, fe0, pe0, v1, fe1, pe1;
  uart_rx                         u0 (.clk, .rst, .tick16, .rxd, .data(d0), .valid(v0), .frame_err(fe0), .parity_err(pe0));
  uart_rx #(.PARITY(PARITY_EVEN)) u1 (.clk, .rst, .tick16, .rxd, .data(d1), .valid(v1), .frame_err(fe1), .parity_err(pe1));
  // 7-E-2 receiver on a line of its own, for the character 'A' example
  logic rxd2 = 1, v2, fe2, pe2;
  logic [7:0] d2;
  uart_rx #(.DATA_BITS(7), .PARITY(PARITY_EVEN), .STOP_HALVES(4)) u2 (.clk, .rst, .tick16, .rxd(rxd2), .data(d2), .valid(v2), .frame_err(fe2), .parity_err(pe2));
  int nv2 = 0, nerr2 = 0, nfe2 = 0;
  always @(posedge clk) if (!rst) begin
    if (v2) nv2++;
    if (fe2 || pe2) nerr2++;
    if (fe2) nfe2++;
  end

  // event counters
  int nv0 = 0, nfe0 = 0, npe0 = 0, nv1 = 0, nfe1 = 0, npe1 = 0;
  logic [7:0] last0, last1;
  int last_valid_t;
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
    if (v0) begin nv0++; last0 = d0; last_valid_t = cyc; end
    if (fe0) nfe0++;
    if (pe0) npe0++;
    if (v1) begin nv1++; last1 = d1; end
    if (fe1) nfe1++;
    if (pe1) npe1++;
    end
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send start, 8 data bits, optional parity bit, one stop bit; bit = tb clocks
  task automatic frame(input logic [7:0] b, input int tb, input int par, input logic stopv, output int stop_mid);
    rxd <= 0; repeat (tb) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd <= b[i]; repeat (tb) @(posedge clk); end
    if (par >= 0) begin rxd <= par[0]; repeat (tb) @(posedge clk); end
    rxd <= stopv; repeat (tb / 2) @(posedge clk);
    stop_mid = cyc;
    repeat (tb - tb / 2) @(posedge clk);
    rxd <= 1; repeat (2 * tb) @(posedge clk);
  endtask

  task automatic expect_counts(input int a, b, c, d, e, f, input string what);
    checks++;
    if (nv0 != a || nfe0 != b || npe0 != c || nv1 != d || nfe1 != e || npe1 != f) begin
      failures++;
      $display("%s: counts %0d %0d %0d / %0d %0d %0d, expected %0d %0d %0d / %0d %0d %0d",
               what, nv0, nfe0, npe0, nv1, nfe1, npe1, a, b, c, d, e, f);
    end
  endtask

  initial begin
    logic [7:0] b; int sm; int n;
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (100) @(posedge clk);
    n = 0;
    for (int k = 0; k < 12; k++) begin
      int tb;
      b = 8'($urandom);
      tb = (k % 3 == 0) ? TB : (k % 3 == 1) ? 62 : 66;   // exact, 3% fast, 3% slow
      frame(b, tb, -1, 1'b1, sm);
      n++;
      checks++;
      if (last0 !== b) begin failures++; $display("8N1 got %h expected %h", last0, b); end
      checks++;
      if (last_valid_t < sm - TB / 2 || last_valid_t > sm + TB) begin
        failures++; $display("valid at %0d, stop middle %0d", last_valid_t, sm);
      end
    end
    // 8N1 frames look to the 8E1 receiver like a data byte followed by a parity
    // bit of 1 and a stop bit of 1 (the idle line): count those
    expect_counts(12, 0, 0, nv1, nfe1, npe1, "8N1 frames");
    begin
      int a1, b1, c1;
      a1 = nv1; b1 = nfe1; c1 = npe1;
      // glitch: 2 ticks low
      rxd <= 0; repeat (8) @(posedge clk); rxd <= 1; repeat (4 * TB) @(posedge clk);
      expect_counts(12, 0, 0, a1, b1, c1, "glitch");
      // good even-parity frame
      b = 8'hA7;
      frame(b, TB, int'(^b), 1'b1, sm);
      checks++;
      if (last1 !== b) begin failures++; $display("8E1 got %h", last1); end
      expect_counts(13, 0, 0, a1 + 1, b1, c1, "8E1 frame");   // u0 sees parity bit 1 as stop: byte + ok
      // wrong parity
      frame(8'h3C, TB, 1, 1'b1, sm);
      expect_counts(14, 0, 0, a1 + 1, b1, c1 + 1, "bad parity");
      // stop bit 0 (8N1 receiver samples the parity slot as stop: send 0 there too)
      frame(8'h55, TB, 0, 1'b0, sm);
      expect_counts(14, 1, 0, a1 + 1, b1 + 1, c1 + 1, "bad stop");
    end
    // 'A' as 7-E-2: line levels 0 1000001 0 11, start bit first
    begin
      logic [10:0] w;
      w = 11'b11_0_1000001_0;
      for (int i = 0; i < 11; i++) begin rxd2 <= w[i]; repeat (TB) @(posedge clk); end
      rxd2 <= 1; repeat (2 * TB) @(posedge clk);
      checks++;
      if (nv2 != 1 || nerr2 != 0 || d2 !== 8'h41) begin failures++; $display("7-E-2 'A': %0d bytes, %0d errors, data %h", nv2, nerr2, d2); end
      // same frame with the second stop bit 0: frame error
      w = 11'b01_0_1000001_0;
      for (int i = 0; i < 11; i++) begin rxd2 <= w[i]; repeat (TB) @(posedge clk); end
      rxd2 <= 1; repeat (2 * TB) @(posedge clk);
      checks++;
      if (nv2 != 1 || nfe2 != 1) begin failures++; $display("7-E-2 with a bad second stop bit: %0d bytes, %0d frame errors", nv2, nfe2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
