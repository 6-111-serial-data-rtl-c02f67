// uart_tx_tb: decodes the transmitter's line independently and checks frames.
// Uses a 1-in-4 tick so a bit is 64 clocks. Three formats are checked with
// separate instances: 8-N-1 (random bytes), 7-E-2 with the character 'A'
// whose frame must read 0 1000001 0 11, and 8-O-1.5. For each frame the
// monitor measures the start bit, samples every bit in its middle, checks the
// parity and stop level and the exact length of the stop period before the
// line is free.
module uart_tx_tb;
  import serial_pkg::*;
  logic clk = 0, rst = 1, tick16 = 0;
  int checks = 0, failures = 0;
  localparam int TB = 64;   // clocks per bit

  always #5 clk = ~clk;
  int tc = 0;
  always @(posedge clk) begin tc <= (tc + 1) % 4; tick16 <= (tc == 3); end

  logic [7:0] d0, d1, d2;
  logic v0 = 0, v1 = 0, v2 = 0;
  logic r0, r1, r2, t0, t1, t2;
  uart_tx                                                         u0 (.clk, .rst, .tick16, .data(d0), .valid(v0), .ready(r0), .txd(t0));
  uart_tx #(.DATA_BITS(7), .PARITY(PARITY_EVEN), .STOP_HALVES(4)) u1 (.clk, .rst, .tick16, .data(d1), .valid(v1), .ready(r1), .txd(t1));
  uart_tx #(.DATA_BITS(8), .PARITY(PARITY_ODD),  .STOP_HALVES(3)) u2 (.clk, .rst, .tick16, .data(d2), .valid(v2), .ready(r2), .txd(t2));

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watch line 'sel' and check one frame
  task automatic check_frame(input int sel, input int nbits, input int par, input int stop_halves,
                             input logic [7:0] exp);
    logic l; logic [7:0] got; int ones; int len;
    got = 0; ones = 0;
    // wait for the start edge
    do begin @(posedge clk); l = (sel == 0) ? t0 : (sel == 1) ? t1 : t2; end while (l);
    repeat (TB / 2) @(posedge clk);
    l = (sel == 0) ? t0 : (sel == 1) ? t1 : t2;
    checks++; if (l) begin failures++; $display("start bit not 0"); end
    for (int i = 0; i < nbits; i++) begin
      repeat (TB) @(posedge clk);
      l = (sel == 0) ? t0 : (sel == 1) ? t1 : t2;
      got[i] = l; ones += l;
    end
    checks++;
    if (got != exp) begin failures++; $display("line %0d data %h expected %h", sel, got, exp); end
    if (par != 0) begin
      repeat (TB) @(posedge clk);
      l = (sel == 0) ? t0 : (sel == 1) ? t1 : t2;
      ones += l;
      checks++;
      if ((par == 1 && ones % 2 != 0) || (par == 2 && ones % 2 != 1)) begin
        failures++; $display("line %0d parity wrong", sel);
      end
    end
    // stop period: from the middle of the last bit, the line must be 1 until ready
    repeat (TB / 2) @(posedge clk);
    len = 0;
    while (((sel == 0) ? r0 : (sel == 1) ? r1 : r2) == 0) begin
      l = (sel == 0) ? t0 : (sel == 1) ? t1 : t2;
      if (!l) begin failures++; $display("stop bit low"); break; end
      @(posedge clk); len++;
    end
    checks++;
    if (len < stop_halves * TB / 2 - 4 || len > stop_halves * TB / 2 + 4) begin
      failures++; $display("line %0d stop period %0d clocks, expected %0d", sel, len, stop_halves * TB / 2);
    end
  endtask

  task automatic send(input int sel, input logic [7:0] b);
    if (sel == 0) begin
      while (!r0) @(posedge clk);
      d0 <= b; v0 <= 1; @(posedge clk); v0 <= 0;
    end else if (sel == 1) begin
      while (!r1) @(posedge clk);
      d1 <= b; v1 <= 1; @(posedge clk); v1 <= 0;
    end else begin
      while (!r2) @(posedge clk);
      d2 <= b; v2 <= 1; @(posedge clk); v2 <= 0;
    end
  endtask

  initial begin
    logic [7:0] b;
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    checks++; if (!(t0 && t1 && t2 && r0)) begin failures++; $display("idle line not mark"); end
    for (int k = 0; k < 8; k++) begin
      b = 8'($urandom);
      fork
        send(0, b);
        check_frame(0, 8, 0, 2, b);
      join
    end
    // 'A' = 0x41, seven data bits, even parity, two stop bits
    fork
      send(1, 8'h41);
      check_frame(1, 7, 1, 4, 8'h41);
    join
    for (int k = 0; k < 4; k++) begin
      b = 8'($urandom);
      fork
        send(2, b);
        check_frame(2, 8, 2, 3, b);
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
