// uart_formats_tb: uart_tx looped back into uart_rx in four frame formats
// that together cover every data width, parity mode and stop length:
//   5-N-1, 6-O-1.5, 7-E-2 and 8-N-2.
// The 16x tick comes every 4 clocks, so a bit lasts 64 clocks. For each
// format 24 random characters are sent back to back (valid held high). A
// decoder in the testbench reads the line on its own: start bit low, the data
// bits LSB first, the parity bit, and the line high through the stop bits,
// each read in the middle of its bit. It must match the character sent. The
// receiver must return the same character with no error pulse. Consecutive
// start edges must be 16 * (1 + data + parity) + 8 * STOP_HALVES ticks apart.
// The first frame is the exception: it starts from idle between two ticks,
// so it may be up to one tick shorter.
module uart_formats_tb;
  import serial_pkg::*;
  localparam int TB = 4, BIT = 16 * TB;
  localparam int NCH = 24;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic tick16 = 0;
  int tdiv = 0;
  always @(posedge clk) begin
    tdiv <= (tdiv == TB - 1) ? 0 : tdiv + 1;
    tick16 <= (tdiv == TB - 1);
  end

  initial begin
    #20_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  localparam int      DB[4] = '{5, 6, 7, 8};
  localparam parity_e PM[4] = '{PARITY_NONE, PARITY_ODD, PARITY_EVEN, PARITY_NONE};
  localparam int      SH[4] = '{2, 3, 4, 4};
  bit fin[4];

  for (genvar f = 0; f < 4; f++) begin : g_fmt
    localparam int D = DB[f], S = SH[f];
    localparam parity_e P = PM[f];
    localparam int PB = (P == PARITY_NONE) ? 0 : 1;
    localparam int FRAME = (16 * (1 + D + PB) + 8 * S) * TB;   // clocks
    string name;
    assign name = $sformatf("%0d-%s-%s", D, P == PARITY_NONE ? "N" : P == PARITY_ODD ? "O" : "E", S == 2 ? "1" : S == 3 ? "1.5" : "2");

    logic [7:0] data = 0, rdata;
    logic valid = 0, ready, txd, rvalid, ferr, perr;
    uart_tx #(.DATA_BITS(D), .PARITY(P), .STOP_HALVES(S)) tx (
      .clk, .rst, .tick16, .data, .valid, .ready, .txd);
    uart_rx #(.DATA_BITS(D), .PARITY(P), .STOP_HALVES(S)) rx (
      .clk, .rst, .tick16, .rxd(txd), .data(rdata), .valid(rvalid), .frame_err(ferr), .parity_err(perr));

    logic [7:0] sent[$], seen[$], got[$];
    int nerr = 0;
    always @(posedge clk) if (!rst) begin
      if (rvalid) got.push_back(rdata);
      if (ferr || perr) nerr++;
    end

    // sender: characters back to back
    initial begin
      wait (!rst);
      repeat (10) @(posedge clk);
      for (int n = 0; n < NCH; n++) begin
        logic [7:0] c;
        c = 8'($urandom) & 8'((1 << D) - 1);
        data  <= c;
        valid <= 1;
        @(posedge clk);
        while (!ready) @(posedge clk);
        sent.push_back(c);
      end
      valid <= 0;
    end

    // line decoder
    initial begin
      int t_prev;
      t_prev = -1;
      wait (!rst);
      for (int n = 0; n < NCH; n++) begin
        logic [7:0] c;
        bit ok;
        int t_fall;
        logic par;
        @(negedge txd);
        t_fall = int'($time / 10);
        // the first frame left idle between two ticks, so its start bit may
        // be up to one tick short; from then on frames follow tick for tick
        if (n == 1)
          check(t_fall - t_prev > FRAME - TB && t_fall - t_prev <= FRAME,
                $sformatf("%s: first frame %0d clocks, expected %0d to %0d", name, t_fall - t_prev, FRAME - TB + 1, FRAME));
        else if (n > 1)
          check(t_fall - t_prev == FRAME, $sformatf("%s: start edges %0d clocks apart, expected %0d", name, t_fall - t_prev, FRAME));
        t_prev = t_fall;
        ok = 1;
        c = 0;
        repeat (BIT / 2) @(posedge clk);
        if (txd) ok = 0;                                   // start bit
        for (int i = 0; i < D; i++) begin
          repeat (BIT) @(posedge clk);
          c[i] = txd;
        end
        par = ^c;
        if (P != PARITY_NONE) begin
          repeat (BIT) @(posedge clk);
          if (txd != (P == PARITY_EVEN ? par : !par)) ok = 0;
        end
        // stop bits: high for the rest of the frame, checked a quarter bit
        // into the stop time and then every half bit, inside its S halves
        repeat (3 * BIT / 4) @(posedge clk);
        if (!txd) ok = 0;
        for (int h = 1; h < S; h++) begin
          repeat (BIT / 2) @(posedge clk);
          if (!txd) ok = 0;
        end
        check(ok, $sformatf("%s: frame %0d malformed", name, n));
        seen.push_back(c);
        if (n == NCH - 1) break;
      end
      repeat (2 * BIT) @(posedge clk);
      check(seen.size() == NCH && got.size() == NCH && nerr == 0,
            $sformatf("%s: decoded %0d, received %0d, %0d error pulses", name, seen.size(), got.size(), nerr));
      for (int n = 0; n < NCH && n < seen.size() && n < got.size(); n++) begin
        check(seen[n] == sent[n], $sformatf("%s: line carried %h, sent %h", name, seen[n], sent[n]));
        check(got[n] == sent[n], $sformatf("%s: receiver got %h, sent %h", name, got[n], sent[n]));
      end
      fin[f] = 1;
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst <= 0;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
