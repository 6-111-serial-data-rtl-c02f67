// ir_receiver_tb: sends pulse-width coded IR frames into ir_receiver with the
// sample period cut to 20 clocks (so 0.6 ms = 8 samples = 160 clocks, the
// unit U below). A frame is a 4U start pulse, then 12 pulses of 2U (1) or
// U (0), LSB first, separated by U gaps. Checks: the example frame of command
// bits 1100100 and address bits 10000 (command 0x13, address 0x01), random
// frames with +-10% timing error, that a 2U start pulse is rejected, that a
// frame broken off by a long gap gives no output and the next one decodes,
// that 'valid' comes within 10 clocks of the last falling edge, and one
// 'start' pulse per accepted start pulse.
module ir_receiver_tb;
  localparam int S = 20, U = 8 * S;
  logic clk = 0, rst = 1, ir_in = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [6:0] command; logic [4:0] address; logic valid, start;
  ir_receiver #(.SAMPLE_CYCLES(S)) dut (.clk, .rst, .ir_in, .command, .address, .valid, .start);

  int nvalid = 0, cyc = 0, tvalid = 0, nstart = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst && start) nstart++;
    if (!rst && valid) begin nvalid++; tvalid = cyc; end
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int jit(input int len, input int pct);
    return len + (len * $urandom_range(0, 2 * pct) / 100) - (len * pct / 100);
  endfunction

  task automatic pulse(input int hi, input int lo);
    ir_in <= 1; repeat (hi) @(posedge clk);
    ir_in <= 0; repeat (lo) @(posedge clk);
  endtask

  // send a frame; nbits < 12 breaks it off; returns the cycle of the last fall
  task automatic send(input logic [6:0] c, input logic [4:0] a, input int pct, input int nbits, output int tfall);
    logic [11:0] w;
    w = {a, c};
    pulse(jit(4 * U, pct), jit(U, pct));
    for (int i = 0; i < nbits; i++) begin
      ir_in <= 1; repeat (jit(w[i] ? 2 * U : U, pct)) @(posedge clk);
      ir_in <= 0; tfall = cyc;
      repeat (jit(U, pct)) @(posedge clk);
    end
    repeat (5 * U) @(posedge clk);
  endtask

  task automatic expect_frame(input logic [6:0] c, input logic [4:0] a, input int nv0, input int tfall);
    checks++;
    if (nvalid != nv0 + 1 || command !== c || address !== a) begin
      failures++; $display("got %0d frames, cmd %h addr %h, expected cmd %h addr %h", nvalid - nv0, command, address, c, a);
    end
    checks++;
    if (tvalid - tfall > 10 || tvalid < tfall) begin failures++; $display("valid %0d clocks after last fall", tvalid - tfall); end
  endtask

  initial begin
    int nv, tf; logic [6:0] c; logic [4:0] a;
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (100) @(posedge clk);
    nv = nvalid; send(7'h13, 5'h01, 0, 12, tf); expect_frame(7'h13, 5'h01, nv, tf);
    checks++; if (nstart != 1) begin failures++; $display("%0d start pulses for one frame", nstart); end
    for (int k = 0; k < 10; k++) begin
      c = 7'($urandom); a = 5'($urandom);
      nv = nvalid; send(c, a, 10, 12, tf); expect_frame(c, a, nv, tf);
    end
    // start pulse too short: no frame
    nv = nvalid;
    pulse(2 * U, U);
    for (int i = 0; i < 12; i++) pulse(U, U);
    repeat (5 * U) @(posedge clk);
    checks++; if (nvalid != nv) begin failures++; $display("frame accepted after a short start pulse"); end
    checks++; if (nstart != 11) begin failures++; $display("%0d start pulses after 11 good frames and one short start", nstart); end
    // broken frame (6 bits, then silence), then a good one
    nv = nvalid; send(7'h55, 5'h0A, 0, 6, tf);
    checks++; if (nvalid != nv) begin failures++; $display("broken frame accepted"); end
    nv = nvalid; send(7'h2A, 5'h15, 0, 12, tf); expect_frame(7'h2A, 5'h15, nv, tf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
