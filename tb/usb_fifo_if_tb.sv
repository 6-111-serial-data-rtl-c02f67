// usb_fifo_if_tb: usb_fifo_if against a behavioural model of the FT245-type
// bridge, at the default pulse and recovery lengths.
// The model keeps one queue of bytes from the PC and one toward it (4 deep,
// drained at random). It enforces the handshake:
//  * rd_n may fall only while rxf_n is low, and wr may rise only while txe_n
//    is low;
//  * read data appears 2 clocks after rd_n falls (garbage before that);
//  * rd_n stays low and wr stays high for at least 2 clocks (50 ns at 27 MHz);
//  * the byte is written on the falling edge of wr, with d_oe high and d_o
//    unchanged since wr rose;
//  * rxf_n and txe_n go high the clock after each access and stay high for
//    3 clocks (about 80 ns);
//  * the FPGA never drives the bus while rd_n is low, or during the clock
//    after rd_n rises;
//  * rd_n low and wr high never overlap;
//  * a read never starts while the user side holds rx_ready low.
// Three phases then check that the bytes arrive intact and in order: PC to
// FPGA with random rx_ready, FPGA to PC with random tx_valid, and both at
// once. In the last phase, with both sides always ready, reads and writes
// must take turns.
module usb_fifo_if_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [7:0] d_i, d_o, rx_data, tx_data;
  logic       d_oe, rxf_n, txe_n, rd_n, wr, rx_valid, rx_ready, tx_valid, tx_ready;

  usb_fifo_if dut (.clk, .rst, .d_i, .d_o, .d_oe, .rxf_n, .txe_n, .rd_n, .wr,
                   .rx_data, .rx_valid, .rx_ready, .tx_data, .tx_valid, .tx_ready);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    #20_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // ---------------- bridge model ----------------
  logic [7:0] from_pc[$];   // bytes the PC has sent, not yet read
  logic [7:0] to_pc[$];     // bytes written, not yet drained to the PC
  int  rx_pre = 0, tx_pre = 0, rd_age = 0, wr_age = 0, since_rd_rise = 9;
  bit  rd_prev = 1, wr_prev = 0, rx_ready_prev = 0;
  bit  drain_en = 1;
  logic [7:0] wr_byte, garbage;

  assign rxf_n = (from_pc.size() == 0) || (rx_pre != 0);
  assign txe_n = (to_pc.size() >= 4) || (tx_pre != 0);
  assign d_i   = (!rd_n && rd_age >= 2) ? from_pc[0] : garbage;

  // bytes read by the FPGA, bytes that reached the PC, and the access order
  logic [7:0] got_rx[$], got_pc[$];
  int reads = 0, writes = 0;
  bit order[$];   // 1 = read, 0 = write

  always @(posedge clk) begin
    garbage <= 8'($urandom);
    if (rst) begin
      rd_prev <= 1; wr_prev <= 0; rd_age <= 0; wr_age <= 0; rx_pre <= 0; tx_pre <= 0;
    end else begin
      rx_ready_prev <= rx_ready;
      if (rx_pre != 0) rx_pre <= rx_pre - 1;
      if (tx_pre != 0) tx_pre <= tx_pre - 1;
      since_rd_rise <= (since_rd_rise < 9) ? since_rd_rise + 1 : 9;
      if (!rd_n && wr) check(0, "rd_n low and wr high together");
      if (d_oe && (!rd_n || since_rd_rise == 0)) check(0, "FPGA drives the bus during a read");
      // read
      if (!rd_n && rd_prev) begin
        check(!rxf_n, "rd_n fell while rxf_n was high");
        check(rx_ready_prev, "read started while rx_ready was low");
        reads++;
        order.push_back(1);
      end
      if (!rd_n) rd_age <= rd_age + 1;
      if (rd_n && !rd_prev) begin
        check(rd_age >= 2, "rd_n pulse shorter than 2 clocks");
        if (from_pc.size() != 0) void'(from_pc.pop_front());
        rx_pre <= 3;
        rd_age <= 0;
        since_rd_rise <= 0;
      end
      rd_prev <= rd_n;
      // write
      if (wr && !wr_prev) begin
        check(!txe_n, "wr rose while txe_n was high");
        wr_byte <= d_o;
        writes++;
        order.push_back(0);
      end
      if (wr) wr_age <= wr_age + 1;
      if (wr && wr_prev) check(d_o == wr_byte && d_oe, "d_o changed or released while wr high");
      if (!wr && wr_prev) begin
        check(wr_age >= 2, "wr pulse shorter than 2 clocks");
        check(d_oe, "d_oe low at the falling edge of wr");
        to_pc.push_back(d_o);
        tx_pre <= 3;
        wr_age <= 0;
      end
      wr_prev <= wr;
      // the PC drains its side now and then
      if (drain_en && to_pc.size() != 0 && tx_pre == 0 && !wr && $urandom_range(0, 3) == 0)
        got_pc.push_back(to_pc.pop_front());
    end
  end

  always @(posedge clk) if (!rst && rx_valid) got_rx.push_back(rx_data);

  // ---------------- stimulus ----------------
  bit rx_rand = 0, tx_rand = 0, rx_always = 0;
  logic [7:0] tx_src[$];

  always @(posedge clk) begin
    if (rst) begin rx_ready <= 0; tx_valid <= 0; tx_data <= 0; end
    else begin
      rx_ready <= rx_always || (rx_rand && $urandom_range(0, 9) < 7);
      // one byte offered at a time; it stays until taken
      if (tx_valid && tx_ready) tx_valid <= 0;
      else if (!tx_valid && tx_src.size() != 0 && (!tx_rand || $urandom_range(0, 3) != 0)) begin
        tx_valid <= 1;
        tx_data  <= tx_src.pop_front();
      end
    end
  end

  logic [7:0] exp_rx[$], exp_pc[$];

  task automatic pc_sends(input int n, input int seed);
    for (int i = 0; i < n; i++) begin
      logic [7:0] b = 8'(seed + 37 * i);
      from_pc.push_back(b);
      exp_rx.push_back(b);
    end
  endtask

  task automatic fpga_sends(input int n, input logic [7:0] seed);
    for (int i = 0; i < n; i++) begin
      logic [7:0] b = seed ^ 8'(29 * i);
      tx_src.push_back(b);
      exp_pc.push_back(b);
    end
  endtask

  task automatic wait_done(input int limit);
    int t = 0;
    while ((got_rx.size() < exp_rx.size() || got_pc.size() < exp_pc.size()) && t < limit) begin
      @(posedge clk);
      t++;
    end
    repeat (20) @(posedge clk);
  endtask

  task automatic compare(input string what);
    check(got_rx.size() == exp_rx.size(), $sformatf("%s: %0d bytes read, %0d sent by the PC", what, got_rx.size(), exp_rx.size()));
    for (int i = 0; i < exp_rx.size() && i < got_rx.size(); i++)
      check(got_rx[i] == exp_rx[i], $sformatf("%s: byte %0d from the PC %h, expected %h", what, i, got_rx[i], exp_rx[i]));
    check(got_pc.size() == exp_pc.size(), $sformatf("%s: %0d bytes reached the PC, %0d offered", what, got_pc.size(), exp_pc.size()));
    for (int i = 0; i < exp_pc.size() && i < got_pc.size(); i++)
      check(got_pc[i] == exp_pc[i], $sformatf("%s: byte %0d to the PC %h, expected %h", what, i, got_pc[i], exp_pc[i]));
    got_rx.delete(); exp_rx.delete(); got_pc.delete(); exp_pc.delete();
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (10) @(posedge clk);
    // nothing moves while the bridge is empty and the user offers nothing
    check(rd_n && !wr && !d_oe, "bus idle after reset");

    // phase 1: PC to FPGA, rx_ready at random
    rx_rand = 1;
    pc_sends(40, 11);
    wait_done(20_000);
    compare("PC to FPGA");
    rx_rand = 0;

    // phase 2: FPGA to PC, tx_valid at random, PC drains slowly
    tx_rand = 1;
    fpga_sends(40, 8'h5A);
    wait_done(20_000);
    compare("FPGA to PC");

    // a byte stays offered while the bridge is full
    drain_en = 0;
    fpga_sends(6, 8'hC3);
    repeat (400) @(posedge clk);
    check(to_pc.size() == 4 && tx_valid && !tx_ready, "waits while the bridge reports full");
    drain_en = 1;
    wait_done(5_000);
    compare("after a full bridge");

    // phase 3: both directions, both sides always ready: accesses alternate
    tx_rand = 0;
    rx_always = 1;
    order.delete();
    pc_sends(60, 3);
    fpga_sends(60, 8'h81);
    wait_done(40_000);
    compare("both directions");
    begin
      int alt;
      alt = 0;
      for (int i = 1; i < 40 && i < order.size(); i++) if (order[i] != order[i - 1]) alt++;
      check(alt >= 30, $sformatf("reads and writes take turns (%0d changes in 40 accesses)", alt));
    end
    $display("reads %0d, writes %0d", reads, writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
