// serial_demo_top_tb: end-to-end test of serial_demo_top at shortened timing (UART 8-E-1 with 4-clock ticks, SPI half period 4, I2C quarter 10 with a stretching slave, IR sample 20 clocks, DMX 8-clock bits and 16 channels).
// Drives every link of serial_demo_top through its external pins and checks
// the results with models and decoders of its own:
//  * UART: bytes sent by the transmitter are looped back into the receiver and
//    must arrive unchanged, one frame time apart; injected frames with a 0 stop
//    bit must raise frame_err and frames with a wrong parity bit parity_err.
//  * SPI: words are exchanged with the on-chip slave (select 0) in all four
//    modes, and with a slave model on select 1 that answers on spi_miso_ext.
//  * I2C: register write, read-back through a repeated START, NACK from a
//    wrong address (the slave stretches SCL after every ACK), and arbitration loss when the testbench pulls
//    SDA low while the master sends a 1.
//  * IR: pulse-width coded frames must decode; a frame with a short start
//    pulse must not.
//  * DMX512: packets on dmx_out are decoded (break, MAB, start code, channel
//    frames sampled in the middle of each bit) and compared with the levels
//    written into the channel RAM; break, MAB and the marks between frames
//    are timed.
//  * USB: a model of the FIFO bridge sends bytes from the PC; the testbench
//    echoes every byte it receives back through the transmit side, and the
//    bytes must reach the PC again in order. The model flags any read or
//    write the bridge's flags do not allow.
// Each mechanism is counted and one that never happened is a failure.
module serial_demo_top_tb;
  import serial_pkg::*;
  // timing of the instance below, in clocks
  localparam int UBIT   = 64;       // UART bit
  localparam bit UPAR   = 1;       // even parity in use
  localparam int SHALF  = 4;
  localparam int IQ     = 10;         // I2C quarter
  localparam bit ISTR   = 1;       // slave stretches SCL
  localparam int IRS    = 20;        // IR sample period
  localparam int DBIT   = 8, DBRK = 40, DMARK = 12, DCH = 16;
  localparam int REPS   = 6;
  localparam int DAW    = $clog2(DCH);

  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // ---------------- pins ----------------
  logic [7:0] uart_tx_data = 0, uart_rx_data;
  logic uart_tx_valid = 0, uart_tx_ready, uart_txd, uart_rx_valid, uart_rx_frame_err, uart_rx_parity_err;
  logic inj_en = 0, inj = 1;
  wire  uart_rxd = inj_en ? inj : uart_txd;
  logic spi_start = 0, spi_cpol = 0, spi_cpha = 0, spi_busy, spi_done, spi_sclk, spi_mosi, spi_miso_ext = 0, spis_rx_valid;
  logic [1:0] spi_ss_sel = 0;
  logic [7:0] spi_tx_data = 0, spi_rx_data, spis_tx_data = 0, spis_rx_data;
  logic [2:0] spi_ss_n;
  i2c_cmd_e i2c_cmd = I2C_START;
  logic i2c_cmd_valid = 0, i2c_cmd_ready, i2c_ack_out = 0, i2c_ack_in, i2c_done, i2c_arb_lost;
  logic [7:0] i2c_wdata = 0, i2c_rdata;
  logic i2c_scl_ext_low = 0, i2c_sda_ext_low = 0, i2c_scl, i2c_sda;
  logic [15:0][7:0] i2c_regs;
  logic ir_in = 0, ir_valid, ir_start;
  logic [6:0] ir_command; logic [4:0] ir_address;
  logic dmx_enable = 0, dmx_wr_en = 0, dmx_out, dmx_packet_done;
  logic [DAW-1:0] dmx_wr_addr = 0;
  logic [7:0] dmx_wr_data = 0;
  logic [7:0] usb_d_i, usb_d_o, usb_rx_data, usb_tx_data = 0;
  logic usb_d_oe, usb_rxf_n, usb_txe_n, usb_rd_n, usb_wr, usb_rx_valid, usb_rx_ready = 0;
  logic usb_tx_valid = 0, usb_tx_ready;

  serial_demo_top #(.UART_BAUD(421875), .UART_PARITY(PARITY_EVEN), .SPI_HALF(4), .SPI_SETUP(6), .I2C_QUARTER(10), .I2C_STRETCH(50), .IR_SAMPLE(20), .DMX_BIT(8), .DMX_BREAK(40), .DMX_MARK(12), .DMX_CHANNELS(16)) dut (.*);

  // ---------------- watchdog ----------------
  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc++;

  // mechanism counters
  int n_uart_byte = 0, n_uart_ferr = 0, n_uart_perr = 0;
  int n_spi_onchip = 0, n_spi_ext = 0, n_spi_modes = 0;
  int n_i2c_write = 0, n_i2c_read = 0, n_i2c_nack = 0, n_i2c_stretch = 0, n_i2c_arb = 0;
  int n_ir_frame = 0, n_ir_reject = 0;
  int n_dmx_packet = 0;
  int n_usb_in = 0, n_usb_out = 0;

  // ================= UART =================
  logic [7:0] urx_q[$];
  int urx_t[$];
  int uferr = 0, uperr = 0;
  always @(posedge clk) if (!rst) begin
    if (uart_rx_valid) begin urx_q.push_back(uart_rx_data); urx_t.push_back(cyc); end
    if (uart_rx_frame_err) uferr++;
    if (uart_rx_parity_err) uperr++;
  end

  task automatic inject_frame(input logic [7:0] b, input logic parbit, input logic stopv);
    inj_en <= 1; inj <= 1; repeat (UBIT) @(posedge clk);
    inj <= 0; repeat (UBIT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin inj <= b[i]; repeat (UBIT) @(posedge clk); end
    if (UPAR) begin inj <= parbit; repeat (UBIT) @(posedge clk); end
    inj <= stopv; repeat (UBIT) @(posedge clk);
    inj <= 1; repeat (3 * UBIT) @(posedge clk);
    inj_en <= 0;
  endtask

  task automatic uart_test();
    logic [7:0] sent[$];
    int fbits, e0, p0;
    fbits = UPAR ? 11 : 10;
    for (int k = 0; k < REPS + 1; k++) begin
      logic [7:0] b;
      b = 8'($urandom);
      while (!uart_tx_ready) @(posedge clk);
      uart_tx_data <= b; uart_tx_valid <= 1; @(posedge clk); uart_tx_valid <= 0;
      sent.push_back(b);
      @(posedge clk);
    end
    while (!uart_tx_ready) @(posedge clk);
    repeat (2 * UBIT) @(posedge clk);
    checks++;
    if (urx_q.size() != sent.size()) begin failures++; $display("UART: %0d bytes received, %0d sent", urx_q.size(), sent.size()); end
    for (int k = 0; k < sent.size() && k < urx_q.size(); k++) begin
      checks++;
      if (urx_q[k] !== sent[k]) begin failures++; $display("UART: byte %0d is %h, sent %h", k, urx_q[k], sent[k]); end
      else n_uart_byte++;
      if (k > 0) begin
        checks++;
        if (urx_t[k] - urx_t[k-1] < fbits * UBIT - 4 || urx_t[k] - urx_t[k-1] > fbits * UBIT + 4) begin
          failures++; $display("UART: bytes %0d cycles apart, frame is %0d", urx_t[k] - urx_t[k-1], fbits * UBIT);
        end
      end
    end
    urx_q.delete(); urx_t.delete();
    e0 = uferr; p0 = uperr;
    inject_frame(8'h5A, 1'b0, 1'b0);
    checks++;
    if (uferr != e0 + 1 || urx_q.size() != 0) begin failures++; $display("UART: bad stop bit not flagged"); end
    else n_uart_ferr++;
    if (UPAR) begin
      inject_frame(8'h5B, 1'b0, 1'b1);        // 5 ones: even parity bit should be 1
      checks++;
      if (uperr != p0 + 1 || urx_q.size() != 0) begin failures++; $display("UART: bad parity not flagged"); end
      else n_uart_perr++;
      inject_frame(8'h5B, 1'b1, 1'b1);
      checks++;
      if (urx_q.size() != 1 || urx_q[0] !== 8'h5B) begin failures++; $display("UART: good injected frame lost"); end
    end
  endtask

  // ================= SPI =================
  // slave model on select 1: mode taken from spi_cpol/spi_cpha
  logic [7:0] xs_tx, xs_rx, xs_out;
  logic xs_sclk_p = 0, xs_sel_p = 0;
  always @(posedge clk) begin
    logic sel;
    sel = !spi_ss_n[1];
    if (sel && !xs_sel_p) begin
      xs_out = xs_tx;
      if (!spi_cpha) begin spi_miso_ext = xs_out[7]; xs_out = xs_out << 1; end
    end
    if (sel && spi_sclk != xs_sclk_p) begin
      if ((spi_sclk != spi_cpol) ^ spi_cpha) xs_rx = {xs_rx[6:0], spi_mosi};
      else begin spi_miso_ext = xs_out[7]; xs_out = xs_out << 1; end
    end
    xs_sclk_p = spi_sclk; xs_sel_p = sel;
  end

  task automatic spi_xfer(input int sel, input int mode);
    int t0;
    spi_cpol <= mode[1]; spi_cpha <= mode[0];
    repeat (4) @(posedge clk);
    spi_tx_data <= 8'($urandom); spis_tx_data <= 8'($urandom); xs_tx = 8'($urandom);
    spi_ss_sel <= 2'(sel);
    @(posedge clk);
    spi_start <= 1; @(posedge clk); spi_start <= 0;
    t0 = cyc;
    while (!spi_done) @(posedge clk);
    checks++;
    if (cyc - t0 != 1 + 6 + 17 * SHALF) begin failures++; $display("SPI: transfer took %0d cycles", cyc - t0); end
    @(posedge clk);
    checks++;
    if (sel == 0) begin
      if (spi_rx_data !== spis_tx_data || spis_rx_data !== spi_tx_data) begin
        failures++; $display("SPI mode %0d: master got %h (slave sent %h), slave got %h (master sent %h)",
                             mode, spi_rx_data, spis_tx_data, spis_rx_data, spi_tx_data);
      end else n_spi_onchip++;
    end else begin
      if (spi_rx_data !== xs_tx || xs_rx !== spi_tx_data) begin
        failures++; $display("SPI ext mode %0d: master got %h (sent %h), model got %h (sent %h)", mode, spi_rx_data, xs_tx, xs_rx, spi_tx_data);
      end else n_spi_ext++;
    end
  endtask

  task automatic spi_test();
    for (int m = 0; m < 4; m++) begin
      int n_prev;
      n_prev = n_spi_onchip;
      spi_xfer(0, m);
      spi_xfer(1, m);
      if (n_spi_onchip > n_prev) n_spi_modes++;
    end
  endtask

  // ================= I2C =================
  int scl_low_run = 0;
  always @(posedge clk) if (!rst) begin
    if (!i2c_scl) scl_low_run++;
    else begin
      if (scl_low_run > 2 * IQ + 8) n_i2c_stretch++;
      scl_low_run = 0;
    end
  end

  task automatic i2c_do(input i2c_cmd_e c, input logic [7:0] d, input logic ao);
    while (!i2c_cmd_ready) @(posedge clk);
    i2c_cmd <= c; i2c_wdata <= d; i2c_ack_out <= ao; i2c_cmd_valid <= 1;
    @(posedge clk);
    i2c_cmd_valid <= 0;
    while (!i2c_done && !i2c_arb_lost) @(posedge clk);
    @(posedge clk);
  endtask

  task automatic i2c_test();
    logic [7:0] v [4];
    int p;
    for (int k = 0; k < 4; k++) v[k] = 8'($urandom);
    p = $urandom_range(0, 12);
    i2c_do(I2C_START, 0, 0);
    i2c_do(I2C_WRITE, 8'h84, 0);
    checks++; if (i2c_ack_in !== 0) begin failures++; $display("I2C: address not acknowledged"); end
    i2c_do(I2C_WRITE, 8'(p), 0);
    for (int k = 0; k < 4; k++) i2c_do(I2C_WRITE, v[k], 0);
    i2c_do(I2C_STOP, 0, 0);
    repeat (10) @(posedge clk);
    checks++;
    if (i2c_regs[p] !== v[0] || i2c_regs[p+1] !== v[1] || i2c_regs[p+2] !== v[2] || i2c_regs[p+3] !== v[3]) begin
      failures++; $display("I2C: registers %h %h %h %h after write", i2c_regs[p], i2c_regs[p+1], i2c_regs[p+2], i2c_regs[p+3]);
    end else n_i2c_write++;
    i2c_do(I2C_START, 0, 0);
    i2c_do(I2C_WRITE, 8'h84, 0);
    i2c_do(I2C_WRITE, 8'(p), 0);
    i2c_do(I2C_START, 0, 0);
    i2c_do(I2C_WRITE, 8'h85, 0);
    begin
      logic ok;
      ok = 1;
      for (int k = 0; k < 4; k++) begin
        i2c_do(I2C_READ, 0, k == 3);
        if (i2c_rdata !== v[k]) begin ok = 0; $display("I2C: read %h, expected %h", i2c_rdata, v[k]); end
      end
      checks++;
      if (!ok) failures++; else n_i2c_read++;
    end
    i2c_do(I2C_STOP, 0, 0);
    i2c_do(I2C_START, 0, 0);
    i2c_do(I2C_WRITE, 8'hA0, 0);
    checks++; if (i2c_ack_in !== 1) begin failures++; $display("I2C: wrong address acknowledged"); end
    else n_i2c_nack++;
    i2c_do(I2C_STOP, 0, 0);
    // arbitration: another master on the bus drives a 0 in the second bit
    i2c_do(I2C_START, 0, 0);
    fork
      i2c_do(I2C_WRITE, 8'hFF, 0);
      begin
        while (i2c_scl) @(posedge clk);
        repeat (IQ * 6) @(posedge clk);
        i2c_sda_ext_low <= 1;
      end
    join
    checks++;
    if (i2c_cmd_ready !== 1 || i2c_scl !== 1) begin failures++; $display("I2C: master kept the bus after losing"); end
    else n_i2c_arb++;
    repeat (4 * IQ) @(posedge clk);
    i2c_sda_ext_low <= 0;        // rising SDA with SCL high: a STOP for the slave
    repeat (4 * IQ) @(posedge clk);
  endtask

  // ================= IR =================
  task automatic ir_pulse(input int hi, input int lo);
    ir_in <= 1; repeat (hi) @(posedge clk);
    ir_in <= 0; repeat (lo) @(posedge clk);
  endtask
  task automatic ir_test();
    localparam int U = 8 * IRS;  // 0.6 ms
    for (int k = 0; k < REPS; k++) begin
      logic [11:0] w; int nv;
      w = (k == 0) ? {5'h01, 7'h13} : 12'($urandom);
      ir_pulse(4 * U, U);
      for (int i = 0; i < 12; i++) ir_pulse(w[i] ? 2 * U : U, U);
      repeat (8) @(posedge clk);
      checks++;
      if (ir_command !== w[6:0] || ir_address !== w[11:7]) begin
        failures++; $display("IR: got %h/%h, sent %h/%h", ir_command, ir_address, w[6:0], w[11:7]);
      end else n_ir_frame++;
      repeat (4 * U) @(posedge clk);
    end
    begin
      int nv;
      nv = n_ir_valid;
      ir_pulse(2 * U, U);
      for (int i = 0; i < 12; i++) ir_pulse(U, U);
      repeat (4 * U) @(posedge clk);
      checks++;
      if (n_ir_valid != nv) begin failures++; $display("IR: frame with short start accepted"); end
      else n_ir_reject++;
    end
  endtask
  int n_ir_valid = 0;
  always @(posedge clk) if (!rst && ir_valid) n_ir_valid++;

  // ================= DMX512 =================
  logic [7:0] dmx_vals [DCH];
  task automatic dmx_test();
    for (int c = 0; c < DCH; c++) begin
      dmx_vals[c] = 8'($urandom);
      dmx_wr_en <= 1; dmx_wr_addr <= DAW'(c); dmx_wr_data <= dmx_vals[c];
      @(posedge clk);
    end
    dmx_wr_en <= 0;
    @(posedge clk);
    dmx_enable <= 1;
    for (int p = 0; p < 3; p++) begin
      int low, bad;
      logic [7:0] b;
      bad = 0;
      // break: a low run of at least DBRK clocks
      do begin
        while (dmx_out) @(posedge clk);
        low = 0;
        while (!dmx_out) begin @(posedge clk); low++; end
      end while (low < DBRK);
      checks++;
      if (low != DBRK) begin failures++; $display("DMX: break %0d clocks", low); end
      // start code and channels: wait for each start bit, sample bit middles
      for (int f = 0; f <= DCH; f++) begin
        int hi;
        hi = 0;
        while (dmx_out) begin @(posedge clk); hi++; end
        if (f == 0) begin
          checks++;
          if (hi != DMARK) begin failures++; $display("DMX: mark after break %0d clocks", hi); end
        end else if (hi < DMARK + DBIT / 2 - 3 || hi > DMARK + DBIT / 2 + 3) begin
          bad++; $display("DMX: mark before frame %0d is %0d clocks", f, hi);
        end
        repeat (DBIT / 2) @(posedge clk);
        for (int i = 0; i < 8; i++) begin repeat (DBIT) @(posedge clk); b[i] = dmx_out; end
        repeat (DBIT) @(posedge clk);
        if (!dmx_out) bad++;                 // first stop bit
        repeat (DBIT) @(posedge clk);
        if (!dmx_out) bad++;                 // second stop bit
        if (f == 0 && b !== 8'h00) begin bad++; $display("DMX: start code %h", b); end
        if (f > 0 && b !== dmx_vals[f-1]) begin bad++; if (bad < 4) $display("DMX: channel %0d is %h, expected %h", f, b, dmx_vals[f-1]); end
      end
      checks++;
      if (bad != 0) failures++; else n_dmx_packet++;
    end
    dmx_enable <= 0;
  endtask

  // ================= USB FIFO bridge =================
  // bridge model: data valid 2 clocks after usb_rd_n falls, flags inactive
  // for 3 clocks after each access, 4 bytes of room toward the PC, drained
  // every third clock
  logic [7:0] usb_from_pc[$], usb_to_pc[$], usb_at_pc[$], usb_echo[$];
  int  usb_rx_pre = 0, usb_tx_pre = 0, usb_rd_age = 0;
  bit  usb_rd_prev = 1, usb_wr_prev = 0, usb_bad = 0;
  assign usb_rxf_n = (usb_from_pc.size() == 0) || (usb_rx_pre != 0);
  assign usb_txe_n = (usb_to_pc.size() >= 4) || (usb_tx_pre != 0);
  assign usb_d_i   = (!usb_rd_n && usb_rd_age >= 2) ? usb_from_pc[0] : 8'hEE;
  always @(posedge clk) if (!rst) begin
    if (usb_rx_pre != 0) usb_rx_pre <= usb_rx_pre - 1;
    if (usb_tx_pre != 0) usb_tx_pre <= usb_tx_pre - 1;
    if (!usb_rd_n && usb_rd_prev && usb_rxf_n) begin usb_bad = 1; $display("USB: read while RXF# high"); end
    if (usb_wr && !usb_wr_prev && usb_txe_n) begin usb_bad = 1; $display("USB: write while TXE# high"); end
    if (usb_d_oe && !usb_rd_n) begin usb_bad = 1; $display("USB: bus driven during a read"); end
    usb_rd_age <= usb_rd_n ? 0 : usb_rd_age + 1;
    if (usb_rd_n && !usb_rd_prev) begin void'(usb_from_pc.pop_front()); usb_rx_pre <= 3; end
    if (!usb_wr && usb_wr_prev) begin usb_to_pc.push_back(usb_d_o); usb_tx_pre <= 3; end
    usb_rd_prev <= usb_rd_n;
    usb_wr_prev <= usb_wr;
    if (usb_to_pc.size() != 0 && usb_tx_pre == 0 && !usb_wr && cyc % 3 == 0)
      usb_at_pc.push_back(usb_to_pc.pop_front());
    // user side: echo every received byte
    if (usb_rx_valid) usb_echo.push_back(usb_rx_data);
    if (usb_tx_valid && usb_tx_ready) usb_tx_valid <= 0;
    else if (!usb_tx_valid && usb_echo.size() != 0) begin
      usb_tx_valid <= 1;
      usb_tx_data  <= usb_echo.pop_front();
    end
  end

  task automatic usb_test();
    logic [7:0] sent[$];
    int t;
    for (int i = 0; i < 8 * REPS; i++) begin
      sent.push_back(8'($urandom));
      usb_from_pc.push_back(sent[i]);
    end
    usb_rx_ready <= 1;
    t = 0;
    while (usb_at_pc.size() < sent.size() && t < 100_000) begin @(posedge clk); t++; end
    for (int i = 0; i < sent.size(); i++) begin
      checks++;
      if (i >= usb_at_pc.size() || usb_at_pc[i] !== sent[i]) begin
        failures++;
        $display("USB: echoed byte %0d missing or wrong", i);
      end else begin
        n_usb_in++;
        n_usb_out++;
      end
    end
    checks++;
    if (usb_bad) begin failures++; n_usb_in = 0; end
  endtask

  // ================= sequence =================
  initial begin
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (20) @(posedge clk);
    fork
      uart_test();
      spi_test();
      i2c_test();
      ir_test();
      dmx_test();
      usb_test();
    join
    // every mechanism must have happened
    checks++; if (n_uart_byte == 0)  begin failures++; $display("never: UART byte"); end
    checks++; if (n_uart_ferr == 0)  begin failures++; $display("never: UART frame error"); end
    if (UPAR) begin checks++; if (n_uart_perr == 0) begin failures++; $display("never: UART parity error"); end end
    checks++; if (n_spi_onchip == 0) begin failures++; $display("never: SPI on-chip transfer"); end
    checks++; if (n_spi_ext == 0)    begin failures++; $display("never: SPI external transfer"); end
    checks++; if (n_spi_modes != 4)  begin failures++; $display("SPI modes working: %0d", n_spi_modes); end
    checks++; if (n_i2c_write == 0)  begin failures++; $display("never: I2C write"); end
    checks++; if (n_i2c_read == 0)   begin failures++; $display("never: I2C read"); end
    checks++; if (n_i2c_nack == 0)   begin failures++; $display("never: I2C NACK"); end
    if (ISTR) begin checks++; if (n_i2c_stretch == 0) begin failures++; $display("never: I2C clock stretch"); end end
    checks++; if (n_i2c_arb == 0)    begin failures++; $display("never: I2C arbitration loss"); end
    checks++; if (n_ir_frame == 0)   begin failures++; $display("never: IR frame"); end
    checks++; if (n_ir_reject == 0)  begin failures++; $display("never: IR rejected start"); end
    checks++; if (n_dmx_packet == 0) begin failures++; $display("never: DMX packet"); end
    checks++; if (n_usb_in == 0)     begin failures++; $display("never: USB byte read from the bridge"); end
    checks++; if (n_usb_out == 0)    begin failures++; $display("never: USB byte written to the bridge"); end
    $display("mechanisms: uart_byte=%0d uart_frame_err=%0d uart_parity_err=%0d spi_onchip=%0d spi_ext=%0d spi_modes=%0d",
             n_uart_byte, n_uart_ferr, n_uart_perr, n_spi_onchip, n_spi_ext, n_spi_modes);
    $display("mechanisms: i2c_write=%0d i2c_read=%0d i2c_nack=%0d i2c_stretch=%0d i2c_arb_lost=%0d ir_frame=%0d ir_reject=%0d dmx_packet=%0d",
             n_i2c_write, n_i2c_read, n_i2c_nack, n_i2c_stretch, n_i2c_arb, n_ir_frame, n_ir_reject, n_dmx_packet);
    $display("mechanisms: usb_in=%0d usb_out=%0d", n_usb_in, n_usb_out);
    $display("simulated %0d clock cycles", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
