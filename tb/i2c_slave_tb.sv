// i2c_slave_tb: a bit-banged I2C master in the testbench talks to i2c_slave
// (address 0x42, 16 registers, STRETCH 60). Each SCL phase is 20 clocks and
// the master waits for SCL to go high after releasing it. Checks: ACK for the
// slave's address and NACK for another, random writes to several registers
// through the pointer with auto-increment, the register outputs, reads from
// a set pointer with repeated START (ACK continues, NACK ends), that a bus
// transfer to another address leaves the registers alone, and that the slave
// stretched SCL after its ACK bits.
module i2c_slave_tb;
  localparam int P = 20;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic m_scl_low = 0, m_sda_low = 0, s_scl_low, s_sda_low;
  logic [15:0][7:0] regs;
  wire scl = !(m_scl_low || s_scl_low);
  wire sda = !(m_sda_low || s_sda_low);
  i2c_slave #(.ADDR(7'h42), .NUM_REGS(16), .STRETCH(60)) dut (
    .clk, .rst, .scl_i(scl), .sda_i(sda), .scl_low(s_scl_low), .sda_low(s_sda_low), .regs);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nstretch = 0;
  always @(posedge clk) if (!rst && !m_scl_low && s_scl_low) nstretch++;

  task automatic scl_high();
    m_scl_low <= 0;
    @(posedge clk);
    while (!scl) @(posedge clk);
    repeat (P) @(posedge clk);
  endtask
  task automatic i2c_start();      // from idle or after a bit (SCL low)
    m_sda_low <= 0; repeat (P) @(posedge clk);
    scl_high();
    m_sda_low <= 1; repeat (P) @(posedge clk);
    m_scl_low <= 1; repeat (P) @(posedge clk);
  endtask
  task automatic i2c_stop();
    m_sda_low <= 1; repeat (P) @(posedge clk);
    scl_high();
    m_sda_low <= 0; repeat (P) @(posedge clk);
  endtask
  task automatic put_bit(input logic b, output logic r);
    m_sda_low <= !b; repeat (P) @(posedge clk);
    scl_high();
    r = sda;
    m_scl_low <= 1; repeat (2) @(posedge clk);
  endtask
  task automatic wr(input logic [7:0] b, output logic ack);
    logic r;
    for (int i = 7; i >= 0; i--) put_bit(b[i], r);
    put_bit(1'b1, ack);          // release SDA, read ACK (0 = acknowledged)
  endtask
  task automatic rd(input logic ack, output logic [7:0] b);
    logic r;
    for (int i = 7; i >= 0; i--) begin put_bit(1'b1, r); b[i] = r; end
    put_bit(ack, r);
  endtask

  logic [7:0] model [16];
  initial begin
    logic a; logic [7:0] b; int p, n;
    repeat (4) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 16; i++) model[i] = 0;
    repeat (20) @(posedge clk);
    for (int t = 0; t < 6; t++) begin
      p = $urandom_range(0, 15); n = $urandom_range(1, 4);
      i2c_start();
      wr(8'h84, a); checks++; if (a) begin failures++; $display("no ACK for address"); end
      wr(8'(p), a); checks++; if (a) begin failures++; $display("no ACK for pointer"); end
      for (int k = 0; k < n; k++) begin
        b = 8'($urandom);
        model[(p + k) % 16] = b;
        wr(b, a); checks++; if (a) begin failures++; $display("no ACK for data"); end
      end
      i2c_stop();
      repeat (5) @(posedge clk);
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (regs[i] !== model[i]) begin failures++; $display("reg %0d = %h, expected %h", i, regs[i], model[i]); end
      end
    end
    // other address: NACK and nothing written
    i2c_start();
    wr(8'h90, a); checks++; if (!a) begin failures++; $display("ACK for address 0x48"); end
    wr(8'h00, a); wr(8'hEE, a);
    i2c_stop();
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (regs[i] !== model[i]) begin failures++; $display("reg %0d changed by foreign write", i); end
    end
    // reads
    for (int t = 0; t < 4; t++) begin
      p = $urandom_range(0, 15); n = $urandom_range(1, 4);
      i2c_start();
      wr(8'h84, a); wr(8'(p), a);
      i2c_start();
      wr(8'h85, a); checks++; if (a) begin failures++; $display("no ACK for read address"); end
      for (int k = 0; k < n; k++) begin
        rd(k == n - 1, b);
        checks++;
        if (b !== model[(p + k) % 16]) begin failures++; $display("read reg %0d = %h, expected %h", (p + k) % 16, b, model[(p + k) % 16]); end
      end
      i2c_stop();
    end
    checks++; if (nstretch < 60) begin failures++; $display("SCL stretched for %0d cycles", nstretch); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
