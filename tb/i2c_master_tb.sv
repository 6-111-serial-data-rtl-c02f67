// i2c_master_tb: runs i2c_master (QUARTER 10) on a wired-AND bus with an
// i2c_slave register device (address 0x42, clock stretching of 50 cycles) and
// a bus monitor written in the testbench. The monitor decodes START, STOP and
// every 9-bit byte+ACK from the line levels alone. Checks: register write
// (pointer then two data bytes), read-back through a repeated START with ACK
// then NACK, NACK from a wrong address, every byte and ACK the monitor saw,
// START/STOP counts (an SDA change while SCL is high would add spurious ones),
// the START command length of 4*QUARTER, a byte length of at least
// 36*QUARTER, that SCL was stretched, and arbitration loss when the testbench
// pulls SDA low while the master sends a 1.
module i2c_master_tb;
  import serial_pkg::*;
  localparam int Q = 10;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  i2c_cmd_e cmd = I2C_START;
  logic cmd_valid = 0, cmd_ready, ack_out = 0, ack_in, done, arb_lost;
  logic [7:0] wdata = 0, rdata;
  logic m_scl_low, m_sda_low, s_scl_low, s_sda_low, tb_sda_low = 0;
  logic [15:0][7:0] regs;
  wire scl = !(m_scl_low || s_scl_low);
  wire sda = !(m_sda_low || s_sda_low || tb_sda_low);

  i2c_master #(.QUARTER(Q)) dut (
    .clk, .rst, .cmd, .cmd_valid, .cmd_ready, .wdata, .ack_out, .rdata, .ack_in, .done,
    .arb_lost, .scl_i(scl), .sda_i(sda), .scl_low(m_scl_low), .sda_low(m_sda_low));
  i2c_slave #(.ADDR(7'h42), .STRETCH(50)) slave (
    .clk, .rst, .scl_i(scl), .sda_i(sda), .scl_low(s_scl_low), .sda_low(s_sda_low), .regs);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- bus monitor ----
  logic scl_p = 1, sda_p = 1;
  int nstart = 0, nstop = 0, nbit = 0, nstretch = 0, narb = 0;
  logic [8:0] sh;
  logic [8:0] log_q[$];
  always @(posedge clk) begin
    if (!rst) begin
      if (scl && scl_p && sda_p && !sda) begin nstart++; nbit = 0; end
      if (scl && scl_p && !sda_p && sda) nstop++;
      if (scl && !scl_p) begin
        sh = {sh[7:0], sda}; nbit++;
        if (nbit == 9) begin log_q.push_back(sh); nbit = 0; end
      end
      if (!m_scl_low && s_scl_low) nstretch++;
      if (arb_lost) narb++;
    end
    scl_p = scl; sda_p = sda;
  end

  int t_cmd;
  task automatic do_cmd(input i2c_cmd_e c, input logic [7:0] d, input logic ao);
    while (!cmd_ready) @(posedge clk);
    cmd <= c; wdata <= d; ack_out <= ao; cmd_valid <= 1;
    @(posedge clk);
    cmd_valid <= 0;
    t_cmd = 0;
    while (!done && !arb_lost) begin @(posedge clk); t_cmd++; end
    @(posedge clk);
  endtask

  task automatic expect_log(input logic [7:0] b, input logic a);
    logic [8:0] e;
    checks++;
    if (log_q.size() == 0) begin failures++; $display("monitor saw no byte, expected %h", b); end
    else begin
      e = log_q.pop_front();
      if (e !== {b, a}) begin failures++; $display("monitor saw %h/%b, expected %h/%b", e[8:1], e[0], b, a); end
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (20) @(posedge clk);
    // write 0xA5, 0x5A to registers 3 and 4
    do_cmd(I2C_START, 0, 0);
    checks++; if (t_cmd < 4 * Q || t_cmd > 4 * Q + 3) begin failures++; $display("START took %0d", t_cmd); end
    do_cmd(I2C_WRITE, 8'h84, 0);
    checks++; if (ack_in !== 0) begin failures++; $display("no ACK for address"); end
    checks++; if (t_cmd < 36 * Q) begin failures++; $display("byte took %0d", t_cmd); end
    do_cmd(I2C_WRITE, 8'h03, 0);
    do_cmd(I2C_WRITE, 8'hA5, 0);
    do_cmd(I2C_WRITE, 8'h5A, 0);
    checks++; if (ack_in !== 0) begin failures++; $display("no ACK for data"); end
    do_cmd(I2C_STOP, 0, 0);
    repeat (10) @(posedge clk);
    checks++; if (regs[3] !== 8'hA5 || regs[4] !== 8'h5A) begin failures++; $display("regs %h %h", regs[3], regs[4]); end
    expect_log(8'h84, 0); expect_log(8'h03, 0); expect_log(8'hA5, 0); expect_log(8'h5A, 0);
    // read them back: pointer write, repeated start, read with ACK then NACK
    do_cmd(I2C_START, 0, 0);
    do_cmd(I2C_WRITE, 8'h84, 0);
    do_cmd(I2C_WRITE, 8'h03, 0);
    do_cmd(I2C_START, 0, 0);
    do_cmd(I2C_WRITE, 8'h85, 0);
    checks++; if (ack_in !== 0) begin failures++; $display("no ACK for read address"); end
    do_cmd(I2C_READ, 0, 0);
    checks++; if (rdata !== 8'hA5) begin failures++; $display("read %h", rdata); end
    do_cmd(I2C_READ, 0, 1);
    checks++; if (rdata !== 8'h5A) begin failures++; $display("read %h", rdata); end
    do_cmd(I2C_STOP, 0, 0);
    expect_log(8'h84, 0); expect_log(8'h03, 0); expect_log(8'h85, 0); expect_log(8'hA5, 0); expect_log(8'h5A, 1);
    // wrong address: NACK
    do_cmd(I2C_START, 0, 0);
    do_cmd(I2C_WRITE, 8'h44, 0);
    checks++; if (ack_in !== 1) begin failures++; $display("ACK for wrong address"); end
    do_cmd(I2C_STOP, 0, 0);
    expect_log(8'h44, 1);
    checks++; if (nstart != 4 || nstop != 3) begin failures++; $display("%0d starts, %0d stops", nstart, nstop); end
    checks++; if (nstretch == 0) begin failures++; $display("SCL never stretched"); end
    // arbitration: another device pulls SDA low while the master sends 1s
    do_cmd(I2C_START, 0, 0);
    fork
      do_cmd(I2C_WRITE, 8'hFF, 0);
      begin
        while (!(!scl && m_scl_low)) @(posedge clk);
        repeat (Q * 6) @(posedge clk);     // inside the second bit
        tb_sda_low <= 1;
      end
    join
    checks++; if (narb != 1) begin failures++; $display("arbitration loss seen %0d times", narb); end
    repeat (3) @(posedge clk);
    checks++; if (m_scl_low || m_sda_low || !cmd_ready) begin failures++; $display("master did not let go"); end
    tb_sda_low <= 0;
    repeat (100) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
