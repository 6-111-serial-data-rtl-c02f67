// i2c_multi_master_tb: two i2c_master instances (QUARTER 10) and one
// i2c_slave register device (address 0x42, stretching SCL 20 clocks after each
// ACK) on one wired-AND bus. Both masters start a write at nearly the same
// time. On SDA, 0 wins: the master that sends a 1 while the bus reads 0 must
// pulse arb_lost, let go of both lines and send nothing more. The other master
// must finish its write as if it had been alone. Before a master counts SCL
// as high it waits to see it high, so two masters started a few clocks apart
// line up on the slower one's SCL edges. That is the I2C clock
// synchronisation. It is checked directly: after its START, each time one
// master pulls SCL low, the other must pull it low on the same clock, as long
// as both are still sending.
// Cases, each followed by checks of which master lost, the winner's ACKs, and
// the slave's registers (the winner's byte written, the loser's not):
//   1. same start clock, same address, registers 3 and 5: master B loses in
//      the pointer byte;
//   2. master A starts 5 clocks ahead, registers 7 and 6: A loses at the last
//      pointer bit;
//   3. master B starts 7 clocks ahead, addresses 0x42 and 0x43: B loses in the
//      address byte, and A goes on to write.
// A bus monitor also checks that SDA changes only while SCL is low, except in
// the START and STOP of the winner.
module i2c_multi_master_tb;
  import serial_pkg::*;
  localparam int Q = 10;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  i2c_cmd_e   cmd[2];
  logic [7:0] wdata[2], rdata[2];
  logic       cmd_valid[2], cmd_ready[2], ack_in[2], done[2], arb_lost[2];
  logic       scl_low[2], sda_low[2];
  logic       s_scl_low, s_sda_low;
  logic [15:0][7:0] regs;
  wire scl = !(scl_low[0] || scl_low[1] || s_scl_low);
  wire sda = !(sda_low[0] || sda_low[1] || s_sda_low);

  for (genvar i = 0; i < 2; i++) begin : g_m
    i2c_master #(.QUARTER(Q)) m (
      .clk, .rst, .cmd(cmd[i]), .cmd_valid(cmd_valid[i]), .cmd_ready(cmd_ready[i]),
      .wdata(wdata[i]), .ack_out(1'b1), .rdata(rdata[i]), .ack_in(ack_in[i]),
      .done(done[i]), .arb_lost(arb_lost[i]), .scl_i(scl), .sda_i(sda),
      .scl_low(scl_low[i]), .sda_low(sda_low[i]));
  end
  i2c_slave #(.ADDR(7'h42), .STRETCH(20)) slave (
    .clk, .rst, .scl_i(scl), .sda_i(sda), .scl_low(s_scl_low), .sda_low(s_sda_low), .regs);

  initial begin
    #5_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // bus monitor: SDA may change while SCL is high only as START or STOP
  logic scl_p = 1, sda_p = 1;
  int n_start = 0, n_stop = 0, n_arb[2] = '{0, 0};
  always @(posedge clk) if (!rst) begin
    if (scl && scl_p && sda_p && !sda) n_start++;
    if (scl && scl_p && !sda_p && sda) n_stop++;
    for (int i = 0; i < 2; i++) if (arb_lost[i]) n_arb[i]++;
    scl_p <= scl;
    sda_p <= sda;
  end

  // clock synchronisation: after START, pull-downs of SCL coincide
  bit in_contest = 0;
  bit gone[2];
  logic scl_low_p[2];
  int pl[2], sync_ok = 0, sync_bad = 0;
  always @(posedge clk) begin
    bit r0, r1;
    r0 = scl_low[0] && !scl_low_p[0];
    r1 = scl_low[1] && !scl_low_p[1];
    if (in_contest) begin
      for (int i = 0; i < 2; i++) if (arb_lost[i]) gone[i] = 1;
      if (((r0 && pl[0] >= 1) || (r1 && pl[1] >= 1)) && pl[0] >= 1 && pl[1] >= 1 && !gone[0] && !gone[1]) begin
        if (r0 && r1) sync_ok++;
        else sync_bad++;
      end
      pl[0] += int'(r0);
      pl[1] += int'(r1);
    end
    scl_low_p = scl_low;
  end

  // one master's transaction: START, the bytes, STOP; it stops at arb_lost
  bit   lost[2];
  logic acks[2][$];
  task automatic transact(input int i, input int delay, input logic [7:0] bytes[3]);
    lost[i] = 0;
    acks[i].delete();
    repeat (delay) @(posedge clk);
    for (int k = 0; k < 5 && !lost[i]; k++) begin
      i2c_cmd_e c;
      c = (k == 0) ? I2C_START : (k == 4) ? I2C_STOP : I2C_WRITE;
      while (!cmd_ready[i]) @(posedge clk);
      cmd[i] <= c;
      wdata[i] <= (k >= 1 && k <= 3) ? bytes[k - 1] : 8'h00;
      cmd_valid[i] <= 1;
      @(posedge clk);
      cmd_valid[i] <= 0;
      while (!done[i] && !arb_lost[i]) @(posedge clk);
      if (arb_lost[i]) lost[i] = 1;
      else if (c == I2C_WRITE) acks[i].push_back(ack_in[i]);
      @(posedge clk);
    end
  endtask

  task automatic contest(input string name, input int da, input int db,
                         input logic [7:0] a_bytes[3], input logic [7:0] b_bytes[3],
                         input int loser);
    int winner, a0, b0, s0, p0;
    logic [15:0][7:0] regs0;
    winner = 1 - loser;
    regs0 = regs;
    a0 = n_arb[0]; b0 = n_arb[1]; s0 = n_start; p0 = n_stop;
    pl = '{0, 0};
    gone = '{0, 0};
    sync_ok = 0;
    sync_bad = 0;
    in_contest = 1;
    fork
      transact(0, da, a_bytes);
      transact(1, db, b_bytes);
    join
    in_contest = 0;
    repeat (10 * Q) @(posedge clk);
    check(sync_bad == 0 && sync_ok >= 5,
          $sformatf("%s: SCL pull-downs %0d together, %0d apart", name, sync_ok, sync_bad));
    check(lost[loser] && !lost[winner], $sformatf("%s: master %0d should lose, lost = %b %b", name, loser, lost[0], lost[1]));
    check(n_arb[loser] - (loser == 1 ? b0 : a0) == 1 && n_arb[winner] == (winner == 1 ? b0 : a0),
          $sformatf("%s: arb_lost pulses %0d %0d", name, n_arb[0] - a0, n_arb[1] - b0));
    check(acks[winner].size() == 3, $sformatf("%s: winner sent %0d bytes", name, acks[winner].size()));
    for (int k = 0; k < acks[winner].size(); k++)
      check(acks[winner][k] == 1'b0, $sformatf("%s: winner's byte %0d not acknowledged", name, k));
    begin
      logic [7:0] wb[3];
      wb = (winner == 1) ? b_bytes : a_bytes;
      for (int r = 0; r < 16; r++)
        if (r == int'(wb[1]))
          check(regs[r] == wb[2], $sformatf("%s: register %0d is %h, winner wrote %h", name, r, regs[r], wb[2]));
        else
          check(regs[r] == regs0[r], $sformatf("%s: register %0d changed to %h", name, r, regs[r]));
    end
    check(n_start - s0 == 1 && n_stop - p0 == 1,
          $sformatf("%s: %0d START and %0d STOP on the bus (SDA moved while SCL high?)", name, n_start - s0, n_stop - p0));
    check(scl && sda, $sformatf("%s: bus not released", name));
  endtask

  initial begin
    cmd = '{I2C_START, I2C_START};
    cmd_valid = '{0, 0};
    wdata = '{0, 0};
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (10) @(posedge clk);
    contest("same start",  0, 0, '{8'h84, 8'h03, 8'hAA}, '{8'h84, 8'h05, 8'h55}, 1);
    contest("A 5 ahead",   0, 5, '{8'h84, 8'h07, 8'h11}, '{8'h84, 8'h06, 8'h66}, 0);
    contest("B 7 ahead",   7, 0, '{8'h84, 8'h09, 8'h99}, '{8'h86, 8'h0A, 8'hEE}, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
