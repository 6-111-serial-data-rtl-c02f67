// dmx512_tx_tb: dmx512_tx with a dmx_channel_ram, at reduced timing (8-clock
// bits, 40-clock break, 12-clock MAB/MTBF/MTBP, 16 channels). The testbench
// builds the expected line waveform itself, cycle by cycle, from the packet
// rules (break low, MAB high, start code 0 framed as 0_00000000_11, then MTBF
// plus one 11-bit frame per channel, LSB first, then MTBP) and the values it
// wrote into the RAM, and compares it with dmx_out over two whole packets with
// different channel data. Also checks one request pulse per channel per
// packet, one packet_done per packet, and that the line stays at mark once
// 'enable' is low.
module dmx512_tx_tb;
  localparam int BITC = 8, BRK = 40, MARK = 12, NCH = 16;
  logic clk = 0, rst = 1, enable = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic dmx_out, req, pdone, wr_en = 0;
  logic [3:0] req_addr, wr_addr = 0;
  logic [7:0] chan, wr_data = 0;
  dmx_channel_ram #(.DEPTH(NCH)) ram (.clk, .wr_en, .wr_addr, .wr_data, .rd_en(req), .rd_addr(req_addr), .rd_data(chan));
  dmx512_tx #(.BIT_CYCLES(BITC), .BREAK_CYCLES(BRK), .MAB_CYCLES(MARK), .MTBF_CYCLES(MARK),
              .MTBP_CYCLES(MARK), .NUM_CHANNELS(NCH)) dut (
    .clk, .rst, .enable, .dmx_out, .request_pulse(req), .request_addr(req_addr),
    .chan_data(chan), .packet_done(pdone));

  int nreq = 0, ndone = 0;
  always @(posedge clk) if (!rst) begin
    if (req) nreq++;
    if (pdone) ndone++;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] vals [NCH];
  logic exp_q[$];
  task automatic add(input logic v, input int n);
    repeat (n) exp_q.push_back(v);
  endtask
  task automatic add_frame(input logic [7:0] d);
    add(0, BITC);
    for (int i = 0; i < 8; i++) add(d[i], BITC);
    add(1, 2 * BITC);
  endtask
  task automatic build_packet();
    add(0, BRK); add(1, MARK); add_frame(8'h00);
    for (int c = 0; c < NCH; c++) begin add(1, MARK); add_frame(vals[c]); end
    add(1, MARK);               // MTBP
  endtask
  task automatic pick();
    for (int c = 0; c < NCH; c++) vals[c] = 8'($urandom);
  endtask
  task automatic fill();
    for (int c = 0; c < NCH; c++) begin
      wr_en <= 1; wr_addr <= 4'(c); wr_data <= vals[c];
      @(posedge clk);
    end
    wr_en <= 0;
    @(posedge clk);
  endtask
  // compare the next packet on the line with exp_q; starts at the break
  task automatic compare_packet();
    int bad, n, r0, d0;
    bad = 0; n = 0; r0 = nreq; d0 = ndone;
    while (dmx_out) @(posedge clk);
    while (exp_q.size() > 0) begin
      logic e;
      e = exp_q.pop_front();
      if (dmx_out !== e && bad < 3) $display("cycle %0d of packet: line %b, expected %b", n, dmx_out, e);
      if (dmx_out !== e) bad++;
      n++;
      @(posedge clk);
    end
    checks++; if (bad != 0) begin failures++; $display("%0d wrong cycles in packet", bad); end
    checks++; if (nreq - r0 != NCH) begin failures++; $display("%0d requests in packet", nreq - r0); end
    checks++; if (ndone - d0 != 1) begin failures++; $display("%0d packet_done pulses", ndone - d0); end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    pick();
    fill();
    build_packet();
    enable <= 1;
    compare_packet();
    // new data for the next packet, written during the break of the next one
    pick();
    build_packet();
    fork
      fill();
      compare_packet();
    join
    enable <= 0;
    // let the packet in flight finish, then the line must stay high
    while (!pdone) @(posedge clk);
    repeat (2) @(posedge clk);
    begin
      int low = 0;
      repeat (3000) begin @(posedge clk); if (!dmx_out) low++; end
      checks++; if (low != 0) begin failures++; $display("line low for %0d cycles while disabled", low); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
