// dmx_channel_ram_tb: writes random values to random addresses of a 512-word
// dmx_channel_ram, keeping a reference copy, and reads addresses back with
// rd_en. Checks the one-cycle read latency, that rd_data holds while rd_en is
// low, and that a read in the cycle after a write returns the new value.
module dmx_channel_ram_tb;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic wr_en = 0, rd_en = 0;
  logic [8:0] wr_addr = 0, rd_addr = 0;
  logic [7:0] wr_data = 0, rd_data;
  dmx_channel_ram dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data);

  logic [7:0] ref_mem [512];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] a; logic [7:0] held;
    for (int i = 0; i < 512; i++) begin
      ref_mem[i] = 8'($urandom);
      wr_en <= 1; wr_addr <= 9'(i); wr_data <= ref_mem[i];
      @(posedge clk);
    end
    wr_en <= 0;
    for (int k = 0; k < 600; k++) begin
      if ($urandom_range(0, 3) == 0) begin
        a = 9'($urandom);
        ref_mem[a] = 8'($urandom);
        wr_en <= 1; wr_addr <= a; wr_data <= ref_mem[a];
        @(posedge clk);
        wr_en <= 0;
      end
      a = 9'($urandom);
      rd_en <= 1; rd_addr <= a;
      @(posedge clk);
      rd_en <= 0; rd_addr <= 9'($urandom);
      #1;
      checks++;
      if (rd_data !== ref_mem[a]) begin failures++; $display("addr %0d read %h, expected %h", a, rd_data, ref_mem[a]); end
      held = rd_data;
      @(posedge clk); #1;
      checks++;
      if (rd_data !== held) begin failures++; $display("rd_data changed without rd_en"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
