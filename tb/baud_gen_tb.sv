// baud_gen_tb: checks the 16x tick period of baud_gen at its defaults.
// 27 MHz / (9600 * 16) = 175.8, so a tick must come every 176 cycles and be one
// cycle wide. Counts 40 periods.
module baud_gen_tb;
  logic clk = 0, rst = 1, tick;
  int checks = 0, failures = 0;
  localparam int EXP = 176;

  baud_gen dut (.clk, .rst, .tick);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, n, cyc;
    last = -1; n = 0; cyc = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    while (n < 40) begin
      @(posedge clk); cyc++;
      if (tick) begin
        if (last >= 0) begin
          checks++;
          if (cyc - last != EXP) begin
            failures++;
            $display("period %0d, expected %0d", cyc - last, EXP);
          end
        end
        last = cyc;
        n++;
        @(posedge clk); cyc++;
        checks++;
        if (tick) begin failures++; $display("tick wider than one cycle"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
