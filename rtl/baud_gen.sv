// baud_gen: oversampling tick generator for the UART.
// A counter divides the system clock by round(CLK_HZ / (BAUD * OVERSAMPLE)) and
// emits a one-cycle 'tick' each time it wraps, i.e. OVERSAMPLE ticks per bit
// time. The 16x oversampling follows the usual RS232 receiver scheme; the
// integer divider and 9600 baud default are this design's choices.
// Timing: first tick DIV cycles after reset is released, then every DIV cycles.
module baud_gen #(
  parameter int unsigned CLK_HZ     = 27_000_000,
  parameter int unsigned BAUD       = 9600,
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic clk,
  input  logic rst,   // synchronous, active high
  output logic tick
);
  localparam int unsigned DIV = (CLK_HZ + (BAUD * OVERSAMPLE) / 2) / (BAUD * OVERSAMPLE);
  localparam int unsigned CW  = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
