// dmx_channel_ram: channel-level memory for the DMX512 transmitter.
// One 8-bit value per channel, DEPTH words, held as an array so synthesis can
// map it to block RAM. The write port lets the host change channel levels at
// any time; the read port answers the transmitter's requests with one cycle of
// latency (rd_data is registered and holds its value between reads). The RAM itself is this design's choice: the
// transmitter only defines the request pulse and address it reads by.
// Timing: a write at edge k is visible to a read issued at edge k+1 or later.
module dmx_channel_ram #(
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [7:0]    wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [7:0]    rd_data
);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
