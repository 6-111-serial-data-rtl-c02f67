// i2c_slave: I2C slave device with a bank of 8-bit registers (sub-addresses).
// SCL and SDA are oversampled by the system clock through two-flop
// synchronisers. SDA falling while SCL is high is a START, SDA rising while
// SCL is high a STOP; data bits are taken on SCL rising edges and the slave
// changes its own SDA output only after SCL falling edges. After a START the
// first byte is the 7-bit address plus R/W bit (MSB first). If the address is
// ADDR the slave pulls SDA low for the ACK bit, otherwise it ignores the bus
// until the next START. In a write, the next byte sets the register pointer
// and every further byte is stored at the pointer, which then increments. In
// a read, the slave sends the register at the pointer (incrementing it) for as
// long as the master answers with ACK; a NACK ends the read. With STRETCH > 0
// the slave holds SCL low for STRETCH cycles after each acknowledge bit, the
// clock stretching a slow receiver may use. The START/STOP/ACK rules follow
// I2C; the register map, pointer protocol and stretching rule are this design's.
// Timing: the slave reacts about 3 clock cycles after a line edge, so an SCL
// low phase must be longer than that.
module i2c_slave #(
  parameter logic [6:0]  ADDR     = 7'h42,
  parameter int unsigned NUM_REGS = 16,
  parameter int unsigned STRETCH  = 0,
  localparam int unsigned PW      = (NUM_REGS > 1) ? $clog2(NUM_REGS) : 1
) (
  input  logic clk,
  input  logic rst,
  input  logic scl_i,
  input  logic sda_i,
  output logic scl_low,
  output logic sda_low,
  output logic [NUM_REGS-1:0][7:0] regs
);
  typedef enum logic [2:0] {S_IDLE, S_RX, S_ACK, S_TX, S_MACK} state_e;
  typedef enum logic [1:0] {K_ADDR, K_PTR, K_DATA} kind_e;
  localparam int unsigned SW = (STRETCH > 1) ? $clog2(STRETCH + 1) : 1;

  logic [2:0] scl_m, sda_m;   // two sync flops plus the previous value
  wire scl_s = scl_m[1], sda_s = sda_m[1];
  wire scl_p = scl_m[2], sda_p = sda_m[2];
  wire start_c = scl_s && scl_p && sda_p && !sda_s;
  wire stop_c  = scl_s && scl_p && !sda_p && sda_s;
  wire scl_r   = !scl_p && scl_s;
  wire scl_f   = scl_p && !scl_s;

  state_e        state;
  kind_e         kind;
  logic          rw;         // 1 = master reads
  logic          mack;       // master acknowledged the byte we sent
  logic [3:0]    nbits;
  logic [7:0]    sh;
  logic [PW-1:0] ptr;
  logic [SW-1:0] scnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      scl_m   <= '1;
      sda_m   <= '1;
      state   <= S_IDLE;
      kind    <= K_ADDR;
      rw      <= 1'b0;
      mack    <= 1'b0;
      nbits   <= '0;
      sh      <= '0;
      ptr     <= '0;
      scnt    <= '0;
      scl_low <= 1'b0;
      sda_low <= 1'b0;
      regs    <= '0;
    end else begin
      scl_m <= {scl_m[1:0], scl_i};
      sda_m <= {sda_m[1:0], sda_i};
      if (scnt != '0) begin
        scnt <= scnt - 1'b1;
        if (scnt == SW'(1)) scl_low <= 1'b0;
      end
      if (start_c) begin
        state   <= S_RX;
        kind    <= K_ADDR;
        nbits   <= '0;
        sda_low <= 1'b0;
      end else if (stop_c) begin
        state   <= S_IDLE;
        sda_low <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_RX: begin
            if (scl_r && nbits != 4'd8) begin
              sh    <= {sh[6:0], sda_s};
              nbits <= nbits + 1'b1;
            end else if (scl_f && nbits == 4'd8) begin
              nbits <= '0;
              unique case (kind)
                K_ADDR: if (sh[7:1] == ADDR) begin
                  rw      <= sh[0];
                  sda_low <= 1'b1;
                  state   <= S_ACK;
                end else state <= S_IDLE;
                K_PTR: begin
                  ptr     <= sh[PW-1:0];
                  sda_low <= 1'b1;
                  state   <= S_ACK;
                end
                K_DATA: begin
                  regs[ptr] <= sh;
                  ptr       <= ptr + 1'b1;
                  sda_low   <= 1'b1;
                  state     <= S_ACK;
                end
                default: state <= S_IDLE;
              endcase
            end
          end
          S_ACK: if (scl_f) begin
            // end of our acknowledge bit
            if (STRETCH != 0) begin
              scl_low <= 1'b1;
              scnt    <= SW'(STRETCH);
            end
            if (kind == K_ADDR && rw) begin
              sh      <= regs[ptr] << 1;
              sda_low <= !regs[ptr][7];
              ptr     <= ptr + 1'b1;
              nbits   <= 4'd1;
              state   <= S_TX;
            end else begin
              sda_low <= 1'b0;
              kind    <= (kind == K_ADDR) ? K_PTR : K_DATA;
              state   <= S_RX;
            end
          end
          S_TX: if (scl_f) begin
            if (nbits == 4'd8) begin
              sda_low <= 1'b0;          // release for the master's ACK
              state   <= S_MACK;
            end else begin
              sda_low <= !sh[7];
              sh      <= sh << 1;
              nbits   <= nbits + 1'b1;
            end
          end
          S_MACK: begin
            if (scl_r) mack <= !sda_s;
            else if (scl_f) begin
              if (mack) begin
                sh      <= regs[ptr] << 1;
                sda_low <= !regs[ptr][7];
                ptr     <= ptr + 1'b1;
                nbits   <= 4'd1;
                state   <= S_TX;
              end else state <= S_IDLE;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
