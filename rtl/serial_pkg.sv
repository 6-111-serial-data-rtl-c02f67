// serial_pkg: types and constants shared by the serial interface blocks.
// Holds the UART parity choice and the I2C master command set. Timing defaults
// elsewhere assume a 27 MHz system clock.
package serial_pkg;
  // UART parity options: none, even (1s count incl. parity is even), odd.
  typedef enum logic [1:0] {
    PARITY_NONE = 2'd0,
    PARITY_EVEN = 2'd1,
    PARITY_ODD  = 2'd2
  } parity_e;

  // Byte-level commands of the I2C master.
  typedef enum logic [1:0] {
    I2C_START = 2'd0,  // (repeated) start condition
    I2C_WRITE = 2'd1,  // send wdata, then read the receiver's ACK
    I2C_READ  = 2'd2,  // read a byte, then send ack_out
    I2C_STOP  = 2'd3   // stop condition
  } i2c_cmd_e;
endpackage
