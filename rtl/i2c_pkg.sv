// i2c_pkg: types shared by the I2C master bus controller, the bus and the
// system top.
//
// i2c_cmd_t is one transaction request. The controller always performs the
// register-addressed form of a transfer: slave address + W, register address,
// then either data bytes written (master transmitter) or, after a repeated
// START, slave address + R and data bytes read (master receiver). nbytes is
// the number of data bytes to move; 0 is treated as 1.
//
// ctrl_state_t names the controller's bit-level states. Every bus-facing state
// lasts four quarter periods of SCL (q = 0..3), see i2c_master.
package i2c_pkg;

  // Direction bit sent after the 7-bit slave address.
  typedef enum logic {
    I2C_WRITE = 1'b0,
    I2C_READ  = 1'b1
  } i2c_dir_t;

  typedef struct packed {
    i2c_dir_t   rw;          // master transmitter (0) or master receiver (1)
    logic [6:0] slave_addr;  // 7-bit slave address
    logic [7:0] reg_addr;    // register pointer to set in the slave
    logic [7:0] nbytes;      // data bytes to transfer (0 counts as 1)
  } i2c_cmd_t;

  typedef enum logic [2:0] {
    ST_IDLE,       // bus idle, SCL and SDA high
    ST_START,      // START or repeated START condition
    ST_WBIT,       // master drives one of 8 bits of a byte
    ST_WACK,       // master releases SDA, samples the slave's ACK
    ST_WAIT_DATA,  // SCL held low until the next write byte is supplied
    ST_RBIT,       // master releases SDA, samples one of 8 bits from the slave
    ST_RACK,       // master drives ACK (more bytes) or NACK (last byte)
    ST_STOP        // STOP condition
  } ctrl_state_t;

  // Which byte of the frame is being sent (selects what follows its ACK).
  typedef enum logic [1:0] {
    BY_ADDR_W,  // slave address + W
    BY_REG,     // register address
    BY_ADDR_R,  // slave address + R after repeated START
    BY_DATA     // data byte
  } byte_kind_t;

endpackage
