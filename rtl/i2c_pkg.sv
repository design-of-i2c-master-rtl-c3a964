// i2c_pkg: types and constants shared by the I2C master, the I2C slave and
// the system top.
//
// The bus carries 8-bit frames, each followed by one acknowledge bit, so a
// frame is 9 SCL periods. A 7-bit address byte is {addr[6:0], R/W}. A 10-bit
// address starts with a byte whose five upper bits are the fixed prefix
// 11110, then the two address MSBs, then R/W; the second byte carries the
// eight address LSBs. R/W is 0 for a write and 1 for a read.
package i2c_pkg;

  // Fixed upper five bits of the first byte of a 10-bit address.
  localparam logic [4:0] TEN_BIT_PREFIX = 5'b11110;

  localparam logic RW_WRITE = 1'b0;
  localparam logic RW_READ  = 1'b1;

  // Master bus-level state.
  typedef enum logic [2:0] {
    M_IDLE,    // SDA and SCL released (both high)
    M_START,   // SDA falls while SCL is high
    M_BYTE,    // 8 data bits plus the acknowledge bit
    M_RSTART,  // repeated START between register address and read address
    M_STOP     // SDA rises while SCL is high
  } m_state_e;

  // Which frame of the transfer the master is sending or receiving.
  typedef enum logic [2:0] {
    F_ADDR1,   // first address byte (7-bit address, or 11110 + MSBs)
    F_ADDR2,   // second byte of a 10-bit address
    F_REG,     // register address inside the slave
    F_RADDR,   // address byte after the repeated START, R/W = 1
    F_WDATA,   // write data byte
    F_RDATA    // read data byte
  } m_frame_e;

  // Slave protocol state.
  typedef enum logic [2:0] {
    S_IDLE,    // not addressed: wait for the next START
    S_ADDR1,   // receiving the first address byte
    S_ADDR2,   // receiving the second byte of a 10-bit address
    S_REG,     // receiving the register address
    S_WDATA,   // receiving write data
    S_ACK,     // driving the acknowledge bit
    S_TX,      // sending a read data byte
    S_RACK     // reading the master's acknowledge after a sent byte
  } s_state_e;

endpackage
