// i2c_pkg: types and constants shared by the I2C master, slave and their
// testbenches.
//
// The master state set follows the master state diagram of the source design:
// Ready, Start, Sl_sel (address phase), Rw_c (read/write decision), RD, WR
// and Stop. The slave state set is this design's own: the slave mirrors the
// frame format (address byte, register-address byte, data bytes, each
// followed by an acknowledge slot).
//
// Bit timing: every SCL bit period is split into four quarters.
//   Q0  SCL low,  the transmitter changes SDA
//   Q1  SCL high (released)
//   Q2  SCL high, SDA was sampled at the start of this quarter
//   Q3  SCL low
package i2c_pkg;

  localparam int unsigned ADDR_W = 7;   // slave address width
  localparam int unsigned DATA_W = 8;   // data byte width

  // Acknowledge level on SDA: ACK pulls the line low, NACK leaves it high.
  localparam logic SDA_ACK  = 1'b0;
  localparam logic SDA_NACK = 1'b1;

  // R/W bit that follows the address: 0 = master writes, 1 = master reads.
  localparam logic RW_WRITE = 1'b0;
  localparam logic RW_READ  = 1'b1;

  typedef enum logic [2:0] {
    M_READY  = 3'd0,
    M_START  = 3'd1,
    M_SL_SEL = 3'd2,
    M_RW_C   = 3'd3,
    M_RD     = 3'd4,
    M_WR     = 3'd5,
    M_STOP   = 3'd6
  } m_state_e;

  typedef enum logic [1:0] {
    Q0 = 2'd0,
    Q1 = 2'd1,
    Q2 = 2'd2,
    Q3 = 2'd3
  } quarter_e;

  typedef enum logic [2:0] {
    S_IDLE     = 3'd0,   // waiting for START (or not addressed)
    S_ADDR     = 3'd1,   // shifting in address + R/W
    S_REG      = 3'd2,   // shifting in the register address
    S_WDATA    = 3'd3,   // shifting in a data byte to store
    S_RDATA    = 3'd4,   // shifting out a data byte
    S_ACK_OUT  = 3'd5,   // slave drives the acknowledge slot
    S_ACK_IN   = 3'd6    // slave samples the master's acknowledge
  } s_state_e;

endpackage
