// i2c_pkg: types and constants shared by the I2C single-master design.
//
// One bus transaction ("frame") carries a 7-bit slave address, a R/W bit and
// two data bytes, each followed by an acknowledge slot driven by the slave:
//   START | A6..A0 RW | ACK1 | D1[7:0] | ACK2 | D2[7:0] | ACK3 | STOP
// That is 27 bit slots between START and STOP (7 + 1 + 1 + 8 + 1 + 8 + 1).
// The frame layout and the three slave acknowledges follow the document;
// the encodings below (R/W polarity, struct field order) are this design's
// choice, with R/W following the usual I2C convention (0 = write, 1 = read).
package i2c_pkg;

  localparam int unsigned ADDR_W = 7;
  localparam int unsigned BYTE_W = 8;

  // Number of bit slots in one frame between START and STOP.
  localparam int unsigned FRAME_SLOTS = ADDR_W + 1 + 1 + BYTE_W + 1 + BYTE_W + 1;

  localparam logic RW_WRITE = 1'b0;
  localparam logic RW_READ  = 1'b1;

  // Command word presented to the master for one frame.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;   // slave address ID
    logic              rw;     // 0 = write data1/data2, 1 = read them
    logic [BYTE_W-1:0] data1;  // first data byte (ignored on a read)
    logic [BYTE_W-1:0] data2;  // second data byte (ignored on a read)
  } i2c_cmd_t;

  // Master states, named after the flow chart of the design.
  typedef enum logic [3:0] {
    M_START,        // idle / START condition
    M_ADDRESS,      // 7 address bits + R/W bit (0 to 7 counter)
    M_SLAVE_ACK,    // address acknowledge from the slave
    M_DATA_1,       // data byte 1, written or read (0 to 7 counter)
    M_DATA_1_ACK,   // acknowledge of data byte 1
    M_DATA_2,       // data byte 2, written or read (0 to 7 counter)
    M_DATA_2_ACK,   // acknowledge of data byte 2
    M_STOP          // STOP condition
  } m_state_t;

  // Slave states.
  typedef enum logic [3:0] {
    S_IDLE,         // waiting for START
    S_ADDRESS,      // shifting in address + R/W
    S_ADDR_ACK,     // driving ACK 1
    S_DATA_1,       // receiving or sending data byte 1
    S_DATA_1_ACK,   // driving ACK 2
    S_DATA_2,       // receiving or sending data byte 2
    S_DATA_2_ACK,   // driving ACK 3
    S_WAIT_STOP     // frame finished or not addressed: wait for STOP/START
  } s_state_t;

endpackage
