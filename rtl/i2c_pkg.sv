// i2c_pkg: types and constants shared by the I2C master blocks.
//
// The state names and the numbers 0 to 9 follow the write trace of the
// reference design (IDLE=0, START=1, ADDR=2, RW=3, ACK=4, REGISTER=5, then
// ACK_2, DATA, ACK_3 and STOP). RSTART, the set-up for the repeated START
// of a read, is numbered 10 here as this design's own choice.
package i2c_pkg;

  // Bus operation selected by the R/W bit of the address byte.
  localparam logic RW_WRITE = 1'b0;
  localparam logic RW_READ  = 1'b1;

  // Master FSM states.
  typedef enum logic [3:0] {
    ST_IDLE   = 4'd0,   // bus idle, SDA and SCL released (high)
    ST_START  = 4'd1,   // START condition: SDA falls while SCL is high
    ST_ADDR   = 4'd2,   // seven slave-address bits, MSB first
    ST_RW     = 4'd3,   // eighth bit: R/W
    ST_ACK    = 4'd4,   // slave acknowledges the address
    ST_REG    = 4'd5,   // eight bits of EEPROM word (register) address
    ST_ACK_2  = 4'd6,   // slave acknowledges the word address
    ST_DATA   = 4'd7,   // eight data bits, written or read
    ST_ACK_3  = 4'd8,   // acknowledge of a data byte (slave on write, master on read)
    ST_STOP   = 4'd9,   // STOP condition: SDA rises while SCL is high
    ST_RSTART = 4'd10   // SCL low, SDA released, SCL high: set-up for a repeated START
  } state_e;

endpackage
