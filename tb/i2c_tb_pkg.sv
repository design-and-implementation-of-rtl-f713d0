// i2c_tb_pkg: types shared by the I2C testbenches.
//
// ev_t is one decoded bus event: a START ("S"), a STOP ("P") or a byte
// frame ("B") with its data and whether the ninth bit was an ACK.
// EEPROM_TYPE_ID is the fixed upper nibble, 1010, of a 24Cxx slave address.
package i2c_tb_pkg;
  localparam logic [3:0] EEPROM_TYPE_ID = 4'b1010;

  typedef struct packed {
    logic [7:0] kind;
    logic       ack;
    logic [7:0] data;
  } ev_t;
endpackage
