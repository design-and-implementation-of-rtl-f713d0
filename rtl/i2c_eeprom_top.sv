// i2c_eeprom_top: FPGA-side I2C master for a 24C02 serial EEPROM.
//
// The chip drives the two bus lines through open-drain pads with external
// pull-ups: scl_oe / sda_oe = 1 pull a line low, 0 release it, and
// scl_i / sda_i are the pad input levels. Both inputs pass an
// i2c_input_filter (synchroniser plus spike filter) before they reach
// i2c_master, which holds the SCL clock generator, the data register and
// the bus FSM. A host (the core logic of the FPGA) starts a byte write or a
// register read with `go` and the command fields; see i2c_master for the
// handshake and the bit timing.
//
// Defaults: a 50 MHz system clock (assumed board oscillator) and the
// 100 kHz standard-mode SCL rate; a spike filter of three cycles (60 ns).
// The default command of the reference design is slave address 0x50
// (1010 000), register 0xFF and data 0xAA, but these are inputs here.
module i2c_eeprom_top
  import i2c_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned SCL_HZ     = 100_000,
  parameter int unsigned FILTER_LEN = 3,
  parameter int unsigned NB_W       = 4
) (
  input  logic            clk,
  input  logic            rst,
  // host command
  input  logic            go,
  input  logic            rw,
  input  logic [6:0]      dev_addr,
  input  logic [7:0]      reg_addr,
  input  logic [NB_W-1:0] nbytes,
  input  logic [7:0]      wdata,
  output logic            wdata_ack,
  output logic [7:0]      rdata,
  output logic            rdata_valid,
  output logic            done,
  output logic            ack_error,
  output logic            busy,
  output state_e          state,
  output logic            stretch,
  // open-drain pads
  input  logic            scl_i,
  input  logic            sda_i,
  output logic            scl_oe,
  output logic            sda_oe
);

  logic scl_f, sda_f;

  i2c_input_filter #(.FILTER_LEN(FILTER_LEN)) u_scl_filter (
    .clk (clk), .rst (rst), .din (scl_i), .dout (scl_f)
  );

  i2c_input_filter #(.FILTER_LEN(FILTER_LEN)) u_sda_filter (
    .clk (clk), .rst (rst), .din (sda_i), .dout (sda_f)
  );

  i2c_master #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ), .NB_W(NB_W)) u_master (
    .clk         (clk),
    .rst         (rst),
    .go          (go),
    .rw          (rw),
    .dev_addr    (dev_addr),
    .reg_addr    (reg_addr),
    .nbytes      (nbytes),
    .wdata       (wdata),
    .wdata_ack   (wdata_ack),
    .rdata       (rdata),
    .rdata_valid (rdata_valid),
    .done        (done),
    .ack_error   (ack_error),
    .busy        (busy),
    .state       (state),
    .stretch     (stretch),
    .scl_in      (scl_f),
    .sda_in      (sda_f),
    .scl_oe      (scl_oe),
    .sda_oe      (sda_oe)
  );

endmodule
