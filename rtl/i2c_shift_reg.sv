// i2c_shift_reg: the master's 8-bit data register.
//
// A byte is loaded in parallel and then shifted one bit per `shift` pulse,
// most significant bit first, as I2C sends every address and data byte.
// On each shift the bit read from SDA enters at the bottom, so the same
// register serialises a byte that is sent and assembles a byte that is
// received. `msb` is the bit currently on offer to SDA; `q` is the whole
// register. Load takes priority over shift. The register is this design's
// reading of the data register drawn between the core logic and the SDA
// driver of the master.
module i2c_shift_reg (
  input  logic       clk,
  input  logic       rst,     // synchronous, active high
  input  logic       load,
  input  logic [7:0] din,
  input  logic       shift,
  input  logic       sin,     // bit sampled from SDA
  output logic       msb,
  output logic [7:0] q
);

  always_ff @(posedge clk) begin
    if (rst)        q <= '0;
    else if (load)  q <= din;
    else if (shift) q <= {q[6:0], sin};
  end

  assign msb = q[7];

endmodule
