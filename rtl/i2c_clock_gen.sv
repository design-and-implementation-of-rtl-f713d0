// i2c_clock_gen: SCL timing for the I2C master.
//
// One SCL bit period is split into four quarters. This block counts
// system-clock cycles and pulses `tick` for one cycle at the end of every
// quarter, i.e. every DIV cycles, where DIV = CLK_HZ / (4 * SCL_HZ)
// rounded up (at least 2). The
// master FSM steps one quarter per tick and decides in each quarter whether
// SCL is pulled low or released.
//
// Clock stretching: whenever the master has released SCL (scl_released = 1)
// but the filtered line still reads low (scl_in = 0), a slave is holding
// SCL low. The count is then held at zero, so the high quarter starts only
// once SCL is really high and the slave gets as long as it needs. `stretch`
// reports that condition. `clear` restarts the count so that a new
// transfer starts with a whole first quarter.
//
// The 100 kHz default is the standard-mode rate; the 50 MHz system clock
// is an assumed board oscillator.
module i2c_clock_gen #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned SCL_HZ = 100_000
) (
  input  logic clk,
  input  logic rst,           // synchronous, active high
  input  logic clear,         // restart the quarter count
  input  logic scl_released,  // master is not pulling SCL low
  input  logic scl_in,        // filtered SCL line level
  output logic tick,          // one-cycle pulse at the end of each quarter
  output logic stretch        // a slave is holding SCL low
);

  // Rounded up so that SCL never runs faster than SCL_HZ.
  localparam int unsigned DIV_RAW = (CLK_HZ + 4 * SCL_HZ - 1) / (4 * SCL_HZ);
  localparam int unsigned DIV     = DIV_RAW < 2 ? 2 : DIV_RAW;
  localparam int unsigned CW  = $clog2(DIV);

  logic [CW-1:0] cnt;

  assign stretch = scl_released && !scl_in;

  always_ff @(posedge clk) begin
    if (rst || clear || stretch) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

endmodule
