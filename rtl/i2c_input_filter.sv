// i2c_input_filter: synchroniser and spike filter for one I2C line (SDA or SCL).
//
// The raw pad input passes two flip-flops that bring it into the system
// clock domain. The output then changes only after the synchronised input
// has held its new level for FILTER_LEN consecutive clock cycles, so a
// spike shorter than that never reaches the controller. Filtering bus
// spikes is a feature the I2C bus requires of its devices; the two-stage
// synchroniser and the counter that measures stability are this design's
// own way of doing it.
//
// Interface: din is the asynchronous line level, dout the filtered level.
// Timing: a clean level change reaches dout 2 + FILTER_LEN cycles later.
// Reset sets the output high, the level of an idle, pulled-up line.
module i2c_input_filter #(
  parameter int unsigned FILTER_LEN = 3   // cycles a new level must persist
) (
  input  logic clk,
  input  logic rst,    // synchronous, active high
  input  logic din,
  output logic dout
);

  localparam int unsigned CW = $clog2(FILTER_LEN + 1);

  logic          sync1, sync2;
  logic [CW-1:0] stable_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1      <= 1'b1;
      sync2      <= 1'b1;
      stable_cnt <= '0;
      dout       <= 1'b1;
    end else begin
      sync1 <= din;
      sync2 <= sync1;
      if (sync2 == dout) begin
        stable_cnt <= '0;
      end else if (stable_cnt == CW'(FILTER_LEN - 1)) begin
        stable_cnt <= '0;
        dout       <= sync2;
      end else begin
        stable_cnt <= stable_cnt + 1'b1;
      end
    end
  end

endmodule
