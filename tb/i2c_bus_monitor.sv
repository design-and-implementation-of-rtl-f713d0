// i2c_bus_monitor: passive decoder of an I2C bus for testbenches.
//
// Oversamples the wired-AND bus levels on every system clock and logs,
// in order, each START ('S'), STOP ('P') and each nine-bit frame (byte
// plus acknowledge, 1 = ACK). Any change of SDA while SCL is high is logged
// as START or STOP, so a misplaced SDA edge shows up in the log. It counts
// SCL phases shorter than MIN_PHASE cycles inside a transfer, and records
// the shortest SCL period (rising edge to rising edge) and the longest
// SCL low time seen.
module i2c_bus_monitor #(
  parameter int unsigned MIN_PHASE = 2
) (
  input logic clk,
  input logic scl,
  input logic sda
);
  import i2c_tb_pkg::*;

  ev_t         log_q [$];
  logic        prev_scl, prev_sda, in_frame;
  logic [8:0]  sh;
  int unsigned nbits, phase_len, last_rise, cyc, min_period, short_phases;
  int unsigned bytes_seen, max_low;

  initial begin
    prev_scl = 1; prev_sda = 1; in_frame = 0; sh = '0; nbits = 0;
    phase_len = 0; last_rise = 0; cyc = 0; min_period = 32'hFFFF_FFFF;
    short_phases = 0; bytes_seen = 0; max_low = 0;
  end

  always @(posedge clk) begin
    cyc      <= cyc + 1;
    prev_scl <= scl;
    prev_sda <= sda;
    phase_len <= (scl != prev_scl) ? 1 : phase_len + 1;
    if (!scl && phase_len + 1 > max_low) max_low <= phase_len + 1;
    if (scl != prev_scl && in_frame && phase_len < MIN_PHASE) short_phases <= short_phases + 1;
    if (prev_scl && scl && prev_sda && !sda) begin
      log_q.push_back('{kind: "S", ack: 1'b0, data: 8'h00});
      in_frame <= 1; nbits <= 0;
    end else if (prev_scl && scl && !prev_sda && sda) begin
      log_q.push_back('{kind: "P", ack: 1'b0, data: 8'h00});
      in_frame <= 0;
    end else if (!prev_scl && scl) begin
      if (last_rise != 0 && cyc - last_rise < min_period) min_period <= cyc - last_rise;
      last_rise <= cyc;
      if (in_frame) begin
        if (nbits == 8) begin
          log_q.push_back('{kind: "B", ack: !sda, data: sh[7:0]});
          bytes_seen <= bytes_seen + 1;
          nbits <= 0;
        end else begin
          sh    <= {sh[7:0], sda};
          nbits <= nbits + 1;
        end
      end
    end
  end

endmodule
