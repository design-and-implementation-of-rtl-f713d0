// tb_i2c_input_filter: self-checking test of the SDA/SCL spike filter.
//
// Drives the filter with random levels that hold for random times, from
// one cycle up to a dozen, and compares its output every cycle with a
// reference written here: two delay stages, then the output takes a new
// level once the last FILTER_LEN delayed samples all show it. It also
// checks the latency of a clean edge (2 + FILTER_LEN cycles) and that a
// spike one cycle shorter than FILTER_LEN never passes.
module tb_i2c_input_filter;

  localparam int unsigned FL = 3;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, din, dout;

  i2c_input_filter #(.FILTER_LEN(FL)) dut (.clk, .rst, .din, .dout);

  int unsigned checks = 0, failures = 0;

  // reference model
  logic d1, d2, ref_out;
  logic [FL-1:0] hist;
  always @(posedge clk) begin
    if (rst) begin
      d1 <= 1; d2 <= 1; ref_out <= 1; hist <= '1;
    end else begin
      d1 <= din;
      d2 <= d1;
      hist <= {hist[FL-2:0], d2};
      if ({hist[FL-2:0], d2} == '0) ref_out <= 1'b0;
      else if ({hist[FL-2:0], d2} == '1) ref_out <= 1'b1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  int unsigned lat;

  initial begin
    rst = 1; din = 1;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;

    // clean falling edge: latency
    repeat (10) @(negedge clk);
    din = 0;
    lat = 0;
    while (dout) begin @(negedge clk); lat++; end
    check(lat == 2 + FL, $sformatf("edge latency %0d, expected %0d", lat, 2 + FL));

    // a spike of FL-1 cycles is removed
    repeat (10) @(negedge clk);
    din = 1;
    repeat (FL - 1) @(negedge clk);
    din = 0;
    repeat (3 * FL) begin
      @(negedge clk);
      check(dout == 0, "short spike removed");
    end

    // random levels against the reference
    repeat (4000) begin
      din = $urandom_range(0, 1);
      repeat ($urandom_range(1, 12)) begin
        @(negedge clk);
        check(dout == ref_out, "output matches reference");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
