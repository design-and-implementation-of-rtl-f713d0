// tb_i2c_clock_gen: self-checking test of the SCL quarter-tick generator.
//
// At 4 MHz and 100 kHz one quarter is 10 cycles. The test checks that
// ticks come exactly every 10 cycles, that `clear` restarts the count,
// and that while the master has released SCL but the line stays low (a
// slave stretching the clock) no tick comes and `stretch` is high, after
// which the next tick follows a full quarter after SCL rises.
module tb_i2c_clock_gen;

  localparam int unsigned DIV = 10;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, clear, scl_released, scl_in, tick, stretch;

  i2c_clock_gen #(.CLK_HZ(4_000_000), .SCL_HZ(100_000)) dut (
    .clk, .rst, .clear, .scl_released, .scl_in, .tick, .stretch
  );

  int unsigned checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int unsigned last, now, n;

  initial begin
    rst = 1; clear = 0; scl_released = 0; scl_in = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // free-running period
    now = 0; last = 0; n = 0;
    while (n < 20) begin
      @(negedge clk); now++;
      if (tick) begin
        if (n > 0) check(now - last == DIV, $sformatf("tick period %0d", now - last));
        last = now; n++;
      end
    end

    // clear restarts the quarter
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    now = 1;
    while (!tick) begin @(negedge clk); now++; end
    check(now == DIV + 1, $sformatf("first tick %0d cycles after clear", now));

    // stretching: SCL released but held low for 57 cycles
    @(negedge clk);
    scl_released = 1; scl_in = 0;
    repeat (57) begin
      @(negedge clk);
      check(!tick && stretch, "no tick while SCL is held low");
    end
    scl_in = 1;
    now = 0;
    do begin @(negedge clk); now++; end while (!tick);
    check(now == DIV, $sformatf("tick %0d cycles after SCL rose", now));
    check(!stretch, "stretch ends when SCL rises");

    // driven low by the master itself is not stretching
    scl_released = 0; scl_in = 0;
    now = 0;
    do begin @(negedge clk); now++; end while (!tick);
    check(now <= DIV && !stretch, "master-driven low does not stall");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
