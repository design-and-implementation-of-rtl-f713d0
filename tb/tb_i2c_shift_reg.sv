// tb_i2c_shift_reg: self-checking test of the master's data register.
//
// Loads random bytes and checks that shifting presents them MSB first;
// shifts random bits in and checks the assembled byte; checks that load
// wins over shift and that nothing moves without load or shift.
module tb_i2c_shift_reg;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst, load, shift, sin, msb;
  logic [7:0] din, q;

  i2c_shift_reg dut (.clk, .rst, .load, .din, .shift, .sin, .msb, .q);

  int unsigned checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  logic [7:0] b, got;

  initial begin
    rst = 1; load = 0; shift = 0; sin = 0; din = 0;
    @(negedge clk) rst = 0;
    check(q == 8'h00, "reset clears");

    repeat (200) begin
      b = 8'($urandom);
      // send: MSB first
      load = 1; din = b;
      @(negedge clk) load = 0;
      for (int i = 7; i >= 0; i--) begin
        check(msb == b[i], $sformatf("bit %0d of %h", i, b));
        shift = 1; sin = 1'($urandom);
        @(negedge clk) shift = 0;
      end
      // receive: MSB first
      b = 8'($urandom);
      for (int i = 7; i >= 0; i--) begin
        shift = 1; sin = b[i];
        @(negedge clk);
      end
      shift = 0;
      check(q == b, $sformatf("received %h, expected %h", q, b));
      // hold
      got = q;
      repeat (3) @(negedge clk);
      check(q == got, "holds without load or shift");
      // load wins over shift
      load = 1; shift = 1; din = ~b;
      @(negedge clk) begin load = 0; shift = 0; end
      check(q == ~b, "load has priority");
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
