// tb_i2c_master: self-checking test of the I2C master FSM against a 24C02
// model on a wired-AND bus.
//
// The master runs in fast mode, 400 kHz from a 50 MHz clock, so one SCL
// quarter is 31.25 cycles rounded up to 32 and SCL stays below 400 kHz. An
// independent bus monitor decodes what appears on the wires; each transfer
// is checked against the frame sequence an EEPROM byte write or random
// read must produce (START, address+R/W, word address, repeated START,
// data, ACK/NACK, STOP), against the memory contents, and against its
// length in cycles. Covered: byte write of 0xAA to register 0xFF of slave
// 0x50, acknowledge polling during the write cycle (NACK), random read,
// page write and sequential read, a wrong slave address, clock stretching,
// back-to-back transfers with go held high, and reset in mid-transfer.
module tb_i2c_master;
  import i2c_pkg::*;
  import i2c_tb_pkg::*;

  localparam int unsigned CLK_HZ  = 50_000_000;
  localparam int unsigned SCL_HZ  = 400_000;
  localparam int unsigned DIV     = 32;      // 31.25 rounded up: 390.6 kHz
  localparam int unsigned STRETCH = 150;   // longer than the 64-cycle SCL low time
  localparam int unsigned TWR     = 3000;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst, go, rw;
  logic [6:0] dev_addr;
  logic [7:0] reg_addr, wdata, rdata;
  logic [3:0] nbytes;
  logic       wdata_ack, rdata_valid, done, ack_error, busy, stretch;
  state_e     state;
  logic       m_scl_oe, m_sda_oe, s_scl_oe, s_sda_oe;
  wire        scl = !(m_scl_oe | s_scl_oe);
  wire        sda = !(m_sda_oe | s_sda_oe);

  i2c_master #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ), .NB_W(4)) dut (
    .clk, .rst, .go, .rw, .dev_addr, .reg_addr, .nbytes, .wdata, .wdata_ack,
    .rdata, .rdata_valid, .done, .ack_error, .busy, .state, .stretch,
    .scl_in (scl), .sda_in (sda), .scl_oe (m_scl_oe), .sda_oe (m_sda_oe)
  );

  eeprom_24c02_model #(.TWR_CYCLES(TWR), .STRETCH_CYCLES(STRETCH)) eeprom (
    .clk, .scl, .sda, .a (3'b000), .wp (1'b0), .scl_oe (s_scl_oe), .sda_oe (s_sda_oe)
  );

  i2c_bus_monitor #(.MIN_PHASE(DIV)) mon (.clk, .scl, .sda);

  int unsigned checks = 0, failures = 0;
  int unsigned stretch_cycles_seen = 0;
  always @(posedge clk) if (stretch) stretch_cycles_seen <= stretch_cycles_seen + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // expected bus log
  ev_t exp_q [$];
  function automatic void exp_s(); exp_q.push_back('{kind: "S", ack: 1'b0, data: 8'h00}); endfunction
  function automatic void exp_p(); exp_q.push_back('{kind: "P", ack: 1'b0, data: 8'h00}); endfunction
  function automatic void exp_b(logic [7:0] d, logic a); exp_q.push_back('{kind: "B", ack: a, data: d}); endfunction

  task automatic compare_log(input string what);
    check(mon.log_q.size() == exp_q.size(),
          $sformatf("%s: %0d bus events, expected %0d", what, mon.log_q.size(), exp_q.size()));
    for (int i = 0; i < exp_q.size() && i < mon.log_q.size(); i++)
      check(mon.log_q[i] == exp_q[i],
            $sformatf("%s: event %0d is %s/%h/%b, expected %s/%h/%b", what, i,
                      string'(mon.log_q[i].kind), mon.log_q[i].data, mon.log_q[i].ack,
                      string'(exp_q[i].kind), exp_q[i].data, exp_q[i].ack));
    mon.log_q.delete();
    exp_q.delete();
  endtask

  logic [7:0] wq [$];
  logic [7:0] rq [$];
  int unsigned cycles;

  // Issue one command with a one-cycle go pulse and wait for done.
  task automatic run(input logic r, input logic [6:0] dev, input logic [7:0] ra,
                     input int unsigned n);
    rq.delete();
    @(negedge clk);
    rw = r; dev_addr = dev; reg_addr = ra; nbytes = 4'(n);
    wdata = (wq.size() != 0) ? wq[0] : 8'h00;
    go = 1;
    @(negedge clk);
    go = 0;
    cycles = 1;
    while (!done) begin
      @(posedge clk);
      #1;
      cycles++;
      if (wdata_ack) begin
        void'(wq.pop_front());
        wdata = (wq.size() != 0) ? wq[0] : 8'h00;
      end
      if (rdata_valid) rq.push_back(rdata);
    end
    repeat (4) @(negedge clk);   // let the STOP reach the wires
  endtask

  // Slots per transfer: START + 7 addr + RW + ACK = 10; byte + ACK = 9;
  // STOP = 1; a read adds RSTART + START + 7 + RW + ACK = 11.
  function automatic int unsigned write_slots(int unsigned n); return 10 + 9 + 9 * n + 1; endfunction
  function automatic int unsigned read_slots(int unsigned n);  return 10 + 9 + 11 + 9 * n + 1; endfunction

  task automatic check_len(input int unsigned slots, input int unsigned extra, input string what);
    int unsigned lo = slots * 4 * DIV;
    check(cycles >= lo && cycles <= lo + extra + 10 * slots,
          $sformatf("%s: took %0d cycles, expected %0d..%0d", what, cycles, lo, lo + extra + 10 * slots));
  endtask

  initial begin
    rst = 1; go = 0; rw = 0; dev_addr = '0; reg_addr = '0; wdata = '0; nbytes = '0;
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (20) @(posedge clk);
    // forget what the bus did before reset set the pad enables
    mon.log_q.delete();
    mon.min_period   = 32'hFFFF_FFFF;
    mon.short_phases = 0;
    check(m_scl_oe == 0 && m_sda_oe == 0 && state == ST_IDLE, "idle after reset with lines released");

    // 1. byte write: slave 0x50, register 0xFF, data 0xAA
    wq = '{8'hAA};
    run(RW_WRITE, 7'h50, 8'hFF, 1);
    exp_s(); exp_b(8'hA0, 1); exp_b(8'hFF, 1); exp_b(8'hAA, 1); exp_p();
    compare_log("byte write");
    check(!ack_error, "byte write acknowledged");
    check_len(write_slots(1), STRETCH, "byte write");
    check(eeprom.mem[8'hFF] == 8'hAA, "EEPROM holds 0xAA at 0xFF");

    // 2. acknowledge polling: the slave is in its write cycle and NACKs
    wq = '{8'h00};
    run(RW_WRITE, 7'h50, 8'h00, 1);
    exp_s(); exp_b(8'hA0, 0); exp_p();
    compare_log("write during write cycle");
    check(ack_error, "NACK during write cycle reported");
    check_len(10 + 1, 0, "aborted write");
    repeat (TWR) @(posedge clk);

    // 3. random read of register 0xFF
    run(RW_READ, 7'h50, 8'hFF, 1);
    exp_s(); exp_b(8'hA0, 1); exp_b(8'hFF, 1); exp_s(); exp_b(8'hA1, 1); exp_b(8'hAA, 0); exp_p();
    compare_log("random read");
    check(!ack_error, "random read acknowledged");
    check(rq.size() == 1 && rq[0] == 8'hAA, "random read returns 0xAA");
    check_len(read_slots(1), 2 * STRETCH, "random read");

    // 4. page write of three bytes, then sequential read of them
    wq = '{8'h11, 8'h22, 8'h33};
    run(RW_WRITE, 7'h50, 8'h16, 3);
    exp_s(); exp_b(8'hA0, 1); exp_b(8'h16, 1);
    exp_b(8'h11, 1); exp_b(8'h22, 1); exp_b(8'h33, 1); exp_p();
    compare_log("page write");
    check(wq.size() == 0, "page write consumed all three bytes");
    repeat (TWR + 10) @(posedge clk);
    // the low three bits roll over inside the 8-byte page 0x10..0x17
    check(eeprom.mem[8'h16] == 8'h11 && eeprom.mem[8'h17] == 8'h22 && eeprom.mem[8'h10] == 8'h33,
          "page write rolled over inside its page");
    run(RW_READ, 7'h50, 8'h16, 2);
    exp_s(); exp_b(8'hA0, 1); exp_b(8'h16, 1); exp_s(); exp_b(8'hA1, 1);
    exp_b(8'h11, 1); exp_b(8'h22, 0); exp_p();
    compare_log("sequential read");
    check(rq.size() == 2 && rq[0] == 8'h11 && rq[1] == 8'h22, "sequential read data");
    check_len(read_slots(2), 2 * STRETCH, "sequential read");

    // 5. a slave address nobody answers
    run(RW_READ, 7'h51, 8'h00, 1);
    exp_s(); exp_b(8'hA2, 0); exp_p();
    compare_log("absent slave");
    check(ack_error && rq.size() == 0, "absent slave reported, no data");

    // 6. go held high: STOP is followed straight by the next START
    begin
      automatic int unsigned dones = 0, idle_seen = 0;
      @(negedge clk);
      rw = RW_READ; dev_addr = 7'h50; reg_addr = 8'h10; nbytes = 4'd1; go = 1;
      @(negedge clk);
      while (dones < 2) begin
        @(posedge clk); #1;
        if (done) dones++;
        if (dones == 1 && state == ST_IDLE) idle_seen++;
      end
      go = 0;
      while (busy) @(posedge clk);
      repeat (4) @(posedge clk);
      check(idle_seen == 0, "held go goes from STOP straight to START");
      exp_s(); exp_b(8'hA0, 1); exp_b(8'h10, 1); exp_s(); exp_b(8'hA1, 1); exp_b(8'h33, 0); exp_p();
      exp_s(); exp_b(8'hA0, 1); exp_b(8'h10, 1); exp_s(); exp_b(8'hA1, 1); exp_b(8'h33, 0); exp_p();
      // a third transfer may have started before go dropped: cut the log to two
      while (mon.log_q.size() > exp_q.size()) void'(mon.log_q.pop_back());
      compare_log("back-to-back reads");
    end

    // clock rate and stretching
    check(mon.min_period >= 4 * DIV && mon.min_period <= 4 * DIV + 12,
          $sformatf("SCL period %0d cycles, expected %0d", mon.min_period, 4 * DIV));
    check(eeprom.stretches >= 4 && stretch_cycles_seen >= 4 * STRETCH,
          "master waited for the slave's clock stretching");
    check(mon.short_phases == 0, "no SCL phase shorter than a quarter period");

    // 7. reset in the middle of a transfer releases the bus at once
    @(negedge clk);
    rw = RW_WRITE; dev_addr = 7'h50; reg_addr = 8'h40; nbytes = 4'd1; wdata = 8'h5A; go = 1;
    @(negedge clk) go = 0;
    while (state != ST_REG) @(posedge clk);
    @(negedge clk) rst = 1;
    @(negedge clk);
    @(negedge clk) rst = 0;
    check(state == ST_IDLE && !m_scl_oe && !m_sda_oe && !busy, "reset returns the bus to IDLE");
    repeat (100) @(posedge clk);
    mon.log_q.delete();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
