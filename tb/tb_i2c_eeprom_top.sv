// tb_i2c_eeprom_top: end-to-end test of the I2C EEPROM master at its
// default parameters (50 MHz system clock, 100 kHz SCL, 3-cycle filter).
//
// The top drives a wired-AND bus with a 24C02 model (5 ms write cycle,
// slave address 1010 000) and a passive monitor. The run writes 0xAA to
// register 0xFF of slave 0x50 and reads it back, the transfer pair of the
// reference simulation, then exercises every mechanism of the design and
// counts how often each happened: byte write, page write, random read
// (repeated START), sequential read, NACK with acknowledge polling during
// the write cycle, clock stretching by the slave, spikes on the master's
// inputs removed by the filters, back-to-back transfers with go held high,
// reset in mid-transfer, and a second EEPROM (slave 0x51) on the same bus
// that only answers its own address. A mechanism that never happened is a failure.
// It also checks the SCL period (500 cycles = 100 kHz) and each
// transfer's length in cycles.
module tb_i2c_eeprom_top;
  import i2c_pkg::*;
  import i2c_tb_pkg::*;

  localparam int unsigned DIV     = 125;          // 50 MHz / (4 x 100 kHz)
  localparam int unsigned TWR     = 250_000;      // 5 ms at 50 MHz
  localparam int unsigned STRETCH = 500;          // 10 us

  logic clk = 0;
  always #10 clk = ~clk;                          // 20 ns period

  logic       rst, go, rw;
  logic [6:0] dev_addr;
  logic [7:0] reg_addr, wdata, rdata;
  logic [3:0] nbytes;
  logic       wdata_ack, rdata_valid, done, ack_error, busy, stretch;
  state_e     state;
  logic       m_scl_oe, m_sda_oe, s_scl_oe, s_sda_oe, s2_scl_oe, s2_sda_oe;
  logic       glitch_scl = 1'b0, glitch_sda = 1'b0;
  wire        scl = !(m_scl_oe | s_scl_oe | s2_scl_oe);
  wire        sda = !(m_sda_oe | s_sda_oe | s2_sda_oe);

  i2c_eeprom_top dut (
    .clk, .rst, .go, .rw, .dev_addr, .reg_addr, .nbytes, .wdata, .wdata_ack,
    .rdata, .rdata_valid, .done, .ack_error, .busy, .state, .stretch,
    .scl_i (scl ^ glitch_scl), .sda_i (sda ^ glitch_sda),
    .scl_oe (m_scl_oe), .sda_oe (m_sda_oe)
  );

  eeprom_24c02_model #(.TWR_CYCLES(TWR), .STRETCH_CYCLES(STRETCH)) eeprom (
    .clk, .scl, .sda, .a (3'b000), .wp (1'b0), .scl_oe (s_scl_oe), .sda_oe (s_sda_oe)
  );

  // a second 24C02 on the same bus, address pins 001 (slave 0x51)
  eeprom_24c02_model #(.TWR_CYCLES(TWR), .STRETCH_CYCLES(0)) eeprom2 (
    .clk, .scl, .sda, .a (3'b001), .wp (1'b0), .scl_oe (s2_scl_oe), .sda_oe (s2_sda_oe)
  );

  i2c_bus_monitor #(.MIN_PHASE(DIV)) mon (.clk, .scl, .sda);

  int unsigned checks = 0, failures = 0;

  // mechanism counters
  int unsigned n_byte_write = 0, n_page_write = 0, n_random_read = 0, n_seq_read = 0;
  int unsigned n_rstart = 0, n_nack = 0, n_stretch = 0, n_glitch = 0, n_back2back = 0;
  int unsigned n_reset_abort = 0, n_second_slave = 0;

  logic stretch_q = 0;
  always @(posedge clk) begin
    stretch_q <= stretch;
    if (stretch && !stretch_q && dut.u_master.state == ST_ACK) n_stretch <= n_stretch + 1;
    if (dut.u_master.state == ST_RSTART && dut.u_master.slot_end) n_rstart <= n_rstart + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

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
  bit glitch_on_read = 0;

  // Spikes of two cycles on the master's SDA input right where it samples
  // a read bit, and on its SCL input while SCL is high. The three-cycle
  // filters must remove both.
  always @(posedge clk) begin
    glitch_sda <= 1'b0;
    glitch_scl <= 1'b0;
    if (glitch_on_read && dut.u_master.state == ST_DATA && dut.u_master.qtr == 2'd2 &&
        dut.u_master.u_clock_gen.cnt inside {7'd100, 7'd101}) begin
      glitch_sda <= 1'b1;
      glitch_scl <= 1'b1;
      if (dut.u_master.u_clock_gen.cnt == 7'd100) n_glitch <= n_glitch + 1;
    end
  end

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
    repeat (8) @(negedge clk);
    if (ack_error) n_nack++;
  endtask

  function automatic int unsigned write_slots(int unsigned n); return 10 + 9 + 9 * n + 1; endfunction
  function automatic int unsigned read_slots(int unsigned n);  return 10 + 9 + 11 + 9 * n + 1; endfunction

  task automatic check_len(input int unsigned slots, input int unsigned extra, input string what);
    int unsigned lo = slots * 4 * DIV;
    int unsigned hi = lo + extra + 12 * slots;
    check(cycles >= lo && cycles <= hi,
          $sformatf("%s: took %0d cycles, expected %0d..%0d", what, cycles, lo, hi));
  endtask

  initial begin
    rst = 1; go = 0; rw = 0; dev_addr = '0; reg_addr = '0; wdata = '0; nbytes = '0;
    repeat (10) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (20) @(posedge clk);
    // forget what the bus did before reset set the pad enables
    mon.log_q.delete();
    mon.min_period   = 32'hFFFF_FFFF;
    mon.short_phases = 0;

    // the reference transfer pair: write 0xAA to register 0xFF of 0x50 ...
    wq = '{8'hAA};
    run(RW_WRITE, 7'h50, 8'hFF, 1);
    n_byte_write++;
    exp_s(); exp_b(8'hA0, 1); exp_b(8'hFF, 1); exp_b(8'hAA, 1); exp_p();
    compare_log("byte write");
    check(!ack_error && eeprom.mem[8'hFF] == 8'hAA, "0xAA written to register 0xFF");
    check_len(write_slots(1), STRETCH, "byte write");

    // ... poll with the address until the write cycle is over ...
    begin
      automatic int unsigned polls = 0;
      do begin
        wq = '{};
        run(RW_WRITE, 7'h50, 8'h00, 0);
        polls++;
        if (ack_error) begin
          exp_s(); exp_b(8'hA0, 0); exp_p();
          compare_log("acknowledge polling");
        end
        mon.log_q.delete();
        exp_q.delete();
      end while (ack_error && polls < 100);
      // a poll that got ACK has written one byte (0x00 to 0x00): wait it out
      check(polls > 1 && polls < 100, $sformatf("write cycle ended after %0d polls", polls));
      // 5 ms write cycle over ~11-slot polls of 5.5k cycles each: about 45 polls
      check(polls * 11 * 4 * DIV >= TWR - 11 * 4 * DIV, "polls cover the write cycle");
      repeat (TWR + 100) @(posedge clk);
    end

    // ... and read it back (repeated START), with spikes on the inputs
    glitch_on_read = 1;
    run(RW_READ, 7'h50, 8'hFF, 1);
    n_random_read++;
    exp_s(); exp_b(8'hA0, 1); exp_b(8'hFF, 1); exp_s(); exp_b(8'hA1, 1); exp_b(8'hAA, 0); exp_p();
    compare_log("random read");
    check(!ack_error && rq.size() == 1 && rq[0] == 8'hAA, "register 0xFF reads back 0xAA");
    check_len(read_slots(1), 2 * STRETCH, "random read");

    // page write of eight bytes, the 24C02 page size, then read them back
    wq = '{8'h01, 8'h23, 8'h45, 8'h67, 8'h89, 8'hAB, 8'hCD, 8'hEF};
    run(RW_WRITE, 7'h50, 8'h20, 8);
    n_page_write++;
    exp_s(); exp_b(8'hA0, 1); exp_b(8'h20, 1);
    exp_b(8'h01, 1); exp_b(8'h23, 1); exp_b(8'h45, 1); exp_b(8'h67, 1);
    exp_b(8'h89, 1); exp_b(8'hAB, 1); exp_b(8'hCD, 1); exp_b(8'hEF, 1); exp_p();
    compare_log("page write");
    check_len(write_slots(8), STRETCH, "page write");
    repeat (TWR + 100) @(posedge clk);
    run(RW_READ, 7'h50, 8'h20, 8);
    n_seq_read++;
    check(rq.size() == 8 && rq[0] == 8'h01 && rq[3] == 8'h67 && rq[7] == 8'hEF,
          "sequential read returns the page");
    exp_s(); exp_b(8'hA0, 1); exp_b(8'h20, 1); exp_s(); exp_b(8'hA1, 1);
    exp_b(8'h01, 1); exp_b(8'h23, 1); exp_b(8'h45, 1); exp_b(8'h67, 1);
    exp_b(8'h89, 1); exp_b(8'hAB, 1); exp_b(8'hCD, 1); exp_b(8'hEF, 0); exp_p();
    compare_log("sequential read");
    check_len(read_slots(8), 2 * STRETCH, "sequential read");
    glitch_on_read = 0;

    // the second EEPROM: same register, different slave address
    wq = '{8'h5C};
    run(RW_WRITE, 7'h51, 8'hFF, 1);
    exp_s(); exp_b(8'hA2, 1); exp_b(8'hFF, 1); exp_b(8'h5C, 1); exp_p();
    compare_log("write to second slave");
    check(eeprom2.mem[8'hFF] == 8'h5C && eeprom.mem[8'hFF] == 8'hAA,
          "only the addressed EEPROM was written");
    repeat (TWR + 100) @(posedge clk);
    run(RW_READ, 7'h51, 8'hFF, 1);
    check(!ack_error && rq.size() == 1 && rq[0] == 8'h5C, "second slave reads back 0x5C");
    mon.log_q.delete();
    if (!ack_error) n_second_slave++;

    // go held high: two reads back to back without passing through IDLE
    begin
      automatic int unsigned dones = 0, idle_seen = 0;
      @(negedge clk);
      rw = RW_READ; dev_addr = 7'h50; reg_addr = 8'hFF; nbytes = 4'd1; go = 1;
      while (dones < 2) begin
        @(posedge clk); #1;
        if (done) dones++;
        if (dones == 1 && state == ST_IDLE) idle_seen++;
        if (rdata_valid) check(rdata == 8'hAA, "back-to-back read data");
      end
      go = 0;
      while (busy) @(posedge clk);
      repeat (8) @(posedge clk);
      check(idle_seen == 0, "STOP goes straight to START while go is held");
      if (idle_seen == 0) n_back2back++;
      mon.log_q.delete();
    end

    check(mon.min_period >= 4 * DIV && mon.min_period <= 4 * DIV + 12,
          $sformatf("SCL period %0d cycles, expected %0d (100 kHz)", mon.min_period, 4 * DIV));
    check(mon.short_phases == 0, "no SCL phase shorter than a quarter period");

    // reset in the middle of a data byte (cuts an SCL phase short on purpose)
    @(negedge clk);
    rw = RW_WRITE; dev_addr = 7'h50; reg_addr = 8'h40; nbytes = 4'd1; wdata = 8'h5A; go = 1;
    @(negedge clk) go = 0;
    while (state != ST_DATA) @(posedge clk);
    @(negedge clk) rst = 1;
    @(negedge clk);
    @(negedge clk) rst = 0;
    check(state == ST_IDLE && !busy && !m_scl_oe && !m_sda_oe, "reset returns the bus to IDLE");
    if (state == ST_IDLE) n_reset_abort++;
    repeat (20) @(posedge clk);
    check(eeprom.mem[8'h40] == 8'hFF, "aborted write left the EEPROM unchanged");


    $display("mechanisms: byte_write=%0d page_write=%0d random_read=%0d seq_read=%0d rstart=%0d",
             n_byte_write, n_page_write, n_random_read, n_seq_read, n_rstart);
    $display("mechanisms: nack=%0d stretch=%0d glitch=%0d back_to_back=%0d reset_abort=%0d second_slave=%0d",
             n_nack, n_stretch, n_glitch, n_back2back, n_reset_abort, n_second_slave);
    check(n_byte_write > 0, "byte write happened");
    check(n_page_write > 0, "page write happened");
    check(n_random_read > 0, "random read happened");
    check(n_seq_read > 0, "sequential read happened");
    check(n_rstart > 0, "repeated START happened");
    check(n_nack > 0, "NACK happened");
    check(n_stretch > 0, "clock stretching happened");
    check(n_glitch > 0, "input spikes happened");
    check(n_back2back > 0, "back-to-back transfer happened");
    check(n_reset_abort > 0, "reset abort happened");
    check(n_second_slave > 0, "second slave addressed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
