// i2c_master: I2C bus master for a 24Cxx serial EEPROM.
//
// The FSM walks through the frames of an EEPROM access one bit slot at a
// time. A write is START, seven address bits, R/W = 0, ACK, eight bits of
// word (register) address, ACK, data byte(s) each followed by the slave's
// ACK, and STOP. A read is START, address with R/W = 0, ACK, word address,
// ACK, a repeated START, the address again with R/W = 1, ACK, then data
// byte(s) from the slave, each acknowledged by the master except the last,
// which gets NACK, and STOP. The state sequence IDLE, START, ADDR (count
// 6 down to 0), RW, ACK, register, ACK_2, DATA (count 7 down to 0), ACK_3,
// STOP, and the way reset returns the bus to IDLE from any state, follow
// the reference design; the repeated-START state, multi-byte transfers,
// the NACK handling and the host handshake are this design's additions.
//
// Bit timing: each state is a slot of four quarters of an SCL period,
// stepped by the tick of i2c_clock_gen. In a data slot SCL is pulled low
// for quarters 0 and 1 and released for quarters 2 and 3; SDA keeps its
// level in quarter 0 and takes the new bit in quarter 1, so it only ever
// changes while SCL is low. SDA is sampled at the end of quarter 2. START
// releases both lines for two quarters, then pulls SDA low for two. STOP
// pulls SDA low while SCL is low, releases SCL for two quarters, and lets
// SDA rise when it leaves. The line drivers are open-drain: scl_oe and
// sda_oe = 1 pull the line low, 0 lets the pull-up raise it; both are
// registered so they never glitch.
//
// Host interface: with rst low, `go` high starts a transfer using rw,
// dev_addr, reg_addr and nbytes (0 counts as 1), which are captured at
// START. Each write byte is taken from wdata, and wdata_ack pulses when it
// has been taken so the host can present the next one. Each read byte
// appears on rdata with a one-cycle rdata_valid. `done` pulses after STOP,
// with ack_error set if a slave did not acknowledge (the transfer is then
// cut short by a STOP). If `go` is still high when STOP ends, the next
// transfer starts at once, as the reference design loops from STOP back
// to START while reset stays low.
module i2c_master
  import i2c_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned SCL_HZ = 100_000,
  parameter int unsigned NB_W   = 4          // width of the byte count
) (
  input  logic            clk,
  input  logic            rst,        // synchronous, active high
  // host side
  input  logic            go,
  input  logic            rw,         // 0 write, 1 read
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
  output logic            stretch,    // a slave is holding SCL low
  // bus side (filtered inputs, open-drain enables)
  input  logic            scl_in,
  input  logic            sda_in,
  output logic            scl_oe,
  output logic            sda_oe
);

  // ---------------------------------------------------------------- timing
  logic tick, clear;

  i2c_clock_gen #(.CLK_HZ(CLK_HZ), .SCL_HZ(SCL_HZ)) u_clock_gen (
    .clk          (clk),
    .rst          (rst),
    .clear        (clear),
    .scl_released (!scl_oe),
    .scl_in       (scl_in),
    .tick         (tick),
    .stretch      (stretch)
  );

  // ------------------------------------------------------- data register
  logic       sr_load, sr_shift, sr_msb;
  logic [7:0] sr_din, sr_q;
  logic       sda_sample;

  i2c_shift_reg u_shift_reg (
    .clk   (clk),
    .rst   (rst),
    .load  (sr_load),
    .din   (sr_din),
    .shift (sr_shift),
    .sin   (sda_sample),
    .msb   (sr_msb),
    .q     (sr_q)
  );

  // ------------------------------------------------------------ FSM state
  logic [1:0]      qtr;         // quarter of the current bit slot
  logic [2:0]      count;       // bits left in the current frame, minus one
  logic            pass2;       // read: second address frame (R/W = 1)
  logic            op_rw;
  logic [6:0]      dev_l;
  logic [7:0]      reg_l;
  logic [NB_W-1:0] bytes_left;

  wire slot_end = tick && (qtr == 2'd3);
  wire more     = (bytes_left > NB_W'(1));

  // Next-state logic runs only at the end of a slot (or on `go` in IDLE).
  state_e     state_d;
  logic [2:0] count_d;
  logic       latch_cmd;    // capture a new command and enter START

  always_comb begin
    state_d   = state;
    count_d   = count;
    sr_load   = 1'b0;
    sr_din    = sr_q;
    sr_shift  = 1'b0;
    latch_cmd = 1'b0;
    clear     = 1'b0;

    if (state == ST_IDLE) begin
      if (go) begin
        latch_cmd = 1'b1;
        clear     = 1'b1;
        state_d   = ST_START;
      end
    end else if (slot_end) begin
      unique case (state)
        ST_START: begin
          state_d = ST_ADDR;
          count_d = 3'd6;
          sr_load = 1'b1;
          sr_din  = {dev_l, pass2 ? RW_READ : RW_WRITE};
        end
        ST_ADDR: begin
          sr_shift = 1'b1;
          if (count == 3'd0) state_d = ST_RW;
          else               count_d = count - 3'd1;
        end
        ST_RW: begin
          sr_shift = 1'b1;
          state_d  = ST_ACK;
        end
        ST_ACK: begin
          count_d = 3'd7;
          if (sda_sample) begin
            state_d = ST_STOP;
          end else if (pass2) begin
            state_d = ST_DATA;
          end else begin
            state_d = ST_REG;
            sr_load = 1'b1;
            sr_din  = reg_l;
          end
        end
        ST_REG: begin
          sr_shift = 1'b1;
          if (count == 3'd0) state_d = ST_ACK_2;
          else               count_d = count - 3'd1;
        end
        ST_ACK_2: begin
          count_d = 3'd7;
          if (sda_sample)            state_d = ST_STOP;
          else if (op_rw == RW_READ) state_d = ST_RSTART;
          else begin
            state_d = ST_DATA;
            sr_load = 1'b1;
            sr_din  = wdata;
          end
        end
        ST_RSTART: state_d = ST_START;
        ST_DATA: begin
          sr_shift = 1'b1;
          if (count == 3'd0) state_d = ST_ACK_3;
          else               count_d = count - 3'd1;
        end
        ST_ACK_3: begin
          count_d = 3'd7;
          if (op_rw == RW_WRITE && sda_sample) state_d = ST_STOP;
          else if (more) begin
            state_d = ST_DATA;
            if (op_rw == RW_WRITE) begin
              sr_load = 1'b1;
              sr_din  = wdata;
            end
          end else state_d = ST_STOP;
        end
        ST_STOP: begin
          if (go) begin
            latch_cmd = 1'b1;
            state_d   = ST_START;
          end else begin
            state_d   = ST_IDLE;
          end
        end
        default: state_d = ST_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= ST_IDLE;
      qtr         <= 2'd0;
      count       <= 3'd0;
      pass2       <= 1'b0;
      op_rw       <= RW_WRITE;
      dev_l       <= '0;
      reg_l       <= '0;
      bytes_left  <= '0;
      sda_sample  <= 1'b1;
      ack_error   <= 1'b0;
      done        <= 1'b0;
      wdata_ack   <= 1'b0;
      rdata       <= '0;
      rdata_valid <= 1'b0;
    end else begin
      done        <= 1'b0;
      wdata_ack   <= 1'b0;
      rdata_valid <= 1'b0;
      state       <= state_d;
      count       <= count_d;

      if (latch_cmd) begin
        qtr        <= 2'd0;
        pass2      <= 1'b0;
        op_rw      <= rw;
        dev_l      <= dev_addr;
        reg_l      <= reg_addr;
        bytes_left <= (nbytes == '0) ? NB_W'(1) : nbytes;
        ack_error  <= 1'b0;
      end else if (tick && state != ST_IDLE) begin
        qtr <= qtr + 2'd1;
      end

      if (tick && qtr == 2'd2) sda_sample <= sda_in;

      if (slot_end) begin
        unique case (state)
          ST_ACK, ST_ACK_2:
            if (sda_sample) ack_error <= 1'b1;
          ST_RSTART:
            pass2 <= 1'b1;
          ST_DATA:
            if (op_rw == RW_READ && count == 3'd0) begin
              rdata       <= {sr_q[6:0], sda_sample};
              rdata_valid <= 1'b1;
            end
          ST_ACK_3: begin
            if (op_rw == RW_WRITE && sda_sample) ack_error <= 1'b1;
            bytes_left <= bytes_left - NB_W'(1);
          end
          ST_STOP:
            done <= 1'b1;
          default: ;
        endcase
      end

      // A write byte is consumed when it is loaded into the data register.
      if (sr_load && state inside {ST_ACK_2, ST_ACK_3}) wdata_ack <= 1'b1;
    end
  end

  assign busy = (state != ST_IDLE);

  // ------------------------------------------------------- line drivers
  logic scl_low_d, sda_low_d;

  always_comb begin
    scl_low_d = 1'b0;
    sda_low_d = sda_oe;                 // quarter 0 holds SDA
    unique case (state)
      ST_IDLE: begin
        scl_low_d = 1'b0;
        sda_low_d = 1'b0;
      end
      ST_START: begin
        scl_low_d = 1'b0;
        sda_low_d = (qtr >= 2'd2);
      end
      ST_ADDR, ST_RW, ST_REG: begin
        scl_low_d = (qtr <= 2'd1);
        if (qtr != 2'd0) sda_low_d = !sr_msb;
      end
      ST_DATA: begin
        scl_low_d = (qtr <= 2'd1);
        if (qtr != 2'd0) sda_low_d = (op_rw == RW_WRITE) ? !sr_msb : 1'b0;
      end
      ST_ACK, ST_ACK_2, ST_RSTART: begin
        scl_low_d = (qtr <= 2'd1);
        if (qtr != 2'd0) sda_low_d = 1'b0;
      end
      ST_ACK_3: begin
        scl_low_d = (qtr <= 2'd1);
        if (qtr != 2'd0) sda_low_d = (op_rw == RW_READ) && more;
      end
      ST_STOP: begin
        scl_low_d = (qtr <= 2'd1);
        if (qtr != 2'd0) sda_low_d = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      scl_oe <= 1'b0;
      sda_oe <= 1'b0;
    end else begin
      scl_oe <= scl_low_d;
      sda_oe <= sda_low_d;
    end
  end

  // SDA may change while SCL is released only to make START or STOP.
  a_sda_stable_while_scl_high : assert property (
    @(posedge clk) disable iff (rst)
      (!scl_oe && !$past(scl_oe) && (sda_oe != $past(sda_oe)))
        |-> (state == ST_START || state == ST_IDLE)
  ) else $error("SDA changed while SCL high outside START/STOP");

endmodule
