// eeprom_24c02_model: behavioural model of a 24C02 serial EEPROM (I2C slave).
//
// Not synthesizable design; a simulation model of the memory chip the
// master talks to. It watches the wired-AND bus levels scl/sda on every
// system clock (the bus is oversampled) and pulls sda low through sda_oe
// to acknowledge or to send a 0. Behaviour modelled:
//   * 256 x 8 array, erased to 0xFF at start.
//   * Device address 1010 A2 A1 A0 + R/W; any other address is ignored
//     (no acknowledge), and so is every address while a write cycle runs
//     (acknowledge polling).
//   * Byte and page write: word address, then data bytes buffered in an
//     8-byte page whose low three address bits roll over; the page is
//     written on STOP and starts a self-timed write cycle of TWR_CYCLES.
//   * WP = 1 blocks the array write (data is still acknowledged).
//   * Random read (dummy write of the word address, repeated START, read)
//     and sequential read; the address counter wraps at 256.
//   * Optional clock stretching: after acknowledging its address it holds
//     SCL low for STRETCH_CYCLES (a real 24C02 does not; 0 disables it).
module eeprom_24c02_model #(
  parameter int unsigned TWR_CYCLES     = 1000,
  parameter int unsigned STRETCH_CYCLES = 0
) (
  input  logic       clk,
  input  logic       scl,
  input  logic       sda,
  input  logic [2:0] a,
  input  logic       wp,
  output logic       scl_oe,
  output logic       sda_oe
);
  import i2c_tb_pkg::*;

  typedef enum logic [2:0] {M_IDLE, M_DEV, M_WORD, M_WDATA, M_READ} mstate_e;

  logic [7:0]  mem [256];
  logic [7:0]  page_buf [8];
  logic [7:0]  page_vld;
  logic [7:0]  ptr;
  logic [7:0]  sh;
  logic [3:0]  bitcnt;
  logic        ack_phase, acked, master_ack;
  logic        prev_scl, prev_sda;
  mstate_e     st;
  int unsigned busy_cnt, stretch_cnt;
  int unsigned writes_done, stretches, nacks_sent, starts_seen, stops_seen;

  initial begin
    foreach (mem[i]) mem[i] = 8'hFF;
    page_vld = '0; ptr = '0; sh = '0; bitcnt = '0;
    ack_phase = 0; acked = 0; master_ack = 0;
    prev_scl = 1; prev_sda = 1; st = M_IDLE;
    busy_cnt = 0; stretch_cnt = 0; sda_oe = 0; scl_oe = 0;
    writes_done = 0; stretches = 0; nacks_sent = 0; starts_seen = 0; stops_seen = 0;
  end

  wire start_c = prev_scl && scl && prev_sda && !sda;
  wire stop_c  = prev_scl && scl && !prev_sda && sda;
  wire rise    = !prev_scl && scl;
  wire fall    = prev_scl && !scl;

  function automatic logic [7:0] next_in_page(logic [7:0] p);
    return {p[7:3], p[2:0] + 3'd1};
  endfunction

  always @(posedge clk) begin
    prev_scl <= scl;
    prev_sda <= sda;
    if (busy_cnt != 0) busy_cnt <= busy_cnt - 1;
    if (stretch_cnt != 0) begin
      stretch_cnt <= stretch_cnt - 1;
      if (stretch_cnt == 1) scl_oe <= 1'b0;
    end

    if (start_c) begin
      starts_seen <= starts_seen + 1;
      st        <= M_DEV;
      bitcnt    <= 0;
      ack_phase <= 0;
      sda_oe    <= 0;
    end else if (stop_c) begin
      stops_seen <= stops_seen + 1;
      if (page_vld != 0) begin
        if (!wp) begin
          for (int i = 0; i < 8; i++)
            if (page_vld[i]) mem[{ptr[7:3], 3'(i)}] <= page_buf[i];
          writes_done <= writes_done + 1;
        end
        busy_cnt <= TWR_CYCLES;
        page_vld <= '0;
      end
      st     <= M_IDLE;
      sda_oe <= 0;
    end else if (st != M_IDLE && rise) begin
      if (!ack_phase) begin
        if (st != M_READ) sh <= {sh[6:0], sda};
        bitcnt <= bitcnt + 1;
      end else if (st == M_READ) begin
        master_ack <= !sda;
      end
    end else if (st != M_IDLE && fall) begin
      if (st == M_READ) begin
        if (!ack_phase && bitcnt < 8) begin
          sda_oe <= !sh[7 - bitcnt[2:0]];
        end else if (!ack_phase) begin
          sda_oe    <= 0;            // release for the master's ACK/NACK
          ack_phase <= 1;
        end else if (master_ack) begin
          ptr       <= ptr + 1;
          sh        <= mem[ptr + 1];
          sda_oe    <= !mem[ptr + 1][7];
          bitcnt    <= 0;
          ack_phase <= 0;
        end else begin
          sda_oe <= 0;
          st     <= M_IDLE;          // NACK: wait for STOP
        end
      end else if (!ack_phase && bitcnt == 8) begin
        // end of a received byte: decide the acknowledge
        ack_phase <= 1;
        acked     <= 1;
        unique case (st)
          M_DEV: begin
            if (sh[7:4] == EEPROM_TYPE_ID && sh[3:1] == a && busy_cnt == 0) sda_oe <= 1;
            else begin
              acked      <= 0;
              nacks_sent <= nacks_sent + 1;
            end
          end
          M_WORD: begin
            ptr    <= sh;
            sda_oe <= 1;
          end
          M_WDATA: begin
            page_buf[ptr[2:0]] <= sh;
            page_vld[ptr[2:0]] <= 1'b1;
            ptr    <= next_in_page(ptr);
            sda_oe <= 1;
          end
          default: ;
        endcase
      end else if (ack_phase) begin
        // end of the acknowledge bit
        ack_phase <= 0;
        bitcnt    <= 0;
        sda_oe    <= 0;
        if (!acked) st <= M_IDLE;
        else unique case (st)
          M_DEV: begin
            if (STRETCH_CYCLES != 0) begin
              scl_oe      <= 1;
              stretch_cnt <= STRETCH_CYCLES;
              stretches   <= stretches + 1;
            end
            if (sh[0]) begin
              st     <= M_READ;
              sh     <= mem[ptr];
              sda_oe <= !mem[ptr][7];
            end else st <= M_WORD;
          end
          M_WORD:  st <= M_WDATA;
          default: ;
        endcase
      end
    end
  end

endmodule
