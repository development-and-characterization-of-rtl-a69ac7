// can_bsp: CAN bit stream processor for classic base frames (11-bit
// identifier), ISO 11898-1. It works at the sample points given by the bit
// timing unit and changes its transmit bit at each bit start.
//
// One engine serves transmitter and receiver: every sampled bus bit is
// de-stuffed, run through the CRC-15 register and stored in the receive
// fields; when the node transmits, the same bit is compared with the bit it
// sent (arbitration during identifier and RTR, bit error elsewhere). Frames
// sent by this node always carry DLC 8 (the node keeps no DLC). After a
// correct CRC a receiver acknowledges; a transmitter without acknowledge
// retries. Detected stuff, CRC, form, acknowledge and bit errors send an
// error flag (dominant when error-active, recessive when error-passive) and
// the node waits for 11 recessive bits before the bus counts as idle again.
// Transmit and receive error counters follow the standard increments;
// TEC > 255 is bus-off, left after 128 sequences of 11 recessive bits.
// In listen-only mode the node never drives the bus dominant.
// Design choices: extended frames are skipped without error and without
// acknowledge; overload frames are not generated.
//
// Interface: tx_req_i is a level held until tx_done_o (one clock); the
// message is taken at the start of each attempt. rx_valid_o (one clock)
// comes with rx_msg_o after the last end-of-frame bit. frame_end_o pulses
// whenever the bus returns to idle after a frame, good or bad.
module can_bsp
  import mops_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     sample_i,
  input  logic     bit_i,
  input  logic     tx_point_i,
  input  logic     listen_only_i,
  input  logic     tx_req_i,
  input  can_msg_t tx_msg_i,
  output logic     tx_o,          // 0 = dominant
  output logic     bus_idle_o,
  output logic     rx_valid_o,
  output can_msg_t rx_msg_o,
  output logic     tx_done_o,
  output logic     arb_lost_o,
  output logic     error_o,       // one clock per detected error
  output logic     frame_end_o,
  output logic [8:0] tec_o,
  output logic [7:0] rec_o,
  output logic     err_passive_o,
  output logic     bus_off_o
);
  typedef enum logic [3:0] {
    S_INTEGRATE, S_IDLE, S_FRAME, S_CRC_DELIM, S_ACK_SLOT, S_ACK_DELIM,
    S_EOF, S_INTERMISSION, S_ERROR, S_BUSOFF
  } state_t;

  state_t      state;
  logic        transmitting;
  can_msg_t    tx_shadow;
  logic        tx_next;
  logic [6:0]  bpos;       // de-stuffed bit position, 0 = SOF
  logic [2:0]  same_cnt;
  logic        last_bit;
  logic        stuff_next;
  logic        fdone;      // last CRC bit seen, a stuff bit may follow
  logic [14:0] crc, crc_tx;
  logic        crc_bad;
  logic [10:0] rx_id;
  logic        rx_rtr;
  logic [3:0]  rx_dlc;
  logic [63:0] rx_data;
  logic [3:0]  cnt;        // generic bit counter (EOF, intermission, flag)
  logic [3:0]  rec_run;    // consecutive recessive bits
  logic [7:0]  busoff_seq;
  logic        err_flag_active;

  // Length of the data field of the frame on the bus.
  logic [3:0]  dlen;
  logic [6:0]  crc_start, crc_end;
  assign dlen      = rx_rtr ? 4'd0 : ((rx_dlc > 4'd8) ? 4'd8 : rx_dlc);
  assign crc_start = 7'd19 + {dlen, 3'b000};
  assign crc_end   = crc_start + 7'd14;

  // Bit this node sends at de-stuffed position p.
  function automatic logic tx_bit_at(input logic [6:0] p, input can_msg_t m, input logic [14:0] c);
    logic [6:0] d;
    if (p == 7'd0)       return 1'b0;
    else if (p <= 7'd11) return m.id[4'(7'd11 - p)];
    else if (p <= 7'd14) return 1'b0;                 // RTR, IDE, r0
    else if (p <= 7'd18) return (p == 7'd15);         // DLC = 8
    else if (p <= 7'd82) begin d = p - 7'd19; return m.data[6'(7'd63 - d)]; end
    else if (p <= 7'd97) return c[4'(7'd97 - p)];
    else                 return 1'b1;
  endfunction

  assign err_passive_o = (tec_o > 9'd127) || (rec_o > 8'd127);
  assign bus_off_o     = (state == S_BUSOFF);
  assign bus_idle_o    = (state == S_IDLE);

  logic [2:0]  same_new;
  logic [14:0] crc_new;
  assign same_new = (bit_i == last_bit) ? same_cnt + 3'd1 : 3'd1;
  assign crc_new  = crc15_step(crc, bit_i);

  task automatic raise_error(input logic is_ack_err);
    state           <= S_ERROR;
    cnt             <= '0;
    rec_run         <= '0;
    error_o         <= 1'b1;
    err_flag_active <= !err_passive_o && !listen_only_i;
    tx_next         <= !( !err_passive_o && !listen_only_i);
    if (transmitting) begin
      if (!(is_ack_err && err_passive_o)) tec_o <= tec_o + 9'd8;
    end else if (rec_o < 8'd128) begin
      rec_o <= rec_o + 8'd1;
    end
    transmitting <= 1'b0;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_INTEGRATE;
      transmitting <= 1'b0;
      tx_shadow    <= '0;
      tx_next      <= 1'b1;
      tx_o         <= 1'b1;
      bpos         <= '0;
      same_cnt     <= '0;
      last_bit     <= 1'b1;
      stuff_next   <= 1'b0;
      fdone        <= 1'b0;
      crc          <= '0;
      crc_tx       <= '0;
      crc_bad      <= 1'b0;
      rx_id        <= '0;
      rx_rtr       <= 1'b0;
      rx_dlc       <= '0;
      rx_data      <= '0;
      cnt          <= '0;
      rec_run      <= '0;
      busoff_seq   <= '0;
      err_flag_active <= 1'b0;
      rx_valid_o   <= 1'b0;
      rx_msg_o     <= '0;
      tx_done_o    <= 1'b0;
      arb_lost_o   <= 1'b0;
      error_o      <= 1'b0;
      frame_end_o  <= 1'b0;
      tec_o        <= '0;
      rec_o        <= '0;
    end else begin
      rx_valid_o  <= 1'b0;
      tx_done_o   <= 1'b0;
      arb_lost_o  <= 1'b0;
      error_o     <= 1'b0;
      frame_end_o <= 1'b0;

      // ---------------- transmit side: bit start ----------------
      if (tx_point_i) begin
        if (state == S_IDLE && tx_req_i && !listen_only_i && !transmitting) begin
          tx_o         <= 1'b0;   // start of frame
          transmitting <= 1'b1;
          tx_shadow    <= tx_msg_i;
        end else begin
          tx_o <= listen_only_i ? 1'b1 : tx_next;
        end
      end
      if (!tx_req_i && state == S_IDLE) transmitting <= 1'b0;

      // ---------------- receive side: sample point ----------------
      if (sample_i) begin
        rec_run <= bit_i ? ((rec_run == 4'd15) ? rec_run : rec_run + 4'd1) : 4'd0;
        case (state)
          S_INTEGRATE: begin
            tx_next <= 1'b1;
            if (bit_i && rec_run >= 4'd10) state <= S_IDLE;
          end

          S_IDLE: begin
            tx_next <= 1'b1;
            if (!bit_i) begin
              // start of frame
              state      <= S_FRAME;
              bpos       <= 7'd1;
              same_cnt   <= 3'd1;
              last_bit   <= 1'b0;
              stuff_next <= 1'b0;
              fdone      <= 1'b0;
              crc        <= crc15_step(15'd0, 1'b0);
              crc_bad    <= 1'b0;
              rx_rtr     <= 1'b0;
              rx_dlc     <= '0;
              rx_data    <= '0;
              tx_next    <= transmitting ? tx_bit_at(7'd1, tx_shadow, crc_tx) : 1'b1;
            end
          end

          S_FRAME: begin
            if (stuff_next) begin
              // stuff bit: must differ from the five before it
              if (bit_i == last_bit || (transmitting && bit_i != tx_o)) begin
                raise_error(1'b0);
              end else begin
                last_bit   <= bit_i;
                same_cnt   <= 3'd1;
                stuff_next <= 1'b0;
                if (fdone) begin
                  state   <= S_CRC_DELIM;
                  tx_next <= 1'b1;
                end else begin
                  tx_next <= transmitting ? tx_bit_at(bpos, tx_shadow, crc_tx) : 1'b1;
                end
              end
            end else begin
              logic lost;
              lost = 1'b0;
              if (transmitting && bit_i != tx_o) begin
                if (bpos <= 7'd12 && tx_o && !bit_i) lost = 1'b1;
              end
              if (transmitting && bit_i != tx_o && !lost) begin
                raise_error(1'b0);
              end else if (bpos == 7'd13 && bit_i) begin
                // extended frame: not handled, wait for the bus to go idle
                state           <= S_ERROR;
                cnt             <= 4'd6;
                rec_run         <= '0;
                err_flag_active <= 1'b0;
                tx_next         <= 1'b1;
                transmitting    <= 1'b0;
              end else begin
                if (lost) begin
                  transmitting <= 1'b0;
                  arb_lost_o   <= 1'b1;
                end
                last_bit   <= bit_i;
                same_cnt   <= same_new;
                stuff_next <= (same_new == 3'd5);
                crc        <= crc_new;
                if (bpos == 7'd82) crc_tx <= crc_new;
                if (bpos <= 7'd11)       rx_id  <= {rx_id[9:0], bit_i};
                else if (bpos == 7'd12)  rx_rtr <= bit_i;
                else if (bpos >= 7'd15 && bpos <= 7'd18) rx_dlc <= {rx_dlc[2:0], bit_i};
                else if (bpos >= 7'd19 && bpos < crc_start) rx_data[6'(7'd63 - (bpos - 7'd19))] <= bit_i;
                bpos <= bpos + 7'd1;
                if (bpos == crc_end && bpos > 7'd18) begin
                  if (same_new == 3'd5) begin
                    fdone   <= 1'b1;
                    tx_next <= (transmitting && !lost) ? !bit_i : 1'b1;
                  end else begin
                    state   <= S_CRC_DELIM;
                    tx_next <= 1'b1;
                  end
                end else if (transmitting && !lost) begin
                  tx_next <= (same_new == 3'd5) ? !bit_i
                           : tx_bit_at(bpos + 7'd1, tx_shadow,
                                       (bpos == 7'd82) ? crc_new : crc_tx);
                end else begin
                  tx_next <= 1'b1;
                end
              end
            end
          end

          S_CRC_DELIM: begin
            crc_bad <= (crc != 15'd0);
            if (!bit_i) raise_error(1'b0);
            else begin
              state   <= S_ACK_SLOT;
              tx_next <= !(!transmitting && crc == 15'd0 && !listen_only_i);
            end
          end

          S_ACK_SLOT: begin
            tx_next <= 1'b1;
            if (transmitting && bit_i) raise_error(1'b1);
            else state <= S_ACK_DELIM;
          end

          S_ACK_DELIM: begin
            if (!bit_i || (!transmitting && crc_bad)) raise_error(1'b0);
            else begin
              state <= S_EOF;
              cnt   <= '0;
            end
          end

          S_EOF: begin
            if (!bit_i && cnt < 4'd6) raise_error(1'b0);
            else if (cnt == 4'd6) begin
              state <= S_INTERMISSION;
              cnt   <= '0;
              if (transmitting) begin
                tx_done_o    <= 1'b1;
                transmitting <= 1'b0;
                if (tec_o != 9'd0) tec_o <= tec_o - 9'd1;
              end else begin
                rx_valid_o <= 1'b1;
                rx_msg_o   <= '{id: rx_id, data: rx_data};
                if (rec_o > 8'd127)      rec_o <= 8'd119;
                else if (rec_o != 8'd0)  rec_o <= rec_o - 8'd1;
              end
            end else cnt <= cnt + 4'd1;
          end

          S_INTERMISSION: begin
            tx_next <= 1'b1;
            if (cnt == 4'd2) begin
              state       <= S_IDLE;
              frame_end_o <= 1'b1;
            end else cnt <= cnt + 4'd1;
          end

          S_ERROR: begin
            if (cnt < 4'd5) begin
              cnt     <= cnt + 4'd1;
              tx_next <= !err_flag_active;
            end else begin
              cnt     <= 4'd6;
              tx_next <= 1'b1;
              if (tec_o > 9'd255) begin
                state      <= S_BUSOFF;
                busoff_seq <= '0;
              end else if (bit_i && rec_run >= 4'd10) begin
                state       <= S_IDLE;
                frame_end_o <= 1'b1;
              end
            end
          end

          S_BUSOFF: begin
            tx_next <= 1'b1;
            if (bit_i && rec_run >= 4'd10) begin
              rec_run <= '0;
              if (busoff_seq == 8'd127) begin
                state <= S_IDLE;
                tec_o <= '0;
                rec_o <= '0;
              end else busoff_seq <= busoff_seq + 8'd1;
            end
          end

          default: state <= S_INTEGRATE;
        endcase
      end
    end
  end
endmodule
