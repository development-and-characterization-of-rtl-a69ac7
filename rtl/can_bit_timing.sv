// can_bit_timing: CAN bit timing unit. A prescaler divides the system clock
// into time quanta (brp clocks each). A bit is one synchronisation quantum,
// tseg1 quanta (propagation + phase segment 1) and tseg2 quanta (phase
// segment 2). The bus is sampled at the end of tseg1 (sample_o with
// bit_o) and a new transmit bit is started at the beginning of every bit
// (tx_point_o).
//
// Synchronisation: a recessive-to-dominant edge while hard_sync_i is high
// (bus idle) restarts the bit. Other such edges resynchronise: an edge in
// tseg1 is late and gives a positive phase error equal to its position in
// quanta; an edge in phase segment 2 is early and gives a negative error
// (quanta left to the end of the bit). The bit is lengthened or shortened by
// at most sjw+1 quanta, as in ISO 11898-1. Every resynchronisation edge also
// reports its phase error (phase_err_o, phase_valid_o); the oscillator
// trimming control uses it. Edges while the node itself sends dominant are
// not used. Timing: rx is synchronised with two flip-flops, so all decisions
// lag the pin by two clocks.
// The sign convention of the phase error (late edge positive, early edge
// negative) follows the chip's description; the segment lengths and the
// register layout are this design's own choices, taken from CAN practice.
module can_bit_timing
  import mops_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  can_cfg_t          cfg_i,
  input  logic              rx_i,        // bus level, 0 = dominant
  input  logic              tx_dom_i,    // node drives dominant now
  input  logic              hard_sync_i, // bus idle: hard synchronisation allowed
  output logic              sample_o,    // one-clock pulse at the sample point
  output logic              bit_o,       // sampled bus level
  output logic              tx_point_o,  // one-clock pulse at start of a bit
  output logic signed [5:0] phase_err_o,
  output logic              phase_valid_o
);
  logic [1:0] rx_sync;
  logic       rx_s, rx_prev;
  logic [7:0] pre_cnt;
  logic [5:0] pos;        // quantum index in the bit, 0 = sync segment
  logic [5:0] seg1_end;   // last quantum of phase segment 1 (sample point)
  logic [5:0] bit_end;    // last quantum of the bit
  logic       resynced;   // one resynchronisation per bit
  logic       tq_tick;
  logic       fall_edge;

  assign rx_s    = rx_sync[1];
  assign fall_edge    = rx_prev && !rx_s && !tx_dom_i;
  assign tq_tick = (pre_cnt >= cfg_i.brp - 8'd1);

  // Phase error of an edge at the current quantum.
  logic signed [6:0] err;
  logic [5:0]        jw;
  always_comb begin
    jw = {4'd0, cfg_i.sjw} + 6'd1;
    if (pos == 6'd0)            err = 7'sd0;
    else if (pos <= seg1_end)   err = signed'({1'b0, pos});
    else                        err = signed'({1'b0, pos}) - signed'({1'b0, bit_end}) - 7'sd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sync       <= 2'b11;
      rx_prev       <= 1'b1;
      pre_cnt       <= '0;
      pos           <= '0;
      seg1_end      <= 6'd11;
      bit_end       <= 6'd15;
      resynced      <= 1'b0;
      sample_o      <= 1'b0;
      bit_o         <= 1'b1;
      tx_point_o    <= 1'b0;
      phase_err_o   <= '0;
      phase_valid_o <= 1'b0;
    end else begin
      rx_sync       <= {rx_sync[0], rx_i};
      rx_prev       <= rx_s;
      sample_o      <= 1'b0;
      tx_point_o    <= 1'b0;
      phase_valid_o <= 1'b0;
      if (fall_edge && hard_sync_i) begin
        // Hard synchronisation: this quantum becomes the sync segment.
        pre_cnt    <= '0;
        pos        <= '0;
        seg1_end   <= {1'b0, cfg_i.tseg1};
        bit_end    <= {1'b0, cfg_i.tseg1} + {2'b0, cfg_i.tseg2};
        resynced   <= 1'b1;
        tx_point_o <= 1'b1;
      end else if (fall_edge && !resynced && bit_o) begin
        resynced      <= 1'b1;
        phase_err_o   <= err[5:0];
        phase_valid_o <= 1'b1;
        if (err > 0) begin
          // Late edge: lengthen phase segment 1.
          seg1_end <= seg1_end + ((err[5:0] > jw) ? jw : err[5:0]);
          bit_end  <= bit_end  + ((err[5:0] > jw) ? jw : err[5:0]);
          // The quantum count goes on; the sample point now lies ahead.
          if (tq_tick) begin pre_cnt <= '0; pos <= pos + 6'd1; end
          else         pre_cnt <= pre_cnt + 8'd1;
        end else if (err < 0) begin
          if (6'(-err) <= jw) begin
            // Early edge within the jump width: start the next bit now.
            pre_cnt    <= '0;
            pos        <= '0;
            seg1_end   <= {1'b0, cfg_i.tseg1};
            bit_end    <= {1'b0, cfg_i.tseg1} + {2'b0, cfg_i.tseg2};
            tx_point_o <= 1'b1;
          end else begin
            bit_end <= bit_end - jw;
            if (tq_tick) begin pre_cnt <= '0; pos <= pos + 6'd1; end
            else         pre_cnt <= pre_cnt + 8'd1;
          end
        end
      end else if (tq_tick) begin
        pre_cnt <= '0;
        if (pos == seg1_end) begin
          sample_o <= 1'b1;
          bit_o    <= rx_s;
        end
        if (pos >= bit_end) begin
          pos        <= '0;
          seg1_end   <= {1'b0, cfg_i.tseg1};
          bit_end    <= {1'b0, cfg_i.tseg1} + {2'b0, cfg_i.tseg2};
          resynced   <= 1'b0;
          tx_point_o <= 1'b1;
        end else begin
          pos <= pos + 6'd1;
        end
      end else begin
        pre_cnt <= pre_cnt + 8'd1;
      end
    end
  end
endmodule
