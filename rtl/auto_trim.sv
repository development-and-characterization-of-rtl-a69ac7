// auto_trim: control block of the automated oscillator trimming, a digital
// proportional-integral (PI) compensator. The phase error e of each
// resynchronising edge (from the CAN bit timing unit, in time quanta;
// positive = edge late = local clock too fast) is added to an accumulator;
// the new 6-bit trimming code is
//   code = base + (KP*e + KI*acc) >>> SHIFT, clamped to 0..63,
// where base is the code in use when trimming started. A larger code adds
// capacitance to the relaxation oscillator and lowers its frequency.
// Trimming starts with start_i (after power-up or a remote reset when
// enabled), runs while the node only listens, and stops after FRAMES bus
// frames (15) have ended: done_o (ready_osc) then goes high and the code is
// frozen. abort_default_i (watchdog timeout during trimming) stops trimming
// and restores TRIM_DEFAULT. The code is triplicated and cleared only by
// the power-on reset. KP, KI are inputs (configurable constants).
// The PI structure, the 6-bit code and the 15 frames follow the chip's
// description; the gains, the shift of 4 and the default code 32 are this
// design's own choices.
module auto_trim #(
  parameter logic [5:0]  TRIM_DEFAULT = 6'd32,
  parameter int unsigned FRAMES       = 15,
  parameter int unsigned SHIFT        = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  logic              abort_default_i,
  input  logic [3:0]        kp_i,
  input  logic [3:0]        ki_i,
  input  logic signed [5:0] phase_err_i,
  input  logic              phase_valid_i,
  input  logic              frame_end_i,
  output logic [5:0]        trim_o,
  output logic              active_o,
  output logic              done_o
);
  logic signed [13:0] acc, acc_new;
  logic signed [19:0] u;
  logic signed [19:0] code_new;
  logic [5:0]         base;
  logic [4:0]         frames;
  logic               we;
  logic [5:0]         d;

  assign acc_new  = acc + 14'(phase_err_i);
  assign u        = (20'(signed'({1'b0, kp_i})) * 20'(phase_err_i)
                   + 20'(signed'({1'b0, ki_i})) * 20'(acc_new)) >>> SHIFT;
  assign code_new = 20'(signed'({1'b0, base})) + u;

  always_comb begin
    we = 1'b0;
    d  = trim_o;
    if (abort_default_i && active_o) begin
      we = 1'b1;
      d  = TRIM_DEFAULT;
    end else if (active_o && phase_valid_i) begin
      we = 1'b1;
      if (code_new < 0)        d = 6'd0;
      else if (code_new > 63)  d = 6'd63;
      else                     d = code_new[5:0];
    end
  end

  tmr_reg #(.W(6), .INIT(TRIM_DEFAULT)) u_code (
    .clk, .rst_n, .we_i(we), .d_i(d), .q_o(trim_o), .mismatch_o()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      base     <= TRIM_DEFAULT;
      frames   <= '0;
      active_o <= 1'b0;
      done_o   <= 1'b0;
    end else begin
      if (start_i) begin
        acc      <= '0;
        base     <= trim_o;
        frames   <= '0;
        active_o <= 1'b1;
        done_o   <= 1'b0;
      end else if (active_o) begin
        if (abort_default_i) begin
          active_o <= 1'b0;
        end else begin
          if (phase_valid_i) acc <= acc_new;
          if (frame_end_i) begin
            frames <= frames + 5'd1;
            if (frames == 5'(FRAMES - 1)) begin
              active_o <= 1'b0;
              done_o   <= 1'b1;
            end
          end
        end
      end
    end
  end
endmodule
