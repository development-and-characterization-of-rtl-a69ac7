// adc_interface: read-out of the 12-bit SAR ADC. The ADC runs on a slow
// clock (adc_clk_o, the system clock divided by ADC_DIV: 10 kHz from
// 10 MHz) and delivers one result bit per ADC clock, so no monitoring value
// is stored; a conversion is started only when a request arrives. The ADC
// has one select line per channel (40 lines, no multiplexer address).
// Sequence: on req_i the select line of ch_i goes high at once; start of
// conversion (soc_o) is raised at the second falling edge of adc_clk_o, so
// the channel has been selected for at least one full ADC period; soc_o
// stays high for one ADC period; the ADC then shifts the result out MSB
// first, one bit per rising edge, and this block samples each bit at the
// following falling edge. done_o (one clock) with value_o comes 13 ADC
// periods after start of conversion, about 1.4 ms after the request at
// 10 kHz. The select/start timing details are this design's choice.
module adc_interface #(
  parameter int unsigned ADC_DIV = 1000,
  parameter int unsigned NCH     = 40
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           soft_rst_i,
  input  logic           req_i,
  input  logic [5:0]     ch_i,
  output logic           done_o,
  output logic [11:0]    value_o,
  output logic           idle_o,
  output logic           adc_clk_o,
  output logic [NCH-1:0] sel_o,
  output logic           soc_o,
  input  logic           dout_i
);
  typedef enum logic [2:0] {A_IDLE, A_SEL, A_SOC, A_BITS, A_DONE} astate_t;
  astate_t     state;
  logic [$clog2(ADC_DIV)-1:0] div;
  logic        fall;
  logic [3:0]  nbits;
  logic        sel_wait;
  logic [11:0] shreg;

  assign fall   = (div == ADC_DIV / 2 - 1);
  assign idle_o = (state == A_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div       <= '0;
      adc_clk_o <= 1'b0;
    end else begin
      div <= (div == ADC_DIV - 1) ? '0 : div + 1'b1;
      if (div == ADC_DIV - 1) adc_clk_o <= 1'b1;
      else if (fall)          adc_clk_o <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= A_IDLE;
      sel_o    <= '0;
      soc_o    <= 1'b0;
      nbits    <= '0;
      sel_wait <= 1'b0;
      shreg    <= '0;
      done_o   <= 1'b0;
      value_o  <= '0;
    end else begin
      done_o <= 1'b0;
      if (soft_rst_i) begin
        state <= A_IDLE;
        sel_o <= '0;
        soc_o <= 1'b0;
      end else begin
        unique case (state)
          A_IDLE: if (req_i) begin
            state    <= A_SEL;
            sel_wait <= 1'b0;
            sel_o    <= '0;
            sel_o[ch_i] <= 1'b1;
          end
          A_SEL: if (fall) begin
            if (sel_wait) begin
              soc_o <= 1'b1;
              state <= A_SOC;
            end
            sel_wait <= 1'b1;
          end
          A_SOC: if (fall) begin
            soc_o <= 1'b0;
            nbits <= '0;
            state <= A_BITS;
          end
          A_BITS: if (fall) begin
            shreg <= {shreg[10:0], dout_i};
            nbits <= nbits + 4'd1;
            if (nbits == 4'd11) state <= A_DONE;
          end
          A_DONE: begin
            value_o <= shreg;
            done_o  <= 1'b1;
            sel_o   <= '0;
            state   <= A_IDLE;
          end
          default: state <= A_IDLE;
        endcase
      end
    end
  end
endmodule
