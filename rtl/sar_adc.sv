// sar_adc: behavioural model (not synthesizable) of the 12-bit SAR ADC with
// 40 inputs. The analog inputs are given as ideal 12-bit codes (vin_i; the
// real ADC uses a 0.9 V reference, about 220 uV per count). One of the 40
// select lines picks the channel (one-hot, no multiplexer address). At a
// rising edge of adc_clk_i with soc_i high the selected input is sampled;
// on each of the next 12 rising edges one result bit appears on dout_o,
// MSB first. With no select line high the result is 0. trim_i (the 6 DAC
// trimming bits) is accepted but has no effect in this model.
// Behavioural model. 12 bits and 40 inputs follow the chip; the serial
// read-out order (MSB first) is this model's own choice.
module sar_adc (
  input  logic        adc_clk_i,
  input  logic [39:0] sel_i,
  input  logic        soc_i,
  input  logic [5:0]  trim_i,
  input  logic [11:0] vin_i [40],
  output logic        dout_o
);
  logic [11:0] held;
  logic [11:0] pick;
  logic [3:0]  left;
  initial begin
    dout_o = 1'b0;
    held   = '0;
    left   = '0;
  end

  always_comb begin
    pick = '0;
    for (int i = 0; i < 40; i++) if (sel_i[i]) pick = vin_i[i];
  end

  always @(posedge adc_clk_i) begin
    if (soc_i) begin
      held <= pick;
      left <= 4'd12;
    end else if (left != 4'd0) begin
      dout_o <= held[left - 4'd1];
      left   <= left - 4'd1;
    end
  end
  wire unused_trim = ^trim_i;
endmodule
