// power_on_reset: behavioural model (not synthesizable) of the power-on
// reset generator. In the chip a bandgap-like cell produces a voltage that
// falls and one that rises with temperature; a comparator switches where
// they cross, which happens at a supply of about 930 mV independently of
// temperature and process. Model: the supply is given in millivolts
// (vdd_mv_i); rst_n_o is low while the supply is below THRESH_MV and goes
// high HOLD_NS after it has risen above it, and low again at once when the
// supply drops below the threshold.
// Behavioural model. The threshold and hold time are this model's own
// choices.
module power_on_reset #(
  parameter int THRESH_MV = 930,
  parameter int HOLD_NS   = 1000
) (
  input  logic [15:0] vdd_mv_i,
  output logic        rst_n_o
);
  logic above;
  assign above = (int'(vdd_mv_i) >= THRESH_MV);
  initial rst_n_o = 1'b0;
  always @(above) begin
    if (!above) rst_n_o = 1'b0;
    else begin
      #(HOLD_NS * 1ns);
      if (above) rst_n_o = 1'b1;
    end
  end
endmodule
