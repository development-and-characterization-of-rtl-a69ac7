// mops_chip: the MOPS monitoring chip with its digital part and behavioural
// models of the mixed-signal parts that have a logic function: power-on
// reset, trimmable relaxation oscillator (clocks the whole chip, output on
// clk_out_o) and the 40-input 12-bit ADC. The two 3000-bit SEU test shift
// registers (plain and triplicated) are included as on the chip. The
// regulator, bandgap reference and CAN physical layer have no logic
// function and are not modelled: the CAN pins here are the logic-level
// receive and transmit bits of the physical layer (rxcan_i, txcan_o,
// 0 = dominant), and the supply is given as a voltage in millivolts for the
// power-on reset. The digital reset is the power-on reset ANDed with the
// external RESETD pad (active low here). Analog inputs are ideal 12-bit
// codes. The oscillator model runs from time zero so that the logic sees
// clock edges while the power-on reset is still low; the reset branches of
// all flip-flops are therefore executed before the reset is released.
module mops_chip #(
  parameter int                OSC_PROCESS_PPM = 0,
  parameter longint unsigned   WDT_CYCLES      = 64'd50_000_000,
  parameter longint unsigned   RELOAD_CYCLES   = 64'd2_500_000,
  parameter int unsigned       ADC_DIV         = 1000,
  parameter int unsigned       SEU_LEN         = 3000
) (
  input  logic [15:0] vdd_mv_i,
  input  logic        resetd_n_i,
  input  logic [1:0]  addrcan_i,
  input  logic        auto_trim_en_i,
  input  logic [5:0]  trim_pads_i,
  input  logic        rxcan_i,
  output logic        txcan_o,
  input  logic [11:0] adc_vin_i [40],
  output logic        clk_out_o,
  output logic        reset_out_o,
  output logic        ready_osc_o,
  output logic [5:0]  osc_trim_o,
  output logic [5:0]  adc_trim_o,
  output logic [8:0]  tec_o,
  output logic        bus_off_o,
  input  logic        sr_shift_i,
  input  logic        sr_in_i,
  output logic [1:0]  sr_out_o
);
  logic clk, por_n, rst_n;
  logic adc_clk, adc_soc, adc_dout;
  logic [39:0] adc_sel;

  power_on_reset u_por (.vdd_mv_i, .rst_n_o(por_n));
  assign reset_out_o = por_n;
  assign rst_n       = por_n & resetd_n_i;

  relaxation_oscillator #(.PROCESS_PPM(OSC_PROCESS_PPM)) u_osc (
    .en_i(1'b1), .trim_i(osc_trim_o), .clk_o(clk)
  );
  assign clk_out_o = clk;

  mops_digital #(
    .WDT_CYCLES(WDT_CYCLES), .RELOAD_CYCLES(RELOAD_CYCLES), .ADC_DIV(ADC_DIV)
  ) u_dig (
    .clk, .rst_n, .node_addr_i(addrcan_i), .auto_trim_en_i, .trim_pads_i,
    .can_rx_i(rxcan_i), .can_tx_o(txcan_o), .osc_trim_o, .ready_osc_o,
    .adc_clk_o(adc_clk), .adc_sel_o(adc_sel), .adc_soc_o(adc_soc), .adc_dout_i(adc_dout),
    .adc_trim_o, .tec_o, .bus_off_o
  );

  sar_adc u_adc (
    .adc_clk_i(adc_clk), .sel_i(adc_sel), .soc_i(adc_soc), .trim_i(adc_trim_o),
    .vin_i(adc_vin_i), .dout_o(adc_dout)
  );

  seu_shift_register #(.LEN(SEU_LEN), .TMR(1'b0)) u_sr_plain (
    .clk, .rst_n, .shift_en_i(sr_shift_i), .sr_in_i, .sr_out_o(sr_out_o[0])
  );
  seu_shift_register #(.LEN(SEU_LEN), .TMR(1'b1)) u_sr_tmr (
    .clk, .rst_n, .shift_en_i(sr_shift_i), .sr_in_i, .sr_out_o(sr_out_o[1])
  );
endmodule
