// can_config: hardwired CAN node configuration. A purely combinational
// table that the CAN node interface walks through (index 0..NREGS-1) to
// write the node's registers at power-up, after a timeout, after a remote
// reset and on every configuration reload. Because the values are wired
// in, the chip needs no non-volatile memory or external protocol to start,
// and a periodic reload repairs upset configuration registers. The default
// values give 125 kbit/s from the 10 MHz clock: 5 clocks per time quantum,
// 16 quanta per bit (1 + 11 + 4), sample point at 75 %, jump width 4, and
// an acceptance filter that passes every identifier; these numbers are
// this design's choice.
module can_config
  import mops_pkg::*;
#(
  parameter logic [7:0]  BRP   = 8'd5,
  parameter logic [4:0]  TSEG1 = 5'd11,
  parameter logic [3:0]  TSEG2 = 4'd4,
  parameter logic [1:0]  SJW_M1 = 2'd3,
  parameter logic [10:0] ACODE = 11'd0,
  parameter logic [10:0] AMASK = 11'd0
) (
  input  logic [1:0]  idx_i,
  output logic [1:0]  addr_o,
  output logic [15:0] data_o,
  output logic        last_o
);
  always_comb begin
    addr_o = idx_i;
    unique case (idx_i)
      REG_BRP:    data_o = {8'd0, BRP};
      REG_TIMING: data_o = {5'd0, SJW_M1, TSEG2, TSEG1};
      REG_ACODE:  data_o = {5'd0, ACODE};
      REG_AMASK:  data_o = {5'd0, AMASK};
    endcase
  end
  assign last_o = (idx_i == 2'd3);
endmodule
