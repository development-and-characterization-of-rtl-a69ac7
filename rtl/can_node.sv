// can_node: CAN protocol unit. It joins the bit timing unit and the bit
// stream processor and holds the node's configuration in registers written
// through a small register interface (reg_we_i, reg_addr_i, reg_wdata_i,
// one register per clock):
//   0  BRP      [7:0]  clocks per time quantum
//   1  TIMING   [4:0] tseg1, [8:5] tseg2, [10:9] sjw-1
//   2  ACODE    [10:0] acceptance code
//   3  AMASK    [10:0] acceptance mask, 1 = identifier bit is compared
// Writing a register does not disturb a frame on the bus. Frames that pass
// the acceptance filter are reported with rx_valid_o; all frames are still
// acknowledged. The phase error of every resynchronisation edge is passed
// out for the oscillator trimming control. The register map and reset
// values are this design's choice; the reset values equal the hardwired
// configuration (125 kbit/s at 10 MHz: 5 clocks per quantum, 16 quanta).
module can_node
  import mops_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              reg_we_i,
  input  logic [1:0]        reg_addr_i,
  input  logic [15:0]       reg_wdata_i,
  input  logic              listen_only_i,
  input  logic              rx_i,
  output logic              tx_o,
  input  logic              tx_req_i,
  input  can_msg_t          tx_msg_i,
  output logic              tx_done_o,
  output logic              rx_valid_o,
  output can_msg_t          rx_msg_o,
  output logic              frame_end_o,
  output logic              error_o,
  output logic              arb_lost_o,
  output logic signed [5:0] phase_err_o,
  output logic              phase_valid_o,
  output logic [8:0]        tec_o,
  output logic [7:0]        rec_o,
  output logic              bus_off_o,
  output can_cfg_t          cfg_o
);
  can_cfg_t cfg;
  logic     sample, sbit, tx_point, bus_idle, bsp_rx_valid;
  can_msg_t bsp_rx_msg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg <= '{brp: 8'd5, tseg1: 5'd11, tseg2: 4'd4, sjw: 2'd3,
               acc_code: 11'd0, acc_mask: 11'd0};
    end else if (reg_we_i) begin
      unique case (reg_addr_i)
        REG_BRP:    cfg.brp <= reg_wdata_i[7:0];
        REG_TIMING: begin
          cfg.tseg1 <= reg_wdata_i[4:0];
          cfg.tseg2 <= reg_wdata_i[8:5];
          cfg.sjw   <= reg_wdata_i[10:9];
        end
        REG_ACODE:  cfg.acc_code <= reg_wdata_i[10:0];
        REG_AMASK:  cfg.acc_mask <= reg_wdata_i[10:0];
      endcase
    end
  end
  assign cfg_o = cfg;

  can_bit_timing u_btl (
    .clk, .rst_n, .cfg_i(cfg), .rx_i, .tx_dom_i(!tx_o), .hard_sync_i(bus_idle),
    .sample_o(sample), .bit_o(sbit), .tx_point_o(tx_point),
    .phase_err_o, .phase_valid_o
  );

  can_bsp u_bsp (
    .clk, .rst_n, .sample_i(sample), .bit_i(sbit), .tx_point_i(tx_point),
    .listen_only_i, .tx_req_i, .tx_msg_i, .tx_o, .bus_idle_o(bus_idle),
    .rx_valid_o(bsp_rx_valid), .rx_msg_o(bsp_rx_msg), .tx_done_o, .arb_lost_o,
    .error_o, .frame_end_o, .tec_o, .rec_o, .err_passive_o(), .bus_off_o
  );

  assign rx_valid_o = bsp_rx_valid && (((bsp_rx_msg.id ^ cfg.acc_code) & cfg.acc_mask) == 11'd0);
  assign rx_msg_o   = bsp_rx_msg;
endmodule
