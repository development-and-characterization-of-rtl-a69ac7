// mops_digital: the complete digital part of the MOPS monitoring chip. It
// answers CANopen requests on a CAN bus with monitoring values from the
// on-chip ADC, using only a hardwired subset of CANopen (sign-in, node
// guarding, remote reset, expedited SDO), and keeps itself alive without
// power cycles through two watchdogs and an automated oscillator trimming.
// Blocks: CAN node (bit timing + bit stream processor + registers), CAN
// node interface with the hardwired configuration table and the message
// prioritizer, 75-bit triplicated receive and transmit buffers, CANopen
// block (FSM, message type decoder, SDO failure response, OD interface),
// object dictionary, ADC interface, watchdog timer, configuration reloader,
// trimming control, top-level FSM. The four state machines watched by the
// watchdogs are the top FSM, the CAN node interface, the CANopen FSM and the
// ADC interface.
// Ports: clk is the on-chip oscillator (10 MHz nominal), rst_n the
// power-on/external reset. node_addr_i selects the node ID (0..3, from the
// address pads). With auto_trim_en_i the trimming code osc_trim_o comes from
// the PI loop, otherwise from the trim_pads_i. CAN: can_rx_i/can_tx_o
// (0 = dominant). ADC: adc_clk_o, one select line per channel, start of
// conversion, serial result bit and the 6 ADC trimming bits.
// The set of blocks and their connections follow the chip's block diagram;
// the handshake pulses between them are this design's own choices.
module mops_digital
  import mops_pkg::*;
#(
  parameter longint unsigned WDT_CYCLES    = 64'd50_000_000, // 5 s at 10 MHz
  parameter longint unsigned RELOAD_CYCLES = 64'd2_500_000,  // 250 ms at 10 MHz
  parameter int unsigned     ADC_DIV       = 1000,           // 10 MHz -> 10 kHz
  parameter int unsigned     TRIM_FRAMES   = 15,
  parameter logic [3:0]      TRIM_KP       = 4'd2,
  parameter logic [3:0]      TRIM_KI       = 4'd1,
  parameter int unsigned     NODE_ADDR_W   = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NODE_ADDR_W-1:0] node_addr_i,
  input  logic                   auto_trim_en_i,
  input  logic [5:0]             trim_pads_i,
  input  logic                   can_rx_i,
  output logic                   can_tx_o,
  output logic [5:0]             osc_trim_o,
  output logic                   ready_osc_o,
  output logic                   adc_clk_o,
  output logic [39:0]            adc_sel_o,
  output logic                   adc_soc_o,
  input  logic                   adc_dout_i,
  output logic [5:0]             adc_trim_o,
  output logic [8:0]             tec_o,
  output logic                   bus_off_o
);
  logic [6:0] node_id;
  assign node_id = 7'(node_addr_i);

  // CAN node
  logic        reg_we, tx_req, node_tx_done, node_rx_valid, frame_end, pvalid, listen_only;
  logic [1:0]  reg_addr;
  logic [15:0] reg_wdata;
  can_msg_t    node_rx_msg, rx_q, tx_q, rxbuf_d, co_tx_msg;
  logic signed [5:0] perr;

  can_node u_node (
    .clk, .rst_n, .reg_we_i(reg_we), .reg_addr_i(reg_addr), .reg_wdata_i(reg_wdata),
    .listen_only_i(listen_only), .rx_i(can_rx_i), .tx_o(can_tx_o), .tx_req_i(tx_req),
    .tx_msg_i(tx_q), .tx_done_o(node_tx_done), .rx_valid_o(node_rx_valid), .rx_msg_o(node_rx_msg),
    .frame_end_o(frame_end), .error_o(), .arb_lost_o(), .phase_err_o(perr), .phase_valid_o(pvalid),
    .tec_o, .rec_o(), .bus_off_o, .cfg_o()
  );

  // control signals
  logic timeoutrst, reloadconf, sm_rst, fsm_rst;
  logic cfg_load, cfg_done, tx_start, tx_abort, if_tx_done, if_idle;
  logic new_msg, rxbuf_we;
  logic [1:0] new_rank, cur_rank;
  logic co_start, co_cmd, co_abort, co_done, co_respond, co_idle, co_tx_we;
  logic trim_start, trim_abort, trim_active, trim_done;
  logic top_idle;
  logic [5:0] trim_code;

  assign fsm_rst = timeoutrst | sm_rst;

  can_node_if u_if (
    .clk, .rst_n, .soft_rst_i(fsm_rst), .node_id_i(node_id), .cur_rank_i(cur_rank),
    .cfg_load_i(cfg_load), .cfg_done_o(cfg_done), .tx_start_i(tx_start), .tx_abort_i(tx_abort),
    .tx_done_o(if_tx_done), .idle_o(if_idle), .reg_we_o(reg_we), .reg_addr_o(reg_addr),
    .reg_wdata_o(reg_wdata), .tx_req_o(tx_req), .node_tx_done_i(node_tx_done),
    .node_rx_valid_i(node_rx_valid), .node_rx_msg_i(node_rx_msg), .rxbuf_we_o(rxbuf_we),
    .rxbuf_d_o(rxbuf_d), .new_msg_o(new_msg), .new_rank_o(new_rank)
  );

  msg_buffer u_rxbuf (
    .clk, .rst_n, .clear_i(1'b0), .we_id_i(rxbuf_we), .we_byte_i({8{rxbuf_we}}),
    .d_i(rxbuf_d), .q_o(rx_q), .mismatch_o()
  );
  msg_buffer u_txbuf (
    .clk, .rst_n, .clear_i(1'b0), .we_id_i(co_tx_we), .we_byte_i({8{co_tx_we}}),
    .d_i(co_tx_msg), .q_o(tx_q), .mismatch_o()
  );

  // CANopen block and object dictionary
  logic [15:0] od_index;
  logic [7:0]  od_sub;
  logic        od_wr, od_exists, od_sub_exists, od_readable, od_writable, od_refused, od_is_adc;
  logic [31:0] od_wdata, od_rdata;
  logic [5:0]  od_adc_ch, adc_ch;
  logic [2:0]  od_size;
  logic        adc_req, adc_done, adc_idle;
  logic [11:0] adc_value;

  canopen_ctrl u_co (
    .clk, .rst_n, .soft_rst_i(fsm_rst), .start_i(co_start), .cmd_i(co_cmd), .abort_i(co_abort),
    .node_id_i(node_id), .rx_msg_i(rx_q), .od_index_o(od_index), .od_sub_o(od_sub),
    .od_wr_o(od_wr), .od_wdata_o(od_wdata), .od_exists_i(od_exists),
    .od_sub_exists_i(od_sub_exists), .od_readable_i(od_readable), .od_writable_i(od_writable),
    .od_refused_i(od_refused), .od_is_adc_i(od_is_adc), .od_adc_ch_i(od_adc_ch),
    .od_size_i(od_size), .od_rdata_i(od_rdata), .adc_req_o(adc_req), .adc_ch_o(adc_ch),
    .adc_done_i(adc_done), .adc_value_i(adc_value), .tx_we_o(co_tx_we), .tx_msg_o(co_tx_msg),
    .done_o(co_done), .respond_o(co_respond), .idle_o(co_idle)
  );

  object_dictionary u_od (
    .clk, .rst_n, .node_id_i(node_id), .index_i(od_index), .sub_i(od_sub), .wr_req_i(od_wr),
    .wdata_i(od_wdata), .exists_o(od_exists), .sub_exists_o(od_sub_exists),
    .readable_o(od_readable), .writable_o(od_writable), .sdo_refused_o(od_refused),
    .is_adc_o(od_is_adc), .adc_ch_o(od_adc_ch), .size_o(od_size), .rdata_o(od_rdata),
    .wr_done_o(), .adc_trim_o
  );

  adc_interface #(.ADC_DIV(ADC_DIV), .NCH(40)) u_adc (
    .clk, .rst_n, .soft_rst_i(fsm_rst), .req_i(adc_req), .ch_i(adc_ch), .done_o(adc_done),
    .value_o(adc_value), .idle_o(adc_idle), .adc_clk_o, .sel_o(adc_sel_o), .soc_o(adc_soc_o),
    .dout_i(adc_dout_i)
  );

  // watchdogs
  watchdog_timer #(.TIMEOUT_CYCLES(WDT_CYCLES)) u_wdt (
    .clk, .rst_n, .entimeout_i(~{top_idle, if_idle, co_idle, adc_idle}), .timeoutrst_o(timeoutrst)
  );
  config_reloader #(.RELOAD_CYCLES(RELOAD_CYCLES)) u_reload (
    .clk, .rst_n, .reload_i({top_idle, if_idle, co_idle, adc_idle}), .reloadconf_o(reloadconf)
  );

  // oscillator trimming
  auto_trim #(.TRIM_DEFAULT(6'd32), .FRAMES(TRIM_FRAMES), .SHIFT(4)) u_trim (
    .clk, .rst_n, .start_i(trim_start), .abort_default_i(trim_abort), .kp_i(TRIM_KP),
    .ki_i(TRIM_KI), .phase_err_i(perr), .phase_valid_i(pvalid), .frame_end_i(frame_end),
    .trim_o(trim_code), .active_o(trim_active), .done_o(trim_done)
  );
  assign osc_trim_o  = auto_trim_en_i ? trim_code : trim_pads_i;
  assign ready_osc_o = trim_done;

  top_fsm u_top (
    .clk, .rst_n, .soft_rst_i(timeoutrst), .reload_i(reloadconf), .auto_trim_en_i,
    .new_msg_i(new_msg), .new_rank_i(new_rank), .cfg_done_i(cfg_done), .trim_done_i(trim_done),
    .co_done_i(co_done), .co_respond_i(co_respond), .tx_done_i(if_tx_done),
    .cfg_load_o(cfg_load), .trim_start_o(trim_start), .trim_abort_o(trim_abort),
    .listen_only_o(listen_only), .co_start_o(co_start), .co_cmd_o(co_cmd), .co_abort_o(co_abort),
    .tx_start_o(tx_start), .tx_abort_o(tx_abort), .sm_rst_o(sm_rst), .cur_rank_o(cur_rank),
    .idle_o(top_idle), .remote_reset_o(), .signin_o()
  );
endmodule
