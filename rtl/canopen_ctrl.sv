// canopen_ctrl: CANopen interface block. Its state machine takes the frame
// in the receive buffer, lets the message type decoder classify it, talks
// to the object dictionary and the ADC interface and writes the response
// into the transmit buffer. Implemented communication objects:
//  - Sign-in (cmd_i = 1): node guarding frame 700h+node with byte 0 = 05h
//    (operational) and the toggle bit (bit 7) cleared. Retransmission of an
//    unacknowledged sign-in is done by the CAN node and never toggles.
//  - Node guarding request (700h+node): the toggle bit flips, then the
//    response 700h+node carries {toggle, 05h}; the first request after a
//    sign-in therefore answers with the bit set.
//  - SDO expedited upload (ccs 2) and download (ccs 1) on 600h+node,
//    answered on 580h+node with 43h/4Bh/4Fh + index, sub-index and data
//    (4, 2 or 1 bytes, little endian) or 60h for a write; anything else,
//    and every OD access failure, gets an abort frame (byte 0 = 80h).
//  - PDO, SYNC and EMCY are decoded but get no response.
// Monitoring entries start an ADC conversion and the response is written
// when it ends (about 1.4 ms). Interface: start_i (one clock) with cmd_i;
// done_o (one clock) with respond_o = 1 when the transmit buffer holds a
// response to send. abort_i or soft_rst_i return the FSM to idle at once.
module canopen_ctrl
  import mops_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        soft_rst_i,
  input  logic        start_i,
  input  logic        cmd_i,        // 0: handle receive buffer, 1: sign-in
  input  logic        abort_i,
  input  logic [6:0]  node_id_i,
  input  can_msg_t    rx_msg_i,
  // object dictionary
  output logic [15:0] od_index_o,
  output logic [7:0]  od_sub_o,
  output logic        od_wr_o,
  output logic [31:0] od_wdata_o,
  input  logic        od_exists_i,
  input  logic        od_sub_exists_i,
  input  logic        od_readable_i,
  input  logic        od_writable_i,
  input  logic        od_refused_i,
  input  logic        od_is_adc_i,
  input  logic [5:0]  od_adc_ch_i,
  input  logic [2:0]  od_size_i,
  input  logic [31:0] od_rdata_i,
  // ADC interface
  output logic        adc_req_o,
  output logic [5:0]  adc_ch_o,
  input  logic        adc_done_i,
  input  logic [11:0] adc_value_i,
  // transmit buffer
  output logic        tx_we_o,
  output can_msg_t    tx_msg_o,
  output logic        done_o,
  output logic        respond_o,
  output logic        idle_o
);
  typedef enum logic [1:0] {C_IDLE, C_EXEC, C_ADC} cstate_t;
  cstate_t     state;
  logic        cmd_q;
  logic        toggle;

  msg_type_t   mtype;
  logic [2:0]  ccs, size;
  logic [15:0] index;
  logic [7:0]  sub;
  logic [31:0] wdata;
  sdo_err_t    err;
  logic        fail;
  logic [31:0] abort_code;
  can_msg_t    abort_msg;

  canopen_decoder u_dec (
    .msg_i(rx_msg_i), .node_id_i, .type_o(mtype), .ccs_o(ccs), .index_o(index),
    .sub_o(sub), .data_o(wdata), .size_o(size)
  );

  // Check of an SDO request against the object dictionary.
  always_comb begin
    fail = 1'b1;
    err  = SDO_ERR_GENERAL;
    if (ccs != 3'd1 && ccs != 3'd2)      err = SDO_ERR_CMD;
    else if (!od_exists_i)               err = SDO_ERR_NO_OBJ;
    else if (!od_sub_exists_i)           err = SDO_ERR_NO_SUB;
    else if (od_refused_i)               err = SDO_ERR_ACCESS;
    else if (ccs == 3'd2 && !od_readable_i) err = SDO_ERR_WO;
    else if (ccs == 3'd1 && !od_writable_i) err = SDO_ERR_RO;
    else                                 fail = 1'b0;
  end

  sdo_failure_response u_fail (
    .err_i(err), .node_id_i, .index_i(index), .sub_i(sub),
    .code_o(abort_code), .msg_o(abort_msg)
  );

  assign od_index_o = index;
  assign od_sub_o   = sub;
  assign od_wdata_o = wdata;
  assign idle_o     = (state == C_IDLE);

  function automatic can_msg_t upload_resp(input logic [6:0] nid, input logic [15:0] idx,
                                           input logic [7:0] sb, input logic [2:0] nbytes,
                                           input logic [31:0] d);
    logic [31:0] m;
    logic [1:0]  n;
    n = 2'(3'd4 - nbytes);
    m = (nbytes == 3'd1) ? 32'h0000_00FF : (nbytes == 3'd2) ? 32'h0000_FFFF : 32'hFFFF_FFFF;
    m = m & d;
    upload_resp.id   = COB_SDO_TX + {4'd0, nid};
    upload_resp.data = {3'b010, 1'b0, n, 2'b11, idx[7:0], idx[15:8], sb,
                        m[7:0], m[15:8], m[23:16], m[31:24]};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= C_IDLE;
      cmd_q     <= 1'b0;
      toggle    <= 1'b0;
      od_wr_o   <= 1'b0;
      adc_req_o <= 1'b0;
      adc_ch_o  <= '0;
      tx_we_o   <= 1'b0;
      tx_msg_o  <= '0;
      done_o    <= 1'b0;
      respond_o <= 1'b0;
    end else begin
      od_wr_o <= 1'b0;
      tx_we_o <= 1'b0;
      done_o  <= 1'b0;
      if (soft_rst_i || abort_i) begin
        state     <= C_IDLE;
        adc_req_o <= 1'b0;
      end else begin
        unique case (state)
          C_IDLE: if (start_i) begin
            state <= C_EXEC;
            cmd_q <= cmd_i;
          end
          C_EXEC: begin
            state     <= C_IDLE;
            done_o    <= 1'b1;
            respond_o <= 1'b0;
            if (cmd_q) begin
              toggle    <= 1'b0;
              tx_we_o   <= 1'b1;
              tx_msg_o  <= '{id: COB_GUARD + {4'd0, node_id_i},
                             data: {1'b0, NMT_STATE_OPERATIONAL, 56'd0}};
              respond_o <= 1'b1;
            end else begin
              unique case (mtype)
                MT_GUARD: begin
                  toggle    <= !toggle;
                  tx_we_o   <= 1'b1;
                  tx_msg_o  <= '{id: COB_GUARD + {4'd0, node_id_i},
                                 data: {!toggle, NMT_STATE_OPERATIONAL, 56'd0}};
                  respond_o <= 1'b1;
                end
                MT_SDO: begin
                  respond_o <= 1'b1;
                  if (fail) begin
                    tx_we_o  <= 1'b1;
                    tx_msg_o <= abort_msg;
                  end else if (ccs == 3'd1) begin
                    od_wr_o  <= 1'b1;
                    tx_we_o  <= 1'b1;
                    tx_msg_o <= '{id: COB_SDO_TX + {4'd0, node_id_i},
                                  data: {8'h60, index[7:0], index[15:8], sub, 32'd0}};
                  end else if (od_is_adc_i) begin
                    state     <= C_ADC;
                    done_o    <= 1'b0;
                    adc_req_o <= 1'b1;
                    adc_ch_o  <= od_adc_ch_i;
                  end else begin
                    tx_we_o  <= 1'b1;
                    tx_msg_o <= upload_resp(node_id_i, index, sub, od_size_i, od_rdata_i);
                  end
                end
                default: ;
              endcase
            end
          end
          C_ADC: if (adc_done_i) begin
            adc_req_o <= 1'b0;
            state     <= C_IDLE;
            done_o    <= 1'b1;
            respond_o <= 1'b1;
            tx_we_o   <= 1'b1;
            tx_msg_o  <= upload_resp(node_id_i, index, sub, 3'd2, {20'd0, adc_value_i});
          end
          default: state <= C_IDLE;
        endcase
      end
    end
  end
endmodule
