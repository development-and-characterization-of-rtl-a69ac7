// can_node_if: interface between the chip's control logic and the CAN node.
// Three parts, as in the chip: (1) an FSM that runs the handshakes with the
// node: on cfg_load_i it writes all node registers from the hardwired
// configuration table (one register per clock, then cfg_done_o), and on
// tx_start_i it holds the node's transmit request until the node reports
// the frame sent (tx_done_o) or tx_abort_i / soft_rst_i cancels it; (2) the
// data path that copies an accepted received frame into the receive buffer;
// (3) the combinational prioritizer that accepts a received frame only if
// it is addressed to this chip and outranks the one being worked on
// (new_msg_o, one clock, with its rank).
// The chip's description names this interface and its job; the three states
// and the handshakes are this design's own choices.
module can_node_if
  import mops_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        soft_rst_i,
  input  logic [6:0]  node_id_i,
  input  logic [1:0]  cur_rank_i,
  input  logic        cfg_load_i,
  output logic        cfg_done_o,
  input  logic        tx_start_i,
  input  logic        tx_abort_i,
  output logic        tx_done_o,
  output logic        idle_o,
  // CAN node side
  output logic        reg_we_o,
  output logic [1:0]  reg_addr_o,
  output logic [15:0] reg_wdata_o,
  output logic        tx_req_o,
  input  logic        node_tx_done_i,
  input  logic        node_rx_valid_i,
  input  can_msg_t    node_rx_msg_i,
  // receive buffer side
  output logic        rxbuf_we_o,
  output can_msg_t    rxbuf_d_o,
  output logic        new_msg_o,
  output logic [1:0]  new_rank_o
);
  typedef enum logic [1:0] {I_IDLE, I_CFG, I_TX} istate_t;
  istate_t    state;
  logic [1:0] idx;
  logic [1:0] cfg_addr;
  logic [15:0] cfg_data;
  logic       cfg_last;
  logic [1:0] rank;
  logic       accept;

  can_config u_cfg (.idx_i(idx), .addr_o(cfg_addr), .data_o(cfg_data), .last_o(cfg_last));

  msg_prioritizer u_prio (
    .id_i(node_rx_msg_i.id), .node_id_i, .cur_rank_i, .rank_o(rank), .accept_o(accept)
  );

  assign idle_o      = (state == I_IDLE);
  assign reg_we_o    = (state == I_CFG);
  assign reg_addr_o  = cfg_addr;
  assign reg_wdata_o = cfg_data;
  assign tx_req_o    = (state == I_TX);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= I_IDLE;
      idx        <= '0;
      cfg_done_o <= 1'b0;
      tx_done_o  <= 1'b0;
    end else begin
      cfg_done_o <= 1'b0;
      tx_done_o  <= 1'b0;
      if (soft_rst_i) begin
        state <= cfg_load_i ? I_CFG : I_IDLE;
        idx   <= '0;
      end else begin
        unique case (state)
          I_IDLE: begin
            idx <= '0;
            if (cfg_load_i)      state <= I_CFG;
            else if (tx_start_i) state <= I_TX;
          end
          I_CFG: begin
            idx <= idx + 2'd1;
            if (cfg_last) begin
              state      <= I_IDLE;
              cfg_done_o <= 1'b1;
            end
          end
          I_TX: begin
            if (tx_abort_i) state <= I_IDLE;
            else if (node_tx_done_i) begin
              state     <= I_IDLE;
              tx_done_o <= 1'b1;
            end
          end
          default: state <= I_IDLE;
        endcase
      end
    end
  end

  // Receive path: accepted frames go to the receive buffer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rxbuf_we_o <= 1'b0;
      rxbuf_d_o  <= '0;
      new_msg_o  <= 1'b0;
      new_rank_o <= '0;
    end else begin
      rxbuf_we_o <= node_rx_valid_i && accept;
      rxbuf_d_o  <= node_rx_msg_i;
      new_msg_o  <= 1'b0;
      if (rxbuf_we_o) new_msg_o <= 1'b1;  // one clock after the buffer write
      if (node_rx_valid_i && accept) new_rank_o <= rank;
    end
  end
endmodule
