// tb_can_node: checks the CAN protocol unit against the bus model: frame
// reception with acknowledge, transmission with DLC 8, retransmission and
// error counting without acknowledge, the acceptance filter and register
// writes. The node runs at 10 MHz, the bus at 125 kbit/s.
// The expected values are worked out here from the chip's rules, not taken
// from the design under test; stimulus patterns and tolerances are this
// testbench's own choices.
module tb_can_node;
  import mops_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #50 clk = ~clk;

  logic reg_we = 1'b0; logic [1:0] reg_addr = '0; logic [15:0] reg_wdata = '0;
  logic tx_req = 1'b0; can_msg_t tx_msg = '0;
  logic dut_tx, bfm_tx, bus, tx_done, rx_valid, frame_end, err, arb_lost, pv, bus_off;
  can_msg_t rx_msg; logic signed [5:0] pe; logic [8:0] tec; logic [7:0] rec; can_cfg_t cfg;
  int checks = 0, failures = 0;
  int rx_cnt = 0, done_cnt = 0, err_cnt = 0;
  can_msg_t last_rx;

  assign bus = dut_tx & bfm_tx;

  can_node dut (.clk, .rst_n, .reg_we_i(reg_we), .reg_addr_i(reg_addr), .reg_wdata_i(reg_wdata),
    .listen_only_i(1'b0), .rx_i(bus), .tx_o(dut_tx), .tx_req_i(tx_req), .tx_msg_i(tx_msg),
    .tx_done_o(tx_done), .rx_valid_o(rx_valid), .rx_msg_o(rx_msg), .frame_end_o(frame_end),
    .error_o(err), .arb_lost_o(arb_lost), .phase_err_o(pe), .phase_valid_o(pv),
    .tec_o(tec), .rec_o(rec), .bus_off_o(bus_off), .cfg_o(cfg));
  can_bfm #(.BIT_NS(8000)) bfm (.bus, .tx(bfm_tx));

  always @(posedge clk) begin
    if (rx_valid) begin rx_cnt++; last_rx = rx_msg; end
    if (tx_done) done_cnt++;
    if (err) err_cnt++;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic acked;
    bfm.rx_q.delete();
    #1000 rst_n = 1'b1;
    #200_000;
    // 1: receive a frame
    bfm.send(11'h601, 64'h40_00_24_01_00_00_00_00, 4'd8, acked);
    #20_000;
    check(acked, "node acknowledges a good frame");
    check(rx_cnt == 1 && last_rx.id == 11'h601 && last_rx.data == 64'h40_00_24_01_00_00_00_00,
          "received identifier and data");
    // 2: short frame, bytes beyond DLC read as zero
    bfm.send(11'h000, 64'hFFFF_0000_0000_0000, 4'd1, acked);
    #20_000;
    check(rx_cnt == 2 && last_rx.id == 11'h000 && last_rx.data == 64'hFF00_0000_0000_0000,
          "DLC 1 frame");
    // 3: transmit
    bfm.rx_q.delete();
    tx_msg = '{id: 11'h581, data: 64'h4B_00_24_01_34_12_00_00};
    @(negedge clk) tx_req = 1'b1;
    wait (tx_done); tx_req = 1'b0;   // before the next clock edge
    #1;
    #20_000;
    check(bfm.rx_q.size() == 1, "bus model decodes one frame");
    if (bfm.rx_q.size() > 0) begin
      check(bfm.rx_q[0].id == 11'h581 && bfm.rx_q[0].data == 64'h4B_00_24_01_34_12_00_00
            && bfm.rx_q[0].dlc == 4'd8, "transmitted frame content and DLC 8");
    end
    // 4: no acknowledge -> retransmission, TEC rises by 8 per attempt
    bfm.ack_en = 1'b0;
    bfm.rx_q.delete();
    tx_msg = '{id: 11'h701, data: 64'h05_00_00_00_00_00_00_00};
    @(negedge clk) tx_req = 1'b1;
    #3_500_000;
    check(err_cnt >= 3, "acknowledge errors detected");
    check(tec >= 9'd16, "transmit error counter rises");
    bfm.ack_en = 1'b1;
    wait (tx_done); tx_req = 1'b0;   // before the next clock edge
    #1;
    check(done_cnt == 2, "frame delivered once acknowledged");
    // 5: acceptance filter
    @(posedge clk) begin reg_we = 1'b1; reg_addr = REG_AMASK; reg_wdata = 16'h07FF; end
    @(posedge clk) begin reg_addr = REG_ACODE; reg_wdata = 16'h0601; end
    @(posedge clk) reg_we = 1'b0;
    check(cfg.acc_mask == 11'h7FF && cfg.acc_code == 11'h601, "register writes");
    bfm.send(11'h602, 64'h0, 4'd8, acked);
    #20_000;
    check(rx_cnt == 2 && acked, "filtered frame not reported but acknowledged");
    bfm.send(11'h601, 64'h1, 4'd8, acked);
    #20_000;
    check(rx_cnt == 3, "matching frame reported");
    check(bfm.errors_seen == 0 || err_cnt >= 3, "bus model saw no CRC errors outside error test");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
