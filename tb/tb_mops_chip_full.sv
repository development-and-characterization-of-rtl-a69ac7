// tb_mops_chip_full: the chip exactly as built, with no parameter
// overrides (nominal oscillator, 5 s watchdog, 250 ms configuration
// reload, 10 kHz ADC clock). One complete operation: power-up, automated
// trimming on 0x555 frames from the bus model, sign-in of node 2, an SDO
// read of an ADC channel, then 300 ms of bus silence during which the
// configuration must be reloaded once, and a second SDO read afterwards.
// The expected values are worked out here from the chip's rules, not taken
// from the design under test; stimulus patterns and tolerances are this
// testbench's own choices.
module tb_mops_chip_full;
  import mops_pkg::*;
  typedef struct packed {
    logic [10:0] id;
    logic [63:0] data;
    logic [3:0]  dlc;
    logic        acked;
    longint      t_ns;
  } frame_t;
  localparam logic [6:0] NODE = 7'd2;

  logic [15:0] vdd_mv = 16'd0;
  logic        txcan, bfm_tx, bus;
  logic [11:0] vin [40];
  logic        clk_out, reset_out, ready_osc, bus_off;
  logic [5:0]  osc_trim, adc_trim;
  logic [8:0]  tec;
  logic [1:0]  sr_out;
  int checks = 0, failures = 0, n_reload = 0;

  assign bus = txcan & bfm_tx;

  mops_chip dut (
    .vdd_mv_i(vdd_mv), .resetd_n_i(1'b1), .addrcan_i(2'd2), .auto_trim_en_i(1'b1),
    .trim_pads_i(6'd0), .rxcan_i(bus), .txcan_o(txcan), .adc_vin_i(vin),
    .clk_out_o(clk_out), .reset_out_o(reset_out), .ready_osc_o(ready_osc), .osc_trim_o(osc_trim),
    .adc_trim_o(adc_trim), .tec_o(tec), .bus_off_o(bus_off), .sr_shift_i(1'b0),
    .sr_in_i(1'b0), .sr_out_o(sr_out)
  );
  can_bfm #(.BIT_NS(8000)) bfm (.bus, .tx(bfm_tx));

  always @(posedge dut.u_dig.u_reload.reloadconf_o) n_reload++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic wait_frame(input logic [10:0] id, input longint max_ns,
                            output logic found, output frame_t f);
    longint t0 = longint'($time);
    found = 1'b0;
    while (!found && longint'($time) - t0 < max_ns) begin
      while (bfm.rx_q.size() > 0 && !found) begin
        f = bfm.rx_q.pop_front();
        if (f.id == id) found = 1'b1;
      end
      if (!found) #1000;
    end
  endtask

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic found, acked;
    frame_t f;
    for (int i = 0; i < 40; i++) vin[i] = 12'(4095 - i * 50);
    #2000 vdd_mv = 16'd1200;
    #500_000;
    check(reset_out && osc_trim == 6'd32, "reset released, default code");
    for (int i = 0; i < 25 && !ready_osc; i++) bfm.send(11'h555, 64'hAAAA_AAAA_AAAA_AAAA, 4'd8, acked);
    check(ready_osc, "oscillator trimmed");
    check(osc_trim >= 6'd31 && osc_trim <= 6'd33, "code stays near 32 for a nominal oscillator");
    wait_frame(COB_GUARD + 11'(NODE), 5_000_000, found, f);
    check(found && f.data == 64'h05_00_00_00_00_00_00_00 && f.dlc == 4'd8, "sign-in of node 2");
    bfm.send(COB_SDO_RX + 11'(NODE), 64'h40_10_23_01_00_00_00_00, 4'd8, acked);
    wait_frame(COB_SDO_TX + 11'(NODE), 10_000_000, found, f);
    check(found && f.data == {8'h4B, 8'h10, 8'h23, 8'h01, vin[0][7:0], 4'd0, vin[0][11:8], 16'd0},
          "SDO read of VBANDGAP (2310h/1)");
    #300_000_000;
    check(n_reload == 1, "configuration reloaded once after 250 ms idle");
    bfm.send(COB_SDO_RX + 11'(NODE), 64'h40_00_24_20_00_00_00_00, 4'd8, acked);
    wait_frame(COB_SDO_TX + 11'(NODE), 10_000_000, found, f);
    check(found && f.data == {8'h4B, 8'h00, 8'h24, 8'h20, vin[34][7:0], 4'd0, vin[34][11:8], 16'd0},
          "SDO read of 2400h/20h after reload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
