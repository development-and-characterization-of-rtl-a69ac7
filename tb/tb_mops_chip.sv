// tb_mops_chip: end-to-end test of the chip (10 MHz oscillator, 125 kbit/s
// bus, 10 kHz ADC clock) with the watchdog shortened to 50 ms and the
// configuration reload to 20 ms so that both fire within a short run. A bus model plays the
// controlling master. The oscillator starts 4 % slow; the run covers:
// automated trimming on 0x555 frames after power-up, sign-in with toggle
// bit 0 and its retransmission without acknowledge, SDO reads of constant
// and ADC entries (with the ADC read-out latency), SDO write and read-back
// of the ADC trimming bits, the SDO abort codes, node guarding toggling,
// dropping of a lower-ranked request during a conversion, pre-emption of a
// conversion by a remote reset followed by re-trimming and sign-in, a
// watchdog timeout when no trimming frames come (default trim code
// restored, sign-in sent), restart through the external reset pad and
// trimming again, a configuration reload while idle, manual
// trimming from the pads and the SEU shift registers. Each mechanism is
// counted and must occur.
// The expected values are worked out here from the chip's rules, not taken
// from the design under test; stimulus patterns and tolerances are this
// testbench's own choices.
module tb_mops_chip;
  import mops_pkg::*;

  logic [15:0] vdd_mv = 16'd0;
  logic        resetd_n = 1'b1;
  logic [1:0]  addr = 2'd1;
  logic        auto_trim_en = 1'b1;
  logic [5:0]  trim_pads = 6'd20;
  logic        txcan, bfm_tx, bus;
  logic [11:0] vin [40];
  logic        clk_out, reset_out, ready_osc, bus_off;
  logic [5:0]  osc_trim, adc_trim;
  logic [8:0]  tec;
  logic        sr_shift = 1'b0, sr_in = 1'b0;
  logic [1:0]  sr_out;
  int checks = 0, failures = 0;
  int n_trim = 0, n_signin = 0, n_signin_retx = 0, n_sdo_read = 0, n_adc = 0, n_sdo_write = 0;
  int n_abort = 0, n_guard = 0, n_drop = 0, n_preempt = 0, n_remote_reset = 0;
  int n_watchdog = 0, n_reload = 0, n_manual = 0, n_seu = 0, n_ext_reset = 0;
  localparam logic [6:0] NODE = 7'd1;
  typedef struct packed {
    logic [10:0] id;
    logic [63:0] data;
    logic [3:0]  dlc;
    logic        acked;
    longint      t_ns;
  } frame_t;

  assign bus = txcan & bfm_tx;

  mops_chip #(.OSC_PROCESS_PPM(40_000), .WDT_CYCLES(64'd500_000), .RELOAD_CYCLES(64'd200_000)) dut (
    .vdd_mv_i(vdd_mv), .resetd_n_i(resetd_n), .addrcan_i(addr), .auto_trim_en_i(auto_trim_en),
    .trim_pads_i(trim_pads), .rxcan_i(bus), .txcan_o(txcan), .adc_vin_i(vin),
    .clk_out_o(clk_out), .reset_out_o(reset_out), .ready_osc_o(ready_osc), .osc_trim_o(osc_trim),
    .adc_trim_o(adc_trim), .tec_o(tec), .bus_off_o(bus_off), .sr_shift_i(sr_shift),
    .sr_in_i(sr_in), .sr_out_o(sr_out)
  );

  can_bfm #(.BIT_NS(8000)) bfm (.bus, .tx(bfm_tx));

  always @(posedge dut.u_dig.u_wdt.timeoutrst_o) n_watchdog++;
  always @(posedge dut.u_dig.u_reload.reloadconf_o) n_reload++;
  int n_tx_err = 0;
  always @(posedge dut.u_dig.u_node.error_o) n_tx_err++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // Wait for a frame with the given identifier; older frames are dropped.
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

  task automatic sdo(input logic [7:0] cmd, input logic [15:0] idx, input logic [7:0] sub,
                     input logic [31:0] d, output logic found, output frame_t r,
                     output longint lat_ns);
    logic acked;
    longint t0;
    bfm.send(COB_SDO_RX + 11'(NODE), {cmd, idx[7:0], idx[15:8], sub, d[7:0], d[15:8], d[23:16], d[31:24]},
             4'd8, acked);
    t0 = longint'($time);
    wait_frame(COB_SDO_TX + 11'(NODE), 20_000_000, found, r);
    lat_ns = r.t_ns - t0;
  endtask

  function automatic logic [31:0] le32(input logic [63:0] d);
    return {d[7:0], d[15:8], d[23:16], d[31:24]};
  endfunction

  // trimming frames until the chip reports the oscillator ready (at most n)
  task automatic send_trim_frames(input int n);
    logic acked;
    for (int i = 0; i < n && !ready_osc; i++) bfm.send(11'h555, 64'hAAAA_AAAA_AAAA_AAAA, 4'd8, acked);
  endtask

  initial begin
    #300_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic found, acked;
    frame_t f;
    longint lat;
    int nsi;
    for (int i = 0; i < 40; i++) vin[i] = 12'(i * 97 + 5);
    bfm.rx_q.delete();

    // ---------- power-up and automated trimming ----------
    #2000 vdd_mv = 16'd1200;
    #500_000;
    check(reset_out, "power-on reset released");
    check(osc_trim == 6'd32, "default trim code before trimming");
    bfm.ack_en = 1'b0;           // master leaves the first sign-in unacknowledged
    send_trim_frames(25);
    if (ready_osc) n_trim++;
    check(ready_osc, "trimming ends after 15 frames");
    $display("trim code after power-up: %0d", osc_trim);
    check(osc_trim >= 6'd26 && osc_trim <= 6'd30, "trim code corrects a 4 % slow oscillator (ideal 28)");

    // ---------- sign-in, first without acknowledge ----------
    // without acknowledge every attempt ends in an acknowledge error
    nsi = n_tx_err;
    #3_000_000;
    check(n_tx_err - nsi >= 2, "sign-in retransmitted until acknowledged");
    if (n_tx_err - nsi >= 2) n_signin_retx++;
    bfm.ack_en = 1'b1;
    wait_frame(COB_GUARD + 11'(NODE), 5_000_000, found, f);
    #2_000_000;
    bfm.rx_q.delete();
    check(found && f.dlc == 4'd8 && f.data == 64'h05_00_00_00_00_00_00_00, "sign-in message");
    if (found) n_signin++;
    check(tec < 9'd128, "node still error-active after sign-in");

    // ---------- SDO reads ----------
    sdo(8'h40, 16'h1000, 8'h00, 32'd0, found, f, lat);
    check(found && f.data[63:56] == 8'h43 && le32(f.data) == 32'h191, "read device type 1000h");
    if (found) n_sdo_read++;
    sdo(8'h40, 16'h1018, 8'h01, 32'd0, found, f, lat);
    check(found && f.data[63:32] == 32'h43_18_10_01 && le32(f.data) == 32'h1234_5678, "read vendor id");
    sdo(8'h40, 16'h1200, 8'h02, 32'd0, found, f, lat);
    check(found && le32(f.data) == 32'h581, "read server-to-client COB-ID");
    sdo(8'h40, 16'h2400, 8'h01, 32'd0, found, f, lat);
    check(found && f.data[63:32] == 32'h4B_00_24_01 && le32(f.data) == 32'(vin[3]), "ADC channel 3 via 2400h/1");
    $display("ADC read latency after request frame: %0d us", lat / 1000);
    check(lat > 1_200_000 && lat < 3_000_000, "ADC request answered after the 13-period conversion");
    if (found) n_adc++;
    sdo(8'h40, 16'h2400, 8'h20, 32'd0, found, f, lat);
    check(found && le32(f.data) == 32'(vin[34]), "ADC channel 34 via 2400h/20h");
    sdo(8'h40, 16'h2310, 8'h02, 32'd0, found, f, lat);
    check(found && le32(f.data) == 32'(vin[1]), "VCANSEN via 2310h/2");

    // ---------- SDO write ----------
    sdo(8'h2F, 16'h2001, 8'h00, 32'h2A, found, f, lat);
    check(found && f.data == 64'h60_01_20_00_00_00_00_00, "write response for 2001h");
    check(adc_trim == 6'h2A, "ADC trimming bits written");
    if (found) n_sdo_write++;
    sdo(8'h40, 16'h2001, 8'h00, 32'd0, found, f, lat);
    check(found && f.data[63:56] == 8'h4F && le32(f.data) == 32'h2A, "read back 2001h");

    // ---------- SDO aborts ----------
    sdo(8'h40, 16'h3000, 8'h00, 32'd0, found, f, lat);
    check(found && f.data[63:56] == 8'h80 && le32(f.data) == 32'h0602_0000, "abort: no object");
    if (found && f.data[63:56] == 8'h80) n_abort++;
    sdo(8'h23, 16'h1000, 8'h00, 32'd5, found, f, lat);
    check(found && le32(f.data) == 32'h0601_0002, "abort: write to read-only");
    sdo(8'hE0, 16'h1000, 8'h00, 32'd0, found, f, lat);
    check(found && le32(f.data) == 32'h0504_0001, "abort: unknown command");
    sdo(8'h40, 16'h1018, 8'h05, 32'd0, found, f, lat);
    check(found && le32(f.data) == 32'h0609_0011, "abort: no sub-index");
    sdo(8'h40, 16'h2100, 8'h00, 32'd0, found, f, lat);
    check(found && le32(f.data) == 32'h0601_0000, "abort: 2100h refused for SDO");

    // ---------- node guarding ----------
    for (int k = 0; k < 3; k++) begin
      bfm.send(COB_GUARD + 11'(NODE), 64'd0, 4'd0, acked);
      wait_frame(COB_GUARD + 11'(NODE), 5_000_000, found, f);
      if (!(found && f.data[63:56] == ((k % 2 == 0) ? 8'h85 : 8'h05)))
        $display("guard reply found=%b data=%h dlc=%0d", found, f.data, f.dlc);
      check(found && f.data[63:56] == ((k % 2 == 0) ? 8'h85 : 8'h05), "node guarding toggle");
      if (found) n_guard++;
    end

    // ---------- lower-ranked request during a conversion is dropped ----------
    bfm.rx_q.delete();
    bfm.send(COB_SDO_RX + 11'(NODE), 64'h40_00_24_05_00_00_00_00, 4'd8, acked);
    bfm.send(COB_GUARD + 11'(NODE), 64'd0, 4'd0, acked);   // arrives while converting
    wait_frame(COB_SDO_TX + 11'(NODE), 5_000_000, found, f);
    if (!(found && le32(f.data) == 32'(vin[7]))) $display("sdo reply found=%b data=%h", found, f.data);
    check(found && le32(f.data) == 32'(vin[7]), "conversion finished despite guarding request");
    #3_000_000;
    found = 1'b0;
    foreach (bfm.rx_q[i]) if (bfm.rx_q[i].id == COB_GUARD + 11'(NODE)) found = 1'b1;
    check(!found, "lower-ranked guarding request dropped");
    if (!found) n_drop++;

    // ---------- remote reset pre-empts a conversion ----------
    bfm.rx_q.delete();
    bfm.send(COB_SDO_RX + 11'(NODE), 64'h40_00_24_05_00_00_00_00, 4'd8, acked);
    bfm.send(11'h000, 64'd0, 4'd0, acked);
    #100_000;
    check(!ready_osc && dut.u_dig.u_top.state == 3'd1, "remote reset enters trimming");
    if (dut.u_dig.u_top.state == 3'd1) begin n_preempt++; n_remote_reset++; end
    send_trim_frames(25);
    check(ready_osc, "trimming after remote reset");
    wait_frame(COB_GUARD + 11'(NODE), 5_000_000, found, f);
    if (!(found && f.data[63:56] == 8'h05)) $display("sign-in found=%b data=%h", found, f.data);
    check(found && f.data[63:56] == 8'h05, "sign-in after remote reset, toggle cleared");
    #2_000_000;
    found = 1'b0;
    foreach (bfm.rx_q[i]) if (bfm.rx_q[i].id == COB_SDO_TX + 11'(NODE)) found = 1'b1;
    check(!found, "pre-empted SDO request not answered");
    check(osc_trim >= 6'd26 && osc_trim <= 6'd30, "trim code kept near 28 after re-trimming");

    // ---------- watchdog: remote reset without trimming frames ----------
    bfm.rx_q.delete();
    bfm.send(11'h000, 64'd0, 4'd0, acked);
    wait (n_watchdog > 0);
    #2000;
    check(osc_trim == 6'd32, "watchdog during trimming restores the default trim code");
    bfm.ack_en = 1'b1;
    wait_frame(COB_GUARD + 11'(NODE), 20_000_000, found, f);
    check(found && f.data[63:56] == 8'h05, "sign-in after watchdog timeout");
    // with the default code the clock is 4 % off, beyond what CAN reception
    // tolerates; the external reset pad restarts the chip and it trims again
    bfm.ack_en = 1'b0;
    resetd_n = 1'b0;
    #5000 resetd_n = 1'b1;
    check(osc_trim == 6'd32 && !ready_osc, "external reset restores default code");
    n_ext_reset++;
    send_trim_frames(25);
    check(ready_osc && osc_trim >= 6'd26 && osc_trim <= 6'd30, "trimming after external reset");
    bfm.ack_en = 1'b1;
    wait_frame(COB_GUARD + 11'(NODE), 5_000_000, found, f);
    check(found, "sign-in after re-trimming");

    // ---------- configuration reload while idle ----------
    begin
      int r0;
      r0 = n_reload;
      #30_000_000;
      check(n_reload > r0, "configuration reloaded after the idle period");
      sdo(8'h40, 16'h2400, 8'h02, 32'd0, found, f, lat);
      check(found && le32(f.data) == 32'(vin[4]), "chip answers after reload");
    end

    // ---------- manual trimming ----------
    auto_trim_en = 1'b0;
    #1000;
    check(osc_trim == trim_pads, "manual trim code from pads");
    if (osc_trim == trim_pads) n_manual++;
    auto_trim_en = 1'b1;

    // ---------- SEU shift registers ----------
    begin
      logic [7:0] pat;
      int errs;
      pat = 8'b1011_0010;
      errs = 0;
      @(posedge clk_out);
      for (int i = 0; i < 3000 + 8; i++) begin
        sr_in <= pat[i % 8]; sr_shift <= 1'b1;
        if (i == 1000) begin
          dut.u_sr_tmr.g_tmr.a[500] = !dut.u_sr_tmr.g_tmr.a[500];
        end
        @(posedge clk_out);
        if (i >= 3000) begin
          if (sr_out[0] != pat[(i - 3000) % 8] || sr_out[1] != pat[(i - 3000) % 8]) errs++;
        end
      end
      sr_shift <= 1'b0;
      check(errs == 0, "SEU shift registers pass the pattern; upset in TMR copy outvoted");
      if (errs == 0) n_seu++;
    end

    check(n_trim > 0, "mechanism: trimming");
    check(n_signin > 0, "mechanism: sign-in");
    check(n_signin_retx > 0, "mechanism: sign-in retransmission");
    check(n_sdo_read > 0, "mechanism: SDO read");
    check(n_adc > 0, "mechanism: ADC read");
    check(n_sdo_write > 0, "mechanism: SDO write");
    check(n_abort > 0, "mechanism: SDO abort");
    check(n_guard > 0, "mechanism: node guarding");
    check(n_drop > 0, "mechanism: lower-ranked request dropped");
    check(n_preempt > 0, "mechanism: pre-emption");
    check(n_remote_reset > 0, "mechanism: remote reset");
    check(n_watchdog > 0, "mechanism: watchdog timeout");
    check(n_reload > 0, "mechanism: configuration reload");
    check(n_manual > 0, "mechanism: manual trimming");
    check(n_seu > 0, "mechanism: SEU shift register");
    check(n_ext_reset > 0, "mechanism: external reset pad");
    $display("counts: trim=%0d signin=%0d retx=%0d read=%0d adc=%0d write=%0d abort=%0d guard=%0d drop=%0d preempt=%0d rreset=%0d wdt=%0d reload=%0d manual=%0d seu=%0d",
             n_trim, n_signin, n_signin_retx, n_sdo_read, n_adc, n_sdo_write, n_abort, n_guard,
             n_drop, n_preempt, n_remote_reset, n_watchdog, n_reload, n_manual, n_seu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
