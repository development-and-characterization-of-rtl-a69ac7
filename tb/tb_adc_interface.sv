// tb_adc_interface: the ADC interface drives the SAR ADC model with a
// short clock divider. For random channels and input codes it checks the
// one-hot select, the start-of-conversion pulse, the 12-bit result, the
// conversion time in ADC clock periods, the idle flag, and that a soft
// reset in the middle of a conversion returns the block to idle. One run
// with the default divider checks the 10 kHz ADC clock and the ~1.4 ms
// conversion time.
// The expected values are worked out here from the chip's rules, not taken
// from the design under test; stimulus patterns and tolerances are this
// testbench's own choices.
module tb_adc_interface;
  localparam int DIV = 20;
  logic clk = 1'b0, rst_n = 1'b0, srst = 1'b0, req = 1'b0;
  logic [5:0] ch = '0;
  logic done, idle, aclk, soc, dout;
  logic [11:0] val;
  logic [39:0] sel;
  logic [11:0] vin [40];
  // full-size instance
  logic reqf = 1'b0, donef, idlef, aclkf, socf, doutf;
  logic [11:0] valf;
  logic [39:0] self;
  int checks = 0, failures = 0;
  always #50 clk = ~clk;   // 10 MHz

  adc_interface #(.ADC_DIV(DIV)) dut (.clk, .rst_n, .soft_rst_i(srst), .req_i(req), .ch_i(ch),
    .done_o(done), .value_o(val), .idle_o(idle), .adc_clk_o(aclk), .sel_o(sel), .soc_o(soc), .dout_i(dout));
  sar_adc u_adc (.adc_clk_i(aclk), .sel_i(sel), .soc_i(soc), .trim_i(6'd0), .vin_i(vin), .dout_o(dout));

  adc_interface u_full (.clk, .rst_n, .soft_rst_i(1'b0), .req_i(reqf), .ch_i(6'd17),
    .done_o(donef), .value_o(valf), .idle_o(idlef), .adc_clk_o(aclkf), .sel_o(self), .soc_o(socf), .dout_i(doutf));
  sar_adc u_adcf (.adc_clk_i(aclkf), .sel_i(self), .soc_i(socf), .trim_i(6'd0), .vin_i(vin), .dout_o(doutf));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t1;
    for (int i = 0; i < 40; i++) vin[i] = 12'($urandom);
    #220 rst_n = 1'b1;
    check(idle && sel == '0 && !soc, "idle after reset");
    for (int k = 0; k < 20; k++) begin
      int n, nsoc;
      logic sel_ok;
      @(negedge clk) begin ch = 6'($urandom % 40); req = 1'b1; end
      @(negedge clk) req = 1'b0;
      check(!idle, "busy after request");
      n = 0; nsoc = 0; sel_ok = 1'b1;
      while (!done && n < 20 * DIV) begin
        @(negedge clk);
        n++;
        if (soc) nsoc++;
        if (!done && sel != (40'd1 << ch)) sel_ok = 1'b0;
      end
      check(done && val == vin[ch], "conversion result");
      check(sel_ok, "one-hot channel select held during conversion");
      check(nsoc == DIV, "start-of-conversion lasts one ADC clock period");
      check(n >= 14 * DIV && n <= 16 * DIV, "conversion takes 14-16 ADC clock periods");
      @(negedge clk) check(idle && sel == '0, "idle and deselected after conversion");
    end
    // soft reset during a conversion
    @(negedge clk) begin ch = 6'd5; req = 1'b1; end
    @(negedge clk) req = 1'b0;
    repeat (5 * DIV) @(negedge clk);
    srst = 1'b1;
    @(negedge clk) srst = 1'b0;
    check(idle && sel == '0 && !soc, "soft reset aborts conversion");
    repeat (20 * DIV) @(negedge clk);
    check(!done, "no result after abort");
    // default divider: 10 kHz ADC clock, ~1.4 ms conversion
    @(posedge aclkf) t0 = $realtime;
    @(posedge aclkf) t1 = $realtime;
    check(t1 - t0 > 99.9us && t1 - t0 < 100.1us, "10 kHz ADC clock at default divider");
    @(negedge clk) reqf = 1'b1;
    t0 = $realtime;
    @(negedge clk) reqf = 1'b0;
    @(posedge donef) t1 = $realtime;
    check(valf == vin[17], "full-size conversion result");
    check(t1 - t0 > 1.3ms && t1 - t0 < 1.6ms, "full-size conversion time");
    $display("full-size conversion time %0t", t1 - t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
