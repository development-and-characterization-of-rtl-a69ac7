// tb_sar_adc: checks the ADC model on its own: on a clock edge with start-
// of-conversion high it holds the selected input, and then shifts the 12
// bits out MSB first, one per rising ADC clock edge.
module tb_sar_adc;
  logic aclk = 1'b0, soc = 1'b0, dout;
  logic [39:0] sel = '0;
  logic [11:0] vin [40];
  int checks = 0, failures = 0;
  always #50 aclk = ~aclk;

  sar_adc dut (.adc_clk_i(aclk), .sel_i(sel), .soc_i(soc), .trim_i(6'd0), .vin_i(vin), .dout_o(dout));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 40; i++) vin[i] = 12'($urandom);
    for (int k = 0; k < 40; k++) begin
      logic [11:0] got, exp;
      @(negedge aclk) begin sel = 40'd1 << k; soc = 1'b1; end
      exp = vin[k];
      @(negedge aclk) soc = 1'b0;
      vin[k] = ~vin[k];   // input change after sampling must not matter
      for (int b = 0; b < 12; b++) begin
        @(negedge aclk) got = {got[10:0], dout};
      end
      check(got == exp, "serial result MSB first");
      vin[k] = exp;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
