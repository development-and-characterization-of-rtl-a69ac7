// tb_relaxation_oscillator: measures the period of the oscillator model for
// several trim codes and process offsets: 68 ns + 1 ns per code step, so
// code 32 gives 100 ns (10 MHz) at nominal process; the enable stops the
// clock.
// The expected values are worked out here from the chip's rules, not taken
// from the design under test; stimulus patterns and tolerances are this
// testbench's own choices.
module tb_relaxation_oscillator;
  logic en = 1'b0;
  logic [5:0] trim = 6'd32;
  logic clk_a, clk_b;
  int checks = 0, failures = 0;

  relaxation_oscillator u_a (.en_i(en), .trim_i(trim), .clk_o(clk_a));
  relaxation_oscillator #(.PROCESS_PPM(50_000)) u_b (.en_i(en), .trim_i(trim), .clk_o(clk_b));

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

  task automatic period(ref logic c, output realtime p);
    realtime t0;
    @(posedge c) t0 = $realtime;
    repeat (10) @(posedge c);
    p = ($realtime - t0) / 10.0;
  endtask

  initial begin
    realtime p;
    #1000 check(clk_a == 1'b0, "no clock while disabled");
    en = 1'b1;
    for (int c = 0; c < 64; c += 7) begin
      trim = 6'(c);
      @(posedge clk_a);
      period(clk_a, p);
      check(p > (68.0 + c) * 1ns - 0.05ns && p < (68.0 + c) * 1ns + 0.05ns, "nominal period");
      period(clk_b, p);
      check(p > (68.0 + c) * 1.05ns - 0.05ns && p < (68.0 + c) * 1.05ns + 0.05ns, "period with process offset");
    end
    trim = 6'd32;
    @(posedge clk_a);
    period(clk_a, p);
    check(p > 99.95ns && p < 100.05ns, "10 MHz at default code");
    en = 1'b0;
    #500 check(clk_a == 1'b0, "clock stops when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
