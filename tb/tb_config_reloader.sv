// tb_config_reloader: with a short reload period, checks that the reload
// pulse comes RELOAD_CYCLES clocks after all four state machines became
// idle, repeats while they stay idle, and is held off by any activity.
// The expected values are worked out here from the chip's rules, not taken
// from the design under test; stimulus patterns and tolerances are this
// testbench's own choices.
module tb_config_reloader;
  localparam int T = 100;
  logic clk = 1'b0, rst_n = 1'b0, rl;
  logic [3:0] idle = 4'b1111;
  int checks = 0, failures = 0, fired = 0, last_fire = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) begin cyc++; if (rl) begin fired++; last_fire = cyc; end end

  config_reloader #(.RELOAD_CYCLES(T)) dut (.clk, .rst_n, .reload_i(idle), .reloadconf_o(rl));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t) fired=%0d", what, $time, fired); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0;
    idle = 4'b1110;
    #22 rst_n = 1'b1;
    repeat (2 * T) @(negedge clk);
    check(fired == 0, "no reload while a machine is busy");
    c0 = cyc;
    idle = 4'b1111;
    repeat (T + 3) @(negedge clk);
    check(fired == 1, "reload after idle period");
    check(last_fire - c0 >= T && last_fire - c0 <= T + 2, "reload after RELOAD_CYCLES");
    repeat (T) @(negedge clk);
    check(fired == 2, "reload repeats while idle");
    for (int k = 0; k < 4; k++) begin
      repeat (T - 10) @(negedge clk);
      idle[k] = 1'b0;
      @(negedge clk) idle[k] = 1'b1;
    end
    check(fired == 2, "activity restarts the count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
