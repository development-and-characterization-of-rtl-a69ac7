// tb_watchdog_timer: with a short timeout, checks that the timer fires
// exactly TIMEOUT_CYCLES clocks after a state machine left idle, that it
// restarts when all machines return to idle, and that it fires again
// after a further full timeout if a machine stays busy.
// The expected values are worked out here from the chip's rules, not taken
// from the design under test; stimulus patterns and tolerances are this
// testbench's own choices.
module tb_watchdog_timer;
  localparam int T = 100;
  logic clk = 1'b0, rst_n = 1'b0, to;
  logic [3:0] en = '0;
  int checks = 0, failures = 0, fired = 0, last_fire = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) begin cyc++; if (to) begin fired++; last_fire = cyc; end end

  watchdog_timer #(.TIMEOUT_CYCLES(T)) dut (.clk, .rst_n, .entimeout_i(en), .timeoutrst_o(to));

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
    #22 rst_n = 1'b1;
    repeat (3 * T) @(negedge clk);
    check(fired == 0, "no timeout while all idle");
    // busy for less than the timeout, several times
    for (int k = 0; k < 4; k++) begin
      en = 4'(1 << k);
      repeat (T - 5) @(negedge clk);
      en = '0;
      repeat (3) @(negedge clk);
    end
    check(fired == 0, "no timeout for short busy periods");
    c0 = cyc;
    en = 4'b0100;
    repeat (T + 3) @(negedge clk);
    check(fired == 1, "timeout after a long busy period");
    check(last_fire - c0 >= T && last_fire - c0 <= T + 2, "timeout after TIMEOUT_CYCLES");
    repeat (T) @(negedge clk);
    check(fired == 2, "timeout repeats if still busy");
    en = '0;
    repeat (2 * T) @(negedge clk);
    check(fired == 2, "no timeout after return to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
