// tb_power_on_reset: ramps the supply model up and down and checks that
// the reset is held while the supply is below the threshold, released
// HOLD_NS after it rises above, and asserted at once when it drops.
module tb_power_on_reset;
  logic [15:0] vdd = '0;
  logic rst_n;
  int checks = 0, failures = 0;

  power_on_reset dut (.vdd_mv_i(vdd), .rst_n_o(rst_n));

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
    for (int k = 0; k < 3; k++) begin
      for (int v = 0; v < 920; v += 40) begin vdd = 16'(v); #100 check(!rst_n, "reset below threshold"); end
      vdd = 16'd1200;
      #900 check(!rst_n, "reset held just after the rise");
      #200 check(rst_n, "reset released after hold time");
      #5000 check(rst_n, "reset stays released");
      vdd = 16'd800;
      #1 check(!rst_n, "reset asserted when supply drops");
      // short glitch above threshold does not release reset
      vdd = 16'd1000; #300 vdd = 16'd500; #2000 check(!rst_n, "short supply glitch ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
