// tb_can_config: checks the constant configuration table that is written
// into the CAN controller: 125 kbit/s timing (prescaler 5, TSEG1 11,
// TSEG2 4, SJW 4) and an acceptance filter that lets every frame through.
// The expected values are worked out here from the chip's rules, not taken
// from the design under test; stimulus patterns and tolerances are this
// testbench's own choices.
module tb_can_config;
  import mops_pkg::*;
  logic [1:0] idx, addr;
  logic [15:0] data;
  logic last;
  int checks = 0, failures = 0;

  can_config dut (.idx_i(idx), .addr_o(addr), .data_o(data), .last_o(last));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idx = 2'd0; #1 check(addr == REG_BRP && data == 16'd5 && !last, "prescaler 5");
    idx = 2'd1; #1 check(addr == REG_TIMING && data == {5'd0, 2'd3, 4'd4, 5'd11} && !last, "bit timing");
    idx = 2'd2; #1 check(addr == REG_ACODE && data == 16'd0 && !last, "acceptance code");
    idx = 2'd3; #1 check(addr == REG_AMASK && data == 16'd0 && last, "acceptance mask, last entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
