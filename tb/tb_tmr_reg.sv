// tb_tmr_reg: checks the triplicated register. Random writes must read
// back; a bit flipped by force in one copy must not change the voted
// output, must raise the mismatch flag, and must be repaired by the
// refresh voter on the next clock edge. Reset must load INIT.
// The expected values are worked out here from the chip's rules, not taken
// from the design under test; stimulus patterns and tolerances are this
// testbench's own choices.
module tb_tmr_reg;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0, mism;
  logic [7:0] d = '0, q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  tmr_reg #(.W(8), .INIT(8'hA5)) dut (.clk, .rst_n, .we_i(we), .d_i(d), .q_o(q), .mismatch_o(mism));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v;
    #12 check(q == 8'hA5 && !mism, "reset value");
    rst_n = 1'b1;
    for (int i = 0; i < 40; i++) begin
      v = 8'($urandom);
      @(negedge clk) begin we = 1'b1; d = v; end
      @(negedge clk) we = 1'b0;
      check(q == v, "write and read back");
      @(negedge clk) check(q == v, "value held without write");
      // single upset in a random copy
      case (i % 3)
        0: dut.r0 = dut.r0 ^ (8'd1 << (i % 8));
        1: dut.r1 = dut.r1 ^ (8'd1 << (i % 8));
        default: dut.r2 = dut.r2 ^ (8'd1 << (i % 8));
      endcase
      #1 check(q == v, "upset outvoted");
      check(mism, "mismatch flagged");
      @(negedge clk) check(!mism && q == v, "refresh repairs the upset copy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
