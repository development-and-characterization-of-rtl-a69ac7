// tb_auto_trim: closed-loop check of the trimming controller. A plant
// model turns the trim code into a phase error per resynchronisation
// edge (a larger code means a slower clock, so the bus edges come early
// and the error is negative). Starting from the default code 32 the loop
// must settle on the ideal code within one step, finish after exactly 15
// frames, leave the code in place afterwards, restart from the present
// code, and restore the default code when the watchdog aborts a trim.
// The expected values are worked out here from the chip's rules, not taken
// from the design under test; stimulus patterns and tolerances are this
// testbench's own choices.
module tb_auto_trim;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, abort = 1'b0;
  logic signed [5:0] perr = '0;
  logic pvalid = 1'b0, fend = 1'b0, active, done;
  logic [5:0] trim;
  int checks = 0, failures = 0;
  int ideal;
  always #5 clk = ~clk;

  auto_trim dut (.clk, .rst_n, .start_i(start), .abort_default_i(abort), .kp_i(4'd2), .ki_i(4'd1),
                 .phase_err_i(perr), .phase_valid_i(pvalid), .frame_end_i(fend),
                 .trim_o(trim), .active_o(active), .done_o(done));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t) trim=%0d", what, $time, trim); end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one frame: 20 edges with a phase error from the plant, then frame end
  task automatic frame();
    for (int e = 0; e < 20; e++) begin
      int pe;
      pe = -2 * (int'(trim) - ideal) + int'($urandom % 3) - 1;
      if (pe > 8) pe = 8;
      if (pe < -8) pe = -8;
      @(negedge clk) begin perr = 6'(pe); pvalid = 1'b1; end
      @(negedge clk) pvalid = 1'b0;
      repeat (3) @(negedge clk);
    end
    @(negedge clk) fend = 1'b1;
    @(negedge clk) fend = 1'b0;
  endtask

  task automatic run_trim(input int target, input int nframes);
    int nf;
    ideal = target;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    check(active && !done, "trimming active after start");
    nf = 0;
    while (nf < nframes && !done) begin frame(); nf++; end
    check(done && !active && nf == 15, "done after 15 frames");
    check(trim >= 6'(target - 1) && trim <= 6'(target + 1), "code settles on ideal value");
  endtask

  initial begin
    int held;
    #22 rst_n = 1'b1;
    check(trim == 6'd32 && !active && !done, "reset state");
    run_trim(26, 30);
    held = int'(trim);
    frame(); frame();
    check(int'(trim) == held, "code frozen after trimming");
    run_trim(40, 30);
    run_trim(12, 30);
    // watchdog abort in the middle of a trim
    ideal = 50;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    frame(); frame(); frame();
    check(trim != 6'd32, "code moved during trim");
    @(negedge clk) abort = 1'b1;
    @(negedge clk) abort = 1'b0;
    check(trim == 6'd32 && !active && !done, "abort restores default code");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
