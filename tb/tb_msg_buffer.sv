// tb_msg_buffer: checks the triplicated 75-bit message buffer. The
// identifier and each data byte are written through their own enables and
// must land only in their field (enable bit 0 is CAN byte 0, data[63:56]); clear must zero the buffer; an upset in
// one copy must be outvoted and repaired on the next clock.
module tb_msg_buffer;
  import mops_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, we_id = 1'b0, mism;
  logic [7:0] we_byte = '0;
  can_msg_t d, q, exp;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  msg_buffer dut (.clk, .rst_n, .clear_i(clr), .we_id_i(we_id), .we_byte_i(we_byte),
                  .d_i(d), .q_o(q), .mismatch_o(mism));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0; exp = '0;
    #12 check(q == '0, "reset clears buffer");
    rst_n = 1'b1;
    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      d.id = 11'($urandom); d.data = {$urandom, $urandom};
      we_id = ($urandom % 2) == 1;
      we_byte = 8'($urandom);
      if (we_id) exp.id = d.id;
      for (int b = 0; b < 8; b++) if (we_byte[b]) exp.data[63 - 8*b -: 8] = d.data[63 - 8*b -: 8];
      @(negedge clk);
      we_id = 1'b0; we_byte = '0;
      check(q == exp, "field-wise write");
      if (i % 10 == 5) begin
        dut.c1.data[3] = !dut.c1.data[3];
        #1 check(q == exp && mism, "upset outvoted and flagged");
        @(negedge clk) check(!mism, "upset repaired");
      end
      if (i % 20 == 19) begin
        clr = 1'b1; @(negedge clk) clr = 1'b0;
        exp = '0;
        check(q == '0, "clear");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
