// tb_seu_shift_register: two 3000-bit chains, plain and triplicated, are
// fed the same random stream. Both must deliver it delayed by 3000
// shifts. Single-event upsets are injected every 150 cycles at random
// positions: the plain chain must show them at its output, the
// triplicated chain must not (one copy hit per upset, copies in turn).
// The expected values are worked out here from the chip's rules, not taken
// from the design under test; stimulus patterns and tolerances are this
// testbench's own choices.
module tb_seu_shift_register;
  localparam int L = 3000;
  logic clk = 1'b0, rst_n = 1'b0, sh = 1'b0, din = 1'b0, q_plain, q_tmr;
  int checks = 0, failures = 0;
  logic hist [$];
  always #5 clk = ~clk;

  seu_shift_register #(.LEN(L), .TMR(1'b0)) u_plain (.clk, .rst_n, .shift_en_i(sh), .sr_in_i(din), .sr_out_o(q_plain));
  seu_shift_register #(.LEN(L), .TMR(1'b1)) u_tmr (.clk, .rst_n, .shift_en_i(sh), .sr_in_i(din), .sr_out_o(q_tmr));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int err_plain, err_tmr, n_upsets;
    n_upsets = 0;
    #22 rst_n = 1'b1;
    check(q_plain == 1'b0 && q_tmr == 1'b0, "reset clears chains");
    err_plain = 0; err_tmr = 0;
    for (int i = 0; i < 3 * L + 300; i++) begin
      @(negedge clk);
      // one upset every 150 cycles: a random bit of the plain chain and of
      // one copy of the triplicated chain (copies in turn)
      if (i % 150 == 75) begin
        int pos;
        pos = int'($urandom % L);
        u_plain.g_plain.r[pos] = !u_plain.g_plain.r[pos];
        case ((i / 150) % 3)
          0: u_tmr.g_tmr.a[pos] = !u_tmr.g_tmr.a[pos];
          1: u_tmr.g_tmr.b[pos] = !u_tmr.g_tmr.b[pos];
          default: u_tmr.g_tmr.c[pos] = !u_tmr.g_tmr.c[pos];
        endcase
        n_upsets++;
      end
      // with shift disabled for a few cycles the contents must hold
      sh = (i % 97) != 3;
      if (sh) begin
        din = 1'($urandom);
        hist.push_back(din);
      end
      @(posedge clk) #1;
      if (sh && hist.size() >= L) begin
        logic e;
        e = hist.pop_front();
        if (q_plain != e) err_plain++;
        if (q_tmr != e) err_tmr++;
      end
    end
    check(err_tmr == 0, "triplicated chain corrects every upset");
    check(err_plain > 10, "plain chain shows the upsets");
    $display("plain-chain errors %0d, triplicated-chain errors %0d", err_plain, err_tmr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
