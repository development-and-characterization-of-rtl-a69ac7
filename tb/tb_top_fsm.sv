// tb_top_fsm: drives the top-level state machine through its sequences with
// scripted done pulses and checks its command pulses and reported rank:
// power-up with trimming, sign-in and transmit; a request with a response;
// a request without response; pre-emption of a request by a remote reset,
// which trims again (with the done flag of the previous trim still high);
// a watchdog reset during trimming, which restores the default code and
// does not trim; a configuration reload from Idle; power-up without
// trimming. Sequences follow the chip's description; the pulse handshakes
// are this design's own choices, and the expected values are written here.
module tb_top_fsm;
  logic clk = 1'b0, rst_n = 1'b0;
  logic soft_rst = 1'b0, reload = 1'b0, ate = 1'b1, new_msg = 1'b0;
  logic [1:0] new_rank = '0;
  logic cfg_done = 1'b0, trim_done = 1'b0, co_done = 1'b0, co_resp = 1'b0, tx_done = 1'b0;
  logic cfg_load, trim_start, trim_abort, listen, co_start, co_cmd, co_abort, tx_start, tx_abort;
  logic sm_rst, idle, rreset, signin;
  logic [1:0] rank;
  int checks = 0, failures = 0;
  int n_cfg = 0, n_trim = 0, n_co = 0, n_tx = 0, n_abort = 0, n_smrst = 0, n_tabort = 0, n_signin = 0;
  always #50 clk = ~clk;
  // like the trimming block, the done flag is cleared by the next start
  always @(posedge clk) if (trim_start) trim_done <= 1'b0;
  always @(posedge clk) if (rst_n) begin   // outputs are meaningless before the first reset edge
    n_cfg += int'(cfg_load); n_trim += int'(trim_start); n_co += int'(co_start); n_tx += int'(tx_start);
    n_abort += int'(co_abort); n_smrst += int'(sm_rst); n_tabort += int'(trim_abort); n_signin += int'(signin);
  end

  top_fsm dut (.clk, .rst_n, .soft_rst_i(soft_rst), .reload_i(reload), .auto_trim_en_i(ate),
    .new_msg_i(new_msg), .new_rank_i(new_rank), .cfg_done_i(cfg_done), .trim_done_i(trim_done),
    .co_done_i(co_done), .co_respond_i(co_resp), .tx_done_i(tx_done), .cfg_load_o(cfg_load),
    .trim_start_o(trim_start), .trim_abort_o(trim_abort), .listen_only_o(listen), .co_start_o(co_start),
    .co_cmd_o(co_cmd), .co_abort_o(co_abort), .tx_start_o(tx_start), .tx_abort_o(tx_abort),
    .sm_rst_o(sm_rst), .cur_rank_o(rank), .idle_o(idle), .remote_reset_o(rreset), .signin_o(signin));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1'b1;
    @(negedge clk) s = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  task automatic request(input logic [1:0] r);
    @(negedge clk) begin new_msg = 1'b1; new_rank = r; end
    @(negedge clk) new_msg = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #120 rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(n_cfg == 1 && !idle && rank == 2'd2, "configuration loaded after reset");
    pulse(cfg_done);
    check(n_trim == 1 && listen && rank == 2'd3, "trimming, listen-only, rank 3");
    request(2'd2);
    check(n_co == 0 && listen, "request ignored while trimming");
    pulse(trim_done);
    check(n_co == 1 && co_cmd && !listen && rank == 2'd2, "sign-in built after trimming");
    pulse(co_done);
    check(n_tx == 1 && n_signin == 1, "sign-in transmitted");
    pulse(tx_done);
    check(idle && rank == 2'd0, "idle after sign-in");
    // request with a response
    request(2'd1);
    check(n_co == 2 && !co_cmd && rank == 2'd1, "guarding request handled at rank 1");
    co_resp = 1'b1; pulse(co_done);
    check(n_tx == 2 && rank == 2'd1, "response transmitted at rank 1");
    pulse(tx_done);
    check(idle, "idle after response");
    // request without response
    request(2'd2);
    co_resp = 1'b0; pulse(co_done);
    check(n_tx == 2 && idle, "no transmit without response");
    // pre-emption by a higher request while handling one
    request(2'd1);
    request(2'd2);
    check(n_abort == 1 && rank == 2'd2 && n_co == 5, "higher request aborts the current one");
    // remote reset while handling a request; trim_done still high from before
    trim_done = 1'b1;
    request(2'd3);
    check(rreset == 1'b0 && n_smrst == 1 && n_abort == 2 && n_cfg == 2, "remote reset resets machines");
    pulse(cfg_done);
    check(n_trim == 2 && listen, "remote reset trims again");
    repeat (5) @(negedge clk);
    check(listen, "stale done flag of the previous trim ignored");
    // watchdog during trimming
    pulse(soft_rst);
    check(n_tabort == 1 && n_cfg == 3 && !listen, "watchdog aborts trimming and reloads");
    pulse(cfg_done);
    check(n_trim == 2 && co_cmd && n_co == 6, "after watchdog: sign-in without trimming");
    pulse(co_done);
    pulse(tx_done);
    check(idle, "idle after watchdog sign-in");
    // configuration reload from Idle
    pulse(reload);
    check(n_cfg == 4 && n_smrst == 2 && !idle && rank == 2'd2, "reload from Idle");
    pulse(cfg_done);
    check(idle && n_co == 6, "back to Idle after reload without sign-in");
    // power-up without automated trimming
    ate = 1'b0;
    rst_n = 1'b0; #120 rst_n = 1'b1;
    repeat (2) @(negedge clk);
    pulse(cfg_done);
    check(n_trim == 2 && co_cmd && !listen, "no trimming when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
