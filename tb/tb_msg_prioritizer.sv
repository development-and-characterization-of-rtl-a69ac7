// tb_msg_prioritizer: sweeps identifiers, node numbers and current ranks
// against a reference model: remote reset (ID 0) rank 3, SDO request
// (0x600+node) rank 2, node guarding (0x700+node) rank 1, all else 0; a
// frame is accepted only if its rank is non-zero and above the current one.
// The expected values are worked out here from the chip's rules, not taken
// from the design under test; stimulus patterns and tolerances are this
// testbench's own choices.
module tb_msg_prioritizer;
  logic [10:0] id;
  logic [6:0] node;
  logic [1:0] cur, rank, erank;
  logic acc;
  int checks = 0, failures = 0;

  msg_prioritizer dut (.id_i(id), .node_id_i(node), .cur_rank_i(cur), .rank_o(rank), .accept_o(acc));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s id=%h node=%0d cur=%0d", what, id, node, cur); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4; n++)
      for (int k = 0; k < 2048; k += ((k < 8 || (k & 8'h7F) < 8) ? 1 : 13))
        for (int c = 0; c < 4; c++) begin
          node = 7'(n); id = 11'(k); cur = 2'(c);
          #1;
          if (k == 0) erank = 2'd3;
          else if (k == 'h600 + n) erank = 2'd2;
          else if (k == 'h700 + n) erank = 2'd1;
          else erank = 2'd0;
          check(rank == erank, "rank");
          check(acc == (erank != 0 && erank > cur), "accept");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
