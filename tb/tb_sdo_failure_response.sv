// tb_sdo_failure_response: checks every abort code against the table of
// the design and the layout of the abort frame: ID 0x580+node, byte 0
// 0x80, index (little endian), sub-index, then the code little endian.
// The expected values are worked out here from the chip's rules, not taken
// from the design under test; stimulus patterns and tolerances are this
// testbench's own choices.
module tb_sdo_failure_response;
  import mops_pkg::*;
  sdo_err_t err;
  logic [6:0] node;
  logic [15:0] index;
  logic [7:0] sub;
  logic [31:0] code;
  can_msg_t m;
  int checks = 0, failures = 0;
  logic [31:0] exp [10] = '{32'h0504_0000, 32'h0504_0001, 32'h0601_0000, 32'h0601_0001,
                            32'h0601_0002, 32'h0602_0000, 32'h0606_0000, 32'h0606_0007,
                            32'h0609_0011, 32'h0800_0000};

  sdo_failure_response dut (.err_i(err), .node_id_i(node), .index_i(index), .sub_i(sub),
                            .code_o(code), .msg_o(m));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s err=%0d", what, err); end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 10; e++) begin
      err = sdo_err_t'(e);
      node = 7'($urandom % 4); index = 16'($urandom); sub = 8'($urandom);
      #1;
      check(code == exp[e], "abort code");
      check(m.id == 11'h580 + 11'(node), "response identifier");
      check(m.data == {8'h80, index[7:0], index[15:8], sub, exp[e][7:0], exp[e][15:8],
                       exp[e][23:16], exp[e][31:24]}, "abort frame layout");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
