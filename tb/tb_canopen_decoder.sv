// tb_canopen_decoder: checks frame classification (remote reset, SDO,
// node guarding, SYNC, EMCY, PDO, other) for each node number and the
// SDO field extraction: command specifier, little-endian index,
// sub-index, little-endian data and the expedited size from the n bits.
// The expected values are worked out here from the chip's rules, not taken
// from the design under test; stimulus patterns and tolerances are this
// testbench's own choices.
module tb_canopen_decoder;
  import mops_pkg::*;
  can_msg_t m;
  logic [6:0] node;
  msg_type_t t;
  logic [2:0] ccs, size;
  logic [15:0] index;
  logic [7:0] sub;
  logic [31:0] data;
  int checks = 0, failures = 0;

  canopen_decoder dut (.msg_i(m), .node_id_i(node), .type_o(t), .ccs_o(ccs), .index_o(index),
                       .sub_o(sub), .data_o(data), .size_o(size));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s id=%h", what, m.id); end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = '0;
    for (int n = 0; n < 4; n++) begin
      node = 7'(n);
      m.id = 11'h000;      #1 check(t == MT_RESET, "remote reset");
      m.id = 11'h600 + 11'(n); #1 check(t == MT_SDO, "SDO request");
      m.id = 11'h700 + 11'(n); #1 check(t == MT_GUARD, "node guarding");
      m.id = 11'h080;      #1 check(t == MT_SYNC, "SYNC");
      m.id = 11'h180 + 11'(n); #1 check(t == MT_PDO, "PDO");
      m.id = 11'h601 + 11'(n); #1 check(t == MT_NONE, "SDO for other node");
      m.id = 11'h580 + 11'(n); #1 check(t == MT_NONE, "SDO response not decoded");
    end
    node = 7'd2;
    m.id = 11'h082; #1 check(t == MT_EMCY, "EMCY");
    for (int i = 0; i < 50; i++) begin
      logic [7:0] b0;
      m.id = 11'h602;
      m.data = {$urandom, $urandom};
      b0 = m.data[63:56];
      #1;
      check(ccs == b0[7:5], "command specifier");
      check(index == {m.data[47:40], m.data[55:48]}, "index little endian");
      check(sub == m.data[39:32], "sub-index");
      check(data == {m.data[7:0], m.data[15:8], m.data[23:16], m.data[31:24]}, "data little endian");
      check(size == (b0[0] ? 3'(4 - b0[3:2]) : 3'd4), "size");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
