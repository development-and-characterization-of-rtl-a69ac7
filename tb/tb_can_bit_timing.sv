// tb_can_bit_timing: checks the CAN bit timing unit at the chip's setting
// (5 clocks per quantum, tseg1 11, tseg2 4, jump width 4 quanta, so 80
// clocks per bit). It measures, in clocks between tx_point pulses:
// - the nominal bit length and the sample point after a hard
//   synchronisation;
// - the phase error reported for edges in every quantum of the bit: late
//   edges in quanta 1-11 give +1..+11, early edges in 12-15 give -4..-1;
// - how each edge changes the bit: late edges lengthen it by at most the
//   jump width, early edges within it start the next bit at the edge;
// - that edges during the node's own dominant bit and second edges in the
//   same bit are ignored.
// Edges are placed an exact number of clocks after a tx_point, allowing
// for the two-stage input synchroniser. The expected values are worked out
// here from the segment lengths.
module tb_can_bit_timing;
  import mops_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rx = 1'b1, tx_dom = 1'b0, hsync = 1'b0;
  can_cfg_t cfg;
  logic sample, bitv, txp, pv;
  logic signed [5:0] perr;
  int checks = 0, failures = 0, cyc = 0;

  assign cfg = '{brp: 8'd5, tseg1: 5'd11, tseg2: 4'd4, sjw: 2'd3, acc_code: '0, acc_mask: '0};
  always #50 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  can_bit_timing dut (.clk, .rst_n, .cfg_i(cfg), .rx_i(rx), .tx_dom_i(tx_dom), .hard_sync_i(hsync),
    .sample_o(sample), .bit_o(bitv), .tx_point_o(txp), .phase_err_o(perr), .phase_valid_o(pv));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // Returns the cycle number of the next tx_point pulse, seen at a negedge.
  task automatic next_txp(output int t);
    do @(negedge clk); while (!txp);
    t = cyc;
  endtask

  // A recessive bit with no edge, so the next edge may resynchronise.
  task automatic recessive_bits();
    int t;
    rx = 1'b1;
    next_txp(t); next_txp(t);
  endtask

  // Falling edge m clocks after a tx_point; returns the phase error seen
  // and the length of the bit that holds the edge.
  task automatic edge_at(input int m, input logic own, output logic valid,
                         output int err, output int len);
    int t0, t1;
    recessive_bits();
    next_txp(t0);
    repeat (m) @(negedge clk);
    tx_dom = own; rx = 1'b0;
    valid = 1'b0; err = 0;
    do begin
      @(negedge clk);
      if (pv) begin valid = 1'b1; err = int'(perr); end
    end while (!txp);
    t1 = cyc;
    len = t1 - t0;
    tx_dom = 1'b0;
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1, ts, err, len, exp_err, exp_len, ok_err, ok_len;
    logic valid;
    #120 rst_n = 1'b1;
    repeat (200) @(negedge clk);
    // hard synchronisation, then nominal bits
    hsync = 1'b1;
    rx = 1'b0;
    next_txp(t0);
    hsync = 1'b0;
    do @(negedge clk); while (!sample);
    ts = cyc;
    next_txp(t1);
    check(t1 - t0 == 80, "bit of 16 quanta of 5 clocks after hard sync");
    check(ts - t0 == 60, "sample point after 12 quanta");
    check(bitv == 1'b0, "dominant level sampled");
    next_txp(t0);
    check(t0 - t1 == 80, "second bit nominal");

    // phase error and bit length for an edge in each quantum
    ok_err = 0; ok_len = 0;
    for (int p = 1; p <= 15; p++) begin
      edge_at(5 * p, 1'b0, valid, err, len);
      exp_err = (p <= 11) ? p : p - 16;
      if (p <= 11) exp_len = 80 + 5 * ((p > 4) ? 4 : p);
      else         exp_len = 5 * p + 3;            // the edge starts the next bit
      if (valid && err == exp_err) ok_err++;
      else $display("quantum %0d: error %0d valid %0d, expected %0d", p, err, valid, exp_err);
      if (len == exp_len) ok_len++;
      else $display("quantum %0d: bit length %0d, expected %0d", p, len, exp_len);
    end
    check(ok_err == 15, "phase error of an edge in every quantum");
    check(ok_len == 15, "bit lengthened or shortened by at most the jump width");

    // an edge during the node's own dominant bit is not used
    edge_at(5 * 3, 1'b1, valid, err, len);
    check(!valid && len == 80, "own dominant edge ignored");

    // only the first edge in a bit resynchronises
    recessive_bits();
    next_txp(t0);
    repeat (10) @(negedge clk);
    rx = 1'b0;
    repeat (10) @(negedge clk);
    rx = 1'b1;
    repeat (10) @(negedge clk);
    rx = 1'b0;
    next_txp(t1);
    check(t1 - t0 == 90, "second edge in the same bit ignored");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
