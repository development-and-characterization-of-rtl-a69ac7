// tb_object_dictionary: reads every entry of the object dictionary and
// compares it with a table written out here, for two node numbers: value,
// size in bytes, existence of index and sub-index, access rights, the ADC
// channel of the monitoring entries and the refusal of 2100h. It then
// writes the ADC trimming entry 2001h (only 6 bits kept), checks the write
// acknowledge one clock later, that read-only entries ignore writes, and
// that an upset in one copy of the stored value is outvoted.
// The entries follow the chip's object dictionary; the ADC channel
// numbering is this design's own choice, and the expected values here are
// written independently of the design.
module tb_object_dictionary;
  logic clk = 1'b0, rst_n = 1'b0, wr = 1'b0;
  logic [6:0] node = 7'd0;
  logic [15:0] index = '0;
  logic [7:0] sub = '0;
  logic [31:0] wdata = '0, rdata;
  logic exists, sub_exists, readable, writable, refused, is_adc, wr_done;
  logic [5:0] adc_ch, adc_trim;
  logic [2:0] size;
  int checks = 0, failures = 0;
  always #50 clk = ~clk;

  object_dictionary dut (.clk, .rst_n, .node_id_i(node), .index_i(index), .sub_i(sub), .wr_req_i(wr),
    .wdata_i(wdata), .exists_o(exists), .sub_exists_o(sub_exists), .readable_o(readable),
    .writable_o(writable), .sdo_refused_o(refused), .is_adc_o(is_adc), .adc_ch_o(adc_ch),
    .size_o(size), .rdata_o(rdata), .wr_done_o(wr_done), .adc_trim_o(adc_trim));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s index=%h sub=%h node=%0d", what, index, sub, node); end
  endtask

  task automatic expect_val(input logic [15:0] i, input logic [7:0] s, input logic [31:0] v, input int sz);
    index = i; sub = s; #1;
    check(exists && sub_exists && readable && !is_adc && !refused, "entry present");
    check(rdata == v, "entry value");
    check(int'(size) == sz, "entry size");
  endtask

  task automatic expect_missing_sub(input logic [15:0] i, input logic [7:0] s);
    index = i; sub = s; #1;
    check(exists && !sub_exists, "missing sub-index");
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
    for (int n = 0; n < 4; n += 3) begin
      node = 7'(n);
      expect_val(16'h1000, 8'h00, 32'h191, 4);
      expect_val(16'h1001, 8'h00, 32'h0, 1);
      expect_val(16'h1005, 8'h00, 32'h80, 4);
      expect_val(16'h1014, 8'h00, 32'h80 + n, 4);
      expect_val(16'h1018, 8'h00, 32'd1, 1);
      expect_val(16'h1018, 8'h01, 32'h1234_5678, 4);
      expect_val(16'h1200, 8'h00, 32'd2, 1);
      expect_val(16'h1200, 8'h01, 32'h600 + n, 4);
      expect_val(16'h1200, 8'h02, 32'h580 + n, 4);
      expect_val(16'h1800, 8'h00, 32'd6, 1);
      expect_val(16'h1800, 8'h01, 32'h180 + n, 4);
      expect_val(16'h1801, 8'h01, 32'h280 + n, 4);
      expect_val(16'h1800, 8'h02, 32'hFE, 1);
      expect_val(16'h1A00, 8'h01, 32'h2100_0020, 4);
      expect_val(16'h1A01, 8'h01, 32'h2101_0030, 4);
      expect_val(16'h2310, 8'h00, 32'd3, 1);
      expect_val(16'h2400, 8'h00, 32'h40, 1);
      expect_missing_sub(16'h1000, 8'h01);
      expect_missing_sub(16'h1018, 8'h02);
      expect_missing_sub(16'h1200, 8'h03);
      expect_missing_sub(16'h1800, 8'h07);
      expect_missing_sub(16'h2310, 8'h04);
      expect_missing_sub(16'h2400, 8'h21);
    end
    for (int s = 1; s <= 3; s++) begin
      index = 16'h2310; sub = 8'(s); #1;
      check(is_adc && adc_ch == 6'(s - 1) && size == 3'd2, "2310h maps to ADC channels 0-2");
    end
    for (int s = 1; s <= 32; s++) begin
      index = 16'h2400; sub = 8'(s); #1;
      check(is_adc && adc_ch == 6'(s + 2) && size == 3'd2, "2400h maps to ADC channels 3-34");
    end
    index = 16'h2100; sub = 8'h00; #1 check(exists && refused, "2100h refused for SDO");
    index = 16'h3000; #1 check(!exists, "unknown index");
    index = 16'h1000; #1 check(!writable, "1000h read-only");
    // write 2001h
    @(negedge clk) begin index = 16'h2001; sub = 8'h00; wdata = 32'hFFFF_FFEA; wr = 1'b1; end
    #1 check(writable, "2001h writable");
    @(negedge clk) begin wr = 1'b0; end
    check(wr_done, "write acknowledged one clock later");
    check(adc_trim == 6'h2A && rdata == 32'h2A && size == 3'd1, "only 6 bits of 2001h kept");
    @(negedge clk) check(!wr_done, "acknowledge is a pulse");
    @(negedge clk) begin index = 16'h1000; wdata = 32'd5; wr = 1'b1; end
    @(negedge clk) wr = 1'b0;
    check(!wr_done && adc_trim == 6'h2A, "write to read-only entry ignored");
    dut.u_adc_trim.r1 = 6'h15;
    #1 check(adc_trim == 6'h2A, "upset in one copy outvoted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
