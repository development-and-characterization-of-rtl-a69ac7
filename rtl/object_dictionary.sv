// object_dictionary: the chip's CANopen object dictionary (OD) in three
// parts. (1) A large combinational multiplexer holds every entry: constants
// are wired in, writable entries are fed back from the storage, and for
// each index/sub-index it reports whether the object and sub-index exist,
// the access rights, the data size and, for monitoring channels, the ADC
// channel to convert. (2) Access control turns a write request into a
// write strobe only for an existing, writable entry. (3) Stored entries
// hold the writable registers (triplicated); they are cleared only by the
// power-on reset, never by the watchdogs.
// Entries: 1000h device type 191h; 1001h error register 0; 1005h COB-ID
// SYNC 80h; 1014h COB-ID EMCY 80h+node; 1018h identity (1 entry, vendor
// 12345678h); 1200h server SDO (600h+node, 580h+node); 1800h/1801h TPDO
// communication (COB-ID 180h/280h+node, type FEh, other fields 0); 1A00h/
// 1A01h TPDO mapping (21000020h, 21010030h); 2001h ADC trimming bits (U8,
// read/write, 6 bits kept); 2100h all-FE monitoring (exists, refused for
// SDO access); 2310h VBANDGAP, VCANSEN, VGNDSEN (ADC channels 0-2); 2400h
// sub-indices 1-20h = ADC channels 3-34. Sub-index 0 of a record gives its
// number of entries. ADC channel numbering is this design's choice.
module object_dictionary
  import mops_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,        // power-on reset only
  input  logic [6:0]  node_id_i,
  input  logic [15:0] index_i,
  input  logic [7:0]  sub_i,
  input  logic        wr_req_i,
  input  logic [31:0] wdata_i,
  output logic        exists_o,
  output logic        sub_exists_o,
  output logic        readable_o,
  output logic        writable_o,
  output logic        sdo_refused_o,
  output logic        is_adc_o,
  output logic [5:0]  adc_ch_o,
  output logic [2:0]  size_o,       // bytes
  output logic [31:0] rdata_o,
  output logic        wr_done_o,
  output logic [5:0]  adc_trim_o
);
  logic [5:0]  adc_trim_q;
  logic        wr_strobe;
  logic [31:0] nid;
  assign nid = {25'd0, node_id_i};

  // ---- (1) entry multiplexer ----
  always_comb begin
    exists_o      = 1'b1;
    sub_exists_o  = 1'b1;
    readable_o    = 1'b1;
    writable_o    = 1'b0;
    sdo_refused_o = 1'b0;
    is_adc_o      = 1'b0;
    adc_ch_o      = '0;
    size_o        = 3'd4;
    rdata_o       = '0;
    unique case (index_i)
      16'h1000: begin rdata_o = 32'h0000_0191; sub_exists_o = (sub_i == 8'd0); end
      16'h1001: begin rdata_o = 32'd0; size_o = 3'd1; sub_exists_o = (sub_i == 8'd0); end
      16'h1005: begin rdata_o = 32'h80; sub_exists_o = (sub_i == 8'd0); end
      16'h1014: begin rdata_o = 32'h80 + nid; sub_exists_o = (sub_i == 8'd0); end
      16'h1018: unique case (sub_i)
        8'd0:    begin rdata_o = 32'd1; size_o = 3'd1; end
        8'd1:    rdata_o = 32'h1234_5678;
        default: sub_exists_o = 1'b0;
      endcase
      16'h1200: unique case (sub_i)
        8'd0:    begin rdata_o = 32'd2; size_o = 3'd1; end
        8'd1:    rdata_o = 32'h600 + nid;
        8'd2:    rdata_o = 32'h580 + nid;
        default: sub_exists_o = 1'b0;
      endcase
      16'h1800, 16'h1801: unique case (sub_i)
        8'd0:    begin rdata_o = 32'd6; size_o = 3'd1; end
        8'd1:    rdata_o = (index_i[0] ? 32'h280 : 32'h180) + nid;
        8'd2:    begin rdata_o = 32'hFE; size_o = 3'd1; end
        8'd3:    begin rdata_o = 32'd0; size_o = 3'd2; end
        8'd4:    begin rdata_o = 32'd0; size_o = 3'd1; end
        8'd5:    begin rdata_o = 32'd0; size_o = 3'd2; end
        8'd6:    begin rdata_o = 32'd0; size_o = 3'd1; end
        default: sub_exists_o = 1'b0;
      endcase
      16'h1A00, 16'h1A01: unique case (sub_i)
        8'd0:    begin rdata_o = 32'd1; size_o = 3'd1; end
        8'd1:    rdata_o = index_i[0] ? 32'h2101_0030 : 32'h2100_0020;
        default: sub_exists_o = 1'b0;
      endcase
      16'h2001: begin
        rdata_o = {26'd0, adc_trim_q}; size_o = 3'd1; writable_o = 1'b1;
        sub_exists_o = (sub_i == 8'd0);
      end
      16'h2100: begin sdo_refused_o = 1'b1; sub_exists_o = (sub_i == 8'd0); end
      16'h2310: begin
        if (sub_i == 8'd0) begin rdata_o = 32'd3; size_o = 3'd1; end
        else if (sub_i <= 8'd3) begin is_adc_o = 1'b1; adc_ch_o = 6'(sub_i - 8'd1); size_o = 3'd2; end
        else sub_exists_o = 1'b0;
      end
      16'h2400: begin
        if (sub_i == 8'd0) begin rdata_o = 32'h40; size_o = 3'd1; end
        else if (sub_i <= 8'h20) begin is_adc_o = 1'b1; adc_ch_o = 6'(sub_i + 8'd2); size_o = 3'd2; end
        else sub_exists_o = 1'b0;
      end
      default: begin exists_o = 1'b0; sub_exists_o = 1'b0; readable_o = 1'b0; end
    endcase
  end

  // ---- (2) access control ----
  assign wr_strobe = wr_req_i && exists_o && sub_exists_o && writable_o;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wr_done_o <= 1'b0;
    else        wr_done_o <= wr_strobe;
  end

  // ---- (3) stored entries ----
  tmr_reg #(.W(6), .INIT(6'd0)) u_adc_trim (
    .clk, .rst_n, .we_i(wr_strobe && index_i == 16'h2001), .d_i(wdata_i[5:0]),
    .q_o(adc_trim_q), .mismatch_o()
  );
  assign adc_trim_o = adc_trim_q;
endmodule
