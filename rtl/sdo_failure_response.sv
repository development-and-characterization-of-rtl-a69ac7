// sdo_failure_response: purely combinational SDO failure block. It maps a
// failure cause to its CANopen abort code and forms the complete abort
// frame: COB-ID 580h + node, byte 0 = 80h, bytes 1-2 the index (little
// endian), byte 3 the sub-index, bytes 4-7 the abort code (little endian).
// The abort codes are the CANopen codes the chip uses; the mapping of
// internal error types is this design's own choice.
module sdo_failure_response
  import mops_pkg::*;
(
  input  sdo_err_t    err_i,
  input  logic [6:0]  node_id_i,
  input  logic [15:0] index_i,
  input  logic [7:0]  sub_i,
  output logic [31:0] code_o,
  output can_msg_t    msg_o
);
  always_comb begin
    unique case (err_i)
      SDO_ERR_TIMEOUT:      code_o = 32'h0504_0000;
      SDO_ERR_CMD:          code_o = 32'h0504_0001;
      SDO_ERR_ACCESS:       code_o = 32'h0601_0000;
      SDO_ERR_WO:           code_o = 32'h0601_0001;
      SDO_ERR_RO:           code_o = 32'h0601_0002;
      SDO_ERR_NO_OBJ:       code_o = 32'h0602_0000;
      SDO_ERR_HW:           code_o = 32'h0606_0000;
      SDO_ERR_COMM_TIMEOUT: code_o = 32'h0606_0007;
      SDO_ERR_NO_SUB:       code_o = 32'h0609_0011;
      default:              code_o = 32'h0800_0000;
    endcase
    msg_o.id   = COB_SDO_TX + {4'd0, node_id_i};
    msg_o.data = {8'h80, index_i[7:0], index_i[15:8], sub_i,
                  code_o[7:0], code_o[15:8], code_o[23:16], code_o[31:24]};
  end
endmodule
