// canopen_decoder: message type decoder of the CANopen block. Purely
// combinational: from the frame in the receive buffer it derives the
// communication object type (remote reset, SDO, node guarding, and the
// unused PDO, SYNC and EMCY types, kept so they can be added later) and, for
// SDO requests, the client command specifier (top three bits of byte 0),
// the index (bytes 1-2, little endian), the sub-index (byte 3), the data
// (bytes 4-7, little endian) and the number of valid data bytes
// (4 - n when the size bit s is set, else 4).
// The COB-IDs follow the CANopen rules used by the chip; classifying SYNC,
// EMCY and PDO frames (which the chip ignores) is this design's own choice.
module canopen_decoder
  import mops_pkg::*;
(
  input  can_msg_t    msg_i,
  input  logic [6:0]  node_id_i,
  output msg_type_t   type_o,
  output logic [2:0]  ccs_o,
  output logic [15:0] index_o,
  output logic [7:0]  sub_o,
  output logic [31:0] data_o,
  output logic [2:0]  size_o
);
  logic [7:0] b0;
  assign b0 = msg_byte(msg_i.data, 0);

  always_comb begin
    if (msg_i.id == COB_NMT_RESET)                           type_o = MT_RESET;
    else if (msg_i.id == COB_SDO_RX + {4'd0, node_id_i})     type_o = MT_SDO;
    else if (msg_i.id == COB_GUARD + {4'd0, node_id_i})      type_o = MT_GUARD;
    else if (msg_i.id == 11'h080)                            type_o = MT_SYNC;
    else if (msg_i.id == 11'h080 + {4'd0, node_id_i})        type_o = MT_EMCY;
    else if (msg_i.id >= 11'h180 && msg_i.id < 11'h580 &&
             msg_i.id[6:0] == node_id_i)                     type_o = MT_PDO;
    else                                                     type_o = MT_NONE;
  end

  assign ccs_o   = b0[7:5];
  assign index_o = {msg_byte(msg_i.data, 2), msg_byte(msg_i.data, 1)};
  assign sub_o   = msg_byte(msg_i.data, 3);
  assign data_o  = {msg_byte(msg_i.data, 7), msg_byte(msg_i.data, 6), msg_byte(msg_i.data, 5), msg_byte(msg_i.data, 4)};
  assign size_o  = b0[0] ? (3'd4 - {1'b0, b0[3:2]}) : 3'd4;
endmodule
