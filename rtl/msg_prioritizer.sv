// msg_prioritizer: purely combinational priority decision for a newly
// received frame. The CAN bus arbitration only orders frames on the bus;
// the chip needs about 1.3 ms per request, so a frame that arrives while
// one is being worked on must be ranked against it. Ranks: remote reset
// (identifier 0) 3, SDO request to this node (600h + node) 2, node guarding
// of this node (700h + node) 1, anything else 0 (not for this chip). A frame
// is accepted when its rank is above cur_rank_i (0 when the chip is idle);
// the chip then drops what it was doing and handles the new frame.
// Ranking frames so that a more important one interrupts a less important
// one follows the chip's description; the order of the ranks is this
// design's own choice.
module msg_prioritizer
  import mops_pkg::*;
(
  input  logic [10:0] id_i,
  input  logic [6:0]  node_id_i,
  input  logic [1:0]  cur_rank_i,
  output logic [1:0]  rank_o,
  output logic        accept_o
);
  always_comb begin
    if (id_i == COB_NMT_RESET)                       rank_o = 2'd3;
    else if (id_i == COB_SDO_RX + {4'd0, node_id_i}) rank_o = 2'd2;
    else if (id_i == COB_GUARD + {4'd0, node_id_i})  rank_o = 2'd1;
    else                                             rank_o = 2'd0;
  end
  assign accept_o = (rank_o != 2'd0) && (rank_o > cur_rank_i);
endmodule
