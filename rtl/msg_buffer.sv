// msg_buffer: 75-bit message buffer (11-bit identifier and eight data
// bytes, no protocol overhead) used for the receive and transmit buffers.
// It is fully triplicated: three copies, each refreshed by its own voter,
// and a voted output. The identifier and each data byte can be written
// separately (we_id_i, we_byte_i[i] for byte i, byte 0 first on the bus),
// so the CANopen logic can fill a response field by field; clear_i zeroes
// the whole buffer. Writes take effect at the next clock edge.
module msg_buffer
  import mops_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear_i,
  input  logic       we_id_i,
  input  logic [7:0] we_byte_i,
  input  can_msg_t   d_i,
  output can_msg_t   q_o,
  output logic       mismatch_o
);
  can_msg_t c0, c1, c2, v;
  logic [74:0] wmask;

  assign v = (c0 & c1) | (c1 & c2) | (c0 & c2);

  always_comb begin
    wmask = {{11{we_id_i}}, 64'd0};
    for (int i = 0; i < 8; i++) wmask[63 - 8*i -: 8] = {8{we_byte_i[i]}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c0 <= '0; c1 <= '0; c2 <= '0;
    end else if (clear_i) begin
      c0 <= '0; c1 <= '0; c2 <= '0;
    end else begin
      c0 <= (d_i & wmask) | (v & ~wmask);
      c1 <= (d_i & wmask) | (v & ~wmask);
      c2 <= (d_i & wmask) | (v & ~wmask);
    end
  end

  assign q_o        = v;
  assign mismatch_o = (c0 != c1) || (c1 != c2);
endmodule
