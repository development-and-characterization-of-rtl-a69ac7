// tmr_reg: triplicated register. Three copies of the register are each fed
// by their own majority voter, so a single upset copy is corrected at the
// next clock edge even when the register is not written (the copies
// refresh each other). A fourth voter drives the output, and mismatch_o
// flags any disagreement between the copies. This is the full-triplication
// scheme of the chip applied to one register; write with we_i, value
// appears on q_o one clock later. INIT is the reset value.
module tmr_reg #(
  parameter int unsigned        W    = 8,
  parameter logic [W-1:0]       INIT = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we_i,
  input  logic [W-1:0] d_i,
  output logic [W-1:0] q_o,
  output logic         mismatch_o
);
  logic [W-1:0] r0, r1, r2;
  logic [W-1:0] v0, v1, v2;

  function automatic logic [W-1:0] vote(input logic [W-1:0] a, b, c);
    return (a & b) | (b & c) | (a & c);
  endfunction

  assign v0 = vote(r0, r1, r2);
  assign v1 = vote(r0, r1, r2);
  assign v2 = vote(r0, r1, r2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0 <= INIT; r1 <= INIT; r2 <= INIT;
    end else begin
      r0 <= we_i ? d_i : v0;
      r1 <= we_i ? d_i : v1;
      r2 <= we_i ? d_i : v2;
    end
  end

  assign q_o        = vote(r0, r1, r2);
  assign mismatch_o = |((r0 ^ r1) | (r1 ^ r2));
endmodule
