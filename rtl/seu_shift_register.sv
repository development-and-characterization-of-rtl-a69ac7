// seu_shift_register: 3000-bit shift register used to measure the
// single-event-upset cross-section of the process. With TMR = 0 it is a
// plain chain of flip-flops. With TMR = 1 every stage is three flip-flops,
// each loaded from its own majority voter over the three flip-flops of the
// previous stage (full triplication, three voters per stage), so an upset
// in one flip-flop is outvoted at the next shift. A pattern shifted in at
// sr_in_i appears at sr_out_o after LEN shifts (shift_en_i high); counting
// differences between the pattern in and out gives the upset rate.
module seu_shift_register #(
  parameter int unsigned LEN = 3000,
  parameter bit          TMR = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic shift_en_i,
  input  logic sr_in_i,
  output logic sr_out_o
);
  if (TMR) begin : g_tmr
    logic [LEN-1:0] a, b, c;
    logic [LEN-1:0] va, vb, vc;
    assign va = ({a[LEN-2:0], sr_in_i} & {b[LEN-2:0], sr_in_i}) | ({b[LEN-2:0], sr_in_i} & {c[LEN-2:0], sr_in_i}) | ({a[LEN-2:0], sr_in_i} & {c[LEN-2:0], sr_in_i});
    assign vb = va;
    assign vc = va;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        a <= '0; b <= '0; c <= '0;
      end else if (shift_en_i) begin
        a <= va; b <= vb; c <= vc;
      end
    end
    assign sr_out_o = (a[LEN-1] & b[LEN-1]) | (b[LEN-1] & c[LEN-1]) | (a[LEN-1] & c[LEN-1]);
  end else begin : g_plain
    logic [LEN-1:0] r;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)          r <= '0;
      else if (shift_en_i) r <= {r[LEN-2:0], sr_in_i};
    end
    assign sr_out_o = r[LEN-1];
  end
endmodule
