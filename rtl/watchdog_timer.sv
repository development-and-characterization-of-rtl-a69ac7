// watchdog_timer: guards against a state machine stuck outside its idle
// state (a logic error or an upset). Each of the four top-level state
// machines reports "not idle" on entimeout_i; the bits are ORed, and while
// any is set a counter runs. When it reaches TIMEOUT_CYCLES (5 s at 10 MHz)
// timeoutrst_o pulses for one clock: all state machines are reset, the CAN
// configuration is reloaded and a sign-in message is sent. The counter
// clears whenever all machines are idle and after each timeout. The time
// scales with the oscillator frequency, as the count is in clock cycles.
// The 5 s timeout and the OR of the four not-idle signals follow the chip's
// description; the counter itself is this design's own choice.
module watchdog_timer #(
  parameter longint unsigned TIMEOUT_CYCLES = 64'd50_000_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] entimeout_i,
  output logic       timeoutrst_o
);
  logic [$clog2(TIMEOUT_CYCLES+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= '0;
      timeoutrst_o <= 1'b0;
    end else begin
      timeoutrst_o <= 1'b0;
      if (!(|entimeout_i) || timeoutrst_o) begin
        cnt <= '0;
      end else if (cnt == $bits(cnt)'(TIMEOUT_CYCLES - 1)) begin
        cnt          <= '0;
        timeoutrst_o <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
