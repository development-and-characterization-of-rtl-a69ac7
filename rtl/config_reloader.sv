// config_reloader: second watchdog, for the opposite case: all four
// top-level state machines idle for a long time. Each machine reports
// "idle" on reload_i; the bits are ANDed and while all are set a counter
// runs. At RELOAD_CYCLES (250 ms at 10 MHz) reloadconf_o pulses for one
// clock: the CAN node configuration is rewritten from the hardwired values
// and the state machines return to idle, without any message on the bus.
// This repairs a corrupted bit timing that would otherwise keep the node in
// error or bus-off. The rewrite takes a few clocks, far less than one CAN
// bit, and does not disturb reception. The counter restarts after each
// reload and whenever any machine leaves idle.
// The 250 ms idle time and the AND of the four idle signals follow the
// chip's description; the counter itself is this design's own choice.
module config_reloader #(
  parameter longint unsigned RELOAD_CYCLES = 64'd2_500_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] reload_i,
  output logic       reloadconf_o
);
  logic [$clog2(RELOAD_CYCLES+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= '0;
      reloadconf_o <= 1'b0;
    end else begin
      reloadconf_o <= 1'b0;
      if (!(&reload_i) || reloadconf_o) begin
        cnt <= '0;
      end else if (cnt == $bits(cnt)'(RELOAD_CYCLES - 1)) begin
        cnt          <= '0;
        reloadconf_o <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
