// relaxation_oscillator: behavioural model (not synthesizable) of the
// on-chip relaxation oscillator. The real circuit charges two capacitors
// alternately with a reference current up to a reference voltage, giving
// f = Iref / (2 C Vref). Each capacitor is a fixed part plus six binary
// weighted trimming capacitors switched by trim_i, so a larger code means a
// lower frequency. Model: period = (FIXED_PS + STEP_PS * trim) scaled by
// (1 + PROCESS_PPM * 1e-6), where PROCESS_PPM stands for process,
// temperature and radiation shifts. With the defaults, code 32 gives
// 100 ns (10 MHz) and one code step about 1 %. en_i stops the clock.
// Behavioural model. The 10 MHz nominal frequency and the 6-bit trim code
// follow the chip; the 68 ns + 1 ns per step law is this model's own choice.
module relaxation_oscillator #(
  parameter int FIXED_PS    = 68_000,
  parameter int STEP_PS     = 1_000,
  parameter int PROCESS_PPM = 0
) (
  input  logic       en_i,
  input  logic [5:0] trim_i,
  output logic       clk_o
);
  realtime half_period;
  initial clk_o = 1'b0;
  always begin
    half_period = (real'(FIXED_PS) + real'(STEP_PS) * real'(trim_i))
                  * (1.0 + real'(PROCESS_PPM) * 1.0e-6) * 0.5e-3 * 1ns;
    #(half_period);
    clk_o = en_i ? !clk_o : 1'b0;
  end
endmodule
