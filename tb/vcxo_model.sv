// vcxo_model: behavioural model of a voltage controlled crystal oscillator
// (simulation only, not synthesizable).
//
// Frequency = F0_MHZ * (1 + (OFFSET_PPM + PULL_PPM * (2*vctl/VREF - 1)) * 1e-6),
// i.e. a linear tuning curve spanning +/-PULL_PPM over 0..VREF around a
// crystal that is OFFSET_PPM off nominal. The control voltage is sampled
// every half period. Edge times are accumulated in real arithmetic, so the
// rounding of each delay to the time precision does not add up to a
// frequency error. Time unit: 1 ns.
`timescale 1ns/1fs
module vcxo_model #(
  parameter real F0_MHZ     = 40.0,
  parameter real PULL_PPM   = 50.0,
  parameter real OFFSET_PPM = 0.0,
  parameter real VREF       = 3.3
) (
  input  real  vctl,
  input  logic en,
  output logic clk
);
  real ppm, half_ns, t_next;

  initial begin
    clk = 1'b0;
    t_next = 0.0;
    forever begin
      ppm     = OFFSET_PPM + PULL_PPM * (2.0 * vctl / VREF - 1.0);
      half_ns = 500.0 / (F0_MHZ * (1.0 + ppm * 1.0e-6));
      t_next += half_ns;
      if (t_next > $realtime) #(t_next - $realtime);
      if (en) clk = ~clk;
    end
  end
endmodule
