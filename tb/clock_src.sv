// clock_src: free-running clock for the testbenches (simulation only), e.g.
// the local quartz oscillator multiplied up to the Fast Clock.
//
// Frequency F_MHZ * (1 + PPM * 1e-6). Edge times are accumulated in real
// arithmetic so delay rounding does not add up. Time unit: 1 ns.
`timescale 1ns/1fs
module clock_src #(
  parameter real F_MHZ = 160.0,
  parameter real PPM   = 0.0
) (
  output logic clk
);
  real half_ns, t_next;

  initial begin
    clk = 1'b0;
    half_ns = 500.0 / (F_MHZ * (1.0 + PPM * 1.0e-6));
    t_next = 0.0;
    forever begin
      t_next += half_ns;
      if (t_next > $realtime) #(t_next - $realtime);
      clk = ~clk;
    end
  end
endmodule
