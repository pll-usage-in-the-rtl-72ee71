// sigma_delta_modulator: first-order sigma-delta modulator for the
// fractional part of the numeric oscillator period.
//
// An FRAC_W-bit phase accumulator adds `frac` once per enable (once per RMClk
// pulse). The carry out of that addition is the 1-bit output `tick`: over any
// 2**FRAC_W consecutive enables exactly `frac` of them carry, so the average
// of `tick` equals frac / 2**FRAC_W Fast Clock ticks per period, which is the
// behaviour the paper asks of the modulator. The first-order structure is
// this design's choice; the paper names the modulator and its purpose.
//
// Timing: `tick` is combinational from the current accumulator and `frac`; it
// is the value that applies to the period being loaded in the cycle `en` is
// high, and the accumulator advances on that same clock edge.
module sigma_delta_modulator #(
  parameter int unsigned FRAC_W = 16
) (
  input  logic              clk,    // Fast Clock
  input  logic              rst_n,
  input  logic              en,     // RMClk: advance once per generated period
  input  logic [FRAC_W-1:0] frac,   // fractional period
  output logic              tick    // add one Fast Clock tick to this period
);
  logic [FRAC_W-1:0] acc;
  logic [FRAC_W:0]   sum;

  assign sum  = {1'b0, acc} + {1'b0, frac};
  assign tick = sum[FRAC_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= sum[FRAC_W-1:0];
  end
endmodule
