// dac_model: behavioural model of the DAC in front of the VCXO (simulation
// only, not synthesizable).
//
// An ideal, unipolar, straight-binary converter: vout = code / 2**W * VREF,
// updated without delay whenever the code changes.
`timescale 1ns/1fs
module dac_model #(
  parameter int unsigned W    = 16,
  parameter real         VREF = 3.3
) (
  input  logic [W-1:0] code,
  output real          vout
);
  always_comb vout = (real'(code) / (2.0 ** W)) * VREF;
endmodule
