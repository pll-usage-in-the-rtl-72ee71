// sync_2ff: two flip-flop synchronizer for signals entering a clock domain.
//
// Each bit passes through two flip-flops clocked by the destination clock, so
// a metastable first stage has one clock period to settle. Used for the
// asynchronous Reference input, for the Recovered Clock crossing into the
// fast-clock domain and for quasi-static configuration bits. A multi-bit
// value must only change while its consumer ignores it (the PLL is stopped),
// because the bits are not guaranteed to arrive in the same cycle.
// Latency: two destination clock cycles. Reset value: RESET_VAL.
module sync_2ff #(
  parameter int unsigned W = 1,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
