// freq_divider: the PLL's Divider, producing the Recovered Clock and the time
// base pulses.
//
// Counts clock-enable events (`ce`) modulo `ratio`. Each wrap gives a
// one-cycle time base pulse `pulse` and starts a new Recovered Clock period;
// `clk_out` is high for the first ratio/2 counted events of each period (for
// ratio >= 2 a square wave, high in the first half). `phase_cnt` exposes the
// counter as a coarse time base. In the hybrid PLL the divider runs on the
// VCXO clean clock with ce tied high (40 MHz / 40 = 1 MHz); in the
// all-digital PLL it runs on the Fast Clock with ce = RMClk.
//
// The paper shows the divider and its outputs but not its insides; the
// modulo counter, the output set and the programmable ratio are this
// design's choices. ratio = 0 is treated as 1. A ratio change applies at the
// next wrap. Timing: pulse and clk_out are registered, rising one cycle after
// the ce event that starts a period.
module freq_divider #(
  parameter int unsigned DIV_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             ce,
  input  logic [DIV_W-1:0] ratio,
  output logic             pulse,
  output logic             clk_out,
  output logic [DIV_W-1:0] phase_cnt
);
  logic [DIV_W-1:0] cnt, cnt_next;

  always_comb begin
    if (({1'b0, cnt} + 1'b1) >= {1'b0, ratio}) cnt_next = '0;
    else                                         cnt_next = cnt + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      pulse   <= 1'b0;
      clk_out <= 1'b0;
    end else begin
      pulse <= 1'b0;
      if (!enable) begin
        cnt     <= '0;
        clk_out <= 1'b0;
      end else if (ce) begin
        // The event counted now is event number cnt of the current period.
        pulse   <= (cnt == '0);
        clk_out <= ({1'b0, cnt} < ({1'b0, ratio} >> 1));
        cnt     <= cnt_next;
      end
    end
  end

  assign phase_cnt = cnt;
endmodule
