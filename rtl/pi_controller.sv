// pi_controller: 32-bit signed fixed-point Proportional-Integral controller.
//
// On each decimated phase measurement (meas/meas_valid) it computes
//   err   = setpoint - meas
//   integ = integ + (Ki * err) >>> GAIN_FRAC
//   ctrl  = integ + (Kp * err) >>> GAIN_FRAC
// All values are 32-bit two's complement. Kp and Ki carry GAIN_FRAC
// fractional bits. Every add, subtract and scaled product saturates at the
// 32-bit limits instead of wrapping, and `saturated` pulses when any of them
// clipped. load_init copies integ_init into the integrator and the output
// (the programmable integrator initial value).
//
// The paper gives the 32-bit signed fixed-point datapath, the overflow
// handling and the four programmable quantities (setpoint, Kp, Ki,
// integrator initial value). The equations are the textbook PI law; the gain
// format, the two-stage pipeline and the sign convention (a positive error
// raises ctrl) are this design's choices. A loop whose actuator runs the
// other way (a numeric oscillator period) uses negative gains.
//
// Timing: stage 1 registers the error and both 64-bit products, stage 2
// updates integ and ctrl. ctrl_valid pulses two cycles after meas_valid.
// meas_valid must not come in two consecutive cycles.
module pi_controller
  import gmt_pll_pkg::*;
#(
  parameter int unsigned GAIN_FRAC = 16   // fractional bits of Kp and Ki
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,
  input  word_t setpoint,
  input  word_t kp,
  input  word_t ki,
  input  word_t integ_init,
  input  logic  load_init,
  input  word_t meas,
  input  logic  meas_valid,
  output word_t err,
  output word_t integ,
  output word_t ctrl,
  output logic  ctrl_valid,
  output logic  saturated
);
  dword_t p_prod, i_prod;
  logic                       s1_valid, s1_sat;
  word_t                      p_term, i_term, integ_n;
  logic                       sat_s2;
  logic signed [DATA_W:0]     diff_full;
  word_t                      diff;

  assign diff_full = {setpoint[DATA_W-1], setpoint} - {meas[DATA_W-1], meas};
  assign diff      = sat33(diff_full);

  // Stage 1: error and products.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err      <= '0;
      p_prod   <= '0;
      i_prod   <= '0;
      s1_valid <= 1'b0;
      s1_sat   <= 1'b0;
    end else begin
      s1_valid <= enable && meas_valid && !load_init;
      if (meas_valid) begin
        err    <= diff;
        p_prod <= dword_t'(diff) * dword_t'(kp);
        i_prod <= dword_t'(diff) * dword_t'(ki);
        s1_sat <= diff_full[DATA_W] != diff_full[DATA_W-1];
      end
    end
  end

  // Stage 2: scale, integrate, sum.
  always_comb begin
    p_term  = sat_scale(p_prod, GAIN_FRAC);
    i_term  = sat_scale(i_prod, GAIN_FRAC);
    integ_n = sat_add(integ, i_term);
    sat_s2  = s1_sat
           || ((p_prod >>> GAIN_FRAC) != dword_t'(p_term))
           || ((i_prod >>> GAIN_FRAC) != dword_t'(i_term))
           || add_clips(integ, i_term)
           || add_clips(integ_n, p_term);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ      <= '0;
      ctrl       <= '0;
      ctrl_valid <= 1'b0;
      saturated  <= 1'b0;
    end else begin
      ctrl_valid <= 1'b0;
      saturated  <= 1'b0;
      if (load_init) begin
        integ <= integ_init;
        ctrl  <= integ_init;
      end else if (s1_valid && enable) begin
        integ      <= integ_n;
        ctrl       <= sat_add(integ_n, p_term);
        ctrl_valid <= 1'b1;
        saturated  <= sat_s2;
      end
    end
  end
endmodule
