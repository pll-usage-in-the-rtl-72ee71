// hpll: Hybrid PLL. A digital phase detector and PI controller steer an
// external VCXO through a DAC; the VCXO's clean clock drives the divider that
// produces the Recovered Clock.
//
// Clock domains:
//   fc_clk   - Fast Clock, from an independent free-running oscillator
//              (local quartz multiplied up, 160 MHz in the paper's tests).
//              Runs the phase detector and the decimation filter. Using a
//              clock unrelated to the VCXO decorrelates the phase
//              quantisation errors, so averaging N_Av samples resolves the
//              phase below one Fast Clock period.
//   vcxo_clk - the VCXO clean clock (40 MHz). Runs the divider (Recovered
//              Clock = vcxo_clk / div_ratio, 1 MHz at the defaults), the PI
//              controller and the register port.
//
// Data flow: the phase detector measures the delay from each Recovered Clock
// rising edge to the next Reference rising edge in Fast Clock ticks; the
// decimator sums N_Av validated samples; the sum crosses to the VCXO domain
// and the PI controller updates its control value. The DAC code is the top
// DAC_W bits of the 32-bit control value in offset binary: control 0 gives
// mid-scale, the VCXO's nominal frequency; a larger control value means a
// higher DAC code and, for a VCXO with positive tuning slope, a higher
// frequency. A positive error (phase below the setpoint, Reference edge too
// early after the Recovered edge) therefore speeds the VCXO up.
//
// The topology (PD on an independent fast clock, shared PI controller, DAC,
// VCXO, divider on the clean clock, bus access and interrupt) follows the
// paper. The register defaults are the paper's operating point where
// it gives one (N_Av = 2000, 160 MHz Fast Clock, 40 MHz VCXO, 1 MHz
// Recovered Clock); the setpoint (half a Recovered Clock period, 80 ticks
// summed over 2000 samples), the gain format (8 fractional bits) and the
// gains are this design's. The default gains give a proportional loop gain
// of about 0.16 per update for a +/-50 ppm VCXO behind a 16-bit DAC with a
// Manchester-coded Reference (about 0.375 rising edges per microsecond):
//   G = Kp * N_Av * (N_Av / 0.375 us) * 160 ticks/us * (100e-6 / 2**32).
// Configuration that crosses to the Fast Clock domain (run, N_Av) is
// re-synchronised bit by bit and should only be changed with the loop stopped.
module hpll
  import gmt_pll_pkg::*;
#(
  parameter int unsigned PHASE_W        = 16,
  parameter int unsigned NAV_W          = 16,
  parameter int unsigned DIV_W          = 16,
  parameter int unsigned DAC_W          = 16,
  parameter int unsigned GAIN_FRAC      = 8,
  parameter int unsigned NAV_RST        = 2000,
  parameter word_t       SETPOINT_RST   = 32'sd160000,
  parameter word_t       KP_RST         = 32'sd1024000,   // 4000.0 with 8 fractional bits
  parameter word_t       KI_RST         = 32'sd64000,     // 250.0 = Kp / 16
  parameter word_t       INTEG_INIT_RST = 32'sd0,
  parameter int unsigned DIV_RST        = 40
) (
  input  logic              fc_clk,
  input  logic              vcxo_clk,
  input  logic              rst_n,
  input  logic              ref_in,      // Reference Clock (or encoded data stream), asynchronous
  // register port, vcxo_clk domain
  input  logic [ADDR_W-1:0] bus_addr,
  input  logic              bus_wr,
  input  word_t             bus_wdata,
  input  logic              bus_rd,
  output word_t             bus_rdata,
  output logic              irq,
  // to the DAC in front of the VCXO
  output logic [DAC_W-1:0]  dac_code,
  // time base
  output logic              rec_clk,     // Recovered Clock
  output logic              rec_pulse,   // one vcxo_clk pulse per Recovered Clock period
  // monitoring (Fast Clock domain)
  output logic              pd_valid,
  output logic              pd_lost
);
  // vcxo_clk domain
  logic             run;
  logic [NAV_W-1:0] n_av;
  word_t            setpoint, kp, ki, integ_init, integ, ctrl, err;
  logic             load_init, ctrl_valid, saturated;
  logic [DIV_W-1:0] div_ratio, div_cnt;
  logic [31:0]      sum_v, lost_v;
  logic             sum_v_valid, lost_v_valid;
  word_t            phase_sum_v, lost_count_v;

  // fc_clk domain
  logic               run_f;
  logic [NAV_W-1:0]   n_av_f;
  logic [PHASE_W-1:0] phase;
  logic [31:0]        sum_f, lost_f;
  logic               sum_f_valid;

  pll_bus_regs #(
    .NAV_W(NAV_W), .DIV_W(DIV_W), .RUN_RST(1'b1), .NAV_RST(NAV_RST),
    .SETPOINT_RST(SETPOINT_RST), .KP_RST(KP_RST), .KI_RST(KI_RST),
    .INTEG_INIT_RST(INTEG_INIT_RST), .DIV_RST(DIV_RST)
  ) u_regs (
    .clk(vcxo_clk), .rst_n(rst_n),
    .addr(bus_addr), .wr(bus_wr), .wdata(bus_wdata), .rd(bus_rd), .rdata(bus_rdata), .irq(irq),
    .run(run), .n_av(n_av), .setpoint(setpoint), .kp(kp), .ki(ki),
    .integ_init(integ_init), .load_init(load_init), .div_ratio(div_ratio),
    .phase_sum(phase_sum_v), .err(err), .integ(integ), .ctrl(ctrl), .ctrl_valid(ctrl_valid),
    .saturated(saturated), .lost_count(lost_count_v)
  );

  // Configuration into the Fast Clock domain.
  sync_2ff #(.W(1 + NAV_W), .RESET_VAL({1'b1, NAV_W'(NAV_RST)})) u_cfg_sync (
    .clk(fc_clk), .rst_n(rst_n), .d({run, n_av}), .q({run_f, n_av_f})
  );

  phase_detector #(.PHASE_W(PHASE_W), .SYNC_REC(1'b1)) u_pd (
    .clk(fc_clk), .rst_n(rst_n), .enable(run_f),
    .ref_in(ref_in), .rec_in(rec_clk),
    .phase(phase), .phase_valid(pd_valid), .lost(pd_lost)
  );

  pd_decimator #(.PHASE_W(PHASE_W), .NAV_W(NAV_W), .SUM_W(32)) u_dec (
    .clk(fc_clk), .rst_n(rst_n), .enable(run_f), .n_av(n_av_f),
    .phase(phase), .phase_valid(pd_valid),
    .sum(sum_f), .sum_valid(sum_f_valid)
  );

  always_ff @(posedge fc_clk or negedge rst_n) begin
    if (!rst_n)       lost_f <= '0;
    else if (pd_lost) lost_f <= lost_f + 1'b1;
  end

  word_sync #(.W(32)) u_sum_sync (
    .src_clk(fc_clk), .src_rst_n(rst_n), .src_data(sum_f), .src_valid(sum_f_valid),
    .dst_clk(vcxo_clk), .dst_rst_n(rst_n), .dst_data(sum_v), .dst_valid(sum_v_valid)
  );

  word_sync #(.W(32)) u_lost_sync (
    .src_clk(fc_clk), .src_rst_n(rst_n), .src_data(lost_f + 1'b1), .src_valid(pd_lost),
    .dst_clk(vcxo_clk), .dst_rst_n(rst_n), .dst_data(lost_v), .dst_valid(lost_v_valid)
  );

  always_ff @(posedge vcxo_clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_sum_v  <= '0;
      lost_count_v <= '0;
    end else begin
      if (sum_v_valid)  phase_sum_v  <= word_t'(sum_v);
      if (lost_v_valid) lost_count_v <= word_t'(lost_v);
    end
  end

  pi_controller #(.GAIN_FRAC(GAIN_FRAC)) u_pi (
    .clk(vcxo_clk), .rst_n(rst_n), .enable(run),
    .setpoint(setpoint), .kp(kp), .ki(ki), .integ_init(integ_init), .load_init(load_init),
    .meas(word_t'(sum_v)), .meas_valid(sum_v_valid),
    .err(err), .integ(integ), .ctrl(ctrl), .ctrl_valid(ctrl_valid), .saturated(saturated)
  );

  // Control value to DAC code: top DAC_W bits, offset binary.
  always_ff @(posedge vcxo_clk or negedge rst_n) begin
    if (!rst_n) dac_code <= {1'b1, {(DAC_W-1){1'b0}}};
    else        dac_code <= {~ctrl[DATA_W-1], ctrl[DATA_W-2 -: DAC_W-1]};
  end

  freq_divider #(.DIV_W(DIV_W)) u_div (
    .clk(vcxo_clk), .rst_n(rst_n), .enable(1'b1), .ce(1'b1), .ratio(div_ratio),
    .pulse(rec_pulse), .clk_out(rec_clk), .phase_cnt(div_cnt)
  );
endmodule
