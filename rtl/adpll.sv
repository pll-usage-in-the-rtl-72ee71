// adpll: All Digital PLL. The PI controller programs the period of a Numeric
// Oscillator clocked by the Fast Clock; no analogue part is steered.
//
// Clock domains:
//   fc_clk  - Fast Clock (local quartz, possibly multiplied). Runs the phase
//             detector, the decimation filter, the numeric oscillator and the
//             divider.
//   sys_clk - System Clock. Runs the PI controller and the register port.
//
// Data flow: the numeric oscillator generates RMClk, one pulse every
// (integer + sigma-delta) Fast Clock ticks; the divider divides RMClk by
// div_ratio into the Recovered Clock and time base pulses; the phase detector
// counts Fast Clock ticks from each Recovered Clock pulse to the next
// Reference rising edge; the decimator sums N_Av validated samples; the sum
// crosses to sys_clk and the PI controller computes a new period, which
// crosses back and is loaded by the oscillator at its next reload.
//
// The PI output is used directly as the period: an unsigned fixed-point value
// with INT_W integer and FRAC_W fractional bits of a Fast Clock tick. A longer
// period lowers the frequency, so this loop needs negative Kp and Ki (a
// positive error, the Reference edge arriving too early, must shorten the
// period); the default gains are negative. The integrator initial value is
// the nominal period. Because the Recovered Clock edges are always on Fast
// Clock edges, its short-term jitter is at least one Fast Clock period.
//
// Blocks and their connection follow the paper's ADPLL figure. The
// defaults reproduce the paper's oscillator example: a 40.33 MHz Fast
// Clock, period 40 + 1/3 ticks, 1 MHz RMClk; the divider ratio 1 (Recovered
// Clock = RMClk), the setpoint (half a period, 20 ticks summed over 2000
// samples), the gain format (24 fractional bits) and the gains are this
// design's. The default proportional gain gives a loop gain of about 0.16
// per update with a Manchester-coded Reference (about 0.375 rising edges per
// Recovered Clock period):
//   G = |Kp| * N_Av * (N_Av / 0.375) / 2**FRAC_W. Configuration crossing to the
// Fast Clock domain is re-synchronised bit by bit and should be changed only
// with the loop stopped.
module adpll
  import gmt_pll_pkg::*;
#(
  parameter int unsigned PHASE_W        = 16,
  parameter int unsigned NAV_W          = 16,
  parameter int unsigned DIV_W          = 16,
  parameter int unsigned INT_W          = 16,
  parameter int unsigned FRAC_W         = 16,
  parameter int unsigned GAIN_FRAC      = 24,
  parameter int unsigned NAV_RST        = 2000,
  parameter word_t       SETPOINT_RST   = 32'sd40000,
  parameter word_t       KP_RST         = -32'sd16384,   // -2**-10 with 24 fractional bits
  parameter word_t       KI_RST         = -32'sd1024,    // -2**-14 = Kp / 16
  parameter word_t       INTEG_INIT_RST = 32'sh0028_5555,
  parameter int unsigned DIV_RST        = 1
) (
  input  logic                    fc_clk,
  input  logic                    sys_clk,
  input  logic                    rst_n,
  input  logic                    ref_in,     // Reference Clock, asynchronous
  // register port, sys_clk domain
  input  logic [ADDR_W-1:0]       bus_addr,
  input  logic                    bus_wr,
  input  word_t                   bus_wdata,
  input  logic                    bus_rd,
  output word_t                   bus_rdata,
  output logic                    irq,
  // time base, fc_clk domain
  output logic                    rmclk,      // Recovered Multiplied Clock pulse
  output logic                    rec_pulse,  // Recovered Clock / time base pulse
  output logic                    rec_clk,    // Recovered Clock level (ratio >= 2)
  output logic [INT_W+FRAC_W-1:0] period,     // period in use by the oscillator
  output logic                    sd_extra,   // last reload added a sigma-delta tick
  output logic                    pd_valid,
  output logic                    pd_lost
);
  localparam int unsigned PER_W = INT_W + FRAC_W;

  // sys_clk domain
  logic             run, load_init, load_q, ctrl_valid, saturated;
  logic [NAV_W-1:0] n_av;
  logic [DIV_W-1:0] div_ratio;
  word_t            setpoint, kp, ki, integ_init, integ, ctrl, err;
  logic [31:0]      sum_s, lost_s;
  logic             sum_s_valid, lost_s_valid;
  word_t            phase_sum_s, lost_count_s;

  // fc_clk domain
  logic               run_f;
  logic [NAV_W-1:0]   n_av_f;
  logic [DIV_W-1:0]   div_ratio_f, div_cnt;
  logic [PHASE_W-1:0] phase;
  logic [31:0]        sum_f, lost_f;
  logic               sum_f_valid;
  logic [PER_W-1:0]   period_f;
  logic               period_f_valid;

  pll_bus_regs #(
    .NAV_W(NAV_W), .DIV_W(DIV_W), .RUN_RST(1'b1), .NAV_RST(NAV_RST),
    .SETPOINT_RST(SETPOINT_RST), .KP_RST(KP_RST), .KI_RST(KI_RST),
    .INTEG_INIT_RST(INTEG_INIT_RST), .DIV_RST(DIV_RST)
  ) u_regs (
    .clk(sys_clk), .rst_n(rst_n),
    .addr(bus_addr), .wr(bus_wr), .wdata(bus_wdata), .rd(bus_rd), .rdata(bus_rdata), .irq(irq),
    .run(run), .n_av(n_av), .setpoint(setpoint), .kp(kp), .ki(ki),
    .integ_init(integ_init), .load_init(load_init), .div_ratio(div_ratio),
    .phase_sum(phase_sum_s), .err(err), .integ(integ), .ctrl(ctrl), .ctrl_valid(ctrl_valid),
    .saturated(saturated), .lost_count(lost_count_s)
  );

  sync_2ff #(
    .W(1 + NAV_W + DIV_W), .RESET_VAL({1'b1, NAV_W'(NAV_RST), DIV_W'(DIV_RST)})
  ) u_cfg_sync (
    .clk(fc_clk), .rst_n(rst_n), .d({run, n_av, div_ratio}), .q({run_f, n_av_f, div_ratio_f})
  );

  phase_detector #(.PHASE_W(PHASE_W), .SYNC_REC(1'b0)) u_pd (
    .clk(fc_clk), .rst_n(rst_n), .enable(run_f),
    .ref_in(ref_in), .rec_in(rec_pulse),
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
    .dst_clk(sys_clk), .dst_rst_n(rst_n), .dst_data(sum_s), .dst_valid(sum_s_valid)
  );

  word_sync #(.W(32)) u_lost_sync (
    .src_clk(fc_clk), .src_rst_n(rst_n), .src_data(lost_f + 1'b1), .src_valid(pd_lost),
    .dst_clk(sys_clk), .dst_rst_n(rst_n), .dst_data(lost_s), .dst_valid(lost_s_valid)
  );

  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_sum_s  <= '0;
      lost_count_s <= '0;
      load_q       <= 1'b0;
    end else begin
      load_q <= load_init;
      if (sum_s_valid)  phase_sum_s  <= word_t'(sum_s);
      if (lost_s_valid) lost_count_s <= word_t'(lost_s);
    end
  end

  pi_controller #(.GAIN_FRAC(GAIN_FRAC)) u_pi (
    .clk(sys_clk), .rst_n(rst_n), .enable(run),
    .setpoint(setpoint), .kp(kp), .ki(ki), .integ_init(integ_init), .load_init(load_init),
    .meas(word_t'(sum_s)), .meas_valid(sum_s_valid),
    .err(err), .integ(integ), .ctrl(ctrl), .ctrl_valid(ctrl_valid), .saturated(saturated)
  );

  // New period (after every PI update and every integrator load) to the
  // Fast Clock domain.
  word_sync #(.W(PER_W)) u_per_sync (
    .src_clk(sys_clk), .src_rst_n(rst_n), .src_data(PER_W'(ctrl)), .src_valid(ctrl_valid | load_q),
    .dst_clk(fc_clk), .dst_rst_n(rst_n), .dst_data(period_f), .dst_valid(period_f_valid)
  );

  always_ff @(posedge fc_clk or negedge rst_n) begin
    if (!rst_n)              period <= PER_W'(INTEG_INIT_RST);
    else if (period_f_valid) period <= period_f;
  end

  numeric_oscillator #(.INT_W(INT_W), .FRAC_W(FRAC_W)) u_no (
    .clk(fc_clk), .rst_n(rst_n), .enable(1'b1), .period(period),
    .rmclk(rmclk), .extra(sd_extra)
  );

  freq_divider #(.DIV_W(DIV_W)) u_div (
    .clk(fc_clk), .rst_n(rst_n), .enable(1'b1), .ce(rmclk), .ratio(div_ratio_f),
    .pulse(rec_pulse), .clk_out(rec_clk), .phase_cnt(div_cnt)
  );
endmodule
