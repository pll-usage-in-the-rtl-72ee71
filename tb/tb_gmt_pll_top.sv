// tb_gmt_pll_top: end-to-end test of both PLLs at their default parameters.
//
// Both loops see the same 500 kbit/s Manchester-coded Reference (300 ps edge
// jitter). The hybrid PLL gets an independent 160 MHz Fast Clock and a
// behavioural 16-bit DAC plus 40 MHz +/-50 ppm VCXO whose crystal is 20 ppm
// off; the all-digital PLL gets a 40.333 MHz Fast Clock that is 30 ppm off
// and a 25 MHz System Clock.
//
// Part 1, register defaults (N_Av = 2000): each PLL must deliver decimated
// phase samples at the decimation rate, and the first PI update must give the
// control value and integrator that the 32-bit saturating PI law predicts
// from the read-back phase, setpoint and default gains.
// Part 2, as software would set up a faster lock: N_Av is lowered through the
// bus (64 and 16), the gains are scaled to keep the loop gain, and the
// integrator initial value is reloaded. Both loops must lock: decimated
// phases within 3 ticks (times N_Av) of the setpoint, DAC code and
// oscillator period close to the values that cancel the clock errors.
// Part 3: a huge Kp and an extreme setpoint must drive the PI arithmetic into saturation and set the
// sticky STATUS flag.
// Every mechanism is counted and must happen at least once: validated and
// lost phase samples, decimated samples, PI updates, interrupts, integrator
// loads, sigma-delta extra ticks, saturation.
`timescale 1ns/1fs
module tb_gmt_pll_top;
  import gmt_pll_pkg::*;

  logic rst_n = 1'b0;
  logic h_fc_clk, h_vcxo_clk, a_fc_clk, a_sys_clk, ref_sig;
  logic [ADDR_W-1:0] h_bus_addr = '0, a_bus_addr = '0;
  logic h_bus_wr = 1'b0, h_bus_rd = 1'b0, a_bus_wr = 1'b0, a_bus_rd = 1'b0;
  word_t h_bus_wdata = '0, a_bus_wdata = '0, h_bus_rdata, a_bus_rdata;
  logic h_irq, a_irq, h_rec_clk, h_rec_pulse, h_pd_valid, h_pd_lost;
  logic a_rmclk, a_rec_pulse, a_rec_clk, a_sd_extra, a_pd_valid, a_pd_lost;
  logic [15:0] h_dac_code;
  logic [31:0] a_period;
  real vctl;
  int ref_edges;
  int checks = 0, failures = 0;

  gmt_pll_top dut (
    .rst_n,
    .h_fc_clk, .h_vcxo_clk, .h_ref_in(ref_sig), .h_bus_addr, .h_bus_wr, .h_bus_wdata, .h_bus_rd,
    .h_bus_rdata, .h_irq, .h_dac_code, .h_rec_clk, .h_rec_pulse, .h_pd_valid, .h_pd_lost,
    .a_fc_clk, .a_sys_clk, .a_ref_in(ref_sig), .a_bus_addr, .a_bus_wr, .a_bus_wdata, .a_bus_rd,
    .a_bus_rdata, .a_irq, .a_rmclk, .a_rec_pulse, .a_rec_clk, .a_period, .a_sd_extra,
    .a_pd_valid, .a_pd_lost
  );

  localparam real H_PULL = 50.0, H_XTAL = 20.0, A_FC = 40.0 + 1.0 / 3.0, A_XTAL = 30.0;

  clock_src #(.F_MHZ(160.0), .PPM(3.3)) u_hfc (.clk(h_fc_clk));
  dac_model #(.W(16), .VREF(3.3)) u_dac (.code(h_dac_code), .vout(vctl));
  vcxo_model #(.F0_MHZ(40.0), .PULL_PPM(H_PULL), .OFFSET_PPM(H_XTAL), .VREF(3.3))
    u_vcxo (.vctl(vctl), .en(1'b1), .clk(h_vcxo_clk));
  clock_src #(.F_MHZ(A_FC), .PPM(A_XTAL)) u_afc (.clk(a_fc_clk));
  clock_src #(.F_MHZ(25.0), .PPM(-7.0)) u_sys (.clk(a_sys_clk));
  manchester_src #(.BIT_NS(2000.0), .JITTER_PS(300), .MANCHESTER(1'b1), .SEED(3))
    u_ref (.sig(ref_sig), .edges(ref_edges));

  initial begin
    #80ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- counters
  int h_valid = 0, h_lost = 0, a_valid = 0, a_lost = 0, a_extra = 0;
  int h_dec = 0, a_dec = 0, h_upd = 0, a_upd = 0, h_irqs = 0, a_irqs = 0;
  int h_loads = 0, a_loads = 0, h_sat = 0, a_sat = 0;
  always @(posedge h_fc_clk) if (rst_n) begin
    if (h_pd_valid) h_valid++;
    if (h_pd_lost)  h_lost++;
    if (dut.u_hpll.sum_f_valid) h_dec++;
  end
  always @(posedge a_fc_clk) if (rst_n) begin
    if (a_pd_valid) a_valid++;
    if (a_pd_lost)  a_lost++;
    if (a_rmclk && a_sd_extra) a_extra++;
    if (dut.u_adpll.sum_f_valid) a_dec++;
  end
  always @(posedge h_vcxo_clk) if (rst_n) begin
    if (dut.u_hpll.ctrl_valid) h_upd++;
    if (dut.u_hpll.load_init)  h_loads++;
    if (dut.u_hpll.saturated)  h_sat++;
  end
  always @(posedge a_sys_clk) if (rst_n) begin
    if (dut.u_adpll.ctrl_valid) a_upd++;
    if (dut.u_adpll.load_init)  a_loads++;
    if (dut.u_adpll.saturated)  a_sat++;
  end

  // ---------------------------------------------------------------- bus tasks
  task automatic h_write(input reg_addr_e a, input word_t d);
    @(negedge h_vcxo_clk);
    h_bus_addr = a; h_bus_wdata = d; h_bus_wr = 1'b1;
    @(negedge h_vcxo_clk);
    h_bus_wr = 1'b0;
  endtask
  task automatic h_read(input reg_addr_e a, output word_t d);
    @(negedge h_vcxo_clk);
    h_bus_addr = a; h_bus_rd = 1'b1;
    @(negedge h_vcxo_clk);
    h_bus_rd = 1'b0;
    d = h_bus_rdata;
  endtask
  task automatic a_write(input reg_addr_e a, input word_t d);
    @(negedge a_sys_clk);
    a_bus_addr = a; a_bus_wdata = d; a_bus_wr = 1'b1;
    @(negedge a_sys_clk);
    a_bus_wr = 1'b0;
  endtask
  task automatic a_read(input reg_addr_e a, output word_t d);
    @(negedge a_sys_clk);
    a_bus_addr = a; a_bus_rd = 1'b1;
    @(negedge a_sys_clk);
    a_bus_rd = 1'b0;
    d = a_bus_rdata;
  endtask

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s = %0d, expected %0d", what, got, exp);
    end
  endtask

  // ------------------------------------------------------- PI reference model
  function automatic longint clip(input longint v);
    if (v > 64'sd2147483647)  return 64'sd2147483647;
    if (v < -64'sd2147483648) return -64'sd2147483648;
    return v;
  endfunction

  // Integrator and control value after one update from `integ0`.
  task automatic pi_model(input longint sp, input longint ph, input longint kp, input longint ki,
                          input int frac, input longint integ0,
                          output longint integ, output longint ctrl);
    longint e;
    e = clip(sp - ph);
    integ = clip(integ0 + clip((e * ki) >>> frac));
    ctrl  = clip(integ + clip((e * kp) >>> frac));
  endtask

  // First update of a PLL at its register defaults, read through the bus.
  task automatic first_update_h();
    word_t ph, sp, kp, ki, init, integ, ctrl, nav;
    longint mi, mc;
    h_write(REG_CTRL, 32'h3);
    wait (h_irq);
    h_read(REG_PHASE, ph); h_read(REG_SETPOINT, sp); h_read(REG_KP, kp); h_read(REG_KI, ki);
    h_read(REG_INTEG_INIT, init); h_read(REG_INTEG, integ); h_read(REG_CTRL_OUT, ctrl);
    h_read(REG_NAV, nav);
    h_write(REG_STATUS, 32'h1);
    check("HPLL default N_Av", nav, 2000);
    pi_model(sp, ph, kp, ki, 8, init, mi, mc);
    check("HPLL first integrator", integ, mi);
    check("HPLL first control", ctrl, mc);
    check("HPLL DAC code", h_dac_code, {~ctrl[31], ctrl[30:16]});
    // a decimated phase is a sum of 2000 samples of at most 160 ticks
    checks++;
    if (ph < 0 || ph > 2000 * 160) begin failures++; $display("FAIL: HPLL phase sum %0d", ph); end
    $display("HPLL at defaults: phase sum %0d, integ %0d, ctrl %0d, DAC %0d", ph, integ, ctrl, h_dac_code);
  endtask

  task automatic first_update_a();
    word_t ph, sp, kp, ki, init, integ, ctrl, nav;
    longint mi, mc;
    a_write(REG_CTRL, 32'h3);
    wait (a_irq);
    a_read(REG_PHASE, ph); a_read(REG_SETPOINT, sp); a_read(REG_KP, kp); a_read(REG_KI, ki);
    a_read(REG_INTEG_INIT, init); a_read(REG_INTEG, integ); a_read(REG_CTRL_OUT, ctrl);
    a_read(REG_NAV, nav);
    a_write(REG_STATUS, 32'h1);
    check("ADPLL default N_Av", nav, 2000);
    pi_model(sp, ph, kp, ki, 24, init, mi, mc);
    check("ADPLL first integrator", integ, mi);
    check("ADPLL first control", ctrl, mc);
    repeat (200) @(posedge a_fc_clk);
    check("ADPLL period in use", a_period, ctrl);
    checks++;
    if (ph < 0 || ph > 2000 * 41) begin failures++; $display("FAIL: ADPLL phase sum %0d", ph); end
    $display("ADPLL at defaults: phase sum %0d, integ %0d, ctrl (period) %0d", ph, integ, ctrl);
  endtask

  // Lock check: trace decimated phases through the interrupt until `t_end`.
  task automatic trace_h(input realtime t_end, input int nav, output int n, output longint dev);
    word_t ph;
    longint sp = 80 * nav;
    n = 0; dev = 0;
    h_write(REG_STATUS, 32'h3);
    while ($realtime < t_end) begin
      wait (h_irq);
      h_read(REG_PHASE, ph);
      h_write(REG_STATUS, 32'h1);
      h_irqs++;
      n++;
      dev += ph - sp;
      checks++;
      if (ph > sp + 3 * nav || ph < sp - 3 * nav) begin
        failures++;
        $display("FAIL: HPLL locked phase %0d, setpoint %0d", ph, sp);
      end
    end
  endtask

  task automatic trace_a(input realtime t_end, input int nav, output int n, output longint dev);
    word_t ph;
    longint sp = 20 * nav;
    n = 0; dev = 0;
    a_write(REG_STATUS, 32'h3);
    while ($realtime < t_end) begin
      wait (a_irq);
      a_read(REG_PHASE, ph);
      a_write(REG_STATUS, 32'h1);
      a_irqs++;
      n++;
      dev += ph - sp;
      checks++;
      if (ph > sp + 3 * nav || ph < sp - 3 * nav) begin
        failures++;
        $display("FAIL: ADPLL locked phase %0d, setpoint %0d", ph, sp);
      end
    end
  endtask

  localparam int    H_NAV  = 64;
  localparam real   H_KP_R = 0.16 / (real'(H_NAV) * (real'(H_NAV) / 0.375) * 160.0 * (2.0 * H_PULL * 1.0e-6 / 4294967296.0));
  localparam int    A_NAV  = 16;
  localparam real   A_KP_R = 0.16 * 65536.0 / (real'(A_NAV) * real'(A_NAV) / 0.375);

  initial begin
    int hn, an, dec_h0, dec_a0, hv0, av0;
    longint hdev, adev;
    real dac_exp, per_exp;
    word_t st, d;

    repeat (5) @(posedge h_vcxo_clk);
    rst_n = 1'b1;

    // ---- part 1: register defaults
    fork
      first_update_h();
      first_update_a();
    join
    dec_h0 = h_dec; dec_a0 = a_dec; hv0 = h_valid; av0 = a_valid;

    // ---- part 2: faster loops set up through the bus
    fork
      begin
        h_write(REG_CTRL, 32'h0);
        h_write(REG_NAV, H_NAV);
        h_write(REG_SETPOINT, 80 * H_NAV);
        h_write(REG_KP, word_t'(longint'(H_KP_R * 256.0)));
        h_write(REG_KI, word_t'(longint'(H_KP_R * 256.0 / 16.0)));
        h_write(REG_INTEG_INIT, 0);
        h_write(REG_CTRL, 32'h7);   // run, irq, load integrator
      end
      begin
        a_write(REG_CTRL, 32'h0);
        a_write(REG_NAV, A_NAV);
        a_write(REG_SETPOINT, 20 * A_NAV);
        a_write(REG_KP, -word_t'(longint'(A_KP_R * 16777216.0)));
        a_write(REG_KI, -word_t'(longint'(A_KP_R * 16777216.0 / 16.0)));
        a_write(REG_INTEG_INIT, 32'sh0028_5555);
        a_write(REG_CTRL, 32'h7);
      end
    join
    #24ms;
    fork
      trace_h(36ms, H_NAV, hn, hdev);
      trace_a(36ms, A_NAV, an, adev);
    join
    checks += 2;
    if (hdev > hn * H_NAV / 2 || hdev < -hn * H_NAV / 2) begin
      failures++; $display("FAIL: HPLL mean phase offset %f ticks", real'(hdev) / real'(hn * H_NAV));
    end
    if (adev > an * A_NAV / 2 || adev < -an * A_NAV / 2) begin
      failures++; $display("FAIL: ADPLL mean phase offset %f ticks", real'(adev) / real'(an * A_NAV));
    end
    dac_exp = 32768.0 * (1.0 - H_XTAL / H_PULL);
    per_exp = A_FC * (1.0 + A_XTAL * 1.0e-6) * 65536.0;
    checks += 2;
    if (real'(h_dac_code) > dac_exp + 655.0 || real'(h_dac_code) < dac_exp - 655.0) begin
      failures++; $display("FAIL: HPLL DAC code %0d, expected about %f", h_dac_code, dac_exp);
    end
    if (real'(a_period) > per_exp + 655.0 || real'(a_period) < per_exp - 655.0) begin
      failures++; $display("FAIL: ADPLL period %0d, expected about %f", a_period, per_exp);
    end
    $display("locked: HPLL %0d updates, mean offset %f ticks, DAC %0d (%f); ADPLL %0d updates, mean offset %f ticks, period %0d (%f)",
             hn, real'(hdev) / real'(hn * H_NAV), h_dac_code, dac_exp,
             an, real'(adev) / real'(an * A_NAV), a_period, per_exp);

    // ---- part 3: saturation
    h_write(REG_KP, 32'sh7FFF_FFFF);
    h_write(REG_SETPOINT, 32'sh7FFF_FFFF);
    a_write(REG_KP, -32'sh7FFF_FFFF);
    a_write(REG_SETPOINT, -32'sh7FFF_FFFF);
    fork
      begin h_write(REG_STATUS, 32'h3); wait (h_irq); h_read(REG_STATUS, st); check("HPLL STATUS saturated", st[STAT_SAT], 1); end
      begin a_write(REG_STATUS, 32'h3); wait (a_irq); a_read(REG_STATUS, d); check("ADPLL STATUS saturated", d[STAT_SAT], 1); end
    join

    // ---- mechanisms
    checks += 14;
    if (h_valid == 0) begin failures++; $display("FAIL: HPLL no validated phase"); end
    if (h_lost == 0)  begin failures++; $display("FAIL: HPLL no lost Reference edge"); end
    if (a_valid == 0) begin failures++; $display("FAIL: ADPLL no validated phase"); end
    if (a_lost == 0)  begin failures++; $display("FAIL: ADPLL no lost Reference edge"); end
    if (h_dec < 2 || a_dec < 2) begin failures++; $display("FAIL: too few decimated samples"); end
    if (h_upd == 0 || a_upd == 0) begin failures++; $display("FAIL: no PI update"); end
    if (h_irqs == 0)  begin failures++; $display("FAIL: HPLL no interrupt"); end
    if (a_irqs == 0)  begin failures++; $display("FAIL: ADPLL no interrupt"); end
    if (h_loads < 2)  begin failures++; $display("FAIL: HPLL integrator load by software missing"); end
    if (a_loads < 2)  begin failures++; $display("FAIL: ADPLL integrator load by software missing"); end
    if (a_extra == 0) begin failures++; $display("FAIL: no sigma-delta extra tick"); end
    if (h_sat == 0)   begin failures++; $display("FAIL: HPLL never saturated"); end
    if (a_sat == 0)   begin failures++; $display("FAIL: ADPLL never saturated"); end
    // decimation rate: one sample per N_Av validated phases
    if ((h_valid - hv0) / H_NAV - (h_dec - dec_h0) > 1 || (a_valid - av0) / A_NAV - (a_dec - dec_a0) > 1) begin
      failures++; $display("FAIL: decimation rate");
    end
    $display("counts: HPLL valid %0d lost %0d dec %0d upd %0d irq %0d loads %0d sat %0d; ADPLL valid %0d lost %0d dec %0d upd %0d irq %0d loads %0d sat %0d sd ticks %0d",
             h_valid, h_lost, h_dec, h_upd, h_irqs, h_loads, h_sat,
             a_valid, a_lost, a_dec, a_upd, a_irqs, a_loads, a_sat, a_extra);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
