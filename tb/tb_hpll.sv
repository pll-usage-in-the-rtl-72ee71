// tb_hpll: closed-loop test of the hybrid PLL with behavioural DAC and VCXO.
//
// Set-up, after the paper's lab test: a 500 kbit/s Manchester-coded
// Reference with 300 ps uniform edge jitter (about 175 ps rms), a 160 MHz
// Fast Clock from an independent oscillator (3.3 ppm off), a 40 MHz VCXO with
// +/-50 ppm pull range behind a 16-bit DAC, divider 40 (1 MHz Recovered
// Clock). The VCXO crystal is 20 ppm off nominal, so the integrator has to
// find a DAC code of about mid-scale - 0.4 * 32768. For a short simulation
// the decimation factor is 64 instead of 2000, and the gains are scaled to
// keep the loop gain of the defaults (about 0.16 proportional per update).
//
// Checks: after lock, every decimated phase read through the bus stays
// within three Fast Clock ticks (times N_Av) of the setpoint and their mean
// within half a tick; the Recovered
// Clock frequency is within 2 ppm of 1 MHz; the DAC code is within 1 % of
// full scale of the value that cancels the crystal offset; updates come at
// the decimation rate (one per 64 validated samples); interrupts, lost
// Reference edges and the integrator load all happened.
`timescale 1ns/1fs
module tb_hpll;
  import gmt_pll_pkg::*;
  localparam int    NAV  = 64;
  localparam int    SP   = 80 * NAV;
  localparam real   PULL = 50.0;
  localparam real   XTAL = 20.0;
  // proportional gain for loop gain 0.16, Q.8
  localparam real   KP_R = 0.16 / (real'(NAV) * (real'(NAV) / 0.375) * 160.0 * (2.0 * PULL * 1.0e-6 / 4294967296.0));
  localparam word_t KP   = word_t'(longint'(KP_R * 256.0));
  localparam word_t KI   = word_t'(longint'(KP_R * 256.0 / 16.0));

  logic fc_clk, vcxo_clk, rst_n = 1'b0, ref_in;
  logic [ADDR_W-1:0] bus_addr = '0;
  logic bus_wr = 1'b0, bus_rd = 1'b0;
  word_t bus_wdata = '0, bus_rdata;
  logic irq;
  logic [15:0] dac_code;
  logic rec_clk, rec_pulse, pd_valid, pd_lost;
  real vctl;
  int ref_edges;
  int checks = 0, failures = 0;

  hpll #(
    .NAV_RST(NAV), .SETPOINT_RST(SP), .KP_RST(KP), .KI_RST(KI), .GAIN_FRAC(8)
  ) dut (.*);

  clock_src #(.F_MHZ(160.0), .PPM(3.3)) u_fc (.clk(fc_clk));
  dac_model #(.W(16), .VREF(3.3)) u_dac (.code(dac_code), .vout(vctl));
  vcxo_model #(.F0_MHZ(40.0), .PULL_PPM(PULL), .OFFSET_PPM(XTAL), .VREF(3.3))
    u_vcxo (.vctl(vctl), .en(1'b1), .clk(vcxo_clk));
  manchester_src #(.BIT_NS(2000.0), .JITTER_PS(300), .MANCHESTER(1'b1), .SEED(7))
    u_ref (.sig(ref_in), .edges(ref_edges));

  initial begin
    #40ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_valid = 0, n_lost = 0, n_irq = 0, n_upd_seen = 0;
  always @(posedge fc_clk) begin
    if (rst_n && pd_valid) n_valid++;
    if (rst_n && pd_lost)  n_lost++;
  end

  task automatic bus_write(input reg_addr_e a, input word_t d);
    @(negedge vcxo_clk);
    bus_addr = a; bus_wdata = d; bus_wr = 1'b1;
    @(negedge vcxo_clk);
    bus_wr = 1'b0;
  endtask

  task automatic bus_read(input reg_addr_e a, output word_t d);
    @(negedge vcxo_clk);
    bus_addr = a; bus_rd = 1'b1;
    @(negedge vcxo_clk);
    bus_rd = 1'b0;
    d = bus_rdata;
  endtask

  // Recovered Clock frequency over the last part of the run
  realtime t_first = 0, t_last = 0;
  int n_rec = 0;
  bit measuring = 1'b0;
  always @(posedge rec_clk) if (measuring) begin
    if (n_rec == 0) t_first = $realtime;
    t_last = $realtime;
    n_rec++;
  end

  initial begin
    word_t ph, upd0, upd1, integ, d;
    int worst, n_locked, valid0;
    longint dev_sum = 0;
    real f_err, dac_exp;
    repeat (5) @(posedge vcxo_clk);
    rst_n = 1'b1;
    repeat (5) @(posedge vcxo_clk);
    bus_write(REG_CTRL, 32'h3);  // run, interrupts on
    // acquisition
    #20ms;
    // locked phase: trace every update through the interrupt
    worst = 0;
    n_locked = 0;
    bus_read(REG_UPDATES, upd0);
    valid0 = n_valid;
    measuring = 1'b1;
    bus_write(REG_STATUS, 32'h3);
    while ($realtime < 32ms) begin
      wait (irq);
      n_irq++;
      bus_read(REG_PHASE, ph);
      bus_write(REG_STATUS, 32'h1);
      n_locked++;
      if ((ph > SP ? ph - SP : SP - ph) > worst) worst = (ph > SP ? ph - SP : SP - ph);
      checks++;
      dev_sum += longint'(ph) - SP;
      if (ph > SP + 3 * NAV || ph < SP - 3 * NAV) begin
        failures++;
        $display("FAIL: decimated phase %0d, setpoint %0d", ph, SP);
      end
    end
    measuring = 1'b0;
    // mean phase on the setpoint within half a tick
    checks++;
    if (dev_sum > n_locked * NAV / 2 || dev_sum < -n_locked * NAV / 2) begin
      failures++;
      $display("FAIL: mean phase offset %f ticks", real'(dev_sum) / real'(n_locked * NAV));
    end
    bus_read(REG_UPDATES, upd1);
    bus_read(REG_INTEG, integ);
    // rate: one update per NAV validated samples
    checks++;
    if ((n_valid - valid0) / NAV - (upd1 - upd0) > 1 || (upd1 - upd0) - (n_valid - valid0) / NAV > 1) begin
      failures++;
      $display("FAIL: %0d updates for %0d validated samples", upd1 - upd0, n_valid - valid0);
    end
    // frequency
    f_err = ((t_last - t_first) / real'(n_rec - 1) - 1000.0) / 1000.0 * 1.0e6;
    checks++;
    if (f_err > 2.0 || f_err < -2.0) begin
      failures++;
      $display("FAIL: Recovered Clock period error %f ppm", f_err);
    end
    // DAC code cancels the crystal offset (the VCXO model is linear)
    dac_exp = 32768.0 * (1.0 - XTAL / PULL);
    checks++;
    if (real'(dac_code) > dac_exp + 655.0 || real'(dac_code) < dac_exp - 655.0) begin
      failures++;
      $display("FAIL: DAC code %0d, expected about %f", dac_code, dac_exp);
    end
    // mechanisms
    checks += 3;
    if (n_lost == 0)   begin failures++; $display("FAIL: no lost Reference edge"); end
    if (n_irq == 0)    begin failures++; $display("FAIL: no interrupt"); end
    if (n_locked < 10) begin failures++; $display("FAIL: only %0d locked updates", n_locked); end
    // integrator load: writing CTRL bit 2 puts INTEG_INIT back
    bus_write(REG_INTEG_INIT, 32'sd12345);
    bus_write(REG_CTRL, 32'h5);
    bus_read(REG_INTEG, d);
    checks++;
    if (d != 32'sd12345) begin failures++; $display("FAIL: integrator load gave %0d", d); end
    $display("mean phase offset %f ticks", real'(dev_sum) / real'(n_locked * NAV));
    $display("locked updates %0d, worst |phase - setpoint| %0d (N_Av %0d), freq error %f ppm, dac %0d (%f), integ %0d, lost %0d, valid %0d",
             n_locked, worst, NAV, f_err, dac_code, dac_exp, integ, n_lost, n_valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
