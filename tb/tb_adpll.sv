// tb_adpll: closed-loop test of the all-digital PLL.
//
// Set-up, after the paper's oscillator example: a Fast Clock of
// 40.333 MHz that is 30 ppm off (a local quartz oscillator error the loop must
// cancel), an independent 25 MHz System Clock, a 500 kbit/s Manchester-coded
// Reference with 300 ps edge jitter, integrator initial value 40 + 1/3 ticks
// (1 MHz for an exact Fast Clock), divider 1. For a short simulation the
// decimation factor is 16 instead of 2000, with the gains scaled to the
// defaults' loop gain of about 0.16 per update (Ki = Kp / 16).
//
// Checks after lock: decimated phases within 3 ticks (times N_Av) of the
// setpoint and their mean within half a tick; the RMClk edges over the
// measurement stay within 60 ns of an exact 1 MHz grid; the oscillator period within 0.01 tick of
// 40.333... * (1 + 30e-6); every RMClk interval 40 or 41 Fast Clock cycles
// (the one-tick jitter floor of a numeric oscillator); sigma-delta extra
// ticks, lost Reference edges and interrupts all happened.
`timescale 1ns/1fs
module tb_adpll;
  import gmt_pll_pkg::*;
  localparam int    NAV  = 16;
  localparam int    SP   = 20 * NAV;
  localparam real   FC   = 40.0 + 1.0 / 3.0;
  localparam real   XTAL = 30.0;
  localparam real   KP_R = 0.16 * 65536.0 / (real'(NAV) * real'(NAV) / 0.375);
  localparam word_t KP   = -word_t'(longint'(KP_R * 16777216.0));
  localparam word_t KI   = -word_t'(longint'(KP_R * 16777216.0 / 16.0));

  logic fc_clk, sys_clk, rst_n = 1'b0, ref_in;
  logic [ADDR_W-1:0] bus_addr = '0;
  logic bus_wr = 1'b0, bus_rd = 1'b0;
  word_t bus_wdata = '0, bus_rdata;
  logic irq, rmclk, rec_pulse, rec_clk, sd_extra, pd_valid, pd_lost;
  logic [31:0] period;
  int ref_edges;
  int checks = 0, failures = 0;

  adpll #(
    .NAV_RST(NAV), .SETPOINT_RST(SP), .KP_RST(KP), .KI_RST(KI)
  ) dut (.*);

  clock_src #(.F_MHZ(FC), .PPM(XTAL)) u_fc (.clk(fc_clk));
  clock_src #(.F_MHZ(25.0), .PPM(-7.0)) u_sys (.clk(sys_clk));
  manchester_src #(.BIT_NS(2000.0), .JITTER_PS(300), .MANCHESTER(1'b1), .SEED(11))
    u_ref (.sig(ref_in), .edges(ref_edges));

  initial begin
    #40ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_lost = 0, n_extra = 0, n_irq = 0, n_bad_int = 0, n_int = 0;
  int cyc = 0, last_rm = -1;
  bit measuring = 1'b0;
  realtime t_first = 0, t_last = 0;
  int n_rm = 0;
  always @(posedge fc_clk) begin
    cyc++;
    if (rst_n && pd_lost) n_lost++;
    if (rst_n && rmclk) begin
      if (sd_extra) n_extra++;
      if (measuring) begin
        if (last_rm >= 0) begin
          n_int++;
          if (cyc - last_rm != 40 && cyc - last_rm != 41) n_bad_int++;
        end
        if (n_rm == 0) t_first = $realtime;
        t_last = $realtime;
        n_rm++;
      end
      last_rm = cyc;
    end
  end

  task automatic bus_write(input reg_addr_e a, input word_t d);
    @(negedge sys_clk);
    bus_addr = a; bus_wdata = d; bus_wr = 1'b1;
    @(negedge sys_clk);
    bus_wr = 1'b0;
  endtask

  task automatic bus_read(input reg_addr_e a, output word_t d);
    @(negedge sys_clk);
    bus_addr = a; bus_rd = 1'b1;
    @(negedge sys_clk);
    bus_rd = 1'b0;
    d = bus_rdata;
  endtask

  initial begin
    word_t ph, per;
    int worst = 0, n_locked = 0;
    longint dev_sum = 0;
    real f_err, per_exp;
    repeat (5) @(posedge sys_clk);
    rst_n = 1'b1;
    repeat (5) @(posedge sys_clk);
    bus_write(REG_CTRL, 32'h3);
    #10ms;
    bus_write(REG_STATUS, 32'h3);
    measuring = 1'b1;
    while ($realtime < 16ms) begin
      wait (irq);
      n_irq++;
      bus_read(REG_PHASE, ph);
      bus_write(REG_STATUS, 32'h1);
      n_locked++;
      dev_sum += longint'(ph) - SP;
      if ((ph > SP ? ph - SP : SP - ph) > worst) worst = (ph > SP ? ph - SP : SP - ph);
      checks++;
      if (ph > SP + 3 * NAV || ph < SP - 3 * NAV) begin
        failures++;
        $display("FAIL: decimated phase %0d, setpoint %0d", ph, SP);
      end
    end
    measuring = 1'b0;
    bus_read(REG_CTRL_OUT, per);
    checks++;
    if (dev_sum > n_locked * NAV / 2 || dev_sum < -n_locked * NAV / 2) begin
      failures++;
      $display("FAIL: mean phase offset %f ticks", real'(dev_sum) / real'(n_locked * NAV));
    end
    // RMClk edges sit on Fast Clock edges, so the span is known to about
    // two ticks (50 ns) plus the Reference jitter.
    f_err = ((t_last - t_first) / real'(n_rm - 1) - 1000.0) / 1000.0 * 1.0e6;
    checks++;
    if ((t_last - t_first) - real'(n_rm - 1) * 1000.0 > 60.0 ||
        (t_last - t_first) - real'(n_rm - 1) * 1000.0 < -60.0) begin
      failures++;
      $display("FAIL: RMClk period error %f ppm", f_err);
    end
    per_exp = FC * (1.0 + XTAL * 1.0e-6) * 65536.0;
    checks++;
    if (real'(period) > per_exp + 655.0 || real'(period) < per_exp - 655.0) begin
      failures++;
      $display("FAIL: period %0d, expected about %f", period, per_exp);
    end
    checks++;
    if (n_bad_int != 0 || n_int < 1000) begin
      failures++;
      $display("FAIL: %0d of %0d RMClk intervals not 40 or 41 cycles", n_bad_int, n_int);
    end
    checks += 4;
    if (n_lost == 0)    begin failures++; $display("FAIL: no lost Reference edge"); end
    if (n_irq == 0)     begin failures++; $display("FAIL: no interrupt"); end
    if (n_extra == 0)   begin failures++; $display("FAIL: no sigma-delta tick"); end
    if (n_locked < 10)  begin failures++; $display("FAIL: only %0d locked updates", n_locked); end
    $display("mean phase offset %f ticks, worst %0d (N_Av %0d), freq error %f ppm, period %0d (%f), ctrl %0d, intervals %0d, sd ticks %0d, lost %0d",
             real'(dev_sum) / real'(n_locked * NAV), worst, NAV, f_err, period, per_exp, per, n_int, n_extra, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
