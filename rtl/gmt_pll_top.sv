// gmt_pll_top: the two PLL configurations of the timing receiver, side by side.
//
// - Hybrid PLL (hpll, ports h_*): the configuration used in the receiver
//   cards. A phase detector on an independent 160 MHz Fast Clock and a PI
//   controller drive an external DAC and VCXO; the 40 MHz VCXO clean clock is
//   divided to the 1 MHz Recovered Clock.
// - All Digital PLL (adpll, ports a_*): the same phase detector and PI
//   controller steer a numeric oscillator (downcounter plus sigma-delta
//   modulator) clocked by the Fast Clock.
//
// Each has its own clocks, Reference input, register port and interrupt. The
// parts outside the FPGA (local quartz oscillator, clock multiplier, DAC,
// VCXO, bus master) are not included: their signals are ports (h_fc_clk,
// h_vcxo_clk, h_dac_code, a_fc_clk, a_sys_clk, the register ports). All
// parameters take the submodules' defaults, which are the paper's
// operating point where it gives one.
module gmt_pll_top
  import gmt_pll_pkg::*;
(
  input  logic              rst_n,
  // Hybrid PLL
  input  logic              h_fc_clk,
  input  logic              h_vcxo_clk,
  input  logic              h_ref_in,
  input  logic [ADDR_W-1:0] h_bus_addr,
  input  logic              h_bus_wr,
  input  word_t             h_bus_wdata,
  input  logic              h_bus_rd,
  output word_t             h_bus_rdata,
  output logic              h_irq,
  output logic [15:0]       h_dac_code,
  output logic              h_rec_clk,
  output logic              h_rec_pulse,
  output logic              h_pd_valid,
  output logic              h_pd_lost,
  // All Digital PLL
  input  logic              a_fc_clk,
  input  logic              a_sys_clk,
  input  logic              a_ref_in,
  input  logic [ADDR_W-1:0] a_bus_addr,
  input  logic              a_bus_wr,
  input  word_t             a_bus_wdata,
  input  logic              a_bus_rd,
  output word_t             a_bus_rdata,
  output logic              a_irq,
  output logic              a_rmclk,
  output logic              a_rec_pulse,
  output logic              a_rec_clk,
  output logic [31:0]       a_period,
  output logic              a_sd_extra,
  output logic              a_pd_valid,
  output logic              a_pd_lost
);
  hpll u_hpll (
    .fc_clk(h_fc_clk), .vcxo_clk(h_vcxo_clk), .rst_n(rst_n), .ref_in(h_ref_in),
    .bus_addr(h_bus_addr), .bus_wr(h_bus_wr), .bus_wdata(h_bus_wdata), .bus_rd(h_bus_rd),
    .bus_rdata(h_bus_rdata), .irq(h_irq),
    .dac_code(h_dac_code), .rec_clk(h_rec_clk), .rec_pulse(h_rec_pulse),
    .pd_valid(h_pd_valid), .pd_lost(h_pd_lost)
  );

  adpll u_adpll (
    .fc_clk(a_fc_clk), .sys_clk(a_sys_clk), .rst_n(rst_n), .ref_in(a_ref_in),
    .bus_addr(a_bus_addr), .bus_wr(a_bus_wr), .bus_wdata(a_bus_wdata), .bus_rd(a_bus_rd),
    .bus_rdata(a_bus_rdata), .irq(a_irq),
    .rmclk(a_rmclk), .rec_pulse(a_rec_pulse), .rec_clk(a_rec_clk), .period(a_period),
    .sd_extra(a_sd_extra), .pd_valid(a_pd_valid), .pd_lost(a_pd_lost)
  );
endmodule
