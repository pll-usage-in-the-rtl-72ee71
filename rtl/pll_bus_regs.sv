// pll_bus_regs: bus-accessible registers of one PLL and its interrupt.
//
// The host programs the PLL through this register file: loop run/stop, the
// decimation factor N_Av, the decimated phase setpoint, the gains Kp and Ki,
// the integrator initial value and the divider ratio. It can read back the
// PI controller's variables (last decimated phase, error, integrator,
// control value), a count of PI updates and a count of lost Reference edges, so that
// software can monitor the loop. When interrupts are enabled every PI update
// sets a pending flag that drives `irq` until the host clears it, which lets
// software trace the loop state over time.
//
// The paper lists the programmable quantities, the read-back of the PI
// variables and the interrupt; it uses a VME bus, whose protocol it does not
// describe. This block offers a generic synchronous register port instead:
// addresses and fields are in gmt_pll_pkg (reg_addr_e). A write takes effect
// on the clock edge where wr is high; rdata is registered and valid the
// cycle after rd. Writing CTRL with bit 2 set loads the integrator initial
// value into the PI controller (one-cycle load_init pulse); load_init also
// pulses once in the first cycle after reset, so the integrator starts at
// INTEG_INIT_RST. STATUS bits are cleared by writing 1 to them.
// All register reset values are parameters; their defaults are set by the
// PLL that instantiates this block.
module pll_bus_regs
  import gmt_pll_pkg::*;
#(
  parameter int unsigned NAV_W          = 16,
  parameter int unsigned DIV_W          = 16,
  parameter logic        RUN_RST        = 1'b1,
  parameter int unsigned NAV_RST        = 2000,
  parameter word_t       SETPOINT_RST   = '0,
  parameter word_t       KP_RST         = '0,
  parameter word_t       KI_RST         = '0,
  parameter word_t       INTEG_INIT_RST = '0,
  parameter int unsigned DIV_RST        = 40
) (
  input  logic              clk,
  input  logic              rst_n,
  // register port
  input  logic [ADDR_W-1:0] addr,
  input  logic              wr,
  input  word_t             wdata,
  input  logic              rd,
  output word_t             rdata,
  output logic              irq,
  // configuration to the loop
  output logic              run,
  output logic [NAV_W-1:0]  n_av,
  output word_t             setpoint,
  output word_t             kp,
  output word_t             ki,
  output word_t             integ_init,
  output logic              load_init,
  output logic [DIV_W-1:0]  div_ratio,
  // monitoring from the loop
  input  word_t             phase_sum,
  input  word_t             err,
  input  word_t             integ,
  input  word_t             ctrl,
  input  logic              ctrl_valid,
  input  logic              saturated,
  input  word_t             lost_count
);
  logic  irq_en, irq_pend, sat_sticky, first;
  word_t updates;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run        <= RUN_RST;
      irq_en     <= 1'b0;
      n_av       <= NAV_W'(NAV_RST);
      setpoint   <= SETPOINT_RST;
      kp         <= KP_RST;
      ki         <= KI_RST;
      integ_init <= INTEG_INIT_RST;
      div_ratio  <= DIV_W'(DIV_RST);
      load_init  <= 1'b0;
      first      <= 1'b1;
      irq_pend   <= 1'b0;
      sat_sticky <= 1'b0;
      updates    <= '0;
    end else begin
      first     <= 1'b0;
      load_init <= first;
      if (ctrl_valid) begin
        updates <= updates + 1'b1;
        if (irq_en) irq_pend <= 1'b1;
      end
      if (saturated) sat_sticky <= 1'b1;
      if (wr) begin
        unique case (addr)
          REG_CTRL: begin
            run       <= wdata[CTRL_RUN];
            irq_en    <= wdata[CTRL_IRQE];
            load_init <= first | wdata[CTRL_LOAD];
          end
          REG_STATUS: begin
            if (wdata[STAT_IRQ]) irq_pend   <= 1'b0;
            if (wdata[STAT_SAT]) sat_sticky <= 1'b0;
          end
          REG_NAV:        n_av       <= wdata[NAV_W-1:0];
          REG_SETPOINT:   setpoint   <= wdata;
          REG_KP:         kp         <= wdata;
          REG_KI:         ki         <= wdata;
          REG_INTEG_INIT: integ_init <= wdata;
          REG_DIV:        div_ratio  <= wdata[DIV_W-1:0];
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata <= '0;
    end else if (rd) begin
      unique case (addr)
        REG_CTRL:       rdata <= word_t'({irq_en, run});
        REG_STATUS:     rdata <= word_t'({sat_sticky, irq_pend});
        REG_NAV:        rdata <= word_t'(n_av);
        REG_SETPOINT:   rdata <= setpoint;
        REG_KP:         rdata <= kp;
        REG_KI:         rdata <= ki;
        REG_INTEG_INIT: rdata <= integ_init;
        REG_DIV:        rdata <= word_t'(div_ratio);
        REG_PHASE:      rdata <= phase_sum;
        REG_INTEG:      rdata <= integ;
        REG_CTRL_OUT:   rdata <= ctrl;
        REG_UPDATES:    rdata <= updates;
        REG_LOST:       rdata <= lost_count;
        REG_ERR:        rdata <= err;
        default:        rdata <= '0;
      endcase
    end
  end

  assign irq = irq_pend;
endmodule
