// tb_pll_bus_regs: self-checking test of the register port and interrupt.
//
// Checks the reset values, write/read-back of every read-write register,
// the monitoring registers, the one-cycle read latency, the integrator load
// pulse (after reset and on a CTRL write), the interrupt raised by a PI
// update only when enabled and cleared by writing STATUS, the sticky
// saturation flag and the PI update counter.
`timescale 1ns/1ps
module tb_pll_bus_regs;
  import gmt_pll_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [ADDR_W-1:0] addr = '0;
  logic wr = 1'b0, rd = 1'b0;
  word_t wdata = '0, rdata;
  logic irq, run, load_init;
  logic [15:0] n_av, div_ratio;
  word_t setpoint, kp, ki, integ_init;
  word_t phase_sum = 32'sd11, err = -32'sd55, integ = 32'sd22, ctrl = 32'sd33, lost_count = 32'sd44;
  logic ctrl_valid = 1'b0, saturated = 1'b0;
  int checks = 0, failures = 0, loads = 0;

  pll_bus_regs #(
    .NAV_W(16), .DIV_W(16), .RUN_RST(1'b1), .NAV_RST(2000), .SETPOINT_RST(32'sd160000),
    .KP_RST(32'sd7), .KI_RST(32'sd3), .INTEG_INIT_RST(-32'sd5), .DIV_RST(40)
  ) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && load_init) loads++;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s = %0d, expected %0d", what, got, exp);
    end
  endtask

  task automatic bus_write(input reg_addr_e a, input word_t d);
    @(negedge clk);
    addr = a; wdata = d; wr = 1'b1;
    @(negedge clk);
    wr = 1'b0;
  endtask

  task automatic bus_read(input reg_addr_e a, output word_t d);
    @(negedge clk);
    addr = a; rd = 1'b1;
    @(negedge clk);
    rd = 1'b0;
    d = rdata;   // registered: valid the cycle after rd
  endtask

  task automatic pi_update(input logic sat);
    @(negedge clk);
    ctrl_valid = 1'b1; saturated = sat;
    @(negedge clk);
    ctrl_valid = 1'b0; saturated = 1'b0;
  endtask

  initial begin
    word_t d;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check("load_init pulses after reset", loads, 1);
    check("run reset", run, 1);
    check("n_av reset", n_av, 2000);
    check("setpoint reset", setpoint, 160000);
    check("div reset", div_ratio, 40);
    bus_read(REG_INTEG_INIT, d);  check("read INTEG_INIT", d, -5);
    bus_read(REG_KP, d);          check("read KP", d, 7);
    // write and read back
    bus_write(REG_NAV, 32'd16);          bus_read(REG_NAV, d);        check("NAV", d, 16);
    bus_write(REG_SETPOINT, -32'sd99);   bus_read(REG_SETPOINT, d);   check("SETPOINT", d, -99);
    bus_write(REG_KP, 32'sd1234567);     bus_read(REG_KP, d);         check("KP", d, 1234567);
    bus_write(REG_KI, -32'sd42);         bus_read(REG_KI, d);         check("KI", d, -42);
    bus_write(REG_INTEG_INIT, 32'sd77);  bus_read(REG_INTEG_INIT, d); check("INTEG_INIT", d, 77);
    bus_write(REG_DIV, 32'd8);           bus_read(REG_DIV, d);        check("DIV", d, 8);
    check("n_av out", n_av, 16);  check("kp out", kp, 1234567);  check("ki out", ki, -42);
    check("integ_init out", integ_init, 77);  check("div out", div_ratio, 8);
    check("setpoint out", setpoint, -99);
    // monitoring registers
    bus_read(REG_PHASE, d);    check("PHASE", d, 11);
    bus_read(REG_INTEG, d);    check("INTEG", d, 22);
    bus_read(REG_CTRL_OUT, d); check("CTRL_OUT", d, 33);
    bus_read(REG_LOST, d);     check("LOST", d, 44);
    bus_read(REG_ERR, d);      check("ERR", d, -55);
    // load pulse on CTRL write
    bus_write(REG_CTRL, 32'h5);  // run + load, irq disabled
    @(negedge clk);
    check("load_init on CTRL write", loads, 2);
    // no interrupt while disabled
    pi_update(1'b0);
    @(negedge clk);
    check("irq disabled", irq, 0);
    bus_write(REG_CTRL, 32'h3);  // run + irq enable
    bus_read(REG_CTRL, d);     check("CTRL", d, 3);
    check("no load without bit 2", loads, 2);
    pi_update(1'b1);
    @(negedge clk);
    check("irq raised", irq, 1);
    bus_read(REG_STATUS, d);   check("STATUS irq+sat", d, 3);
    bus_write(REG_STATUS, 32'h1);
    check("irq cleared", irq, 0);
    bus_read(REG_STATUS, d);   check("STATUS sat sticky", d, 2);
    bus_write(REG_STATUS, 32'h2);
    bus_read(REG_STATUS, d);   check("STATUS cleared", d, 0);
    bus_read(REG_UPDATES, d);  check("UPDATES", d, 2);
    bus_write(REG_CTRL, 32'h0);
    check("run off", run, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
