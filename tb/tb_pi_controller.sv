// tb_pi_controller: self-checking test of the saturating PI controller.
//
// Random setpoints, measurements and gains (including values that drive the
// arithmetic into its 32-bit limits) are applied one measurement at a time.
// A 64-bit reference model computes err, the integrator and the control value
// with explicit clipping; outputs, the saturation flag and the two-cycle
// latency are compared. The integrator initial value load is also checked.
`timescale 1ns/1ps
module tb_pi_controller;
  import gmt_pll_pkg::*;
  localparam int GF = 8;

  logic  clk = 1'b0, rst_n = 1'b0, enable = 1'b0, load_init = 1'b0, meas_valid = 1'b0;
  word_t setpoint = '0, kp = '0, ki = '0, integ_init = '0, meas = '0;
  word_t err, integ, ctrl;
  logic  ctrl_valid, saturated;
  int checks = 0, failures = 0, sat_seen = 0;

  longint m_integ = 0;

  pi_controller #(.GAIN_FRAC(GF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint clip(input longint v, output bit c);
    c = 1'b0;
    if (v > 64'sd2147483647)  begin c = 1'b1; return 64'sd2147483647; end
    if (v < -64'sd2147483648) begin c = 1'b1; return -64'sd2147483648; end
    return v;
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s = %0d, expected %0d", what, got, exp);
    end
  endtask

  function automatic word_t rnd_word(input int mode);
    case (mode)
      0: return word_t'($signed($urandom % 2001) - 1000);
      1: return word_t'($signed($urandom % 2000001) - 1000000);
      default: return word_t'($urandom);
    endcase
  endfunction

  task automatic step(input word_t sp, input word_t m, input word_t p, input word_t i);
    longint e, pt, it, in, c;
    bit c0, c1, c2, c3, c4;
    @(negedge clk);
    setpoint = sp; meas = m; kp = p; ki = i;
    meas_valid = 1'b1;
    e  = clip(longint'(sp) - longint'(m), c0);
    pt = clip((e * longint'(p)) >>> GF, c1);
    it = clip((e * longint'(i)) >>> GF, c2);
    in = clip(m_integ + it, c3);
    c  = clip(in + pt, c4);
    m_integ = in;
    @(negedge clk);
    meas_valid = 1'b0;
    checks++;
    if (ctrl_valid) begin
      failures++;
      $display("FAIL: ctrl_valid after one cycle");
    end
    @(negedge clk);
    checks++;
    if (!ctrl_valid) begin
      failures++;
      $display("FAIL: ctrl_valid missing two cycles after meas_valid");
    end
    check("err", longint'(err), e);
    check("integ", longint'(integ), in);
    check("ctrl", longint'(ctrl), c);
    check("saturated", longint'(saturated), longint'(c0 | c1 | c2 | c3 | c4));
    if (saturated) sat_seen++;
    repeat ($urandom % 3) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    enable = 1'b1;
    // integrator load
    @(negedge clk);
    integ_init = 32'sd123456;
    load_init = 1'b1;
    @(negedge clk);
    load_init = 1'b0;
    check("integ after load", longint'(integ), 123456);
    check("ctrl after load", longint'(ctrl), 123456);
    m_integ = 123456;
    // small values, linear region
    for (int k = 0; k < 300; k++) step(rnd_word(1), rnd_word(1), rnd_word(1), rnd_word(0));
    // anything, saturation expected
    for (int k = 0; k < 300; k++) step(rnd_word(2), rnd_word(2), rnd_word(2), rnd_word(2));
    // extremes
    step(WORD_MAX, WORD_MIN, WORD_MAX, WORD_MAX);
    step(WORD_MIN, WORD_MAX, WORD_MAX, WORD_MAX);
    step(WORD_MIN, WORD_MAX, WORD_MIN, WORD_MIN);
    // disabled: no update
    @(negedge clk);
    enable = 1'b0;
    meas = 32'sd5; meas_valid = 1'b1;
    @(negedge clk);
    meas_valid = 1'b0;
    repeat (3) @(negedge clk);
    check("integ kept while disabled", longint'(integ), m_integ);
    checks++;
    if (sat_seen == 0) begin
      failures++;
      $display("FAIL: saturation never happened");
    end
    $display("saturated updates: %0d", sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
