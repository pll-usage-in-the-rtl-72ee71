// tb_freq_divider: self-checking test of the divider.
//
// With ce tied high and ratio 40 (40 MHz clean clock to 1 MHz) the time base
// pulse must come every 40 cycles and clk_out must be high for 20 cycles of
// each period. With random ce and ratio 3, a pulse must come on every third
// ce event. Ratio 1 must give a pulse on every ce.
`timescale 1ns/1ps
module tb_freq_divider;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, ce = 1'b0;
  logic [15:0] ratio = 16'd40;
  logic pulse, clk_out;
  logic [15:0] phase_cnt;
  int checks = 0, failures = 0;

  freq_divider #(.DIV_W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, last_pulse = -1, high_cnt = 0, ce_cnt = 0, ce_at_pulse = 0;
  int mode = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && enable) begin
      if (ce) ce_cnt++;
      if (clk_out) high_cnt++;
      if (pulse) begin
        if (mode == 1 && last_pulse >= 0) begin
          checks += 2;
          if (cyc - last_pulse != 40) begin
            failures++;
            $display("FAIL: pulse interval %0d, expected 40", cyc - last_pulse);
          end
          if (high_cnt != 20) begin
            failures++;
            $display("FAIL: clk_out high for %0d cycles, expected 20", high_cnt);
          end
        end
        if (mode == 2 || mode == 3) begin
          // the pulse appears one cycle after its ce event; ce_cnt also
          // counts the ce of the current cycle, which belongs to the next period
          int cur;
          cur = ce_cnt - (ce ? 1 : 0);
          checks++;
          if (cur - ce_at_pulse != ((mode == 2) ? 3 : 1) && ce_at_pulse > 0) begin
            failures++;
            $display("FAIL: %0d ce events between pulses", cur - ce_at_pulse);
          end
          ce_at_pulse = cur;
        end
        last_pulse = cyc;
        high_cnt = 0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    enable = 1'b1;
    ce = 1'b1;
    mode = 1;
    repeat (40 * 50) @(negedge clk);
    // random ce, ratio 3
    enable = 1'b0;
    @(negedge clk);
    ratio = 16'd3;
    ce = 1'b0;
    mode = 2;
    ce_cnt = 0; ce_at_pulse = 0;
    enable = 1'b1;
    repeat (3000) begin
      @(negedge clk);
      ce = ($urandom % 3 == 0);
    end
    @(negedge clk);
    ce = 1'b0;
    enable = 1'b0;
    @(negedge clk);
    ratio = 16'd1;
    mode = 3;
    ce_cnt = 0; ce_at_pulse = 0;
    enable = 1'b1;
    repeat (1000) begin
      @(negedge clk);
      ce = ($urandom % 4 == 0);
    end
    checks++;
    if (last_pulse < 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
