// tb_numeric_oscillator: self-checking test of the numeric oscillator.
//
// Loads the paper's example (integer period 40, fractional period 1/3)
// and measures the interval between RMClk pulses: every interval must be 40
// or 41 ticks, each one must match a model of the downcounter and the
// first-order sigma-delta modulator, and over 3*2**12 periods the mean must
// be 40 + frac/2**16. The extra flag must mark exactly the periods that
// received the sigma-delta tick. A second period value (25 + 0.75) checks that a new
// period takes effect at the next reload, and a zero period must clamp to
// one tick.
`timescale 1ns/1ps
module tb_numeric_oscillator;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic [31:0] period = {16'd40, 16'h5555};
  logic rmclk, extra;
  int checks = 0, failures = 0;

  numeric_oscillator #(.INT_W(16), .FRAC_W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // intervals[k] is the length of a period; extras[k] is the extra flag
  // shown with the RMClk pulse that started it.
  int cyc = 0, last = -1;
  int intervals[$];
  bit extras[$];
  bit last_extra;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && rmclk) begin
      if (last >= 0) begin
        intervals.push_back(cyc - last);
        extras.push_back(last_extra);
      end
      last = cyc;
      last_extra = extra;
    end
  end

  // Runs until n intervals have been measured and checks them against the
  // model, which starts from the accumulator value acc (acc < 0: only check
  // that each interval is ip or ip + 1).
  task automatic measure(input int n, input int ip, input int fp, inout int acc, input string tag);
    int bad = 0, bad_x = 0;
    longint total = 0;
    intervals.delete();
    extras.delete();
    wait (intervals.size() >= n);
    for (int k = 0; k < n; k++) begin
      int e;
      checks += 2;
      if (acc >= 0) begin
        acc += fp;
        e = ip + (acc >> 16);
        acc &= 16'hFFFF;
        if (intervals[k] != e) bad++;
      end else if (intervals[k] != ip && intervals[k] != ip + 1) begin
        bad++;
      end
      // the extra flag marks exactly the periods that got the sigma-delta tick
      if (int'(extras[k]) != intervals[k] - ip) bad_x++;
      total += intervals[k];
    end
    failures += bad + bad_x;
    if (bad != 0)
      $display("FAIL %s: %0d of %0d intervals differ from the model", tag, bad, n);
    if (bad_x != 0)
      $display("FAIL %s: extra flag wrong in %0d of %0d periods", tag, bad_x, n);
    checks++;
    if (total != longint'(n) * ip + (longint'(n) * fp) / 65536 &&
        total != longint'(n) * ip + (longint'(n) * fp) / 65536 + 1) begin
      failures++;
      $display("FAIL %s: %0d ticks in %0d periods", tag, total, n);
    end
  endtask

  initial begin
    int acc;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    enable = 1'b1;
    // first pulse one cycle after enabling, then 40/41 tick periods
    @(posedge clk);
    #1;
    checks++;
    if (!rmclk) begin
      failures++;
      $display("FAIL: no RMClk one cycle after enable");
    end
    // The first measured interval is the one loaded at this first pulse,
    // with the modulator accumulator at zero.
    acc = 0;
    measure(3 * 4096, 40, 16'h5555, acc, "40+1/3");
    // new period: takes effect at the next reload
    @(posedge clk iff rmclk);
    @(negedge clk);
    period = {16'd25, 16'hC000};
    repeat (3) @(posedge clk iff rmclk);
    acc = -1;
    measure(4000, 25, 16'hC000, acc, "25+3/4");
    // zero period clamps to one tick
    period = 32'd0;
    repeat (200) @(negedge clk);
    intervals.delete();
    repeat (20) @(negedge clk);
    checks++;
    if (intervals.size() < 18 || intervals[5] != 1) begin
      failures++;
      $display("FAIL: zero period does not give one-tick periods");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
