// tb_phase_detector: self-checking test of the phase detector with an
// asynchronous Recovered Clock input (SYNC_REC = 1).
//
// A Recovered Clock of P cycles and a Reference with one rising edge at a
// random offset d in each window (or none, to model a lost pulse; sometimes a
// second edge that must be ignored) are driven on the falling edge of the
// Fast Clock. Both inputs pass identical synchronizers, so the expected phase
// of a window is exactly d. The result of each window must appear when the
// next window starts: a validated phase equal to d, or a `lost` pulse.
// The output cycle is checked against the Recovered Clock edge, and the
// enable input is dropped once to check that the next window gives no sample.
`timescale 1ns/1ps
module tb_phase_detector;
  localparam int P = 50;
  localparam int NWIN = 400;

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, ref_in = 1'b0, rec_in = 1'b0;
  logic [15:0] phase;
  logic phase_valid, lost;
  int checks = 0, failures = 0;

  int d[NWIN];        // -1: no Reference edge
  bit second[NWIN];
  int n = 0;          // cycles since the stimulus started
  int win_cnt = 0, lost_cnt = 0;
  int exp_q[$];
  int rise_cycle[$];

  phase_detector #(.PHASE_W(16), .SYNC_REC(1'b1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus on the falling edge.
  initial begin
    for (int k = 0; k < NWIN; k++) begin
      d[k] = ($urandom % 4 == 0) ? -1 : int'($urandom % (P - 5));
      second[k] = ($urandom % 3 == 0) && d[k] >= 0 && d[k] + 13 < P;
    end
    d[0] = 0;    // Reference edge on the same cycle as the Recovered edge
    d[1] = -1;   // a lost pulse early on
    second[1] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    enable = 1'b1;
    @(negedge clk);
    for (int k = 0; k < NWIN; k++) begin
      for (int c = 0; c < P; c++) begin
        rec_in = (c < P / 2);
        ref_in = (d[k] >= 0 && c >= d[k] && c < d[k] + 3) ||
                 (second[k] && c >= d[k] + 10 && c < d[k] + 13);
        if (c == 0) begin
          rise_cycle.push_back(n);
          if (k >= 1 && k != 200) exp_q.push_back(d[k-1]);
        end
        // Drop enable for a few cycles inside window 199: window 199 is
        // abandoned (no result at the start of window 200) and window 200 is the
        // first after re-enabling.
        enable = !(k == 199 && c >= 30 && c < 35);
        @(negedge clk);
        n++;
      end
    end
    repeat (10) @(negedge clk);
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d expected results never came", exp_q.size());
    end
    checks++;
    if (lost_cnt == 0) begin
      failures++;
      $display("FAIL: no lost pulse reported");
    end
    $display("windows=%0d lost=%0d", win_cnt, lost_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare outputs; the result of a window must come 4 cycles after the
  // Recovered rising edge that ends it (2 synchronizer + edge detect + register).
  int last_rise;
  always @(posedge clk) begin
    if (rst_n && (phase_valid || lost)) begin
      int e;
      checks++;
      win_cnt++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output at cycle %0d", n);
      end else begin
        e = exp_q.pop_front();
        if (e < 0 && !lost) begin
          failures++;
          $display("FAIL: expected lost, got phase %0d at cycle %0d", phase, n);
        end else if (e >= 0 && !(phase_valid && phase == 16'(e))) begin
          failures++;
          $display("FAIL: expected phase %0d, got valid=%0d phase=%0d lost=%0d", e, phase_valid, phase, lost);
        end
        if (lost) lost_cnt++;
      end
      // cycle of this output relative to the latest Recovered rising edge
      while (rise_cycle.size() > 1 && rise_cycle[1] <= n) void'(rise_cycle.pop_front());
      checks++;
      if (n - rise_cycle[0] != 3) begin
        failures++;
        $display("FAIL: output %0d cycles after the Recovered edge", n - rise_cycle[0]);
      end
    end
  end
endmodule
