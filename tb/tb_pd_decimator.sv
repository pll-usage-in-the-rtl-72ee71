// tb_pd_decimator: self-checking test of the decimation filter.
//
// Random phase samples arrive with random gaps. A reference model sums every
// group of n_av samples; each output sum must equal the model's and appear
// one cycle after the group's last sample. n_av is changed between runs
// (1, 7 and the paper's 2000), and enable is dropped once to check that a
// partial sum is discarded.
`timescale 1ns/1ps
module tb_pd_decimator;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  logic [15:0] n_av = 16'd7;
  logic [15:0] phase = '0;
  logic phase_valid = 1'b0;
  logic [31:0] sum;
  logic sum_valid;
  int checks = 0, failures = 0;

  longint model_acc = 0;
  int model_cnt = 0;
  longint exp_q[$];
  int last_sample_cycle = 0, cyc = 0;

  pd_decimator #(.PHASE_W(16), .NAV_W(16), .SUM_W(32)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input int nsamp);
    for (int i = 0; i < nsamp; i++) begin
      @(negedge clk);
      phase = 16'($urandom % 200);
      phase_valid = 1'b1;
      model_acc += phase;
      model_cnt++;
      if (model_cnt == int'(n_av)) begin
        exp_q.push_back(model_acc);
        model_acc = 0;
        model_cnt = 0;
      end
      @(negedge clk);
      phase_valid = 1'b0;
      repeat ($urandom % 3) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    enable = 1'b1;
    send(7 * 20);
    n_av = 16'd1;
    send(30);
    // drop enable in the middle of a group: the partial sum is lost
    n_av = 16'd7;
    send(3);
    @(negedge clk);
    enable = 1'b0;
    @(negedge clk);
    enable = 1'b1;
    model_acc = 0;
    model_cnt = 0;
    send(7 * 5);
    n_av = 16'd2000;
    send(2000 * 2);
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d sums missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (phase_valid) last_sample_cycle = cyc;
    if (rst_n && sum_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected sum %0d", sum);
      end else begin
        longint e;
        e = exp_q.pop_front();
        if (longint'(sum) != e) begin
          failures++;
          $display("FAIL: sum %0d expected %0d", sum, e);
        end
      end
      checks++;
      if (cyc - last_sample_cycle != 1) begin
        failures++;
        $display("FAIL: sum came %0d cycles after the last sample", cyc - last_sample_cycle);
      end
    end
  end
endmodule
