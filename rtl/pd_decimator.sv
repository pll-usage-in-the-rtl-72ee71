// pd_decimator: decimation filter chained after the phase detector.
//
// Accumulates validated phase samples in a register and, after n_av of them,
// emits their sum and starts over. Keeping the sum rather than dividing by
// n_av is what gives a setpoint granularity of T_FC / N_Av: the PI setpoint
// is expressed in the same summed units. Only validated samples count, so lost
// Reference edges stretch the decimation period instead of adding error.
// N_Av is programmable (the paper's example is 2000); n_av = 0 is treated
// as 1. n_av is sampled when a sum completes, so changing it only affects the
// sum in progress. Output: sum/sum_valid, a one-cycle pulse one cycle after
// the n_av-th input sample. The sum register is SUM_W bits wide and does not
// overflow while n_av * (2**PHASE_W - 1) < 2**SUM_W.
module pd_decimator #(
  parameter int unsigned PHASE_W = 16,
  parameter int unsigned NAV_W   = 16,
  parameter int unsigned SUM_W   = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  input  logic [NAV_W-1:0]   n_av,
  input  logic [PHASE_W-1:0] phase,
  input  logic               phase_valid,
  output logic [SUM_W-1:0]   sum,
  output logic               sum_valid
);
  logic [SUM_W-1:0] acc, acc_next;
  logic [NAV_W-1:0] cnt;
  logic             last;

  assign acc_next = acc + SUM_W'(phase);
  assign last     = (({1'b0, cnt} + 1'b1) >= {1'b0, n_av});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      cnt       <= '0;
      sum       <= '0;
      sum_valid <= 1'b0;
    end else begin
      sum_valid <= 1'b0;
      if (!enable) begin
        acc <= '0;
        cnt <= '0;
      end else if (phase_valid) begin
        if (last) begin
          sum       <= acc_next;
          sum_valid <= 1'b1;
          acc       <= '0;
          cnt       <= '0;
        end else begin
          acc <= acc_next;
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
