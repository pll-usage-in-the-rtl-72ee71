// numeric_oscillator: Numeric Oscillator (NO) of the all-digital PLL.
//
// The PI controller supplies the length of the next Recovered Multiplied
// Clock (RMClk) period in Fast Clock ticks as an unsigned fixed-point number:
// the upper INT_W bits are the integer period, the lower FRAC_W bits the
// fractional period. A downcounter clocked by the Fast Clock counts the
// integer period; when it expires it emits a one-cycle RMClk pulse and is
// reloaded with the integer period plus the sigma-delta modulator's 1-bit
// output. The modulator is advanced by RMClk, so on average frac/2**FRAC_W
// extra ticks are added per period. Example from the paper: a 40.33 MHz
// Fast Clock with integer period 40 and fractional period 1/3 gives periods
// of 40, 40, 41, ... ticks, 1 MHz on average with 25 ns of short-term jitter.
//
// The structure (integer/fractional split, modulator enabled by RMClk, adder,
// downcounter reloaded by RMClk) follows the paper's layout figure. The
// widths and the clamp of a zero integer period to one tick are this design's
// choices. enable = 0 holds the counter at one so that the first pulse comes
// one cycle after enabling; a new period value takes effect at the next
// reload. Period of each RMClk = integer period + tick, in Fast Clock cycles.
module numeric_oscillator #(
  parameter int unsigned INT_W  = 16,
  parameter int unsigned FRAC_W = 16
) (
  input  logic                    clk,     // Fast Clock
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic [INT_W+FRAC_W-1:0] period,  // {integer period, fractional period}
  output logic                    rmclk,   // one-cycle pulse per generated period
  output logic                    extra    // this reload added the sigma-delta tick
);
  logic [INT_W-1:0] count;
  logic [INT_W:0]   reload;
  logic             tick, expire;

  assign expire = enable && (count <= INT_W'(1));

  sigma_delta_modulator #(.FRAC_W(FRAC_W)) u_sdm (
    .clk(clk), .rst_n(rst_n), .en(expire),
    .frac(period[FRAC_W-1:0]), .tick(tick)
  );

  always_comb begin
    reload = {1'b0, period[INT_W+FRAC_W-1:FRAC_W]} + (INT_W+1)'(tick);
    if (reload == '0) reload = (INT_W+1)'(1);
    if (reload[INT_W]) reload = {1'b0, {INT_W{1'b1}}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= INT_W'(1);
      rmclk <= 1'b0;
      extra <= 1'b0;
    end else begin
      rmclk <= expire;
      if (!enable) begin
        count <= INT_W'(1);
        extra <= 1'b0;
      end else if (expire) begin
        count <= reload[INT_W-1:0];
        extra <= tick;
      end else begin
        count <= count - 1'b1;
      end
    end
  end
endmodule
