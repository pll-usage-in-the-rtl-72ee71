// manchester_src: Reference signal source for the PLL testbenches
// (simulation only).
//
// Sends random bits Manchester-coded at BIT_NS per bit: a 0 is high then low,
// a 1 is low then high, so there is a transition in the middle of every bit
// and rising edges fall on a grid of BIT_NS/2 with gaps where the bit pattern
// has none. Each edge is moved by a uniformly distributed jitter of up to
// +/-JITTER_PS. With MANCHESTER = 0 it sends a plain clock of period BIT_NS
// instead. `edges` counts rising edges sent. Time unit: 1 ns.
`timescale 1ns/1fs
module manchester_src #(
  parameter real BIT_NS     = 2000.0,
  parameter int  JITTER_PS  = 0,
  parameter bit  MANCHESTER = 1'b1,
  parameter int  SEED       = 1
) (
  output logic sig,
  output int   edges
);
  real    t_next, t_now;
  longint k;
  logic   bit_v, lvl;
  int     seed;

  initial begin
    seed  = SEED;
    void'($urandom(seed));
    sig   = 1'b0;
    edges = 0;
    k     = 1;
    bit_v = 1'b0;
    forever begin
      if (MANCHESTER) begin
        if (k % 2 == 0) bit_v = 1'($urandom % 2);
        lvl = (k % 2 == 0) ? ~bit_v : bit_v;
      end else begin
        lvl = (k % 2 == 0);
      end
      t_next = real'(k) * BIT_NS / 2.0;
      if (JITTER_PS > 0)
        t_next += real'(int'($urandom % (2 * JITTER_PS + 1)) - JITTER_PS) / 1000.0;
      t_now = $realtime;
      if (t_next > t_now) #(t_next - t_now);
      if (lvl && !sig) edges++;
      sig = lvl;
      k++;
    end
  end
endmodule
