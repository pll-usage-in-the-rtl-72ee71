// gmt_pll_pkg: types, constants and helper functions shared by the PLL blocks.
//
// The PI arithmetic is 32-bit signed fixed point with saturation instead of
// wrap-around, so all saturating helpers live here. The register map of the
// bus port (pll_bus_regs) is also defined here so that the testbenches and the
// RTL share one definition. The 32-bit width follows the paper; the gain
// format and the register map are this design's
// own choices.
package gmt_pll_pkg;

  localparam int unsigned DATA_W    = 32;  // PI datapath width
  localparam int unsigned ADDR_W    = 4;   // register address width

  typedef logic signed [DATA_W-1:0]   word_t;
  typedef logic signed [2*DATA_W-1:0] dword_t;

  // Register map of the bus port (word addresses).
  typedef enum logic [ADDR_W-1:0] {
    REG_CTRL       = 4'h0,  // rw: [0] run, [1] irq enable, [2] load integrator (write 1, self clearing)
    REG_STATUS     = 4'h1,  // [0] irq pending, [1] saturated (sticky); write 1 to clear
    REG_NAV        = 4'h2,  // rw: decimation factor N_Av
    REG_SETPOINT   = 4'h3,  // rw: decimated phase setpoint
    REG_KP         = 4'h4,  // rw: proportional gain
    REG_KI         = 4'h5,  // rw: integral gain
    REG_INTEG_INIT = 4'h6,  // rw: integrator initial value
    REG_DIV        = 4'h7,  // rw: divider ratio
    REG_PHASE      = 4'h8,  // ro: last decimated phase
    REG_INTEG      = 4'h9,  // ro: integrator
    REG_CTRL_OUT   = 4'hA,  // ro: control value (DAC value or NO period)
    REG_UPDATES    = 4'hB,  // ro: number of PI updates
    REG_LOST       = 4'hC,  // ro: number of reference edges not found (phase not validated)
    REG_ERR        = 4'hD   // ro: last PI error (setpoint - decimated phase)
  } reg_addr_e;

  localparam int unsigned CTRL_RUN  = 0;
  localparam int unsigned CTRL_IRQE = 1;
  localparam int unsigned CTRL_LOAD = 2;
  localparam int unsigned STAT_IRQ  = 0;
  localparam int unsigned STAT_SAT  = 1;

  localparam word_t WORD_MAX = {1'b0, {(DATA_W-1){1'b1}}};
  localparam word_t WORD_MIN = {1'b1, {(DATA_W-1){1'b0}}};

  // Clip a 33-bit signed value to 32 bits.
  function automatic word_t sat33(input logic signed [DATA_W:0] v);
    if (v > $signed({1'b0, WORD_MAX})) return WORD_MAX;
    if (v < $signed({1'b1, WORD_MIN})) return WORD_MIN;
    return v[DATA_W-1:0];
  endfunction

  // Saturating signed add.
  function automatic word_t sat_add(input word_t a, input word_t b);
    logic signed [DATA_W:0] s;
    s = {a[DATA_W-1], a} + {b[DATA_W-1], b};
    return sat33(s);
  endfunction

  // Saturating signed subtract.
  function automatic word_t sat_sub(input word_t a, input word_t b);
    logic signed [DATA_W:0] s;
    s = {a[DATA_W-1], a} - {b[DATA_W-1], b};
    return sat33(s);
  endfunction

  // Scale a 64-bit product down by `shift` bits and clip it to 32 bits.
  function automatic word_t sat_scale(input dword_t p, input int unsigned shift);
    dword_t q;
    q = p >>> shift;
    if (q > $signed({{DATA_W{1'b0}}, WORD_MAX})) return WORD_MAX;
    if (q < $signed({{DATA_W{1'b1}}, WORD_MIN})) return WORD_MIN;
    return q[DATA_W-1:0];
  endfunction

  // True when a saturating add clips.
  function automatic logic add_clips(input word_t a, input word_t b);
    logic signed [DATA_W:0] s;
    s = {a[DATA_W-1], a} + {b[DATA_W-1], b};
    return s[DATA_W] != s[DATA_W-1];
  endfunction

endpackage
