// dp: time-evolution datapath (TE/DP) of discrete simulated bifurcation.
//
// Updates one oscillator from its position x, momentum y, its
// matrix-vector result acc = sum_j J[i][j]*sgn(x[j]) and its single-spin
// coefficient h:
//
//   f  = c0 * (acc + h)                     c0 = 2**-c0_shift (a shift)
//   y' = y + dt*(f - (1 - a)*x) [+ gamma*dt*y when heat = 1]
//   x' = x + dt*y'                          (a0 = 1)
//   if |x'| > 1: x' = sgn(x')*1, y' = 0     (inelastic walls)
//   sgn_out = (x' < 0)
//
// This is the dSB update of y followed by x (symplectic Euler), with the
// heated variant switched by the heat input and the parameters gamma, dt and
// c0 given from outside, as the architecture has them. The fixed-point
// formats (sb_pkg), applying c0 as an arithmetic right shift, a0 = 1, the
// heating term gamma*dt*y and floor rounding of every product are this
// design's choices. y' saturates to the XW-bit range.
//
// Purely combinational: the caller registers the results into XMEM, YMEM
// and SIGNXMEM. On an FPGA the two product levels would be pipelined.
module dp
  import sb_pkg::*;
#(
  parameter int unsigned ACCW  = 19,
  parameter int unsigned HBITS = 16
) (
  input  logic signed [XW-1:0]    x,
  input  logic signed [XW-1:0]    y,
  input  logic signed [HBITS-1:0] h,
  input  logic signed [ACCW-1:0]  acc,
  input  logic [AW-1:0]           a,
  input  sb_cfg_t                 cfg,
  output logic signed [XW-1:0]    x_new,
  output logic signed [XW-1:0]    y_new,
  output logic                    sgn_out
);

  localparam int unsigned WW = 48;  // intermediate width
  localparam logic signed [WW-1:0] ONE  = WW'(1) <<< XFRAC;
  localparam logic signed [WW-1:0] YMAX = WW'((1 << (XW - 1)) - 1);
  localparam logic signed [WW-1:0] YMIN = -(WW'(1) <<< (XW - 1));

  logic signed [WW-1:0]   sum, f, om, g, force_t, dy, heat_t, y1, x1;
  logic signed [2*WW-1:0] p_g, p_dy, p_h1, p_h2, p_dx;
  logic signed [WW-1:0]   h1;
  logic signed [WW-1:0]   dt_s, gm_s;

  always_comb begin
    dt_s    = WW'(cfg.dt);
    gm_s    = WW'(cfg.gamma);
    sum     = WW'(acc) + WW'(h);
    f       = (sum <<< XFRAC) >>> cfg.c0_shift;
    om      = (WW'(1) <<< AFRAC) - WW'(a);
    p_g     = (2*WW)'(om) * (2*WW)'(x);
    g       = WW'(p_g >>> AFRAC);
    force_t = f - g;
    p_dy    = (2*WW)'(force_t) * (2*WW)'(dt_s);
    dy      = WW'(p_dy >>> XFRAC);
    p_h1    = (2*WW)'(y) * (2*WW)'(gm_s);
    h1      = WW'(p_h1 >>> XFRAC);
    p_h2    = (2*WW)'(h1) * (2*WW)'(dt_s);
    heat_t  = cfg.heat ? WW'(p_h2 >>> XFRAC) : '0;
    y1      = WW'(y) + dy + heat_t;
    if (y1 > YMAX) y1 = YMAX;
    if (y1 < YMIN) y1 = YMIN;
    p_dx    = (2*WW)'(y1) * (2*WW)'(dt_s);
    x1      = WW'(x) + WW'(p_dx >>> XFRAC);
    if (x1 > ONE) begin
      x1 = ONE;
      y1 = '0;
    end else if (x1 < -ONE) begin
      x1 = -ONE;
      y1 = '0;
    end
    x_new   = XW'(x1);
    y_new   = XW'(y1);
    sgn_out = x1[WW-1];
  end

endmodule
