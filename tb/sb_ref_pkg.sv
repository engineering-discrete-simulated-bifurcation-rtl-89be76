// sb_ref_pkg: reference model of one dSB time-evolution update, written
// with plain 64-bit integers for the testbenches. It restates the update
// rule of the machine (y first, then x, walls at |x| = 1, optional heating,
// c0 as a right shift, floor rounding) independently of the RTL datapath.
package sb_ref_pkg;
  import sb_pkg::*;

  localparam longint ONE = longint'(1) << XFRAC;

  // Returns 1 when the wall was hit.
  function automatic bit dp_ref(input longint x, input longint y, input longint acc,
                                input longint h, input longint a, input sb_cfg_t cfg,
                                output longint xn, output longint yn);
    longint f, g, frc, y1, x1, ht;
    longint ymax, ymin;
    bit wall;
    ymax = (longint'(1) << (XW - 1)) - 1;
    ymin = -(longint'(1) << (XW - 1));
    f   = ((acc + h) * ONE) >>> cfg.c0_shift;
    g   = (((longint'(1) << AFRAC) - a) * x) >>> AFRAC;
    frc = f - g;
    y1  = y + ((frc * longint'(cfg.dt)) >>> XFRAC);
    if (cfg.heat) begin
      ht = (y * longint'(cfg.gamma)) >>> XFRAC;
      y1 = y1 + ((ht * longint'(cfg.dt)) >>> XFRAC);
    end
    if (y1 > ymax) y1 = ymax;
    if (y1 < ymin) y1 = ymin;
    x1 = x + ((y1 * longint'(cfg.dt)) >>> XFRAC);
    wall = 1'b0;
    if (x1 > ONE)  begin x1 = ONE;  y1 = 0; wall = 1'b1; end
    if (x1 < -ONE) begin x1 = -ONE; y1 = 0; wall = 1'b1; end
    xn = x1;
    yn = y1;
    return wall;
  endfunction

endpackage
