// sb_pkg: sizes, fixed-point formats and shared types of the discrete
// simulated bifurcation (dSB) Ising machine.
//
// Problem size N, coefficient width JBITS and the parallelism factors
// PC (columns per memory word), PR (MAC units per MM block) and PB (number
// of MMTE blocks) are the defaults used by every module. JBITS = 8 is the
// coefficient width of the architecture; N = 800 matches the largest problem
// it is evaluated on (an 800-spin max-cut instance). PC, PR, PB, the
// fixed-point formats and the host load interface are this design's own
// choices.
//
// Fixed point: x and y are signed XW-bit numbers with XFRAC fractional bits
// (1.0 = 2**XFRAC). dt and gamma are unsigned PW-bit numbers with XFRAC
// fractional bits. The bifurcation parameter a and its increment da are
// unsigned AW-bit numbers with AFRAC fractional bits, a0 = 1.0.
package sb_pkg;

  localparam int unsigned N_DEF     = 800;
  localparam int unsigned PC_DEF    = 16;
  localparam int unsigned PR_DEF    = 4;
  localparam int unsigned PB_DEF    = 4;
  localparam int unsigned JBITS_DEF = 8;
  localparam int unsigned HBITS_DEF = 16;

  localparam int unsigned XW    = 16;
  localparam int unsigned XFRAC = 12;
  localparam int unsigned PW    = 16;
  localparam int unsigned AW    = 24;
  localparam int unsigned AFRAC = 20;
  localparam int unsigned C0W   = 5;   // width of the c0 shift amount

  // Which memory a host load write goes to.
  typedef enum logic [1:0] {
    LD_J = 2'd0,
    LD_H = 2'd1,
    LD_X = 2'd2,
    LD_Y = 2'd3
  } ld_sel_e;

  // Run-time algorithm parameters, held constant during a run.
  typedef struct packed {
    logic [PW-1:0]  dt;        // time step
    logic [PW-1:0]  gamma;     // heating rate
    logic [C0W-1:0] c0_shift;  // c0 = 2**-c0_shift
    logic           heat;      // 1: add the heating term gamma*dt*y
    logic [AW-1:0]  da;        // increment of a per iteration
  } sb_cfg_t;

endpackage
