// mmte: one Matrix-vector Multiplication Time Evolution block.
//
// An MM block (PR coupling banks and MAC units) followed by the
// time-evolution datapath. The MM hands the PR dot products of a row group
// to the datapath one per cycle; in the same cycle the caller supplies x, y
// and h of that spin (spin index grp*PB*PR + B*PR + te_r) and receives the
// updated x, y and sign, to be written to XMEM, YMEM and the SIGNXMEM being
// filled. Timing is that of mm: outputs are valid while te_valid is high.
// There are PB copies in the machine, all fed the same sign word. The
// MM-then-TE composition is that of the architecture; supplying x, y and h
// from outside, one spin per cycle, is this design's choice.
module mmte
  import sb_pkg::*;
#(
  parameter int unsigned N      = 800,
  parameter int unsigned PC     = 16,
  parameter int unsigned PR     = 4,
  parameter int unsigned PB     = 4,
  parameter int unsigned JBITS  = 8,
  parameter int unsigned HBITS  = 16,
  parameter int unsigned ACCW   = JBITS + $clog2(N) + 1,
  parameter int unsigned WORDS  = N / PC,
  parameter int unsigned GROUPS = N / (PB * PR),
  parameter int unsigned DEPTH  = GROUPS * WORDS,
  parameter int unsigned GW     = (GROUPS > 1) ? $clog2(GROUPS) : 1,
  parameter int unsigned RW     = (PR > 1) ? $clog2(PR) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      req_valid,
  input  logic                      req_first,
  input  logic                      req_last,
  input  logic [$clog2(DEPTH)-1:0]  j_raddr,
  input  logic [GW-1:0]             req_grp,
  input  logic [PC-1:0]             signs,
  input  logic                      j_we,
  input  logic [RW-1:0]             j_wbank,
  input  logic [$clog2(DEPTH)-1:0]  j_waddr,
  input  logic [PC*JBITS-1:0]       j_wdata,
  input  logic [AW-1:0]             a,
  input  sb_cfg_t                   cfg,
  input  logic signed [XW-1:0]      x,
  input  logic signed [XW-1:0]      y,
  input  logic signed [HBITS-1:0]   h,
  output logic                      res_ready,
  output logic [GW-1:0]             res_grp,
  output logic                      te_valid,
  output logic [RW-1:0]             te_r,
  output logic [GW-1:0]             te_grp,
  output logic signed [XW-1:0]      x_new,
  output logic signed [XW-1:0]      y_new,
  output logic                      sgn_new
);

  logic signed [ACCW-1:0] te_acc;

  mm #(.N(N), .PC(PC), .PR(PR), .PB(PB), .JBITS(JBITS), .ACCW(ACCW)) u_mm (
    .clk, .rst_n, .req_valid, .req_first, .req_last, .j_raddr, .req_grp,
    .signs, .j_we, .j_wbank, .j_waddr, .j_wdata,
    .res_ready, .res_grp, .te_valid, .te_r, .te_grp, .te_acc
  );

  dp #(.ACCW(ACCW), .HBITS(HBITS)) u_dp (
    .x, .y, .h, .acc(te_acc), .a, .cfg,
    .x_new, .y_new, .sgn_out(sgn_new)
  );

endmodule
