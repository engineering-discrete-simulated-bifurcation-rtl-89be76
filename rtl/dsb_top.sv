// dsb_top: FPGA-style Ising machine running discrete simulated bifurcation
// (dSB), optionally heated.
//
// N oscillators (one per spin) evolve for n_iter time steps. Per step, every
// spin needs the local field sum_j J[i][j]*sgn(x[j]) and then a time-evolution
// update of its momentum y and position x. PB MMTE blocks each compute PR
// rows at once (PR MAC units per MMTE), consuming PC coefficients of JBITS
// bits and PC sign bits per cycle. The sign word is read from one of two
// SIGNXMEMs and broadcast to all MMTEs; the new signs go to the other one.
// XMEM, YMEM and HMEM (single-spin coefficients h) hold N/PC rows of PC
// values; the PB*PR spins of a row group share one row, so the PB datapaths
// write their lanes of that row in the same cycle. The a updater raises the
// bifurcation parameter by da per step.
//
// Schedule: GROUPS = N/(PB*PR) row groups of WORDS = N/PC cycles each, the
// time evolution of a group (PR cycles) overlapping the next group's
// multiplication, plus a drain stall of PR+2 cycles per iteration:
// GROUPS*WORDS + PR + 2 cycles per iteration (2506 at the defaults).
//
// Host side, while idle (busy low): ld_we with ld_sel = LD_J writes word
// ld_addr of bank ld_r of MMTE ld_b (ld_data[PC*JBITS-1:0], coefficient l in
// bits [l*JBITS +: JBITS]); LD_X, LD_Y, LD_H write row ld_addr of XMEM, YMEM or
// HMEM (lane l in bits [l*XW +: XW] or [l*HBITS +: HBITS]); writing an XMEM
// row also writes its signs into the current SIGNXMEM. rd_addr reads row
// rd_addr of XMEM, YMEM and of the current SIGNXMEM, data one cycle later.
// start with n_iter starts a run; done pulses at its end. cfg must be
// held constant during a run.
//
// Follows the architecture: the MMTE/MM/MAC/TE/DP structure, the two
// SIGNXMEMs feeding a PC-bit bus, XMEM/YMEM organised as N/PC rows of PC
// variables, PC*JBITS-bit coefficient paths, 8-bit coefficients, no
// multipliers in the matrix-vector product, the a updater, the gamma, dt, c0
// and heat inputs and the handling of single-spin coefficients. This
// design's own choices: the sizes PC, PR, PB, the requirement that PB*PR
// divides PC, the fixed-point formats, the host interface, the sequencing
// and the separate HMEM.
module dsb_top
  import sb_pkg::*;
#(
  parameter int unsigned N      = N_DEF,
  parameter int unsigned PC     = PC_DEF,
  parameter int unsigned PR     = PR_DEF,
  parameter int unsigned PB     = PB_DEF,
  parameter int unsigned JBITS  = JBITS_DEF,
  parameter int unsigned HBITS  = HBITS_DEF,
  parameter int unsigned ITW    = 16,
  parameter int unsigned WORDS  = N / PC,
  parameter int unsigned GROUPS = N / (PB * PR),
  parameter int unsigned DEPTH  = GROUPS * WORDS,
  parameter int unsigned LDW    = PC * ((XW > JBITS) ? ((XW > HBITS) ? XW : HBITS)
                                                     : ((JBITS > HBITS) ? JBITS : HBITS)),
  parameter int unsigned BW     = (PB > 1) ? $clog2(PB) : 1,
  parameter int unsigned RW     = (PR > 1) ? $clog2(PR) : 1,
  parameter int unsigned GW     = (GROUPS > 1) ? $clog2(GROUPS) : 1,
  parameter int unsigned ROWW   = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // host load
  input  logic                      ld_we,
  input  ld_sel_e                   ld_sel,
  input  logic [BW-1:0]             ld_b,
  input  logic [RW-1:0]             ld_r,
  input  logic [$clog2(DEPTH)-1:0]  ld_addr,
  input  logic [LDW-1:0]            ld_data,
  // host read-back
  input  logic [ROWW-1:0]           rd_addr,
  output logic [PC-1:0][XW-1:0]     rd_x,
  output logic [PC-1:0][XW-1:0]     rd_y,
  output logic [PC-1:0]             rd_sign,
  // run control
  input  sb_cfg_t                   cfg,
  input  logic                      start,
  input  logic [ITW-1:0]            n_iter,
  output logic                      busy,
  output logic                      done,
  output logic [ITW-1:0]            iter,
  output logic [AW-1:0]             a,
  output logic                      draining
);

  localparam int unsigned GPR     = PB * PR;      // spins per row group
  localparam int unsigned GPERROW = PC / GPR;     // row groups per memory row

  // ---------------------------------------------------------------- control
  logic                     req_valid, req_first, req_last, clear, iter_end;
  logic [$clog2(DEPTH)-1:0] j_raddr;
  logic [ROWW-1:0]          s_raddr;
  logic [GW-1:0]            req_grp;
  logic                     te_last;

  sb_ctrl #(.N(N), .PC(PC), .PR(PR), .PB(PB), .ITW(ITW)) u_ctrl (
    .clk, .rst_n, .start, .n_iter, .te_last,
    .req_valid, .req_first, .req_last, .j_raddr, .s_raddr, .req_grp,
    .clear, .iter_end, .busy, .done, .draining, .iter
  );

  a_updater u_a (.clk, .rst_n, .clear, .step(iter_end), .da(cfg.da), .a);

  // ------------------------------------------------------------ MMTE blocks
  logic [PC-1:0]          signs;
  logic [GW-1:0]          res_grp   [PB];
  logic                   te_valid  [PB];
  logic [RW-1:0]          te_r      [PB];
  logic [GW-1:0]          te_grp    [PB];
  logic signed [XW-1:0]   x_in [PB], y_in [PB], x_new [PB], y_new [PB];
  logic signed [HBITS-1:0] h_in [PB];
  logic                   sgn_new [PB];

  logic [PC-1:0][XW-1:0]    xrow, yrow;
  logic [PC-1:0][HBITS-1:0] hrow;

  logic                  ld_ok;
  assign ld_ok = ld_we && !busy;

  for (genvar b = 0; b < PB; b++) begin : g_mmte
    mmte #(.N(N), .PC(PC), .PR(PR), .PB(PB), .JBITS(JBITS), .HBITS(HBITS)) u_mmte (
      .clk, .rst_n,
      .req_valid, .req_first, .req_last, .j_raddr, .req_grp, .signs,
      .j_we    (ld_ok && ld_sel == LD_J && ld_b == BW'(b)),
      .j_wbank (ld_r),
      .j_waddr (ld_addr),
      .j_wdata (ld_data[PC*JBITS-1:0]),
      .a, .cfg,
      .x (x_in[b]), .y (y_in[b]), .h (h_in[b]),
      .res_ready (), .res_grp (res_grp[b]),
      .te_valid (te_valid[b]), .te_r (te_r[b]), .te_grp (te_grp[b]),
      .x_new (x_new[b]), .y_new (y_new[b]), .sgn_new (sgn_new[b])
    );
  end

  // All MMTEs run in lockstep; block 0 provides the timing of the TE stage.
  logic [ROWW-1:0] te_row;
  logic [$clog2(PC)-1:0] te_base;
  assign te_row  = ROWW'(int'(res_grp[0]) / GPERROW);
  assign te_base = $clog2(PC)'((int'(te_grp[0]) % GPERROW) * GPR);
  assign te_last = te_valid[0] && te_r[0] == RW'(PR - 1) && te_grp[0] == GW'(GROUPS - 1);

  // lane selection towards the datapaths, lane write-back towards the memories
  logic [PC-1:0]            v_wmask, s_wdata;
  logic [PC-1:0][XW-1:0]    x_wdata, y_wdata;
  always_comb begin
    for (int b = 0; b < PB; b++) begin
      int unsigned lane;
      lane    = int'(te_base) + b * PR + int'(te_r[0]);
      x_in[b] = xrow[lane];
      y_in[b] = yrow[lane];
      h_in[b] = hrow[lane];
    end
  end
  always_comb begin
    v_wmask = '0;
    s_wdata = '0;
    x_wdata = '0;
    y_wdata = '0;
    for (int b = 0; b < PB; b++) begin
      int unsigned lane;
      lane    = int'(te_base) + b * PR + int'(te_r[0]);
      if (te_valid[0]) v_wmask[lane] = 1'b1;
      x_wdata[lane] = x_new[b];
      y_wdata[lane] = y_new[b];
      s_wdata[lane] = sgn_new[b];
    end
  end

  // ---------------------------------------------------------------- memories
  logic [ROWW-1:0]       v_raddr;
  logic                  v_busy_we;
  logic [PC-1:0][XW-1:0] ld_xrow;
  logic [PC-1:0]         ld_signs;
  logic [ROWW-1:0]       ld_row;

  assign v_raddr   = busy ? te_row : rd_addr;
  assign v_busy_we = busy && te_valid[0];
  assign ld_xrow   = ld_data[PC*XW-1:0];
  assign ld_row    = ROWW'(ld_addr);
  always_comb for (int l = 0; l < PC; l++) ld_signs[l] = ld_xrow[l][XW-1];

  var_mem #(.ROWS(WORDS), .LANES(PC), .W(XW)) u_xmem (
    .clk, .raddr(v_raddr), .rdata(xrow),
    .we    (v_busy_we || (ld_ok && ld_sel == LD_X)),
    .waddr (busy ? te_row : ld_row),
    .wmask (busy ? v_wmask : '1),
    .wdata (busy ? x_wdata : ld_xrow)
  );

  var_mem #(.ROWS(WORDS), .LANES(PC), .W(XW)) u_ymem (
    .clk, .raddr(v_raddr), .rdata(yrow),
    .we    (v_busy_we || (ld_ok && ld_sel == LD_Y)),
    .waddr (busy ? te_row : ld_row),
    .wmask (busy ? v_wmask : '1),
    .wdata (busy ? y_wdata : ld_data[PC*XW-1:0])
  );

  var_mem #(.ROWS(WORDS), .LANES(PC), .W(HBITS)) u_hmem (
    .clk, .raddr(v_raddr), .rdata(hrow),
    .we    (ld_ok && ld_sel == LD_H),
    .waddr (ld_row),
    .wmask ('1),
    .wdata (ld_data[PC*HBITS-1:0])
  );

  signx_dbuf #(.ROWS(WORDS), .PC(PC)) u_signx (
    .clk, .rst_n,
    .swap      (iter_end),
    .raddr     (busy ? s_raddr : rd_addr),
    .rdata     (signs),
    .we        (v_busy_we),
    .waddr     (te_row),
    .wmask     (v_wmask),
    .wdata     (s_wdata),
    .init_we   (ld_ok && ld_sel == LD_X),
    .init_addr (ld_row),
    .init_data (ld_signs),
    .cur       ()
  );

  assign rd_x    = xrow;
  assign rd_y    = yrow;
  assign rd_sign = signs;

  // -------------------------------------------------------------- checks
  initial begin
    assert (N % PC == 0) else $error("N must be a multiple of PC");
    assert (PC % GPR == 0) else $error("PB*PR must divide PC");
    assert (PR < WORDS) else $error("PR must be below N/PC");
  end
  assert property (@(posedge clk) disable iff (!rst_n) ld_we |-> !busy);

endmodule
