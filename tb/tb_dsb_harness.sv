// tb_dsb_harness: drives one dsb_top through complete runs and checks them.
//
// It generates a random symmetric coupling matrix with zero diagonal
// (coefficients in [-JMAX, JMAX], density about 1/2), random single-spin
// coefficients and random small initial x and y, loads them through the host
// port, runs NRUNS runs of NITER steps (the first unheated, the second
// heated, the initial state reloaded before each), and after each run reads
// back every row of XMEM, YMEM and of the current SIGNXMEM and compares them
// with a step-by-step reference computed here with integer arithmetic. It
// also checks the run length (GROUPS*WORDS + PR + 2 cycles per step) and the
// final value of a, and counts the mechanisms exercised: drain stalls,
// sign-buffer swaps, wall hits, heated steps, sign flips and non-zero h.
module tb_dsb_harness
  import sb_pkg::*;
  import sb_ref_pkg::*;
#(
  parameter int unsigned N      = 64,
  parameter int unsigned PC     = 8,
  parameter int unsigned PR     = 2,
  parameter int unsigned PB     = 4,
  parameter int unsigned JBITS  = 8,
  parameter int unsigned HBITS  = 16,
  parameter int unsigned NITER  = 40,
  parameter int unsigned NRUNS  = 2,
  parameter int          JMAX   = 3,
  parameter int unsigned DENS   = 50,   // percent of non-zero couplings
  parameter bit          NOZERO = 0,    // draw couplings from +-[1, JMAX] only
  parameter bit          HZERO  = 0,    // no single-spin coefficients
  parameter int unsigned C0SH   = 3,
  parameter int unsigned SEED   = 1,
  parameter int unsigned ITW    = 16,
  parameter int unsigned WORDS  = N / PC,
  parameter int unsigned GROUPS = N / (PB * PR),
  parameter int unsigned DEPTH  = GROUPS * WORDS,
  parameter int unsigned LDW    = PC * 16,
  parameter int unsigned BW     = (PB > 1) ? $clog2(PB) : 1,
  parameter int unsigned RW     = (PR > 1) ? $clog2(PR) : 1,
  parameter int unsigned ROWW   = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                      clk,
  output logic                      rst_n,
  output logic                      ld_we,
  output ld_sel_e                   ld_sel,
  output logic [BW-1:0]             ld_b,
  output logic [RW-1:0]             ld_r,
  output logic [$clog2(DEPTH)-1:0]  ld_addr,
  output logic [LDW-1:0]            ld_data,
  output logic [ROWW-1:0]           rd_addr,
  input  logic [PC-1:0][XW-1:0]     rd_x,
  input  logic [PC-1:0][XW-1:0]     rd_y,
  input  logic [PC-1:0]             rd_sign,
  output sb_cfg_t                   cfg,
  output logic                      start,
  output logic [ITW-1:0]            n_iter,
  input  logic                      busy,
  input  logic                      done,
  input  logic [ITW-1:0]            iter,
  input  logic [AW-1:0]             a,
  input  logic                      draining,
  output logic                      finished,
  output int                        checks,
  output int                        failures
);

  localparam int unsigned GPR = PB * PR;

  int     J [N][N];
  longint h [N], x0 [N], y0 [N];
  longint xr [N], yr [N];
  bit     sr [N];
  int     n_drain, n_swap, n_wall, n_heat, n_flip, n_hnz;
  int     busy_cycles;
  logic   draining_q;
  int unsigned seed_dummy;

  always @(posedge clk) begin
    draining_q <= draining;
    if (busy) busy_cycles++;
    if (draining) n_drain++;
    if (draining_q && !draining) n_swap++;
  end

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("MISMATCH %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic load_all();
    // coupling banks
    for (int i = 0; i < N; i++) begin
      int g, br, b, r;
      g  = i / GPR;
      br = i % GPR;
      b  = br / PR;
      r  = br % PR;
      for (int w = 0; w < WORDS; w++) begin
        logic [LDW-1:0] d;
        d = '0;
        for (int l = 0; l < PC; l++) d[l*JBITS +: JBITS] = JBITS'(J[i][w*PC + l]);
        @(negedge clk);
        ld_we = 1; ld_sel = LD_J; ld_b = BW'(b); ld_r = RW'(r);
        ld_addr = $bits(ld_addr)'(g * WORDS + w); ld_data = d;
      end
    end
    // rows of H, X, Y
    for (int row = 0; row < WORDS; row++) begin
      logic [LDW-1:0] dh, dx, dy;
      dh = '0; dx = '0; dy = '0;
      for (int l = 0; l < PC; l++) begin
        dh[l*HBITS +: HBITS] = HBITS'(h[row*PC + l]);
        dx[l*XW +: XW] = XW'(x0[row*PC + l]);
        dy[l*XW +: XW] = XW'(y0[row*PC + l]);
      end
      @(negedge clk); ld_we = 1; ld_sel = LD_H; ld_addr = $bits(ld_addr)'(row); ld_data = dh;
      @(negedge clk); ld_we = 1; ld_sel = LD_X; ld_addr = $bits(ld_addr)'(row); ld_data = dx;
      @(negedge clk); ld_we = 1; ld_sel = LD_Y; ld_addr = $bits(ld_addr)'(row); ld_data = dy;
    end
    @(negedge clk); ld_we = 0;
  endtask

  task automatic ref_run(input sb_cfg_t c);
    for (int i = 0; i < N; i++) begin
      xr[i] = x0[i]; yr[i] = y0[i]; sr[i] = (x0[i] < 0);
    end
    for (int k = 0; k < NITER; k++) begin
      longint acc [N];
      longint av;
      av = longint'(k) * longint'(c.da);
      for (int i = 0; i < N; i++) begin
        acc[i] = 0;
        for (int j = 0; j < N; j++) acc[i] += sr[j] ? -J[i][j] : J[i][j];
      end
      for (int i = 0; i < N; i++) begin
        longint xn, yn;
        if (dp_ref(xr[i], yr[i], acc[i], h[i], av, c, xn, yn)) n_wall++;
        xr[i] = xn; yr[i] = yn;
      end
      for (int i = 0; i < N; i++) begin
        if (sr[i] != (xr[i] < 0)) n_flip++;
        sr[i] = (xr[i] < 0);
      end
      if (c.heat) n_heat++;
    end
  endtask

  task automatic compare_all(input int run);
    for (int row = 0; row < WORDS; row++) begin
      @(negedge clk); rd_addr = ROWW'(row);
      @(negedge clk);
      for (int l = 0; l < PC; l++) begin
        int i;
        i = row * PC + l;
        check($sformatf("run%0d x[%0d]", run, i), longint'(signed'(rd_x[l])), xr[i]);
        check($sformatf("run%0d y[%0d]", run, i), longint'(signed'(rd_y[l])), yr[i]);
        check($sformatf("run%0d s[%0d]", run, i), longint'(rd_sign[l]), longint'(sr[i]));
      end
    end
  endtask

  initial begin
    sb_cfg_t c;
    finished = 0; checks = 0; failures = 0;
    n_drain = 0; n_swap = 0; n_wall = 0; n_heat = 0; n_flip = 0; n_hnz = 0;
    busy_cycles = 0; draining_q = 0;
    seed_dummy = $urandom(SEED);
    rst_n = 0; ld_we = 0; ld_sel = LD_J; ld_b = '0; ld_r = '0; ld_addr = '0; ld_data = '0;
    rd_addr = '0; start = 0; n_iter = '0; cfg = '0;
    // problem
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) J[i][j] = 0;
    for (int i = 0; i < N; i++)
      for (int j = i + 1; j < N; j++)
        if ($urandom % 100 < DENS) begin
          J[i][j] = rnd(-JMAX, JMAX);
          if (NOZERO && J[i][j] == 0) J[i][j] = ($urandom % 2 == 0) ? -1 : 1;
          J[j][i] = J[i][j];
        end
    for (int i = 0; i < N; i++) begin
      h[i]  = (!HZERO && i % 4 == 0) ? longint'(rnd(-2 * JMAX, 2 * JMAX)) : 0;
      if (h[i] != 0) n_hnz++;
      x0[i] = longint'(rnd(-400, 400));
      y0[i] = longint'(rnd(-400, 400));
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < NRUNS; run++) begin
      int bc0;
      c.dt       = PW'(3072);            // 0.75
      c.gamma    = PW'(run == 0 ? 0 : 410); // 0.1
      c.c0_shift = C0W'(C0SH);
      c.heat     = (run % 2 == 1);
      c.da       = AW'((longint'(1) << AFRAC) / NITER);
      load_all();
      ref_run(c);
      cfg = c;
      bc0 = busy_cycles;
      @(negedge clk); start = 1; n_iter = ITW'(NITER);
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      check($sformatf("run%0d cycles", run), longint'(busy_cycles - bc0),
            longint'(NITER) * longint'(GROUPS * WORDS + PR + 2));
      check($sformatf("run%0d a", run), longint'(a), longint'(NITER) * longint'(c.da));
      check($sformatf("run%0d iter", run), longint'(iter), longint'(NITER - 1));
      compare_all(run);
      begin
        // cut value of the final spins for J = -w (max-cut form)
        longint cut;
        cut = 0;
        for (int i = 0; i < N; i++)
          for (int j = i + 1; j < N; j++)
            if (sr[i] != sr[j]) cut -= J[i][j];
        $display("run %0d (heat=%0d): %0d steps, cut value of the final spins = %0d",
                 run, c.heat, NITER, cut);
      end
    end
    // every mechanism must have occurred
    check("drain stalls seen", longint'(n_drain > 0), 1);
    check("buffer swaps", longint'(n_swap), longint'(NITER * NRUNS));
    check("wall hits seen", longint'(n_wall > 0), 1);
    check("heated steps seen", longint'(n_heat > 0), 1);
    check("sign flips seen", longint'(n_flip > 0), 1);
    if (!HZERO) check("nonzero h seen", longint'(n_hnz > 0), 1);
    $display("mechanisms: drain_cycles=%0d swaps=%0d wall_hits=%0d heated_steps=%0d sign_flips=%0d nonzero_h=%0d",
             n_drain, n_swap, n_wall, n_heat, n_flip, n_hnz);
    finished = 1;
  end

endmodule
