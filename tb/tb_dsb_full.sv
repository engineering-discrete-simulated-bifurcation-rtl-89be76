// tb_dsb_full: the dSB machine at its default size (N = 800 spins, PC = 16,
// PR = 4, PB = 4, 8-bit couplings) on a max-cut instance shaped like the
// 800-node G-set graphs: a random graph with about 6 % edge density and
// weights +-1, coupling J = -w. Two runs of 300 steps (unheated, then
// heated) are checked bit for bit against the integer reference in
// tb_dsb_harness, with cycle counts; the cut value reached is printed.
module tb_dsb_full;
  import sb_pkg::*;

  localparam int unsigned N = N_DEF, PC = PC_DEF, PR = PR_DEF, PB = PB_DEF;
  localparam int unsigned WORDS = N / PC;
  localparam int unsigned GROUPS = N / (PB * PR);
  localparam int unsigned DEPTH = GROUPS * WORDS;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, ld_we, start, busy, done, draining;
  ld_sel_e ld_sel;
  logic [$clog2(PB)-1:0] ld_b;
  logic [$clog2(PR)-1:0] ld_r;
  logic [$clog2(DEPTH)-1:0] ld_addr;
  logic [PC*16-1:0] ld_data;
  logic [$clog2(WORDS)-1:0] rd_addr;
  logic [PC-1:0][XW-1:0] rd_x, rd_y;
  logic [PC-1:0] rd_sign;
  sb_cfg_t cfg;
  logic [15:0] n_iter, iter;
  logic [AW-1:0] a;
  logic fin;
  int checks, failures;

  dsb_top u_dut (.*);

  tb_dsb_harness #(.N(N), .PC(PC), .PR(PR), .PB(PB), .NITER(300), .JMAX(1),
                   .DENS(6), .NOZERO(1), .HZERO(1), .C0SH(4), .SEED(7)) u_h (
    .*, .finished(fin), .checks(checks), .failures(failures));

  initial begin
    repeat (2) @(posedge clk);
    wait (fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
