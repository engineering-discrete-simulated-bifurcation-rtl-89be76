// tb_dsb_top: end-to-end test of the dSB machine at reduced sizes.
//
// Two machines: N=64, PC=8, PR=2, PB=4 (one row group per memory row) and
// N=64, PC=16, PR=2, PB=2 (four row groups share a memory row). Each runs an
// unheated and a heated run of 40 steps against the integer reference of
// tb_dsb_harness, which also checks cycle counts and that every mechanism
// (drain stall, buffer swap, walls, heating, sign flips, h) occurred.
module tb_dsb_top;
  import sb_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks, failures;
  int ck [2], fl [2];
  logic fin [2];

`define DSB_PAIR(IDX, PN, PPC, PPR, PPB, PSEED) \
  begin : g_m``IDX \
    localparam int unsigned WORDS = PN / PPC; \
    localparam int unsigned GROUPS = PN / (PPB * PPR); \
    localparam int unsigned DEPTH = GROUPS * WORDS; \
    logic rst_n, ld_we, start, busy, done, draining; \
    ld_sel_e ld_sel; \
    logic [((PPB > 1) ? $clog2(PPB) : 1)-1:0] ld_b; \
    logic [((PPR > 1) ? $clog2(PPR) : 1)-1:0] ld_r; \
    logic [$clog2(DEPTH)-1:0] ld_addr; \
    logic [PPC*16-1:0] ld_data; \
    logic [$clog2(WORDS)-1:0] rd_addr; \
    logic [PPC-1:0][XW-1:0] rd_x, rd_y; \
    logic [PPC-1:0] rd_sign; \
    sb_cfg_t cfg; \
    logic [15:0] n_iter, iter; \
    logic [AW-1:0] a; \
    dsb_top #(.N(PN), .PC(PPC), .PR(PPR), .PB(PPB)) u_dut (.*); \
    tb_dsb_harness #(.N(PN), .PC(PPC), .PR(PPR), .PB(PPB), .SEED(PSEED)) u_h ( \
      .*, .finished(fin[IDX]), .checks(ck[IDX]), .failures(fl[IDX])); \
  end

  if (1) `DSB_PAIR(0, 64, 8, 2, 4, 11)
  if (1) `DSB_PAIR(1, 64, 16, 2, 2, 23)

  initial begin
    repeat (2) @(posedge clk);
    wait (fin[0] && fin[1]);
    checks   = ck[0] + ck[1];
    failures = fl[0] + fl[1];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ck[0] + ck[1], fl[0] + fl[1] + 1);
    $finish;
  end
endmodule
