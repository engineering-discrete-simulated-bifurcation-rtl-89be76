// tb_mmte: one MMTE block (N=32, PC=8, PR=2, PB=2) as block 1 of 2. Its
// coupling banks get a random matrix; all row groups are requested back to
// back with a random sign vector, while the test supplies x, y and h of the
// spin being updated. Each update (x, y, sign) is compared with the integer
// reference applied to the dot product computed here, in both heat modes,
// and the update timing (3..PR+2 cycles after the last request) is checked.
module tb_mmte;
  import sb_pkg::*;
  import sb_ref_pkg::*;
  localparam int unsigned N = 32, PC = 8, PR = 2, PB = 2, JBITS = 8, B = 1;
  localparam int unsigned WORDS = N / PC, GROUPS = N / (PB * PR), DEPTH = GROUPS * WORDS;
  localparam int unsigned ACCW = JBITS + $clog2(N) + 1;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, req_valid, req_first, req_last, j_we, res_ready, te_valid;
  logic [$clog2(DEPTH)-1:0] j_raddr, j_waddr;
  logic [$clog2(GROUPS)-1:0] req_grp, res_grp, te_grp;
  logic [PC-1:0] signs;
  logic [$clog2(PR)-1:0] j_wbank, te_r;
  logic [PC*JBITS-1:0] j_wdata;
  logic [AW-1:0] a;
  sb_cfg_t cfg;
  logic signed [XW-1:0] x, y, x_new, y_new;
  logic signed [15:0] h;
  logic sgn_new;
  longint X [N], Y [N], H [N];
  int J [N][N];
  bit s [N];
  int checks = 0, failures = 0, cyc = 0, seen = 0;
  int last_cyc [GROUPS];

  mmte #(.N(N), .PC(PC), .PR(PR), .PB(PB), .JBITS(JBITS)) dut (.*);

  always_comb begin
    int i;
    i = int'(te_grp) * PB * PR + B * PR + int'(te_r);
    x = XW'(X[i]);
    y = XW'(Y[i]);
    h = 16'(H[i]);
  end

  task automatic chk(string w, longint g, longint e);
    checks++;
    if (g != e) begin failures++; if (failures < 20) $display("MISMATCH %s got %0d exp %0d", w, g, e); end
  endtask

  // sign memory model: word of the request, one cycle later
  always @(posedge clk) begin
    for (int l = 0; l < PC; l++) signs[l] <= s[int'(j_raddr % WORDS) * PC + l];
    if (req_valid && req_last) last_cyc[req_grp] = cyc;
    cyc++;
  end

  always @(negedge clk) if (rst_n) begin
    if (res_ready) chk("res_ready timing", cyc - last_cyc[res_grp], 2);
    if (te_valid) begin
      int i;
      longint e;
      i = int'(te_grp) * PB * PR + B * PR + int'(te_r);
      e = 0;
      for (int j = 0; j < N; j++) e += s[j] ? -J[i][j] : J[i][j];
      begin
        longint xn, yn;
        void'(dp_ref(X[i], Y[i], e, H[i], longint'(a), cfg, xn, yn));
        chk("x_new", longint'(x_new), xn);
        chk("y_new", longint'(y_new), yn);
        chk("sgn_new", longint'(sgn_new), longint'(xn < 0));
      end
      chk("te timing", cyc - last_cyc[te_grp], 3 + te_r);
      seen++;
    end
  end

  initial begin
    rst_n = 0; req_valid = 0; req_first = 0; req_last = 0; j_raddr = '0; req_grp = '0;
    j_we = 0; j_waddr = '0; j_wbank = '0; j_wdata = '0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) J[i][j] = int'($urandom % 256) - 128;
    for (int i = 0; i < N; i++) begin
      X[i] = longint'(int'($urandom % 8001) - 4000);
      Y[i] = longint'(int'($urandom % 4001) - 2000);
      H[i] = longint'(int'($urandom % 201) - 100);
    end
    a = AW'(300000);
    cfg = '0; cfg.dt = PW'(1500); cfg.gamma = PW'(900); cfg.c0_shift = C0W'(6);
    repeat (2) @(negedge clk);
    rst_n = 1;
    // load the rows that belong to block B
    for (int g = 0; g < GROUPS; g++)
      for (int r = 0; r < PR; r++)
        for (int w = 0; w < WORDS; w++) begin
          int i;
          i = g * PB * PR + B * PR + r;
          @(negedge clk);
          j_we = 1; j_wbank = $bits(j_wbank)'(r); j_waddr = $bits(j_waddr)'(g * WORDS + w);
          for (int l = 0; l < PC; l++) j_wdata[l*JBITS +: JBITS] = JBITS'(J[i][w*PC + l]);
        end
    @(negedge clk); j_we = 0;
    for (int pass = 0; pass < 3; pass++) begin
      for (int j = 0; j < N; j++) s[j] = $urandom % 2;
      cfg.heat = (pass == 1);
      for (int g = 0; g < GROUPS; g++)
        for (int w = 0; w < WORDS; w++) begin
          req_valid = 1; req_first = (w == 0); req_last = (w == WORDS - 1);
          j_raddr = $bits(j_raddr)'(g * WORDS + w); req_grp = $bits(req_grp)'(g);
          @(negedge clk);
        end
      req_valid = 0; req_first = 0; req_last = 0;
      repeat (PR + 4) @(negedge clk);
    end
    chk("results handed over", seen, 3 * GROUPS * PR);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
