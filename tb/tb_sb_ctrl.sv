// tb_sb_ctrl: the sequencer with N=32, PC=8, PR=2, PB=2 (4 words per row,
// 8 row groups). A model of the pipeline returns te_last PR+2 cycles after
// the last request of the last group. Checked: the request stream (first,
// last, word and coupling addresses, group), the drain stall and its length,
// iter_end/clear/done pulses, the iteration count and the total run length;
// also a start with n_iter = 0.
module tb_sb_ctrl;
  localparam int unsigned N = 32, PC = 8, PR = 2, PB = 2;
  localparam int unsigned WORDS = N / PC, GROUPS = N / (PB * PR), DEPTH = GROUPS * WORDS;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start, te_last, req_valid, req_first, req_last, clear, iter_end, busy, done, draining;
  logic [15:0] n_iter, iter;
  logic [$clog2(DEPTH)-1:0] j_raddr;
  logic [$clog2(WORDS)-1:0] s_raddr;
  logic [$clog2(GROUPS)-1:0] req_grp;
  int checks = 0, failures = 0;
  int pend [$];
  int cyc = 0;

  sb_ctrl #(.N(N), .PC(PC), .PR(PR), .PB(PB)) dut (.*);

  task automatic chk(string w, longint g, longint e);
    checks++;
    if (g != e) begin failures++; if (failures < 20) $display("MISMATCH %s got %0d exp %0d (cycle %0d)", w, g, e, cyc); end
  endtask

  // pipeline model: te_last PR+2 cycles after the last request of the last group
  always @(posedge clk) begin
    cyc++;
    if (req_valid && req_last && req_grp == $bits(req_grp)'(GROUPS - 1)) pend.push_back(cyc + PR + 2);
  end
  assign te_last = (pend.size() > 0) && (pend[0] == cyc + 1);
  always @(posedge clk) if (pend.size() > 0 && pend[0] == cyc) void'(pend.pop_front());

  initial begin
    rst_n = 0; start = 0; n_iter = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // n_iter = 0: immediate done
    @(negedge clk); start = 1; n_iter = 0; #1;
    chk("done on zero", longint'(done), 1);
    @(negedge clk); start = 0; #1;
    chk("idle after zero", longint'(busy), 0);
    for (int run = 0; run < 2; run++) begin
      int nit, c0, ends, drains;
      nit = 2 + run;
      @(negedge clk); start = 1; n_iter = 16'(nit); #1;
      chk("clear", longint'(clear), 1);
      @(negedge clk); start = 0;
      c0 = cyc; ends = 0;
      for (int k = 0; k < nit; k++) begin
        for (int g = 0; g < GROUPS; g++)
          for (int w = 0; w < WORDS; w++) begin
            #1;
            chk("req_valid", longint'(req_valid), 1);
            chk("first", longint'(req_first), longint'(w == 0));
            chk("last", longint'(req_last), longint'(w == WORDS - 1));
            chk("s_raddr", longint'(s_raddr), w);
            chk("j_raddr", longint'(j_raddr), g * WORDS + w);
            chk("grp", longint'(req_grp), g);
            chk("iter", longint'(iter), k);
            @(negedge clk);
          end
        drains = 0;
        while (!iter_end) begin
          #1;
          chk("no request while draining", longint'(req_valid), 0);
          chk("draining", longint'(draining), 1);
          drains++;
          @(negedge clk);
          #1;
        end
        chk("drain length", drains, PR + 1);
        chk("done at last iteration end", longint'(done), longint'(k == nit - 1));
        ends++;
        @(negedge clk);
      end
      #1;
      chk("idle after run", longint'(busy), 0);
      chk("run length", cyc - c0, nit * (GROUPS * WORDS + PR + 2));
      chk("iteration ends", ends, nit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
