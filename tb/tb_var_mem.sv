// tb_var_mem: lane-masked writes to an XMEM/YMEM style memory against a
// model; whole-row reads are checked one cycle after their address,
// including reads of the row written in the same cycle (old contents).
module tb_var_mem;
  localparam int unsigned ROWS = 10, LANES = 8, W = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [$clog2(ROWS)-1:0] raddr, waddr;
  logic [LANES-1:0][W-1:0] rdata, wdata;
  logic [LANES-1:0] wmask;
  logic we;
  logic [W-1:0] model [ROWS][LANES];
  int checks = 0, failures = 0;

  var_mem #(.ROWS(ROWS), .LANES(LANES), .W(W)) dut (.*);

  initial begin
    we = 0; raddr = '0; waddr = '0; wmask = '0; wdata = '0;
    for (int i = 0; i < ROWS; i++) begin
      @(negedge clk); we = 1; waddr = $bits(waddr)'(i); wmask = '1;
      for (int l = 0; l < LANES; l++) begin wdata[l] = W'($urandom); model[i][l] = wdata[l]; end
    end
    for (int k = 0; k < 300; k++) begin
      int r, w;
      logic [W-1:0] exp [LANES];
      r = int'($urandom % ROWS);
      w = ($urandom % 4 == 0) ? r : int'($urandom % ROWS);
      @(negedge clk);
      raddr = $bits(raddr)'(r);
      exp = model[r];
      we = ($urandom % 2 == 0); waddr = $bits(waddr)'(w); wmask = LANES'($urandom);
      for (int l = 0; l < LANES; l++) begin
        wdata[l] = W'($urandom);
        if (we && wmask[l]) model[w][l] = wdata[l];
      end
      @(negedge clk);
      we = 0;
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (rdata[l] != exp[l]) begin failures++; $display("MISMATCH row %0d lane %0d", r, l); end
      end
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
