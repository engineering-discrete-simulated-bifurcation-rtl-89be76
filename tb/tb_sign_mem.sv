// tb_sign_mem: bit-masked writes to a sign memory against a model, with
// reads checked one cycle after their address, including a read of the row
// being written in the same cycle (old contents expected).
module tb_sign_mem;
  localparam int unsigned ROWS = 12, PC = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [$clog2(ROWS)-1:0] raddr, waddr;
  logic [PC-1:0] rdata, wmask, wdata;
  logic we;
  logic [PC-1:0] model [ROWS];
  int checks = 0, failures = 0;

  sign_mem #(.ROWS(ROWS), .PC(PC)) dut (.*);

  initial begin
    we = 0; raddr = '0; waddr = '0; wmask = '0; wdata = '0;
    for (int i = 0; i < ROWS; i++) begin
      @(negedge clk); we = 1; waddr = $bits(waddr)'(i); wmask = '1; wdata = PC'($urandom);
      model[i] = wdata;
    end
    for (int k = 0; k < 300; k++) begin
      int r, w;
      logic [PC-1:0] exp;
      r = int'($urandom % ROWS);
      w = ($urandom % 4 == 0) ? r : int'($urandom % ROWS);
      @(negedge clk);
      raddr = $bits(raddr)'(r);
      exp = model[r];
      we = ($urandom % 2 == 0); waddr = $bits(waddr)'(w); wmask = PC'($urandom); wdata = PC'($urandom);
      if (we) model[w] = (model[w] & ~wmask) | (wdata & wmask);
      @(negedge clk);
      we = 0;
      checks++;
      if (rdata != exp) begin failures++; $display("MISMATCH row %0d got %h exp %h", r, rdata, exp); end
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
