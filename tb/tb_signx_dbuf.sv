// tb_signx_dbuf: the two sign buffers. Initial rows go to the current
// buffer; masked writes go to the other one and stay invisible on the read
// bus until a swap; after the swap the written buffer is read and writes go
// to the former current one. A read issued in the cycle of a swap must
// still return the buffer it was issued to.
module tb_signx_dbuf;
  localparam int unsigned ROWS = 8, PC = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, swap, we, init_we, cur;
  logic [$clog2(ROWS)-1:0] raddr, waddr, init_addr;
  logic [PC-1:0] rdata, wmask, wdata, init_data;
  logic [PC-1:0] model [2][ROWS];
  logic mcur;
  int checks = 0, failures = 0;

  signx_dbuf #(.ROWS(ROWS), .PC(PC)) dut (.*);

  initial begin
    rst_n = 0; swap = 0; we = 0; init_we = 0; raddr = '0; waddr = '0; init_addr = '0;
    wmask = '0; wdata = '0; init_data = '0; mcur = 0;
    for (int b = 0; b < 2; b++) for (int r = 0; r < ROWS; r++) model[b][r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // clear both buffers through init + swap
    for (int b = 0; b < 2; b++) begin
      for (int r = 0; r < ROWS; r++) begin
        @(negedge clk); init_we = 1; init_addr = $bits(init_addr)'(r);
        init_data = PC'($urandom); model[mcur][r] = init_data;
      end
      @(negedge clk); init_we = 0; swap = 1; mcur = ~mcur;
      @(negedge clk); swap = 0;
    end
    for (int k = 0; k < 400; k++) begin
      int r;
      logic [PC-1:0] exp;
      r = int'($urandom % ROWS);
      @(negedge clk);
      raddr = $bits(raddr)'(r);
      exp = model[mcur][r];
      we = ($urandom % 2 == 0); waddr = $bits(waddr)'($urandom % ROWS);
      wmask = PC'($urandom); wdata = PC'($urandom);
      if (we) model[~mcur][waddr] = (model[~mcur][waddr] & ~wmask) | (wdata & wmask);
      swap = ($urandom % 8 == 0);
      @(negedge clk);
      if (swap) mcur = ~mcur;
      we = 0; swap = 0;
      checks += 2;
      if (rdata != exp) begin failures++; $display("MISMATCH row %0d got %h exp %h", r, rdata, exp); end
      if (cur != mcur) begin failures++; $display("MISMATCH cur"); end
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
