// tb_j_mem: writes random words to a coupling bank, reads them back in
// random order and checks data and the one-cycle read latency.
module tb_j_mem;
  localparam int unsigned DEPTH = 40, PC = 4, JBITS = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [$clog2(DEPTH)-1:0] raddr, waddr;
  logic [PC*JBITS-1:0] rdata, wdata;
  logic we;
  logic [PC*JBITS-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  j_mem #(.DEPTH(DEPTH), .PC(PC), .JBITS(JBITS)) dut (.*);

  initial begin
    we = 0; raddr = '0; waddr = '0; wdata = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = $bits(waddr)'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 200; k++) begin
      int i;
      i = int'($urandom % DEPTH);
      raddr = $bits(raddr)'(i);
      if ($urandom % 2 == 0) begin  // overwrite another word meanwhile
        int o;
        o = int'($urandom % DEPTH);
        if (o != i) begin we = 1; waddr = $bits(waddr)'(o); wdata = $urandom; model[o] = wdata; end
      end
      @(negedge clk);
      we = 0;
      checks++;
      if (rdata != model[i]) begin failures++; $display("MISMATCH addr %0d", i); end
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
