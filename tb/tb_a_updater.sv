// tb_a_updater: a must clear, hold without step, and grow by da per step.
module tb_a_updater;
  import sb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, clear, step;
  logic [AW-1:0] da, a;
  longint exp;
  int checks = 0, failures = 0;

  a_updater dut (.*);

  task automatic chk(longint e);
    checks++;
    if (longint'(a) != e) begin failures++; $display("MISMATCH a=%0d exp %0d", a, e); end
  endtask

  initial begin
    rst_n = 0; clear = 0; step = 0; da = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(0);
    for (int run = 0; run < 3; run++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0; exp = 0; chk(0);
      da = AW'($urandom % 40000);
      for (int k = 0; k < 50; k++) begin
        step = ($urandom % 3 != 0);
        @(negedge clk);
        if (step) exp = (exp + longint'(da)) % (longint'(1) << AW);
        step = 0;
        chk(exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
