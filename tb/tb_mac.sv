// tb_mac: checks the sign-controlled accumulate unit against sums computed
// here, for rows of random length with random coefficients and signs, with
// idle cycles between words, and checks that res_valid comes exactly one
// cycle after the last word and that res holds until the next row ends.
module tb_mac;
  localparam int unsigned PC = 8, JBITS = 8, ACCW = 20;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, in_first, in_last, res_valid;
  logic [PC-1:0] signs;
  logic [PC*JBITS-1:0] jword;
  logic signed [ACCW-1:0] res;
  int checks = 0, failures = 0;

  mac #(.PC(PC), .JBITS(JBITS), .ACCW(ACCW)) dut (.*);

  task automatic chk(string w, longint g, longint e);
    checks++;
    if (g != e) begin failures++; $display("MISMATCH %s got %0d exp %0d", w, g, e); end
  endtask

  initial begin
    rst_n = 0; in_valid = 0; in_first = 0; in_last = 0; signs = '0; jword = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int row = 0; row < 200; row++) begin
      int len;
      longint exp_sum;
      len = 1 + int'($urandom % 9);
      exp_sum = 0;
      for (int w = 0; w < len; w++) begin
        @(negedge clk);
        in_valid = 1; in_first = (w == 0); in_last = (w == len - 1);
        signs = PC'($urandom);
        for (int l = 0; l < PC; l++) begin
          int v;
          v = int'($urandom % 256) - 128;
          jword[l*JBITS +: JBITS] = JBITS'(v);
          exp_sum += signs[l] ? -v : v;
        end
        if ($urandom % 3 == 0 && w != len - 1) begin
          @(negedge clk); in_valid = 0; in_first = 0; in_last = 0;
        end
      end
      @(negedge clk);
      in_valid = 0; in_first = 0; in_last = 0;
      chk("res_valid after last", longint'(res_valid), 1);
      chk("res", longint'(res), exp_sum);
      @(negedge clk);
      chk("res_valid single pulse", longint'(res_valid), 0);
      chk("res held", longint'(res), exp_sum);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
