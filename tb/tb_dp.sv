// tb_dp: the time-evolution datapath against the integer reference model for
// random operands in both modes (heat off/on), and directed cases: a wall
// hit on each side (x clamped to +-1, y zeroed), no update when everything is
// zero, and the sign output.
module tb_dp;
  import sb_pkg::*;
  import sb_ref_pkg::*;
  localparam int unsigned ACCW = 19, HBITS = 16;
  logic signed [XW-1:0] x, y, x_new, y_new;
  logic signed [HBITS-1:0] h;
  logic signed [ACCW-1:0] acc;
  logic [AW-1:0] a;
  sb_cfg_t cfg;
  logic sgn_out;
  int checks = 0, failures = 0, walls = 0;

  dp #(.ACCW(ACCW), .HBITS(HBITS)) dut (.*);

  task automatic run_one();
    longint xn, yn;
    bit w;
    #1;
    w = dp_ref(longint'(x), longint'(y), longint'(acc), longint'(h), longint'(a), cfg, xn, yn);
    if (w) walls++;
    checks += 3;
    if (longint'(x_new) != xn || longint'(y_new) != yn || sgn_out != (xn < 0)) begin
      failures++;
      $display("MISMATCH x=%0d y=%0d acc=%0d h=%0d a=%0d: got %0d %0d exp %0d %0d",
               x, y, acc, h, a, x_new, y_new, xn, yn);
    end
  endtask

  initial begin
    // directed: wall on the positive side
    cfg = '0; cfg.dt = PW'(4096); cfg.c0_shift = 0; cfg.heat = 0;
    x = XW'(4000); y = XW'(2000); acc = '0; h = '0; a = AW'(1 << AFRAC);
    #1; checks += 2;
    if (x_new != XW'(4096) || y_new != '0) begin failures++; $display("positive wall failed"); end
    run_one();
    // wall on the negative side
    x = -XW'(4000); y = -XW'(2000);
    #1; checks += 2;
    if (x_new != -XW'(4096) || y_new != '0 || !sgn_out) begin failures++; $display("negative wall failed"); end
    // field only: y' = dt * c0 * (acc + h) with a = 1
    x = '0; y = '0; acc = 19'(10); h = 16'(-2); cfg.c0_shift = 3; cfg.dt = PW'(2048);
    #1; checks++;
    if (y_new != XW'(2048)) begin failures++; $display("field term failed: %0d", y_new); end
    // random
    for (int k = 0; k < 4000; k++) begin
      x   = XW'(int'($urandom % 8193) - 4096);
      y   = XW'(int'($urandom % 8001) - 4000);
      acc = ACCW'(int'($urandom % 4001) - 2000);
      h   = HBITS'(int'($urandom % 201) - 100);
      a   = AW'($urandom % ((1 << AFRAC) + 1));
      cfg.dt = PW'($urandom % 6000);
      cfg.gamma = PW'($urandom % 2000);
      cfg.c0_shift = C0W'($urandom % 10);
      cfg.heat = $urandom % 2;
      cfg.da = AW'($urandom);
      run_one();
    end
    checks++;
    if (walls == 0) begin failures++; $display("no wall hit in random cases"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
