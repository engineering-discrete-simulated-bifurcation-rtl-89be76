// a_updater: schedule of the bifurcation parameter a(t).
//
// A register a and an adder: a is cleared when a run starts and grows by da
// at the end of every iteration, a(k) = k*da, so a rises linearly from 0
// (towards a0 = 1 when da = 1/iterations). The register and the adder are as
// the architecture draws them; clearing on start and the absence of
// saturation (da is the host's choice) are this design's choices.
module a_updater
  import sb_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          step,
  input  logic [AW-1:0] da,
  output logic [AW-1:0] a
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     a <= '0;
    else if (clear) a <= '0;
    else if (step)  a <= a + da;
  end

endmodule
