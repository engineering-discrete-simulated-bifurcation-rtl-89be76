// mac: sign-controlled accumulate unit of the matrix-vector multiplication.
//
// In discrete simulated bifurcation the vector multiplied by the coupling
// matrix holds only the signs of the positions, so each of the PC products
// J[i][j]*sgn(x[j]) of a word is J[i][j] or -J[i][j]: the unit adds or
// subtracts each coefficient (no multiplier) and accumulates the PC-term
// partial sums over the WORDS words of a matrix row.
//
// Interface: in_valid qualifies signs/jword; in_first marks the first word of
// a row (the accumulator restarts), in_last the last. One cycle after the
// in_last word, res_valid pulses and res holds the row's dot product; res then
// stays unchanged until the next row completes. Sign bit 1 means x < 0.
module mac #(
  parameter int unsigned PC    = 16,
  parameter int unsigned JBITS = 8,
  parameter int unsigned ACCW  = 19
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic                          in_first,
  input  logic                          in_last,
  input  logic [PC-1:0]                 signs,
  input  logic [PC*JBITS-1:0]           jword,
  output logic signed [ACCW-1:0]        res,
  output logic                          res_valid
);

  logic signed [ACCW-1:0] acc;
  logic signed [ACCW-1:0] partial;
  logic signed [ACCW-1:0] total;

  always_comb begin
    partial = '0;
    for (int l = 0; l < PC; l++) begin
      if (signs[l]) partial = partial - ACCW'(signed'(jword[l*JBITS +: JBITS]));
      else          partial = partial + ACCW'(signed'(jword[l*JBITS +: JBITS]));
    end
    total = in_first ? partial : acc + partial;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      res       <= '0;
      res_valid <= 1'b0;
    end else begin
      res_valid <= in_valid && in_last;
      if (in_valid) acc <= total;
      if (in_valid && in_last) res <= total;
    end
  end

endmodule
