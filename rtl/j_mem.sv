// j_mem: one J_Pr coupling-coefficient bank.
//
// Each word holds PC signed coefficients of JBITS bits, i.e. PC*JBITS bits,
// the width the architecture gives the path from a J bank to its MAC unit.
// The bank of MAC r in MMTE b holds the matrix rows i with
// i % (PB*PR) == b*PR + r; word g*WORDS + w holds J[i][w*PC +: PC] of the
// g-th such row (WORDS = N/PC). Coefficient l of a word sits in bits
// [l*JBITS +: JBITS]. Synchronous read, one write port for loading. The word
// width and the 8-bit coefficients follow the architecture; the row-to-bank
// mapping, two's-complement coding and the load port are this design's.
module j_mem #(
  parameter int unsigned DEPTH = 2500,
  parameter int unsigned PC    = 16,
  parameter int unsigned JBITS = 8
) (
  input  logic                       clk,
  input  logic [$clog2(DEPTH)-1:0]   raddr,
  output logic [PC*JBITS-1:0]        rdata,
  input  logic                       we,
  input  logic [$clog2(DEPTH)-1:0]   waddr,
  input  logic [PC*JBITS-1:0]        wdata
);

  logic [PC*JBITS-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    rdata <= mem[raddr];
    if (we) mem[waddr] <= wdata;
  end

endmodule
