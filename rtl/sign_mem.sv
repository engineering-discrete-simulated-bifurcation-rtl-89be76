// sign_mem: one SIGNXMEM, the memory of the signs of the oscillator
// positions.
//
// ROWS rows of PC bits; bit l of row r is 1 when x of spin r*PC + l is
// negative. A row is the PC-bit word that the MM blocks consume per cycle.
// Synchronous read (data one cycle after the address) and a bit-masked
// write port, so that the PB time-evolution datapaths can each store the
// sign of the spin they just updated into the same row in one cycle.
// The 1-means-negative encoding and the masked write are this design's
// choices.
module sign_mem #(
  parameter int unsigned ROWS = 50,
  parameter int unsigned PC   = 16
) (
  input  logic                    clk,
  input  logic [$clog2(ROWS)-1:0] raddr,
  output logic [PC-1:0]           rdata,
  input  logic                    we,
  input  logic [$clog2(ROWS)-1:0] waddr,
  input  logic [PC-1:0]           wmask,
  input  logic [PC-1:0]           wdata
);

  logic [PC-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    rdata <= mem[raddr];
    if (we) mem[waddr] <= (mem[waddr] & ~wmask) | (wdata & wmask);
  end

endmodule
