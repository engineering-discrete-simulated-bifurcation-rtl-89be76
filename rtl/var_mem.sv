// var_mem: oscillator variable memory (XMEM, YMEM, and the single-spin
// coefficient memory HMEM).
//
// ROWS rows of LANES variables, W bits each; spin i lives in row i / LANES,
// lane i % LANES, as in the "N/Pc rows, Pc vars" organisation of the
// architecture. One synchronous read port returns a whole row one cycle after
// the address. One write port writes any subset of the lanes of one row
// (per-lane mask), so several time-evolution datapaths can store their
// results into the same row in the same cycle. Read-before-write: a read and
// a write of the same row in the same cycle return the old contents.
// The lane-masked write port is this design's choice.
module var_mem #(
  parameter int unsigned ROWS  = 50,
  parameter int unsigned LANES = 16,
  parameter int unsigned W     = 16
) (
  input  logic                      clk,
  input  logic [$clog2(ROWS)-1:0]   raddr,
  output logic [LANES-1:0][W-1:0]   rdata,
  input  logic                      we,
  input  logic [$clog2(ROWS)-1:0]   waddr,
  input  logic [LANES-1:0]          wmask,
  input  logic [LANES-1:0][W-1:0]   wdata
);

  logic [W-1:0] mem [ROWS][LANES];

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      rdata[l] <= mem[raddr][l];
      if (we && wmask[l]) mem[waddr][l] <= wdata[l];
    end
  end

endmodule
