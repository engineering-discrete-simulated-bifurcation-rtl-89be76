// mm: Matrix-vector Multiplication block of one MMTE.
//
// PR coupling banks (j_mem) each feed one MAC unit, so PR matrix rows are
// worked on at once, each MAC consuming PC coefficients and the PC matching
// sign bits per cycle. After the last word of the rows, the PR results are
// handed one per cycle to the time-evolution datapath through a selector.
//
// Timing: the sequencer presents a word request (req_valid/first/last,
// j_raddr, grp) in cycle t; the bank and the sign memory answer in t+1, which
// is when the signs input must carry the word's sign bits. For a request with
// req_last in cycle t, res_ready pulses in t+2 with res_grp, and in cycles
// t+3 .. t+2+PR te_valid is high with te_r = 0..PR-1 and te_acc the dot
// product of row te_r of group te_grp. A new row group may be requested
// right after the last word of the previous one as long as PR < WORDS.
// The bank addressing, the request pipeline and the one-per-cycle hand-off are
// this design's choices.
module mm #(
  parameter int unsigned N     = 800,
  parameter int unsigned PC    = 16,
  parameter int unsigned PR    = 4,
  parameter int unsigned PB    = 4,
  parameter int unsigned JBITS = 8,
  parameter int unsigned ACCW  = JBITS + $clog2(N) + 1,
  parameter int unsigned WORDS = N / PC,
  parameter int unsigned GROUPS = N / (PB * PR),
  parameter int unsigned DEPTH = GROUPS * WORDS,
  parameter int unsigned GW    = (GROUPS > 1) ? $clog2(GROUPS) : 1,
  parameter int unsigned RW    = (PR > 1) ? $clog2(PR) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // word requests from the sequencer
  input  logic                          req_valid,
  input  logic                          req_first,
  input  logic                          req_last,
  input  logic [$clog2(DEPTH)-1:0]      j_raddr,
  input  logic [GW-1:0]                 req_grp,
  // sign word, one cycle after the request
  input  logic [PC-1:0]                 signs,
  // loading of the coupling banks
  input  logic                          j_we,
  input  logic [RW-1:0]                 j_wbank,
  input  logic [$clog2(DEPTH)-1:0]      j_waddr,
  input  logic [PC*JBITS-1:0]           j_wdata,
  // results
  output logic                          res_ready,
  output logic [GW-1:0]                 res_grp,
  output logic                          te_valid,
  output logic [RW-1:0]                 te_r,
  output logic [GW-1:0]                 te_grp,
  output logic signed [ACCW-1:0]        te_acc
);

  logic                    d_valid, d_first, d_last;
  logic [GW-1:0]           d_grp;
  logic [PR-1:0]           mac_rv;
  logic signed [ACCW-1:0]  mac_res [PR];
  logic [PC*JBITS-1:0]     jrd [PR];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid <= 1'b0;
      d_first <= 1'b0;
      d_last  <= 1'b0;
      d_grp   <= '0;
    end else begin
      d_valid <= req_valid;
      d_first <= req_first;
      d_last  <= req_last;
      if (req_valid && req_last) d_grp <= req_grp;
    end
  end

  for (genvar r = 0; r < PR; r++) begin : g_row
    j_mem #(.DEPTH(DEPTH), .PC(PC), .JBITS(JBITS)) u_j (
      .clk   (clk),
      .raddr (j_raddr),
      .rdata (jrd[r]),
      .we    (j_we && (j_wbank == RW'(r))),
      .waddr (j_waddr),
      .wdata (j_wdata)
    );
    mac #(.PC(PC), .JBITS(JBITS), .ACCW(ACCW)) u_mac (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (d_valid),
      .in_first  (d_first),
      .in_last   (d_last),
      .signs     (signs),
      .jword     (jrd[r]),
      .res       (mac_res[r]),
      .res_valid (mac_rv[r])
    );
  end

  assign res_ready = mac_rv[0];
  assign res_grp   = d_grp;

  // selector: hand the PR row results to the datapath one per cycle
  logic [RW-1:0] ser_r;
  logic          ser_on;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ser_on <= 1'b0;
      ser_r  <= '0;
      te_grp <= '0;
    end else if (mac_rv[0]) begin
      ser_on <= 1'b1;
      ser_r  <= '0;
      te_grp <= d_grp;
    end else if (ser_on) begin
      if (ser_r == RW'(PR - 1)) ser_on <= 1'b0;
      else ser_r <= ser_r + 1'b1;
    end
  end

  assign te_valid = ser_on;
  assign te_r     = ser_r;
  assign te_acc   = mac_res[ser_r];

  // The results of a row group must all be handed over before the next group
  // completes.
  assert property (@(posedge clk) disable iff (!rst_n) mac_rv[0] |-> !ser_on || ser_r == RW'(PR - 1));

endmodule
