// sb_ctrl: sequencer of the dSB machine.
//
// One iteration walks the GROUPS row groups (PB*PR spins each, computed by
// the PB MMTE blocks at once). For each group it requests the WORDS words of
// the coupling rows and of the sign memory, one per cycle, back to back, so
// the matrix-vector work of a group overlaps the time evolution of the
// previous one. After the last group it stalls (DRAIN) until the time
// evolution of that group has written its results (te_last): only then are
// all new signs in place for the next iteration, because every matrix-vector
// product needs every sign of the previous step. At that point iter_end
// pulses, which swaps the sign buffers and advances a.
//
// start (with n_iter > 0) begins a run when idle; clear pulses in the start
// cycle; done pulses in the cycle of the last iter_end (or on start with
// n_iter = 0); busy is high in between. j_raddr = grp*WORDS + word and
// s_raddr = word accompany each request. The sequencer itself is not drawn
// in the architecture; its states and the drain stall are this design's
// way of meeting the data dependency between multiplication and time
// evolution.
module sb_ctrl #(
  parameter int unsigned N      = 800,
  parameter int unsigned PC     = 16,
  parameter int unsigned PR     = 4,
  parameter int unsigned PB     = 4,
  parameter int unsigned ITW    = 16,
  parameter int unsigned WORDS  = N / PC,
  parameter int unsigned GROUPS = N / (PB * PR),
  parameter int unsigned DEPTH  = GROUPS * WORDS,
  parameter int unsigned GW     = (GROUPS > 1) ? $clog2(GROUPS) : 1,
  parameter int unsigned WW     = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [ITW-1:0]            n_iter,
  input  logic                      te_last,
  output logic                      req_valid,
  output logic                      req_first,
  output logic                      req_last,
  output logic [$clog2(DEPTH)-1:0]  j_raddr,
  output logic [WW-1:0]             s_raddr,
  output logic [GW-1:0]             req_grp,
  output logic                      clear,
  output logic                      iter_end,
  output logic                      busy,
  output logic                      done,
  output logic                      draining,
  output logic [ITW-1:0]            iter
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_DRAIN} state_e;
  state_e state;

  logic [WW-1:0]            word;
  logic [GW-1:0]            grp;
  logic [$clog2(DEPTH)-1:0] jaddr;

  assign req_valid = (state == S_ISSUE);
  assign req_first = (word == '0);
  assign req_last  = (word == WW'(WORDS - 1));
  assign j_raddr   = jaddr;
  assign s_raddr   = word;
  assign req_grp   = grp;
  assign clear     = (state == S_IDLE) && start;
  assign iter_end  = (state == S_DRAIN) && te_last;
  assign busy      = (state != S_IDLE);
  assign draining  = (state == S_DRAIN);
  assign done      = (clear && n_iter == '0) || (iter_end && iter == n_iter - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      word  <= '0;
      grp   <= '0;
      jaddr <= '0;
      iter  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          word  <= '0;
          grp   <= '0;
          jaddr <= '0;
          iter  <= '0;
          if (n_iter != '0) state <= S_ISSUE;
        end
        S_ISSUE: begin
          if (req_last) begin
            word <= '0;
            if (grp == GW'(GROUPS - 1)) state <= S_DRAIN;
            else begin
              grp   <= grp + 1'b1;
              jaddr <= jaddr + 1'b1;
            end
          end else begin
            word  <= word + 1'b1;
            jaddr <= jaddr + 1'b1;
          end
        end
        S_DRAIN: if (te_last) begin
          if (iter == n_iter - 1'b1) state <= S_IDLE;
          else begin
            state <= S_ISSUE;
            iter  <= iter + 1'b1;
            grp   <= '0;
            jaddr <= '0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
