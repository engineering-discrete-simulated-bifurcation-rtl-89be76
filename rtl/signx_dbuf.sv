// signx_dbuf: the two SIGNXMEMs and the selector in front of them.
//
// The matrix-vector blocks of iteration k need the signs of step k-1 for all
// N spins, while the time evolution of iteration k already produces the signs
// of step k. Two sign memories therefore alternate: the "current" one (cur)
// is read, one word per cycle, onto the PC-bit sign bus; the other receives
// the new signs through the bit-masked write port. swap (end of iteration)
// exchanges the roles. The selector follows the buffer the read was issued
// to, so a read one cycle before a swap still returns the right data.
//
// init_we writes a whole row of the current buffer (initial signs at load
// time). Read data appears one cycle after raddr. Two memories are drawn in
// the architecture; their alternating use is this design's reading of them.
module signx_dbuf #(
  parameter int unsigned ROWS = 50,
  parameter int unsigned PC   = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    swap,
  input  logic [$clog2(ROWS)-1:0] raddr,
  output logic [PC-1:0]           rdata,
  input  logic                    we,
  input  logic [$clog2(ROWS)-1:0] waddr,
  input  logic [PC-1:0]           wmask,
  input  logic [PC-1:0]           wdata,
  input  logic                    init_we,
  input  logic [$clog2(ROWS)-1:0] init_addr,
  input  logic [PC-1:0]           init_data,
  output logic                    cur
);

  logic          cur_q;
  logic [PC-1:0] rd [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur   <= 1'b0;
      cur_q <= 1'b0;
    end else begin
      cur_q <= cur;
      if (swap) cur <= ~cur;
    end
  end

  for (genvar k = 0; k < 2; k++) begin : g_buf
    logic                    bwe;
    logic [$clog2(ROWS)-1:0] bwaddr;
    logic [PC-1:0]           bwmask, bwdata;
    always_comb begin
      if (init_we && cur == 1'(k)) begin
        bwe = 1'b1; bwaddr = init_addr; bwmask = '1; bwdata = init_data;
      end else begin
        bwe = we && cur != 1'(k); bwaddr = waddr; bwmask = wmask; bwdata = wdata;
      end
    end
    sign_mem #(.ROWS(ROWS), .PC(PC)) u_mem (
      .clk, .raddr, .rdata(rd[k]),
      .we(bwe), .waddr(bwaddr), .wmask(bwmask), .wdata(bwdata)
    );
  end

  assign rdata = rd[cur_q];

endmodule
