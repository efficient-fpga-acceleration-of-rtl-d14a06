// output_buffer: double-buffered on-chip store of one output tile.
//
// Each bank is T_M parallel buffers, one per output map of the compute
// tile, each N = T_R*T_C words wide and D_M*D_R*D_C lines deep, so a whole
// compute-tile output is loaded or stored in one cycle. The compute side
// has a read port and a write port (simple dual port), used together to
// store one pass's results while the next pass's partial sums are loaded.
// A second read port lets the drain engine read one row of T_C words (one
// output row of one map) of the other bank for write-back while the
// compute side works on its bank.
// Timing: writes on the clock edge, both reads registered (one cycle).
// Bank organisation and width follow the source; the drain read port is
// this design's choice.
module output_buffer
  import ican_pkg::*;
#(
  parameter int TM    = 11,
  parameter int N     = 49,
  parameter int DEPTH = 72,
  parameter int TC    = 7,    // words per drain row; N is a multiple of it
  localparam int LAW  = $clog2(DEPTH),
  localparam int MW   = $clog2(TM),
  localparam int RWW  = $clog2(N/TC + 1)
) (
  input  logic           clk,
  // compute side
  input  logic           rd_en,
  input  logic           rbank,
  input  logic [LAW-1:0] rline,
  output word_t          rdata [TM][N],
  input  logic           we,
  input  logic           wbank,
  input  logic [LAW-1:0] wline,
  input  word_t          wdata [TM][N],
  // drain side
  input  logic           d_en,
  input  logic           dbank,
  input  logic [LAW-1:0] dline,
  input  logic [MW-1:0]  dlane,
  input  logic [RWW-1:0] drow,
  output word_t          ddata [TC]
);

  word_t mem [2][DEPTH][TM][N];

  always_ff @(posedge clk) begin
    if (we)
      mem[wbank][wline] <= wdata;
    if (rd_en)
      rdata <= mem[rbank][rline];
    if (d_en)
      for (int c = 0; c < TC; c++)
        ddata[c] <= mem[dbank][dline][dlane][int'(drow)*TC + c];
  end

endmodule
