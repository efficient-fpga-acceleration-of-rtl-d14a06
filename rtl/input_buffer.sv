// input_buffer: double-buffered on-chip store of one input tile slice.
//
// Holds, per bank, one z-slice of the input tile, ((D_R*T_R-1)*S+K) x
// ((D_C*T_C-1)*S+K) words stored row-major at linear word addresses. Two
// banks (ping-pong) let the fetch engine fill one slice while the read
// controller reads the other. The read port is N = T_R*T_C words wide and
// may start at any word address: the words are interleaved over N columns
// (column = address mod N, row = address div N), each column is read at
// its own row, and the N words are rotated into order. The write port takes
// one memory beat per cycle: WR words at consecutive addresses, each with
// its own enable; they fall into distinct columns, so WR <= N is required.
// Timing: write on the clock edge; read data N words valid one cycle after
// rd_en.
// The double buffering and the T_R*T_C-word width follow the source; the
// column interleaving for unaligned reads is this design's choice.
module input_buffer
  import ican_pkg::*;
#(
  parameter int N     = 49,   // read width in words, T_R*T_C
  parameter int DEPTH = 81,   // rows of N words per bank
  parameter int WR    = 8,    // write port width in words (memory beat)
  localparam int AW   = $clog2(N*DEPTH)
) (
  input  logic          clk,
  input  logic [WR-1:0] we,      // per-word write enable
  input  logic          wbank,
  input  logic [AW-1:0] waddr,   // address of beat word 0
  input  word_t         wdata [WR],
  input  logic          rd_en,
  input  logic          rbank,
  input  logic [AW-1:0] raddr,
  output word_t         rdata [N]
);

  localparam int RW = $clog2(DEPTH + 1);

  word_t mem [2][N][DEPTH];

  initial assert (WR <= N) else $fatal(1, "write beat wider than the buffer");

  always_ff @(posedge clk) begin
    for (int b = 0; b < WR; b++)
      if (we[b] && int'(waddr) + b < N*DEPTH)
        mem[wbank][(int'(waddr) + b) % N][(int'(waddr) + b) / N] <= wdata[b];
  end

  // Column b holds word raddr + ((b - raddr mod N) mod N).
  int unsigned    off;
  int unsigned    row0;
  word_t          col_q [N];
  int unsigned    off_q;

  always_comb begin
    off  = int'(raddr) % N;
    row0 = int'(raddr) / N;
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      off_q <= off;
      for (int b = 0; b < N; b++) begin
        automatic int unsigned row = row0 + ((b < int'(off)) ? 1 : 0);
        col_q[b] <= (row < DEPTH) ? mem[rbank][b][RW'(row)] : '0;
      end
    end
  end

  always_comb begin
    for (int k = 0; k < N; k++)
      rdata[k] = col_q[(off_q + k) % N];
  end

endmodule
