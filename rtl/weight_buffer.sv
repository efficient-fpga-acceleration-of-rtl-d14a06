// weight_buffer: double-buffered on-chip store of one weight tile.
//
// A weight tile is the T_M x K x K weights of one block of T_M output maps
// for one input map z. Each of the two banks has T_M lanes of K_MAX*K_MAX
// words. The fetch engine writes one memory beat per cycle: WR consecutive
// words of one lane, each with its own enable (words past the end of the
// lane are dropped). The compute controller reads one word from every lane
// per cycle, the weight (i, j) for each of the T_M RC planes of the compute
// tile.
// Timing: write on the clock edge; read is combinational (a small
// distributed memory), so the weight lines up with the reuse network
// register it multiplies in the same cycle.
// Double buffering, tile size and bus-width write follow the source; the
// lane organisation and asynchronous read are this design's choices.
module weight_buffer
  import ican_pkg::*;
#(
  parameter int TM    = 11,
  parameter int K_MAX = 11,
  parameter int WR    = 8,    // write port width in words (memory beat)
  localparam int KK   = K_MAX*K_MAX,
  localparam int LW   = $clog2(TM),
  localparam int AW   = $clog2(KK)
) (
  input  logic          clk,
  input  logic [WR-1:0] we,      // per-word write enable
  input  logic          wbank,
  input  logic [LW-1:0] wlane,
  input  logic [AW-1:0] waddr,   // address of beat word 0
  input  word_t         wdata [WR],
  input  logic          rbank,
  input  logic [AW-1:0] raddr,
  output word_t         rdata [TM]
);

  word_t mem [2][TM][KK];

  always_ff @(posedge clk) begin
    for (int b = 0; b < WR; b++)
      if (we[b] && int'(waddr) + b < KK)
        mem[wbank][wlane][int'(waddr) + b] <= wdata[b];
  end

  always_comb begin
    for (int m = 0; m < TM; m++)
      rdata[m] = mem[rbank][m][raddr];
  end

endmodule
