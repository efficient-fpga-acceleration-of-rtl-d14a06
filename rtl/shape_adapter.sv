// shape_adapter: staging registers between the input buffer and the input
// reuse network.
//
// An H x W array of isolated word registers, the same shape as the input
// reuse network. The read controller writes it one row per cycle from a
// wide input-buffer read; a per-word keep mask selects between the buffer
// word and zero, which is how zero padding at the image borders (and the
// unused part of a row) is inserted. The whole array is copied into the
// reuse network in one cycle, after which it can be refilled for the next
// pass while the current pass computes, so its latency stays hidden.
// Timing: row write on the clock edge; contents visible as an array.
// Structure (registers plus zero muxes) follows the source; writing one row
// per cycle is this design's choice.
module shape_adapter
  import ican_pkg::*;
#(
  parameter int TR    = 7,
  parameter int TC    = 7,
  parameter int K_MAX = 11,
  parameter int S_MAX = 4,
  localparam int H = (TR-1)*S_MAX + K_MAX,
  localparam int W = (TC-1)*S_MAX + K_MAX
) (
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic [$clog2(H)-1:0] wr_row,
  input  word_t                wr_data [W],
  input  logic [W-1:0]         wr_keep,   // 1: take the word, 0: zero
  output word_t                data    [H][W]
);

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int x = 0; x < W; x++)
        data[wr_row][x] <= wr_keep[x] ? wr_data[x] : '0;
    end
  end

endmodule
