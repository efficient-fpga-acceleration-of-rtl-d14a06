// input_reuse_network: the register array that feeds the compute tile.
//
// An H x W array of word registers, H = (T_R-1)*S_MAX + K_MAX and
// W = (T_C-1)*S_MAX + K_MAX, i.e. the T_R x T_C positions spread by the
// stride plus K-1 guard rows along the southern and guard columns along the
// eastern edge. It is loaded in one cycle from the shape adapter and then
// walks every register value over its K x K neighbourhood: shift west K-1
// times, north once, east K-1 times, north once, and so on, the whole array
// moving at once like a systolic array. Rows wrap around horizontally (a
// torus in that direction only) so that eastward shifts bring back what
// westward shifts pushed out; the southern row fills with zero when shifting
// north. Compute-tile position (r, c) reads register (r*S, c*S); the stride
// S is chosen at run time from 1..S_MAX by a multiplexer per tap.
// Timing: load or shift on the clock edge; taps are combinational from the
// registers. Load has priority over shift.
// Topology, guard registers, shift order and stride multiplexers follow the
// source; the zero fill of the southern row is this design's choice.
module input_reuse_network
  import ican_pkg::*;
#(
  parameter int TR    = 7,
  parameter int TC    = 7,
  parameter int K_MAX = 11,
  parameter int S_MAX = 4,
  localparam int H = (TR-1)*S_MAX + K_MAX,
  localparam int W = (TC-1)*S_MAX + K_MAX
) (
  input  logic       clk,
  input  logic       load,
  input  word_t      ld_data [H][W],
  input  shift_e     shift,
  input  logic [2:0] stride,
  output word_t      tap     [TR*TC]
);

  word_t regs [H][W];

  always_ff @(posedge clk) begin
    if (load) begin
      regs <= ld_data;
    end else begin
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          unique case (shift)
            SH_WEST:  regs[y][x] <= regs[y][(x + 1) % W];
            SH_EAST:  regs[y][x] <= regs[y][(x + W - 1) % W];
            SH_NORTH: regs[y][x] <= (y + 1 < H) ? regs[(y + 1) % H][x] : '0;
            default:  ;
          endcase
        end
      end
    end
  end

  always_comb begin
    for (int r = 0; r < TR; r++) begin
      for (int c = 0; c < TC; c++) begin
        tap[r*TC + c] = regs[r][c];
        for (int s = 2; s <= S_MAX; s++)
          if (int'(stride) == s) tap[r*TC + c] = regs[r*s][c*s];
      end
    end
  end

endmodule
