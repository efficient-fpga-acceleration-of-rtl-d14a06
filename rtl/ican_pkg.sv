// ican_pkg: types and constants shared by the convolution accelerator.
//
// Data words are 32-bit signed fixed-point numbers (the word width follows
// the 32-bit fixed-point MAC evaluated for the main configuration; the
// Q16.16 split of integer and fraction bits is this design's choice).
// A layer is described to the hardware by a layer_cfg_t, written by the
// host before start. The window descriptor win_desc_t travels from the
// window sequencer through the read controller to the compute controller:
// one descriptor is one compute-tile pass (one cc-loop iteration), i.e.
// K*K multiply-accumulate cycles of all T_M*T_R*T_C MAC units.
package ican_pkg;

  localparam int DATA_W = 32;   // word width
  localparam int FRAC_W = 16;   // fraction bits of the fixed-point format
  localparam int DIM_W  = 16;   // width of layer dimensions and loop counters
  localparam int ADDR_W = 32;   // external memory word address width
  localparam int MAX_BUS_WORDS = 16;  // widest memory beat the tag can describe

  typedef logic signed [DATA_W-1:0] word_t;
  typedef logic [DIM_W-1:0]         dim_t;
  typedef logic signed [DIM_W:0]    coord_t;   // signed image coordinate

  // Layer configuration. Input A[z][y][x] is Z x Y x X, output B[m][r][c]
  // is M x R x C, weights W[m][z][i][j] are M x Z x K x K, all stored
  // row-major in external memory, one word per address.
  typedef struct packed {
    dim_t             z, y, x;
    dim_t             m, r, c;
    logic [3:0]       k;        // kernel size, 2..K_MAX
    logic [2:0]       s;        // stride, 1..S_MAX
    logic [3:0]       p;        // zero padding on each border
    logic [ADDR_W-1:0] in_base, w_base, out_base;
  } layer_cfg_t;

  // One compute-tile pass.
  typedef struct packed {
    logic   z_first;     // first input map: partial sums start at zero
    logic   tile_first;  // first pass of an output tile: claim an output bank
    logic   tile_last;   // last pass of an output tile: bank complete after store
    logic   slice_last;  // last pass reading the current input slice
    logic   wtile_last;  // last pass using the current weight tile
    logic   last;        // last pass of the layer
    dim_t   line;        // output buffer line (dm, dr, dc)
    dim_t   win_row0;    // window origin inside the input tile
    dim_t   win_col0;
    coord_t img_row0;    // image coordinate of the window origin
    coord_t img_col0;
    dim_t   m_base;      // output tile origin, for the write-back
    dim_t   r_base;
    dim_t   c_base;
  } win_desc_t;

  // Sideband of an external-memory read of one beat (BUS_WORDS consecutive
  // words): where the returned words go and which of them are wanted.
  typedef struct packed {
    logic       is_w;    // 1: weight buffer, 0: input buffer
    logic       bank;
    logic [7:0] lane;    // weight lane (output map within the tile)
    logic [15:0] idx;    // word index in the bank or lane of beat word 0
    logic [MAX_BUS_WORDS-1:0] mask;  // beat words to keep
  } fetch_tag_t;

  // Commands of the input reuse network.
  typedef enum logic [1:0] {
    SH_NONE  = 2'd0,
    SH_WEST  = 2'd1,
    SH_EAST  = 2'd2,
    SH_NORTH = 2'd3
  } shift_e;

  // Fixed-point product, truncated back to one word.
  function automatic word_t fx_mul(word_t a, word_t b);
    logic signed [2*DATA_W-1:0] p;
    p = a * b;
    return word_t'(p >>> FRAC_W);
  endfunction

endpackage
