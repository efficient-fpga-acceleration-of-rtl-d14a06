// window_sequencer: the loop nest of the hardware controller.
//
// Walks one convolutional layer in the order
//   for each output tile (m block, r block, c block)   -- steps D_M*T_M, D_R*T_R, D_C*T_C
//     for z in 0..Z-1                                  -- one input slice
//       for dm in 0..D_M-1                             -- one weight tile
//         for dr in 0..D_R-1
//           for dc in 0..D_C-1                         -- one compute-tile pass
// and issues one descriptor per compute-tile pass on a valid/ready
// handshake. Inner loops stop early at the layer's edge (a partial last
// tile), so passes that would produce only out-of-range outputs are not
// issued. The descriptor carries the pass's output-buffer line, its window
// in the input tile, the image coordinates for zero padding and the flags
// that tell the downstream controllers when a buffer bank is finished.
// Timing: a new descriptor every cycle it is accepted; busy from start
// until the last descriptor is accepted.
// The tiled loop nest with the z-loop outside the rr/cc-loops follows the
// source; the position of the dm-loop and the early loop exits are this
// design's choices.
module window_sequencer
  import ican_pkg::*;
#(
  parameter int TM = 11,
  parameter int TR = 7,
  parameter int TC = 7,
  parameter int DM = 18,
  parameter int DR = 2,
  parameter int DC = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  layer_cfg_t cfg,
  output logic       busy,
  output logic       valid,
  input  logic       ready,
  output win_desc_t  desc
);

  int unsigned mb, rb, cb, z, dm, dr, dc;
  logic dc_last, dr_last, dm_last, z_last, cb_last, rb_last, mb_last;
  int   s, p;

  always_comb begin
    s = int'(cfg.s);
    p = int'(cfg.p);
    dc_last = (dc == DC-1) || (cb + (dc+1)*TC >= int'(cfg.c));
    dr_last = (dr == DR-1) || (rb + (dr+1)*TR >= int'(cfg.r));
    dm_last = (dm == DM-1) || (mb + (dm+1)*TM >= int'(cfg.m));
    z_last  = (z + 1 >= int'(cfg.z));
    cb_last = (cb + DC*TC >= int'(cfg.c));
    rb_last = (rb + DR*TR >= int'(cfg.r));
    mb_last = (mb + DM*TM >= int'(cfg.m));

    desc            = '0;
    desc.z_first    = (z == 0);
    desc.tile_first = (z == 0) && (dm == 0) && (dr == 0) && (dc == 0);
    desc.slice_last = dm_last && dr_last && dc_last;
    desc.wtile_last = dr_last && dc_last;
    desc.tile_last  = z_last && desc.slice_last;
    desc.last       = desc.tile_last && mb_last && rb_last && cb_last;
    desc.line       = dim_t'((dm*DR + dr)*DC + dc);
    desc.win_row0   = dim_t'(dr*TR*s);
    desc.win_col0   = dim_t'(dc*TC*s);
    desc.img_row0   = coord_t'(int'(rb*s) - p + int'(dr*TR*s));
    desc.img_col0   = coord_t'(int'(cb*s) - p + int'(dc*TC*s));
    desc.m_base     = dim_t'(mb);
    desc.r_base     = dim_t'(rb);
    desc.c_base     = dim_t'(cb);
  end

  assign valid = busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      {mb, rb, cb, z, dm, dr, dc} <= '0;
    end else if (start && !busy) begin
      busy <= 1'b1;
      {mb, rb, cb, z, dm, dr, dc} <= '0;
    end else if (busy && ready) begin
      if (desc.last) busy <= 1'b0;
      if (!dc_last) dc <= dc + 1;
      else begin
        dc <= 0;
        if (!dr_last) dr <= dr + 1;
        else begin
          dr <= 0;
          if (!dm_last) dm <= dm + 1;
          else begin
            dm <= 0;
            if (!z_last) z <= z + 1;
            else begin
              z <= 0;
              if (!cb_last) cb <= cb + DC*TC;
              else begin
                cb <= 0;
                if (!rb_last) rb <= rb + DR*TR;
                else begin
                  rb <= 0;
                  mb <= mb + DM*TM;
                end
              end
            end
          end
        end
      end
    end
  end

endmodule
