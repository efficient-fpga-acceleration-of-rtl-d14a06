// compute_controller: runs the compute tile and the input reuse network.
//
// A pass starts when the shape adapter holds a window, the weight-buffer
// bank of the pass is full and, for the first pass of an output tile, an
// output-buffer bank is free. In its start cycle the window is copied into
// the reuse network and the pass's partial sums are read from the output
// buffer. Then come K*K MAC cycles: the cycle (i, j') of kernel row i
// multiplies each tap by weight W[m][z][i][j'], where j' runs 0..K-1 on even
// rows and K-1..0 on odd rows, following the serpentine walk of the reuse
// network (west K-1 times, north, east K-1 times, north, ...). The first MAC
// cycle starts the accumulators from the partial sums (zero for the first
// input map). The next pass may start in the last MAC cycle of the current
// one, so back-to-back passes keep every MAC busy. The results are stored
// in the cycle after the last MAC cycle, while the next pass loads; when
// the next pass reads the very line being stored, the accumulators keep
// their own value instead (bypass). Weight and output banks are released
// or handed to the drain engine after their last pass.
// Timing: K*K cycles per pass when nothing stalls.
// The serpentine schedule, SIMD weight sharing and simultaneous load/store
// follow the source; the start conditions and the bypass are this design's.
module compute_controller
  import ican_pkg::*;
#(
  parameter int K_MAX = 11,
  parameter int DEPTH = 72,   // output buffer lines, D_M*D_R*D_C
  localparam int LAW  = $clog2(DEPTH),
  localparam int WAW  = $clog2(K_MAX*K_MAX)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  layer_cfg_t     cfg,
  // from read controller
  input  logic           sa_valid,
  input  win_desc_t      sa_desc,
  output logic           sa_take,     // also loads the reuse network
  output shift_e         irn_shift,
  // compute tile control
  output logic           mac_en,
  output logic           mac_first,
  output logic           mac_bypass,
  output logic           psum_zero,
  // weight buffer
  input  logic [1:0]     wb_full,
  output logic           wb_release,
  output logic           wb_rel_bank,
  output logic           wb_rbank,
  output logic [WAW-1:0] wb_raddr,
  // output buffer, compute side
  output logic           ob_rd_en,
  output logic           ob_rbank,
  output logic [LAW-1:0] ob_rline,
  output logic           ob_we,
  output logic           ob_wbank,
  output logic [LAW-1:0] ob_wline,
  // output bank hand-over to the drain engine
  input  logic [1:0]     ob_full,
  output logic           ob_mark,
  output logic           ob_mark_bank,
  output win_desc_t      ob_mark_desc,
  output logic           layer_done    // pulse: last result stored
);

  logic      active;
  int        i, j, k;
  win_desc_t cur;
  logic      cur_wb, cur_ob, wb_sel, ob_sel;
  logic      zero_q, bypass_q;
  logic      store_pend;
  win_desc_t st_desc;
  logic      st_bank;
  logic      end_now, can_start, start, start_bank;

  always_comb begin
    k          = int'(cfg.k);
    end_now    = active && (i == k-1) && (j == k-1);
    start_bank = sa_desc.tile_first ? ob_sel : cur_ob;
    can_start  = sa_valid && wb_full[wb_sel] && (!sa_desc.tile_first || !ob_full[ob_sel]);
    start      = can_start && (!active || end_now);
    sa_take    = start;

    mac_en     = active;
    mac_first  = active && (i == 0) && (j == 0);
    mac_bypass = bypass_q;
    psum_zero  = zero_q;

    if (!active)          irn_shift = SH_NONE;
    else if (j < k-1)     irn_shift = (i % 2 == 0) ? SH_WEST : SH_EAST;
    else                  irn_shift = SH_NORTH;

    wb_rbank = cur_wb;
    wb_raddr = WAW'(i*k + ((i % 2 == 0) ? j : k-1-j));

    ob_rd_en = start;
    ob_rbank = start_bank;
    ob_rline = LAW'(sa_desc.line);
    ob_we    = store_pend;
    ob_wbank = st_bank;
    ob_wline = LAW'(st_desc.line);

    ob_mark      = store_pend && st_desc.tile_last;
    ob_mark_bank = st_bank;
    ob_mark_desc = st_desc;
    layer_done   = store_pend && st_desc.last;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active     <= 1'b0;
      i          <= 0;
      j          <= 0;
      cur_wb     <= 1'b0;
      cur_ob     <= 1'b0;
      wb_sel     <= 1'b0;
      ob_sel     <= 1'b0;
      zero_q     <= 1'b0;
      bypass_q   <= 1'b0;
      store_pend <= 1'b0;
      st_bank    <= 1'b0;
      st_desc    <= '0;
      cur        <= '0;
      wb_release <= 1'b0;
      wb_rel_bank <= 1'b0;
    end else begin
      wb_release <= 1'b0;
      store_pend <= 1'b0;
      if (active) begin
        if (j < k-1) j <= j + 1;
        else begin
          j <= 0;
          i <= i + 1;
        end
      end
      if (end_now) begin
        active      <= 1'b0;
        store_pend  <= 1'b1;
        st_desc     <= cur;
        st_bank     <= cur_ob;
        wb_release  <= cur.wtile_last;
        wb_rel_bank <= cur_wb;
      end
      if (start) begin
        active   <= 1'b1;
        i        <= 0;
        j        <= 0;
        cur      <= sa_desc;
        cur_wb   <= wb_sel;
        if (sa_desc.wtile_last) wb_sel <= !wb_sel;
        if (sa_desc.tile_first) begin
          cur_ob <= ob_sel;
          ob_sel <= !ob_sel;
        end
        zero_q   <= sa_desc.z_first;
        bypass_q <= !sa_desc.z_first && (end_now || store_pend) &&
                    !sa_desc.tile_first && (sa_desc.line == cur.line);
      end
    end
  end

  // The schedule relies on a pass being at least two cycles long.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> cfg.k >= 2);
  // A pass never starts on a weight bank that is not full.
  assert property (@(posedge clk) disable iff (!rst_n) mac_en |-> wb_full[cur_wb]);

endmodule
