// read_controller: fills the shape adapter for each compute-tile pass.
//
// Takes pass descriptors from the window sequencer (valid/ready, one held
// in reserve). For each pass it waits until the input-buffer bank holding
// the pass's input slice is full and the shape adapter is free (empty, or
// being copied into the reuse network this cycle), then reads the pass's
// window one row per cycle: row y of the window starts at tile word
// (win_row0 + y) * IW + win_col0, IW = (D_C*T_C-1)*S + K being the input
// tile width. With each row it computes the keep mask that zeroes words
// outside the image (zero padding) or beyond the window width. When the
// last row is written the shape adapter is marked valid and the descriptor
// is handed to the compute controller. After the last pass of an input
// slice it releases that input-buffer bank to the fetch engine.
// Timing: the first row is read in the cycle the fill starts, and each
// row is written one cycle after its read, so a fill takes H + 1 cycles,
// H = (T_R-1)*S + K. A fill may start in the cycle the previous window is
// copied out, so a new window is ready every max(K*K, H + 1) cycles; with
// H + 1 <= K*K it is hidden behind the K*K compute cycles.
// The role (reading the input buffer, per-word padding control) follows
// the source; the row-per-cycle schedule is this design's choice.
module read_controller
  import ican_pkg::*;
#(
  parameter int TR    = 7,
  parameter int TC    = 7,
  parameter int DC    = 2,
  parameter int K_MAX = 11,
  parameter int S_MAX = 4,
  parameter int IB_N  = 49,
  parameter int IB_DEPTH = 81,
  localparam int H    = (TR-1)*S_MAX + K_MAX,
  localparam int W    = (TC-1)*S_MAX + K_MAX,
  localparam int IAW  = $clog2(IB_N*IB_DEPTH),
  localparam int HW   = $clog2(H)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  layer_cfg_t      cfg,
  // descriptors in
  input  logic            in_valid,
  output logic            in_ready,
  input  win_desc_t       in_desc,
  // input buffer bank status and read port
  input  logic [1:0]      ib_full,
  output logic            ib_release,
  output logic            ib_rel_bank,
  output logic            ib_rd_en,
  output logic            ib_rbank,
  output logic [IAW-1:0]  ib_raddr,
  input  word_t           ib_rdata [IB_N],
  // shape adapter write port
  output logic            sa_wr_en,
  output logic [HW-1:0]   sa_wr_row,
  output word_t           sa_wr_data [W],
  output logic [W-1:0]    sa_wr_keep,
  // to compute controller
  output logic            sa_valid,
  output win_desc_t       sa_desc,
  input  logic            sa_take
);

  initial assert (W <= IB_N) else $fatal(1, "window row wider than the input buffer port");

  logic      have;      // a descriptor waits in hold
  win_desc_t hold;
  logic      filling;
  win_desc_t fdesc;
  int        y;          // row being read
  logic      ib_sel;
  // second stage: data of the row read last cycle
  logic         wr_pend;
  logic [HW-1:0] wr_row_q;
  logic [W-1:0] keep_q;
  logic         wr_last_q;

  int hrt, wrt, iw;
  logic start_fill;
  logic [W-1:0] keep;
  int   img_y, ry;
  win_desc_t rdesc;       // descriptor of the row read this cycle

  always_comb begin
    hrt = (TR-1)*int'(cfg.s) + int'(cfg.k);
    wrt = (TC-1)*int'(cfg.s) + int'(cfg.k);
    iw  = (DC*TC-1)*int'(cfg.s) + int'(cfg.k);
    in_ready   = !have;
    start_fill = have && !filling && !wr_pend && ib_full[ib_sel] && (!sa_valid || sa_take);
    // row 0 is read straight from the held descriptor in the start cycle
    rdesc      = start_fill ? hold : fdesc;
    ry         = start_fill ? 0 : y;
    ib_rd_en   = filling || start_fill;
    ib_rbank   = ib_sel;
    ib_raddr   = IAW'((int'(rdesc.win_row0) + ry) * iw + int'(rdesc.win_col0));
    img_y      = int'(rdesc.img_row0) + ry;
    for (int x = 0; x < W; x++)
      keep[x] = (x < wrt) && (img_y >= 0) && (img_y < int'(cfg.y)) &&
                (int'(rdesc.img_col0) + x >= 0) && (int'(rdesc.img_col0) + x < int'(cfg.x));
    sa_wr_en   = wr_pend;
    sa_wr_row  = wr_row_q;
    sa_wr_keep = keep_q;
    for (int x = 0; x < W; x++)
      sa_wr_data[x] = ib_rdata[x];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      have       <= 1'b0;
      filling    <= 1'b0;
      wr_pend    <= 1'b0;
      wr_last_q  <= 1'b0;
      sa_valid   <= 1'b0;
      ib_sel     <= 1'b0;
      ib_release <= 1'b0;
      ib_rel_bank <= 1'b0;
      y          <= 0;
    end else begin
      ib_release <= 1'b0;
      if (in_valid && in_ready) begin
        have <= 1'b1;
        hold <= in_desc;
      end
      if (sa_take) sa_valid <= 1'b0;
      if (start_fill) begin
        have    <= 1'b0;
        fdesc   <= hold;
        filling <= 1'b1;      // rows 1 .. hrt-1 follow (hrt >= 2)
        y       <= 1;
      end
      wr_pend   <= filling || start_fill;
      wr_row_q  <= HW'(ry);
      keep_q    <= keep;
      wr_last_q <= filling && (y == hrt - 1);
      if (filling) begin
        if (y == hrt - 1) filling <= 1'b0;
        else              y <= y + 1;
      end
      if (wr_pend && wr_last_q) begin
        sa_valid <= 1'b1;
        sa_desc  <= fdesc;
        if (fdesc.slice_last) begin
          ib_release  <= 1'b1;
          ib_rel_bank <= ib_sel;
          ib_sel      <= !ib_sel;
        end
      end
    end
  end

endmodule
