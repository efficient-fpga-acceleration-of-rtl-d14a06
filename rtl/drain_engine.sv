// drain_engine: writes finished output tiles back to external memory.
//
// When the compute controller hands over an output-buffer bank (the last
// pass of an output tile has been stored), the bank is marked full and the
// engine copies every in-range output neuron of the tile to external memory
// at out_base + (m*R + r)*C + c. It reads one row of T_C neurons of one map
// from a buffer line at a time and writes it as one beat of BUS_WORDS words
// with a mask for the words inside the layer (T_C <= BUS_WORDS). It then
// frees the bank, which the compute controller may claim for the tile after
// next; meanwhile the compute side works on the other bank, so the
// write-back overlaps computation.
// External memory is reached through a write channel (valid/ready, word
// address of beat word 0, BUS_WORDS data words and a word mask).
// Timing: two cycles per row of T_C words (buffer read, then write beat)
// when the memory is always ready.
// Double buffering of the output buffer follows the source; the write
// order and interface are this design's choices.
module drain_engine
  import ican_pkg::*;
#(
  parameter int TM    = 11,
  parameter int TR    = 7,
  parameter int TC    = 7,
  parameter int DM    = 18,
  parameter int DR    = 2,
  parameter int DC    = 2,
  parameter int BUS_WORDS = 8,
  localparam int BW   = BUS_WORDS,
  localparam int DEPTH = DM*DR*DC,
  localparam int LAW  = $clog2(DEPTH),
  localparam int MW   = $clog2(TM),
  localparam int RWW  = $clog2(TR + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  layer_cfg_t        cfg,
  // hand-over from the compute controller
  input  logic              ob_mark,
  input  logic              ob_mark_bank,
  input  win_desc_t         ob_mark_desc,
  output logic [1:0]        ob_full,
  output logic              busy,
  // output buffer drain read port
  output logic              d_en,
  output logic              d_bank,
  output logic [LAW-1:0]    d_line,
  output logic [MW-1:0]     d_lane,
  output logic [RWW-1:0]    d_row,
  input  word_t             d_data [TC],
  // external memory write channel
  output logic              wr_valid,
  input  logic              wr_ready,
  output logic [ADDR_W-1:0] wr_addr,
  output word_t             wr_data [BW],
  output logic [BW-1:0]     wr_mask
);

  initial assert (TC <= BW) else $fatal(1, "an output row must fit one memory beat");

  typedef enum logic [1:0] {D_IDLE, D_RD, D_WR} dstate_e;

  dstate_e     st;
  logic        sel;
  dim_t        mb [2];
  dim_t        rb [2];
  dim_t        cb [2];
  int unsigned dm, mi, dr, ri, dc;
  int          gm, gr, gc;
  logic        dc_last, ri_last, dr_last, mi_last, dm_last;

  always_comb begin
    gm = int'(mb[sel]) + int'(dm*TM + mi);
    gr = int'(rb[sel]) + int'(dr*TR + ri);
    gc = int'(cb[sel]) + int'(dc*TC);
    dc_last = (dc == DC-1) || (int'(cb[sel]) + int'((dc+1)*TC) >= int'(cfg.c));
    ri_last = (ri == TR-1) || (gr + 1 >= int'(cfg.r));
    dr_last = (dr == DR-1) || (int'(rb[sel]) + int'((dr+1)*TR) >= int'(cfg.r));
    mi_last = (mi == TM-1) || (gm + 1 >= int'(cfg.m));
    dm_last = (dm == DM-1) || (int'(mb[sel]) + int'((dm+1)*TM) >= int'(cfg.m));

    d_en     = (st == D_RD);
    d_bank   = sel;
    d_line   = LAW'((dm*DR + dr)*DC + dc);
    d_lane   = MW'(mi);
    d_row    = RWW'(ri);
    wr_valid = (st == D_WR);
    for (int b = 0; b < BW; b++)
      wr_data[b] = (b < TC) ? d_data[b % TC] : '0;
    busy     = (st != D_IDLE) || (ob_full != 2'b00);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st      <= D_IDLE;
      sel     <= 1'b0;
      ob_full <= '0;
      {dm, mi, dr, ri, dc} <= '0;
      wr_addr <= '0;
      wr_mask <= '0;
    end else begin
      if (ob_mark) begin
        ob_full[ob_mark_bank] <= 1'b1;
        mb[ob_mark_bank] <= ob_mark_desc.m_base;
        rb[ob_mark_bank] <= ob_mark_desc.r_base;
        cb[ob_mark_bank] <= ob_mark_desc.c_base;
      end
      unique case (st)
        D_IDLE: if (ob_full[sel]) begin
          st <= D_RD;
          {dm, mi, dr, ri, dc} <= '0;
        end
        D_RD: begin
          st      <= D_WR;
          wr_addr <= cfg.out_base + ADDR_W'((gm*int'(cfg.r) + gr)*int'(cfg.c) + gc);
          for (int b = 0; b < BW; b++)
            wr_mask[b] <= (b < TC) && (gc + b < int'(cfg.c));
        end
        D_WR: if (wr_ready) begin
          st <= D_RD;
          if (!dc_last) dc <= dc + 1;
          else begin
            dc <= 0;
            if (!ri_last) ri <= ri + 1;
            else begin
              ri <= 0;
              if (!dr_last) dr <= dr + 1;
              else begin
                dr <= 0;
                if (!mi_last) mi <= mi + 1;
                else begin
                  mi <= 0;
                  if (!dm_last) dm <= dm + 1;
                  else begin
                    dm  <= 0;
                    st  <= D_IDLE;
                    ob_full[sel] <= 1'b0;
                    sel <= !sel;
                  end
                end
              end
            end
          end
        end
        default: st <= D_IDLE;
      endcase
    end
  end

  // A bank is never handed over twice before it has been written back.
  assert property (@(posedge clk) disable iff (!rst_n) ob_mark |-> !ob_full[ob_mark_bank]);

endmodule
