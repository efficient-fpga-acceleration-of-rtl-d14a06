// fetch_engine: loads input slices and weight tiles from external memory.
//
// Walks the same output-tile and z loops as the window sequencer. For every
// (output tile, z) it waits for a free input-buffer bank and loads the input
// slice, ((D_R*T_R-1)*S+K) x ((D_C*T_C-1)*S+K) words, skipping words that
// lie outside the image (the shape adapter zeroes them). Then, for each
// block dm of T_M output maps in the tile, it waits for a free weight-buffer
// bank and loads the T_M x K x K weights of that block for map z. Each bank
// counts its own outstanding reads and is marked full once they have all
// returned, so requests for the next bank are issued without waiting for
// the memory latency of the previous one. The read controller and the
// compute controller release banks after their last use, so loading runs
// ahead of computation by up to one slice and one weight tile.
// External memory is reached through a read-request channel (valid/ready,
// word address and a tag) and an in-order response channel that returns
// the tag with one beat of BUS_WORDS consecutive words. A beat covers
// BUS_WORDS words of one input row or of one weight lane; the tag names the
// buffer position of its first word and masks the words that are wanted
// (inside the slice and the image, or inside the kernel and the layer's
// maps). Only masked words need be read; the addresses of the others are
// don't-care. Beats with an empty mask are not requested.
// Timing: one beat per cycle while the memory accepts them, so an input
// slice takes about rows * ceil(width / BUS_WORDS) cycles.
// Double buffering and tile contents follow the source; the request
// interface and load order are this design's choices.
module fetch_engine
  import ican_pkg::*;
#(
  parameter int TM    = 11,
  parameter int TR    = 7,
  parameter int TC    = 7,
  parameter int DM    = 18,
  parameter int DR    = 2,
  parameter int DC    = 2,
  parameter int K_MAX = 11,
  parameter int IB_N  = 49,
  parameter int IB_DEPTH = 81,
  parameter int BUS_WORDS = 8,
  localparam int BW   = BUS_WORDS,
  localparam int IAW  = $clog2(IB_N*IB_DEPTH),
  localparam int LW   = $clog2(TM),
  localparam int WAW  = $clog2(K_MAX*K_MAX)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  layer_cfg_t        cfg,
  output logic              busy,
  // external memory read channel
  output logic              rd_req_valid,
  input  logic              rd_req_ready,
  output logic [ADDR_W-1:0] rd_req_addr,
  output fetch_tag_t        rd_req_tag,
  input  logic              rd_resp_valid,
  input  word_t             rd_resp_data [BW],
  input  fetch_tag_t        rd_resp_tag,
  // input buffer write port and bank status
  output logic [BW-1:0]     ib_we,
  output logic              ib_wbank,
  output logic [IAW-1:0]    ib_waddr,
  output word_t             ib_wdata [BW],
  output logic [1:0]        ib_full,
  input  logic              ib_release,
  input  logic              ib_rel_bank,
  // weight buffer write port and bank status
  output logic [BW-1:0]     wb_we,
  output logic              wb_wbank,
  output logic [LW-1:0]     wb_wlane,
  output logic [WAW-1:0]    wb_waddr,
  output word_t             wb_wdata [BW],
  output logic [1:0]        wb_full,
  input  logic              wb_release,
  input  logic              wb_rel_bank
);

  typedef enum logic [2:0] {
    F_IDLE, F_IN_WAIT, F_IN_ISSUE, F_W_WAIT, F_W_ISSUE
  } fstate_e;

  fstate_e     st;
  int unsigned mb, rb, cb, z, dm, y, x, mi, kk;
  int unsigned ib_cnt [2], wb_cnt [2];   // outstanding reads per bank
  logic [1:0]  ib_pend, wb_pend;         // all reads of the bank issued
  logic        ib_sel, wb_sel;
  logic [BW-1:0] in_mask, w_mask;

  initial assert (BW <= MAX_BUS_WORDS && BW <= IB_N) else $fatal(1, "unsupported bus width");

  int   s, k, ih, iw, iy, ix, gm;
  logic in_img, w_ok, x_last, y_last, kk_last, mi_last;
  logic dm_last, z_last, cb_last, rb_last, mb_last;
  logic issue, req_fire;
  logic [1:0] set_ib, set_wb;

  always_comb begin
    s  = int'(cfg.s);
    k  = int'(cfg.k);
    ih = (DR*TR-1)*s + k;
    iw = (DC*TC-1)*s + k;
    iy = int'(rb)*s - int'(cfg.p) + int'(y);
    ix = int'(cb)*s - int'(cfg.p) + int'(x);
    gm = int'(mb + dm*TM + mi);
    for (int b = 0; b < BW; b++) begin
      in_mask[b] = (int'(x) + b < iw) && (iy >= 0) && (iy < int'(cfg.y)) &&
                   (ix + b >= 0) && (ix + b < int'(cfg.x));
      w_mask[b]  = (int'(kk) + b < k*k) && (gm < int'(cfg.m));
    end
    in_img  = (in_mask != '0);
    w_ok    = (w_mask != '0);
    x_last  = (int'(x) + BW >= iw);
    y_last  = (int'(y) == ih-1);
    kk_last = (int'(kk) + BW >= k*k);
    mi_last = (mi == TM-1);
    dm_last = (dm == DM-1) || (mb + (dm+1)*TM >= int'(cfg.m));
    z_last  = (z + 1 >= int'(cfg.z));
    cb_last = (cb + DC*TC >= int'(cfg.c));
    rb_last = (rb + DR*TR >= int'(cfg.r));
    mb_last = (mb + DM*TM >= int'(cfg.m));

    rd_req_valid    = 1'b0;
    rd_req_addr     = '0;
    rd_req_tag      = '0;
    if (st == F_IN_ISSUE && in_img) begin
      rd_req_valid   = 1'b1;
      rd_req_addr    = cfg.in_base + ADDR_W'((int'(z)*int'(cfg.y) + iy)*int'(cfg.x) + ix);
      rd_req_tag.is_w = 1'b0;
      rd_req_tag.bank = ib_sel;
      rd_req_tag.idx  = 16'(int'(y)*iw + int'(x));
      rd_req_tag.mask = MAX_BUS_WORDS'(in_mask);
    end else if (st == F_W_ISSUE && w_ok) begin
      rd_req_valid   = 1'b1;
      rd_req_addr    = cfg.w_base + ADDR_W'((gm*int'(cfg.z) + int'(z))*k*k + int'(kk));
      rd_req_tag.is_w = 1'b1;
      rd_req_tag.bank = wb_sel;
      rd_req_tag.lane = 8'(mi);
      rd_req_tag.idx  = 16'(kk);
      rd_req_tag.mask = MAX_BUS_WORDS'(w_mask);
    end
    req_fire = rd_req_valid && rd_req_ready;
    // advance the issue loop: a request was taken, or the word is skipped
    issue    = ((st == F_IN_ISSUE) || (st == F_W_ISSUE)) && (!rd_req_valid || rd_req_ready);
    for (int b = 0; b < 2; b++) begin
      set_ib[b] = ib_pend[b] && (ib_cnt[b] == 0);
      set_wb[b] = wb_pend[b] && (wb_cnt[b] == 0);
    end

    ib_we    = (rd_resp_valid && !rd_resp_tag.is_w) ? BW'(rd_resp_tag.mask) : '0;
    ib_wbank = rd_resp_tag.bank;
    ib_waddr = IAW'(rd_resp_tag.idx);
    ib_wdata = rd_resp_data;
    wb_we    = (rd_resp_valid && rd_resp_tag.is_w) ? BW'(rd_resp_tag.mask) : '0;
    wb_wbank = rd_resp_tag.bank;
    wb_wlane = LW'(rd_resp_tag.lane);
    wb_waddr = WAW'(rd_resp_tag.idx);
    wb_wdata = rd_resp_data;
    busy     = (st != F_IDLE) || (ib_pend != '0) || (wb_pend != '0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st          <= F_IDLE;
      {mb, rb, cb, z, dm, y, x, mi, kk} <= '0;
      ib_cnt      <= '{default: 0};
      wb_cnt      <= '{default: 0};
      ib_pend     <= '0;
      wb_pend     <= '0;
      ib_sel      <= 1'b0;
      wb_sel      <= 1'b0;
      ib_full     <= '0;
      wb_full     <= '0;
    end else begin
      for (int b = 0; b < 2; b++) begin
        ib_cnt[b] <= ib_cnt[b]
                   + ((req_fire && !rd_req_tag.is_w && int'(rd_req_tag.bank) == b) ? 1 : 0)
                   - ((rd_resp_valid && !rd_resp_tag.is_w && int'(rd_resp_tag.bank) == b) ? 1 : 0);
        wb_cnt[b] <= wb_cnt[b]
                   + ((req_fire && rd_req_tag.is_w && int'(rd_req_tag.bank) == b) ? 1 : 0)
                   - ((rd_resp_valid && rd_resp_tag.is_w && int'(rd_resp_tag.bank) == b) ? 1 : 0);
        if (ib_release && int'(ib_rel_bank) == b) ib_full[b] <= 1'b0;
        if (set_ib[b]) begin
          ib_full[b] <= 1'b1;
          ib_pend[b] <= 1'b0;
        end
        if (wb_release && int'(wb_rel_bank) == b) wb_full[b] <= 1'b0;
        if (set_wb[b]) begin
          wb_full[b] <= 1'b1;
          wb_pend[b] <= 1'b0;
        end
      end
      unique case (st)
        F_IDLE: if (start) begin
          st <= F_IN_WAIT;
          {mb, rb, cb, z, dm} <= '0;
        end
        F_IN_WAIT: if (!ib_full[ib_sel] && !ib_pend[ib_sel]) begin
          st <= F_IN_ISSUE;
          y  <= 0;
          x  <= 0;
        end
        F_IN_ISSUE: if (issue) begin
          if (!x_last) x <= x + BW;
          else begin
            x <= 0;
            if (!y_last) y <= y + 1;
            else begin
              ib_pend[ib_sel] <= 1'b1;
              ib_sel <= !ib_sel;
              dm     <= 0;
              st     <= F_W_WAIT;
            end
          end
        end
        F_W_WAIT: if (!wb_full[wb_sel] && !wb_pend[wb_sel]) begin
          st <= F_W_ISSUE;
          mi <= 0;
          kk <= 0;
        end
        F_W_ISSUE: if (issue) begin
          if (!kk_last) kk <= kk + BW;
          else begin
            kk <= 0;
            if (!mi_last) mi <= mi + 1;
            else begin
              wb_pend[wb_sel] <= 1'b1;
              wb_sel <= !wb_sel;
              if (!dm_last) begin
                dm <= dm + 1;
                st <= F_W_WAIT;
              end else begin
                dm <= 0;
                st <= F_IN_WAIT;
                if (!z_last) z <= z + 1;
                else begin
                  z <= 0;
                  if (!cb_last) cb <= cb + DC*TC;
                  else begin
                    cb <= 0;
                    if (!rb_last) rb <= rb + DR*TR;
                    else begin
                      rb <= 0;
                      if (!mb_last) mb <= mb + DM*TM;
                      else st <= F_IDLE;
                    end
                  end
                end
              end
            end
          end
        end
        default: st <= F_IDLE;
      endcase
    end
  end

endmodule
