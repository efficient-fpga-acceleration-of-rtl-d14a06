// ican_accel: convolutional-layer accelerator built around a 3D array of
// MAC units fed by an input reuse network.
//
// The accelerator computes one convolutional layer at a time,
//   B[m][r][c] = sum over z, i, j of W[m][z][i][j] * A[z][r*S+i-P][c*S+j-P],
// reading A and W from and writing B to external memory. The compute tile
// holds T_M x T_R x T_C MAC units, one per output neuron of a compute tile.
// An input reuse network of registers, loaded from the input buffer through
// the shape adapter, feeds all T_R x T_C positions and walks each value over
// its K x K neighbourhood, so a window is read from the buffer once per
// K*K MAC cycles. Input, weight and output buffers are double-buffered so
// that external memory traffic overlaps computation; an output tile of
// D_M*T_M x D_R*T_R x D_C*T_C neurons stays on chip until all input maps
// have been accumulated.
//
// Blocks: window_sequencer (loop nest), read_controller + input_buffer +
// shape_adapter (input path), input_reuse_network + compute_tile (compute),
// weight_buffer, output_buffer, compute_controller (pass schedule),
// fetch_engine (memory reads), drain_engine (memory writes).
//
// Interface: cfg is sampled while the layer runs and must stay stable from
// start until done. start is a one-cycle pulse while idle; done rises when
// the last output word has been accepted by the memory write channel and
// stays high until the next start. External memory is a read channel
// (request valid/ready with address and tag, in-order response with tag)
// and a write channel (valid/ready, address, data, word mask), each moving
// one beat of BUS_WORDS consecutive words per cycle.
// Defaults are the main configuration: (T_M, T_R, T_C) = (11, 7, 7),
// (D_M, D_R, D_C) = (18, 2, 2), sized for kernels up to 11 and strides up
// to 4 (the largest of the five-layer benchmark network). The 8-word memory
// beat is this design's choice: about the bandwidth of the reference board
// at the reference clock (6.2 GB/s at 160 MHz, near 10 words per cycle),
// which keeps the default array compute-bound on that network.
module ican_accel
  import ican_pkg::*;
#(
  parameter int TM    = 11,
  parameter int TR    = 7,
  parameter int TC    = 7,
  parameter int DM    = 18,
  parameter int DR    = 2,
  parameter int DC    = 2,
  parameter int K_MAX = 11,
  parameter int S_MAX = 4,
  parameter int BUS_WORDS = 8,
  localparam int N    = TR*TC,
  localparam int IB_SIDE  = ((DR > DC ? DR*TR : DC*TC) - 1)*S_MAX + K_MAX,
  localparam int IB_DEPTH = (IB_SIDE*IB_SIDE + N - 1) / N,
  localparam int OB_DEPTH = DM*DR*DC,
  localparam int H    = (TR-1)*S_MAX + K_MAX,
  localparam int W    = (TC-1)*S_MAX + K_MAX
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  layer_cfg_t        cfg,
  output logic              busy,
  output logic              done,
  // external memory read channel
  output logic              rd_req_valid,
  input  logic              rd_req_ready,
  output logic [ADDR_W-1:0] rd_req_addr,
  output fetch_tag_t        rd_req_tag,
  input  logic              rd_resp_valid,
  input  word_t             rd_resp_data [BUS_WORDS],
  input  fetch_tag_t        rd_resp_tag,
  // external memory write channel
  output logic              wr_valid,
  input  logic              wr_ready,
  output logic [ADDR_W-1:0] wr_addr,
  output word_t             wr_data [BUS_WORDS],
  output logic [BUS_WORDS-1:0] wr_mask
);

  localparam int IAW = $clog2(N*IB_DEPTH);
  localparam int LAW = $clog2(OB_DEPTH);
  localparam int WAW = $clog2(K_MAX*K_MAX);
  localparam int HW  = $clog2(H);

  // ---------------------------------------------------------------- control
  logic      go;
  logic      seq_busy, seq_valid, seq_ready;
  win_desc_t seq_desc;
  logic      fe_busy, de_busy, layer_done, done_pend;

  assign go = start && !busy;

  window_sequencer #(
    .TM(TM), .TR(TR), .TC(TC), .DM(DM), .DR(DR), .DC(DC)
  ) u_seq (
    .clk, .rst_n, .start(go), .cfg,
    .busy(seq_busy), .valid(seq_valid), .ready(seq_ready), .desc(seq_desc)
  );

  // ------------------------------------------------------------ input path
  logic [BUS_WORDS-1:0] ib_we;
  logic         ib_wbank, ib_rd_en, ib_rbank;
  logic [IAW-1:0] ib_waddr, ib_raddr;
  word_t        ib_wdata [BUS_WORDS];
  word_t        ib_rdata [N];
  logic [1:0]   ib_full;
  logic         ib_release, ib_rel_bank;

  input_buffer #(.N(N), .DEPTH(IB_DEPTH), .WR(BUS_WORDS)) u_ibuf (
    .clk, .we(ib_we), .wbank(ib_wbank), .waddr(ib_waddr), .wdata(ib_wdata),
    .rd_en(ib_rd_en), .rbank(ib_rbank), .raddr(ib_raddr), .rdata(ib_rdata)
  );

  logic         sa_wr_en;
  logic [HW-1:0] sa_wr_row;
  word_t        sa_wr_data [W];
  logic [W-1:0] sa_wr_keep;
  word_t        sa_data [H][W];
  logic         sa_valid, sa_take;
  win_desc_t    sa_desc;

  read_controller #(
    .TR(TR), .TC(TC), .DC(DC), .K_MAX(K_MAX), .S_MAX(S_MAX), .IB_N(N), .IB_DEPTH(IB_DEPTH)
  ) u_rdctl (
    .clk, .rst_n, .cfg,
    .in_valid(seq_valid), .in_ready(seq_ready), .in_desc(seq_desc),
    .ib_full, .ib_release, .ib_rel_bank,
    .ib_rd_en, .ib_rbank, .ib_raddr, .ib_rdata,
    .sa_wr_en, .sa_wr_row, .sa_wr_data, .sa_wr_keep,
    .sa_valid, .sa_desc, .sa_take
  );

  shape_adapter #(.TR(TR), .TC(TC), .K_MAX(K_MAX), .S_MAX(S_MAX)) u_sa (
    .clk, .wr_en(sa_wr_en), .wr_row(sa_wr_row), .wr_data(sa_wr_data),
    .wr_keep(sa_wr_keep), .data(sa_data)
  );

  // --------------------------------------------------------------- compute
  shift_e   irn_shift;
  word_t    taps [N];

  input_reuse_network #(.TR(TR), .TC(TC), .K_MAX(K_MAX), .S_MAX(S_MAX)) u_irn (
    .clk, .load(sa_take), .ld_data(sa_data), .shift(irn_shift),
    .stride(cfg.s), .tap(taps)
  );

  logic     mac_en, mac_first, mac_bypass, psum_zero;
  logic [BUS_WORDS-1:0] wb_we;
  logic     wb_wbank, wb_rbank, wb_release, wb_rel_bank;
  logic [$clog2(TM)-1:0] wb_wlane;
  logic [WAW-1:0] wb_waddr, wb_raddr;
  word_t    wb_wdata [BUS_WORDS];
  word_t    weights [TM];
  logic [1:0] wb_full;

  logic     ob_rd_en, ob_rbank, ob_we, ob_wbank;
  logic [LAW-1:0] ob_rline, ob_wline;
  word_t    ob_rdata [TM][N];
  word_t    psum     [TM][N];
  word_t    acc      [TM][N];
  logic [1:0] ob_full;
  logic     ob_mark, ob_mark_bank;
  win_desc_t ob_mark_desc;

  compute_controller #(.K_MAX(K_MAX), .DEPTH(OB_DEPTH)) u_cctl (
    .clk, .rst_n, .cfg,
    .sa_valid, .sa_desc, .sa_take, .irn_shift,
    .mac_en, .mac_first, .mac_bypass, .psum_zero,
    .wb_full, .wb_release, .wb_rel_bank, .wb_rbank, .wb_raddr,
    .ob_rd_en, .ob_rbank, .ob_rline, .ob_we, .ob_wbank, .ob_wline,
    .ob_full, .ob_mark, .ob_mark_bank, .ob_mark_desc, .layer_done
  );

  weight_buffer #(.TM(TM), .K_MAX(K_MAX), .WR(BUS_WORDS)) u_wbuf (
    .clk, .we(wb_we), .wbank(wb_wbank), .wlane(wb_wlane), .waddr(wb_waddr),
    .wdata(wb_wdata), .rbank(wb_rbank), .raddr(wb_raddr), .rdata(weights)
  );

  always_comb begin
    for (int m = 0; m < TM; m++)
      for (int n = 0; n < N; n++)
        psum[m][n] = psum_zero ? '0 : ob_rdata[m][n];
  end

  compute_tile #(.TM(TM), .TR(TR), .TC(TC)) u_tile (
    .clk, .rst_n, .en(mac_en), .first(mac_first), .bypass(mac_bypass),
    .x(taps), .w(weights), .psum, .acc
  );

  logic                  d_en, d_bank;
  logic [LAW-1:0]        d_line;
  logic [$clog2(TM)-1:0] d_lane;
  logic [$clog2(TR+1)-1:0] d_row;
  word_t                 d_data [TC];

  output_buffer #(.TM(TM), .N(N), .DEPTH(OB_DEPTH), .TC(TC)) u_obuf (
    .clk,
    .rd_en(ob_rd_en), .rbank(ob_rbank), .rline(ob_rline), .rdata(ob_rdata),
    .we(ob_we), .wbank(ob_wbank), .wline(ob_wline), .wdata(acc),
    .d_en, .dbank(d_bank), .dline(d_line), .dlane(d_lane), .drow(d_row), .ddata(d_data)
  );

  // ------------------------------------------------------- external memory
  fetch_engine #(
    .TM(TM), .TR(TR), .TC(TC), .DM(DM), .DR(DR), .DC(DC), .K_MAX(K_MAX),
    .IB_N(N), .IB_DEPTH(IB_DEPTH), .BUS_WORDS(BUS_WORDS)
  ) u_fetch (
    .clk, .rst_n, .start(go), .cfg, .busy(fe_busy),
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_req_tag,
    .rd_resp_valid, .rd_resp_data, .rd_resp_tag,
    .ib_we, .ib_wbank, .ib_waddr, .ib_wdata, .ib_full, .ib_release, .ib_rel_bank,
    .wb_we, .wb_wbank, .wb_wlane, .wb_waddr, .wb_wdata, .wb_full, .wb_release, .wb_rel_bank
  );

  drain_engine #(.TM(TM), .TR(TR), .TC(TC), .DM(DM), .DR(DR), .DC(DC),
                 .BUS_WORDS(BUS_WORDS)) u_drain (
    .clk, .rst_n, .cfg,
    .ob_mark, .ob_mark_bank, .ob_mark_desc, .ob_full, .busy(de_busy),
    .d_en, .d_bank, .d_line, .d_lane, .d_row, .d_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data, .wr_mask
  );

  // ----------------------------------------------------------- run status
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      done_pend <= 1'b0;
    end else begin
      if (go) begin
        busy <= 1'b1;
        done <= 1'b0;
      end
      if (layer_done) done_pend <= 1'b1;
      if (done_pend && !de_busy && !fe_busy && !seq_busy && !ob_mark) begin
        done_pend <= 1'b0;
        busy      <= 1'b0;
        done      <= 1'b1;
      end
    end
  end

  // A layer must fit the sizes the hardware was built for.
  assert property (@(posedge clk) disable iff (!rst_n)
    go |-> (cfg.k >= 2 && int'(cfg.k) <= K_MAX && cfg.s >= 1 && int'(cfg.s) <= S_MAX));

endmodule
