// tb_drain_engine: two output tiles of a 5 x 5 x 5 layer, the second a
// partial tile, are handed over in turn through the output-bank protocol.
// The output buffer is modelled here (one-cycle read of a TC-word row
// segment); the write bus is wider than a segment. The memory model
// randomly withholds ready. Checked: every in-range neuron lands at
// out_base + (m*R + r)*C + c with the value of its buffer line and word,
// nothing else is written, and each bank is freed after its write-back.
module tb_drain_engine;
  import ican_pkg::*;
  localparam int TM = 2, TR = 2, TC = 2, DM = 2, DR = 2, DC = 2;
  localparam int DEPTH = DM*DR*DC, N = TR*TC;
  localparam int M = 5, R = 5, C = 5, OUT_BASE = 100, BW = 4;
  logic clk = 0, rst_n = 0;
  layer_cfg_t cfg;
  logic ob_mark = 0, ob_mark_bank = 0;
  win_desc_t ob_mark_desc;
  logic [1:0] ob_full;
  logic busy, d_en, d_bank;
  logic [$clog2(DEPTH)-1:0] d_line;
  logic [$clog2(TM)-1:0] d_lane;
  logic [$clog2(TR+1)-1:0] d_row;
  word_t d_data [TC];
  logic wr_valid, wr_ready;
  logic [ADDR_W-1:0] wr_addr;
  word_t wr_data [BW];
  logic [BW-1:0] wr_mask;
  logic rd_req_valid = 0, rd_req_ready, rd_resp_valid;
  logic [ADDR_W-1:0] rd_req_addr = '0;
  fetch_tag_t rd_req_tag = '0, rd_resp_tag;
  word_t rd_resp_data [BW];
  word_t obuf [2][DEPTH][TM][N];
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  drain_engine #(.TM(TM), .TR(TR), .TC(TC), .DM(DM), .DR(DR), .DC(DC), .BUS_WORDS(BW)) dut (.*);
  dram_model #(.WORDS(256), .LAT(2), .BW(BW)) u_mem (.*);

  always @(posedge clk)
    if (d_en) for (int c = 0; c < TC; c++) d_data[c] <= obuf[d_bank][d_line][d_lane][int'(d_row)*TC + c];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hand_over(int bank, int mb, int rb, int cb);
    for (int l = 0; l < DEPTH; l++)
      for (int m = 0; m < TM; m++)
        for (int n = 0; n < N; n++) obuf[bank][l][m][n] = word_t'($urandom);
    while (ob_full[bank]) @(negedge clk);
    ob_mark = 1; ob_mark_bank = 1'(bank);
    ob_mark_desc = '0;
    ob_mark_desc.m_base = dim_t'(mb); ob_mark_desc.r_base = dim_t'(rb); ob_mark_desc.c_base = dim_t'(cb);
    @(negedge clk);
    ob_mark = 0;
  endtask

  task automatic check_tile(int bank, int mb, int rb, int cb);
    for (int m = mb; m < M && m < mb + DM*TM; m++)
      for (int r = rb; r < R && r < rb + DR*TR; r++)
        for (int c = cb; c < C && c < cb + DC*TC; c++) begin
          int dm, mi, dr, ri, dc, ci;
          dm = (m - mb) / TM; mi = (m - mb) % TM;
          dr = (r - rb) / TR; ri = (r - rb) % TR;
          dc = (c - cb) / TC; ci = (c - cb) % TC;
          checks++;
          if (u_mem.mem[OUT_BASE + (m*R + r)*C + c] !==
              obuf[bank][(dm*DR + dr)*DC + dc][mi][ri*TC + ci]) failures++;
        end
  endtask

  initial begin
    for (int a = 0; a < 256; a++) u_mem.mem[a] = 32'h5555_5555;
    cfg = '0;
    cfg.m = M; cfg.r = R; cfg.c = C; cfg.out_base = OUT_BASE;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    hand_over(0, 0, 0, 0);       // full 4x4x4 tile
    hand_over(1, 4, 4, 4);       // partial tile: one map, one row, one column
    @(negedge clk);
    while (busy) @(negedge clk);
    check_tile(0, 0, 0, 0);
    check_tile(1, 4, 4, 4);
    checks += 2;
    if (u_mem.writes != 4*4*4 + 1) begin failures++; $display("%0d writes", u_mem.writes); end
    if (ob_full != 2'b00) failures++;
    // a third tile reuses bank 0 once it is free
    hand_over(0, 0, 4, 0);
    @(negedge clk);
    while (busy) @(negedge clk);
    check_tile(0, 0, 4, 0);
    checks++;
    if (u_mem.writes != 4*4*4 + 1 + 4*1*4) begin failures++; $display("%0d writes", u_mem.writes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
