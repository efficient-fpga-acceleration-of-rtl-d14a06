// tb_read_controller: drives the read controller with a real input buffer.
// Two input slices (one per bank) are written with random words; for each,
// the four windows of a 2 x 2 output tile are requested. Every window that
// reaches the shape adapter port is compared with the slice words it
// should hold, zero outside the image and beyond the window width. Also
// checked: the input bank is released exactly once after the last window of
// its slice, and a queued window is ready H cycles after the cycle in which
// the previous one is taken (H = (T_R-1)*S+K rows; the first row is read in
// the take cycle, every row is written one cycle after its read).
module tb_read_controller;
  import ican_pkg::*;
  localparam int TR = 3, TC = 2, DR = 2, DC = 2, K_MAX = 3, S_MAX = 2, N = TR*TC;
  localparam int SIDE = ((DR*TR-1)*S_MAX + K_MAX) * ((DC*TC-1)*S_MAX + K_MAX);
  localparam int DEPTH = (SIDE + N - 1) / N;
  localparam int H = (TR-1)*S_MAX + K_MAX, W = (TC-1)*S_MAX + K_MAX;
  localparam int IAW = $clog2(N*DEPTH), HW = $clog2(H);

  logic clk = 0, rst_n = 0;
  layer_cfg_t cfg;
  logic in_valid = 0, in_ready;
  win_desc_t in_desc;
  logic [1:0] ib_full = '0;
  logic ib_release, ib_rel_bank, ib_rd_en, ib_rbank;
  logic [IAW-1:0] ib_raddr;
  word_t ib_rdata [N];
  logic sa_wr_en;
  logic [HW-1:0] sa_wr_row;
  word_t sa_wr_data [W];
  logic [W-1:0] sa_wr_keep;
  logic sa_valid, sa_take = 0;
  win_desc_t sa_desc;
  logic [0:0] we = '0;
  logic wbank = 0;
  logic [IAW-1:0] waddr;
  word_t wdata [1];
  word_t sa [H][W];
  word_t tile [2][SIDE];
  int checks = 0, failures = 0, releases = 0;
  always #5 clk = !clk;

  read_controller #(.TR(TR), .TC(TC), .DC(DC), .K_MAX(K_MAX), .S_MAX(S_MAX),
                    .IB_N(N), .IB_DEPTH(DEPTH)) dut (.*);
  input_buffer #(.N(N), .DEPTH(DEPTH), .WR(1)) u_ib (
    .clk, .we, .wbank, .waddr, .wdata,
    .rd_en(ib_rd_en), .rbank(ib_rbank), .raddr(ib_raddr), .rdata(ib_rdata));

  // shape adapter contents as written
  always @(posedge clk)
    if (sa_wr_en)
      for (int x = 0; x < W; x++) sa[sa_wr_row][x] <= sa_wr_keep[x] ? sa_wr_data[x] : '0;

  always @(posedge clk)
    if (ib_release) begin
      releases++;
      ib_full[ib_rel_bank] <= 1'b0;
    end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic slice(int bank, int k, int s, int p, int rb, int cb);
    int hr, wr, iw, ih;
    hr = (TR-1)*s + k; wr = (TC-1)*s + k;
    ih = (DR*TR-1)*s + k; iw = (DC*TC-1)*s + k;
    for (int a = 0; a < ih*iw; a++) begin
      @(negedge clk);
      we = 1'b1; wbank = bank[0]; waddr = IAW'(a); wdata[0] = word_t'($urandom);
      tile[bank][a] = wdata[0];
    end
    @(negedge clk); we = 0;
    ib_full[bank] = 1'b1;
    fork
      // producer of descriptors
      for (int d = 0; d < 4; d++) begin
        win_desc_t wd;
        int dr, dc;
        dr = d / 2; dc = d % 2;
        wd = '0;
        wd.slice_last = (d == 3);
        wd.line     = dim_t'(d);
        wd.win_row0 = dim_t'(dr*TR*s);
        wd.win_col0 = dim_t'(dc*TC*s);
        wd.img_row0 = coord_t'((rb + dr*TR)*s - p);
        wd.img_col0 = coord_t'((cb + dc*TC)*s - p);
        in_valid = 1; in_desc = wd;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
        in_valid = 0;
      end
      // consumer of filled windows
      for (int d = 0; d < 4; d++) begin
        int wait_c = 0;
        while (!sa_valid) begin @(negedge clk); wait_c++; end
        if (d > 0) begin
          checks++;
          if (wait_c != hr) begin
            failures++;
            $display("window %0d ready %0d cycles after the take, expected %0d", d, wait_c, hr);
          end
        end
        for (int y = 0; y < hr; y++)
          for (int x = 0; x < W; x++) begin
            int iy, ix;
            word_t e;
            iy = int'(sa_desc.img_row0) + y;
            ix = int'(sa_desc.img_col0) + x;
            e = (x < wr && iy >= 0 && iy < int'(cfg.y) && ix >= 0 && ix < int'(cfg.x)) ?
                tile[bank][(int'(sa_desc.win_row0) + y)*iw + int'(sa_desc.win_col0) + x] : '0;
            checks++;
            if (sa[y][x] !== e) begin
              failures++;
              if (failures < 10) $display("window %0d (%0d,%0d): %h expected %h", d, y, x, sa[y][x], e);
            end
          end
        checks++;
        if (sa_desc.line != dim_t'(d)) failures++;
        sa_take = 1;
        @(negedge clk);
        sa_take = 0;
      end
    join
    @(negedge clk);
  endtask

  initial begin
    cfg = '0;
    @(negedge clk); rst_n = 1;
    // 6x6 image, K=3, S=1, P=1: top-left tile with padding on two sides
    cfg.k = 3; cfg.s = 1; cfg.p = 1; cfg.y = 6; cfg.x = 6;
    slice(0, 3, 1, 1, 0, 0);
    // 7x5 image, K=3, S=2, P=1: right edge beyond the image
    cfg.k = 3; cfg.s = 2; cfg.p = 1; cfg.y = 9; cfg.x = 5;
    slice(1, 3, 2, 1, 0, 0);
    checks++;
    if (releases != 2) begin failures++; $display("%0d bank releases, expected 2", releases); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
