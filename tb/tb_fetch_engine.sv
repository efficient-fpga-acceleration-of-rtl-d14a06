// tb_fetch_engine: the fetch engine loads a 7x7x2 layer (K = 3, padding 1,
// 5 output maps, so partial tiles in m, r and c) from a memory model that
// randomly withholds ready, over a 4-word bus so rows and weight lanes end
// in partial beats. Two consumer threads stand in for the read and
// compute controllers: each waits for its next bank to become full, checks
// every word of the input slice or weight tile against memory (in-image
// words and in-range maps only), wipes its copy and releases the bank after
// a random delay. The order of slices and tiles is derived here from plain
// nested loops.
module tb_fetch_engine;
  import ican_pkg::*;
  localparam int TM = 2, TR = 2, TC = 2, DM = 2, DR = 2, DC = 2, K_MAX = 3, N = TR*TC;
  localparam int SIDE = (DR*TR-1)*2 + K_MAX;
  localparam int IB_DEPTH = (SIDE*SIDE + N - 1) / N;
  localparam int IAW = $clog2(N*IB_DEPTH), KK = K_MAX*K_MAX;
  localparam int Z = 2, Y = 7, X = 7, M = 5, K = 3, S = 1, P = 1, R = 7, C = 7;
  localparam int W_BASE = 1000, BW = 4;

  logic clk = 0, rst_n = 0, start = 0, busy;
  layer_cfg_t cfg;
  logic rd_req_valid, rd_req_ready, rd_resp_valid;
  logic [ADDR_W-1:0] rd_req_addr;
  fetch_tag_t rd_req_tag, rd_resp_tag;
  word_t rd_resp_data [BW];
  logic wr_valid = 0, wr_ready;
  logic [ADDR_W-1:0] wr_addr = '0;
  word_t wr_data [BW];
  logic [BW-1:0] wr_mask = '0;
  logic [BW-1:0] ib_we, wb_we;
  logic ib_wbank, wb_wbank;
  logic [IAW-1:0] ib_waddr;
  logic [$clog2(TM)-1:0] wb_wlane;
  logic [$clog2(KK)-1:0] wb_waddr;
  word_t ib_wdata [BW];
  word_t wb_wdata [BW];
  logic [1:0] ib_full, wb_full;
  logic ib_release = 0, ib_rel_bank = 0, wb_release = 0, wb_rel_bank = 0;
  word_t ib [2][N*IB_DEPTH];
  word_t wb [2][TM][KK];
  int checks = 0, failures = 0, slices = 0, wtiles = 0;
  always #5 clk = !clk;

  fetch_engine #(.TM(TM), .TR(TR), .TC(TC), .DM(DM), .DR(DR), .DC(DC), .K_MAX(K_MAX),
                 .IB_N(N), .IB_DEPTH(IB_DEPTH), .BUS_WORDS(BW)) dut (.*);
  dram_model #(.WORDS(2048), .LAT(3), .BW(BW)) u_mem (.*);

  always @(posedge clk) begin
    for (int b = 0; b < BW; b++) begin
      if (ib_we[b]) ib[ib_wbank][int'(ib_waddr) + b] <= ib_wdata[b];
      if (wb_we[b]) wb[wb_wbank][wb_wlane][int'(wb_waddr) + b] <= wb_wdata[b];
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic input_consumer();
    int b = 0;
    int ih = (DR*TR-1)*S + K, iw = (DC*TC-1)*S + K;
    for (int mb = 0; mb < M; mb += DM*TM)
      for (int rb = 0; rb < R; rb += DR*TR)
        for (int cb = 0; cb < C; cb += DC*TC)
          for (int z = 0; z < Z; z++) begin
            @(negedge clk);
            while (!ib_full[b]) @(negedge clk);
            for (int y = 0; y < ih; y++)
              for (int x = 0; x < iw; x++) begin
                int iy, ix;
                iy = rb*S - P + y; ix = cb*S - P + x;
                if (iy >= 0 && iy < Y && ix >= 0 && ix < X) begin
                  checks++;
                  if (ib[b][y*iw + x] !== u_mem.mem[(z*Y + iy)*X + ix]) failures++;
                end
              end
            slices++;
            for (int a = 0; a < N*IB_DEPTH; a++) ib[b][a] = 32'hDEAD_BEEF;
            repeat ($urandom_range(0, 20)) @(negedge clk);
            ib_release = 1; ib_rel_bank = 1'(b);
            @(negedge clk);
            ib_release = 0;
            b = 1 - b;
          end
  endtask

  task automatic weight_consumer();
    int b = 0;
    for (int mb = 0; mb < M; mb += DM*TM)
      for (int rb = 0; rb < R; rb += DR*TR)
        for (int cb = 0; cb < C; cb += DC*TC)
          for (int z = 0; z < Z; z++)
            for (int dm = 0; dm < DM && mb + dm*TM < M; dm++) begin
              @(negedge clk);
              while (!wb_full[b]) @(negedge clk);
              for (int mi = 0; mi < TM; mi++)
                for (int kk = 0; kk < K*K; kk++) begin
                  int gm = mb + dm*TM + mi;
                  if (gm < M) begin
                    checks++;
                    if (wb[b][mi][kk] !== u_mem.mem[W_BASE + (gm*Z + z)*K*K + kk]) failures++;
                  end
                end
              wtiles++;
              for (int mi = 0; mi < TM; mi++)
                for (int kk = 0; kk < KK; kk++) wb[b][mi][kk] = 32'hDEAD_BEEF;
              repeat ($urandom_range(0, 30)) @(negedge clk);
              wb_release = 1; wb_rel_bank = 1'(b);
              @(negedge clk);
              wb_release = 0;
              b = 1 - b;
            end
  endtask

  initial begin
    for (int a = 0; a < 2048; a++) u_mem.mem[a] = word_t'($urandom);
    cfg = '0;
    cfg.z = Z; cfg.y = Y; cfg.x = X; cfg.m = M; cfg.r = R; cfg.c = C;
    cfg.k = K; cfg.s = S; cfg.p = P; cfg.in_base = 0; cfg.w_base = W_BASE; cfg.out_base = 1500;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    fork
      input_consumer();
      weight_consumer();
    join
    repeat (5) @(negedge clk);
    checks += 3;
    if (busy) begin failures++; $display("still busy"); end
    if (slices != 16) begin failures++; $display("%0d slices", slices); end
    if (wtiles != 24) begin failures++; $display("%0d weight tiles", wtiles); end
    checks++;
    if (u_mem.bad_addr != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
