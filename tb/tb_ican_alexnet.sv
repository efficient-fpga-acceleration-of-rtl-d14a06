// tb_ican_alexnet: the accelerator at its default sizes running the five
// convolutional layers of AlexNet (one of its two partitions):
//   (3,224,224) -> (48,55,55),   K=11, S=4, P=2
//   (48,27,27)  -> (128,27,27),  K=5,  S=1, P=2
//   (256,13,13) -> (192,13,13),  K=3,  S=1, P=1
//   (192,13,13) -> (192,13,13),  K=3,  S=1, P=1
//   (192,13,13) -> (128,13,13),  K=3,  S=1, P=1
// Every output word is checked against a convolution computed here, MAC
// cycles against passes * K*K, and the run time of each layer against the
// timing model of the design: one pass every max(K*K, H + 1) cycles, H + 1
// being the shape-adapter fill time for a window of H = (T_R-1)*S + K rows,
// and each weight tile (the D_R*D_C passes of one dm) lasting at least as
// long as fetching the next one, T_M*ceil(K*K/8) beats plus the memory
// latency plus 4 cycles of bank hand-over (two weight banks give one tile
// of look-ahead). The memory model
// never withholds ready and answers after LAT = 20 cycles; a layer may take
// at most 10% more cycles than the model (input fetch and write-back
// hidden behind compute). The MAC utilisation of the
// 539 units is printed per layer and for the whole network.
module tb_ican_alexnet;
  import ican_pkg::*;

  localparam int TM = 11, TR = 7, TC = 7, DM = 18, DR = 2, DC = 2;
  localparam int IN_BASE = 0, W_BASE = 1 << 18, OUT_BASE = 3 << 18, LAT = 20;

  logic clk = 0, rst_n = 0, start = 0;
  layer_cfg_t cfg;
  logic busy, done;
  logic rd_req_valid, rd_req_ready, rd_resp_valid, wr_valid, wr_ready;
  logic [ADDR_W-1:0] rd_req_addr, wr_addr;
  fetch_tag_t rd_req_tag, rd_resp_tag;
  word_t rd_resp_data [8];
  word_t wr_data [8];
  logic [7:0] wr_mask;

  always #5 clk = !clk;

  ican_accel dut (.*);

  dram_model #(.WORDS(1 << 20), .LAT(LAT), .STALLS(1'b0)) u_mem (.*);

  int checks = 0, failures = 0;
  int n_mac = 0;
  longint tot_macs = 0, tot_cycles = 0;

  always @(posedge clk) if (rst_n && busy && dut.mac_en) n_mac++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t rnd_word();
    return word_t'($signed($urandom_range(0, 1 << 18)) - (1 << 17));
  endfunction

  function automatic int cdiv(int a, int b);
    return (a + b - 1) / b;
  endfunction

  task automatic run_layer(int z, int y, int x, int m, int k, int s, int p);
    int r, c, passes, cyc0, mac0, per, est;
    word_t ref_v;
    r = (y + 2*p - k) / s + 1;
    c = (x + 2*p - k) / s + 1;
    cfg = '0;
    cfg.z = dim_t'(z); cfg.y = dim_t'(y); cfg.x = dim_t'(x);
    cfg.m = dim_t'(m); cfg.r = dim_t'(r); cfg.c = dim_t'(c);
    cfg.k = 4'(k); cfg.s = 3'(s); cfg.p = 4'(p);
    cfg.in_base = IN_BASE; cfg.w_base = W_BASE; cfg.out_base = OUT_BASE;
    for (int i = 0; i < z*y*x; i++) u_mem.mem[IN_BASE + i] = rnd_word();
    for (int i = 0; i < m*z*k*k; i++) u_mem.mem[W_BASE + i] = rnd_word();
    for (int i = 0; i < m*r*c + 64; i++) u_mem.mem[OUT_BASE + i] = 32'h0BAD_F00D;
    // passes: per output tile, Z * (m blocks) * (r blocks) * (c blocks)
    passes = 0;
    est = 0;
    per = (k*k > (TR-1)*s + k + 1) ? k*k : (TR-1)*s + k + 1;
    for (int mb = 0; mb < m; mb += DM*TM)
      for (int rb = 0; rb < r; rb += DR*TR)
        for (int cb = 0; cb < c; cb += DC*TC) begin
          int ndm, nrc, wt;
          ndm = cdiv((m-mb < DM*TM) ? m-mb : DM*TM, TM);
          nrc = cdiv((r-rb < DR*TR) ? r-rb : DR*TR, TR) * cdiv((c-cb < DC*TC) ? c-cb : DC*TC, TC);
          wt  = TM * cdiv(k*k, 8) + LAT + 4;
          passes += z * ndm * nrc;
          est    += z * ndm * ((nrc * per > wt) ? nrc * per : wt);
        end
    mac0 = n_mac;
    @(posedge clk); start <= 1;
    @(posedge clk); start <= 0;
    @(posedge clk);
    cyc0 = 1;
    while (!done) begin
      @(posedge clk);
      cyc0++;
    end
    checks++;
    if (n_mac - mac0 != passes * k * k) begin
      failures++;
      $display("MAC cycles %0d, expected %0d passes x %0d", n_mac - mac0, passes, k*k);
    end
    for (int mo = 0; mo < m; mo++)
      for (int ro = 0; ro < r; ro++)
        for (int co = 0; co < c; co++) begin
          ref_v = '0;
          for (int zi = 0; zi < z; zi++)
            for (int i = 0; i < k; i++)
              for (int j = 0; j < k; j++) begin
                int iy, ix;
                iy = ro*s + i - p;
                ix = co*s + j - p;
                if (iy >= 0 && iy < y && ix >= 0 && ix < x)
                  ref_v += fx_mul(u_mem.mem[IN_BASE + (zi*y + iy)*x + ix],
                                  u_mem.mem[W_BASE + ((mo*z + zi)*k + i)*k + j]);
              end
          checks++;
          if (u_mem.mem[OUT_BASE + (mo*r + ro)*c + co] !== ref_v) begin
            failures++;
            if (failures < 10)
              $display("layer k=%0d s=%0d: B[%0d][%0d][%0d] = %h, expected %h", k, s, mo, ro, co,
                       u_mem.mem[OUT_BASE + (mo*r + ro)*c + co], ref_v);
          end
        end
    checks++;
    if (u_mem.mem[OUT_BASE + m*r*c] !== 32'h0BAD_F00D) begin
      failures++;
      $display("write past the end of the output");
    end
    checks++;
    if (cyc0 * 10 > est * 11) begin
      failures++;
      $display("layer too slow: %0d cycles, timing model %0d", cyc0, est);
    end
    tot_macs += longint'(m) * r * c * z * k * k;
    tot_cycles += cyc0;
    $display("layer Z=%0d %0dx%0d M=%0d K=%0d S=%0d P=%0d -> %0dx%0d: %0d cycles (model %0d), %0d passes, MAC utilisation %0.1f%%",
             z, y, x, m, k, s, p, r, c, cyc0, est, passes,
             100.0 * real'(longint'(m) * r * c * z * k * k) / (real'(TM*TR*TC) * real'(cyc0)));
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    run_layer(3, 224, 224, 48, 11, 4, 2);
    run_layer(48, 27, 27, 128, 5, 1, 2);
    run_layer(256, 13, 13, 192, 3, 1, 1);
    run_layer(192, 13, 13, 192, 3, 1, 1);
    run_layer(192, 13, 13, 128, 3, 1, 1);
    checks++;
    if (u_mem.bad_addr != 0) begin failures++; $display("out-of-range memory access"); end
    $display("network: %0d cycles, MAC utilisation %0.1f%%, %0.1f GOPS at 160 MHz", tot_cycles,
             100.0 * real'(tot_macs) / (real'(TM*TR*TC) * real'(tot_cycles)),
             2.0 * real'(tot_macs) * 0.16 / real'(tot_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
