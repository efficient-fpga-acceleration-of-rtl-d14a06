// tb_ican_accel_full: the accelerator at its default sizes,
// (T_M,T_R,T_C) = (11,7,7), (D_M,D_R,D_C) = (18,2,2), kernels up to 11 and
// strides up to 4, running two small layers end to end: a 3x3 layer with
// zero padding whose output needs two tiles in m, r and c, and an 11x11
// stride-4 layer shaped like the first layer of the benchmark network.
// Outputs are checked word by word against a convolution computed here,
// MAC cycles against passes * K*K, and the padding, stall, stride-4 and
// overlap mechanisms must each occur.
module tb_ican_accel_full;
  import ican_pkg::*;

  localparam int TM = 11, TR = 7, TC = 7, DM = 18, DR = 2, DC = 2;
  localparam int IN_BASE = 0, W_BASE = 4096, OUT_BASE = 8192;

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

  dram_model #(.WORDS(16384), .LAT(5)) u_mem (.*);

  int checks = 0, failures = 0;
  int n_stall = 0, n_bypass = 0, n_pad = 0, n_fetch_overlap = 0, n_drain_overlap = 0;
  int n_stride2 = 0, n_mac = 0, n_edge_m = 0;

  always @(posedge clk) if (rst_n && busy) begin
    if (!dut.mac_en && !done) n_stall++;
    if (dut.mac_en && dut.mac_first && dut.mac_bypass) n_bypass++;
    if (dut.sa_wr_en && dut.u_rdctl.keep_q != '1) n_pad++;
    if (dut.mac_en && rd_req_valid) n_fetch_overlap++;
    if (dut.mac_en && wr_valid) n_drain_overlap++;
    if (dut.mac_en && cfg.s == 4) n_stride2++;
    if (dut.mac_en) n_mac++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
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
    int r, c, passes, cyc0, mac0;
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
    for (int mb = 0; mb < m; mb += DM*TM)
      for (int rb = 0; rb < r; rb += DR*TR)
        for (int cb = 0; cb < c; cb += DC*TC)
          passes += z * cdiv((m-mb < DM*TM) ? m-mb : DM*TM, TM)
                      * cdiv((r-rb < DR*TR) ? r-rb : DR*TR, TR)
                      * cdiv((c-cb < DC*TC) ? c-cb : DC*TC, TC);
    if (m % TM != 0) n_edge_m++;
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
    $display("layer Z=%0d %0dx%0d M=%0d K=%0d S=%0d P=%0d -> %0dx%0d: %0d cycles, %0d passes",
             z, y, x, m, k, s, p, r, c, cyc0, passes);
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    run_layer(3, 16, 16, 12, 3, 1, 1);  // K = 3, padding, edge tiles in m, r, c
    run_layer(2, 31, 31, 4, 11, 4, 0);  // K = 11, stride 4 (first-layer shape)
    // every mechanism must have occurred
    checks += 6;
    if (n_stall == 0)         begin failures++; $display("no stall");          end
    if (n_pad == 0)           begin failures++; $display("no zero padding");   end
    if (n_fetch_overlap == 0) begin failures++; $display("no fetch overlap");  end
    if (n_drain_overlap == 0) begin failures++; $display("no drain overlap");  end
    if (n_stride2 == 0)       begin failures++; $display("no stride 4");       end
    if (n_edge_m == 0)        begin failures++; $display("no partial m tile"); end
    checks++;
    if (u_mem.bad_addr != 0) begin failures++; $display("out-of-range memory access"); end
    $display("stall=%0d bypass=%0d pad_rows=%0d fetch_overlap=%0d drain_overlap=%0d stride2=%0d",
             n_stall, n_bypass, n_pad, n_fetch_overlap, n_drain_overlap, n_stride2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
