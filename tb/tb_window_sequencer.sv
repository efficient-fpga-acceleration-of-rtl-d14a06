// tb_window_sequencer: runs the loop nest for several layer shapes with a
// randomly stalling consumer and compares every descriptor with one built
// here from plain nested loops over output tiles, z, dm, dr and dc.
module tb_window_sequencer;
  import ican_pkg::*;
  localparam int TM = 2, TR = 3, TC = 2, DM = 3, DR = 2, DC = 2;
  logic clk = 0, rst_n = 0, start = 0, busy, valid, ready;
  layer_cfg_t cfg;
  win_desc_t desc;
  win_desc_t exp_q [$];
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  window_sequencer #(.TM(TM), .TR(TR), .TC(TC), .DM(DM), .DR(DR), .DC(DC)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic build(int z, int m, int r, int c, int s, int p);
    exp_q.delete();
    for (int mb = 0; mb < m; mb += DM*TM)
      for (int rb = 0; rb < r; rb += DR*TR)
        for (int cb = 0; cb < c; cb += DC*TC)
          for (int zi = 0; zi < z; zi++)
            for (int dm = 0; dm < DM && mb + dm*TM < m; dm++)
              for (int dr = 0; dr < DR && rb + dr*TR < r; dr++)
                for (int dc = 0; dc < DC && cb + dc*TC < c; dc++) begin
                  win_desc_t d;
                  logic ldm, ldr, ldc;
                  ldm = (dm == DM-1) || (mb + (dm+1)*TM >= m);
                  ldr = (dr == DR-1) || (rb + (dr+1)*TR >= r);
                  ldc = (dc == DC-1) || (cb + (dc+1)*TC >= c);
                  d = '0;
                  d.z_first    = (zi == 0);
                  d.tile_first = (zi == 0) && dm == 0 && dr == 0 && dc == 0;
                  d.slice_last = ldm && ldr && ldc;
                  d.wtile_last = ldr && ldc;
                  d.tile_last  = (zi == z-1) && d.slice_last;
                  d.last       = d.tile_last && (mb + DM*TM >= m) && (rb + DR*TR >= r) && (cb + DC*TC >= c);
                  d.line       = dim_t'((dm*DR + dr)*DC + dc);
                  d.win_row0   = dim_t'(dr*TR*s);
                  d.win_col0   = dim_t'(dc*TC*s);
                  d.img_row0   = coord_t'((rb + dr*TR)*s - p);
                  d.img_col0   = coord_t'((cb + dc*TC)*s - p);
                  d.m_base     = dim_t'(mb);
                  d.r_base     = dim_t'(rb);
                  d.c_base     = dim_t'(cb);
                  exp_q.push_back(d);
                end
  endtask

  task automatic run(int z, int m, int r, int c, int s, int p);
    int n;
    cfg = '0;
    cfg.z = dim_t'(z); cfg.m = dim_t'(m); cfg.r = dim_t'(r); cfg.c = dim_t'(c);
    cfg.s = 3'(s); cfg.p = 4'(p); cfg.k = 3;
    build(z, m, r, c, s, p);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    n = 0;
    while (busy) begin
      ready = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (valid && ready) begin
        checks++;
        if (exp_q.size() == 0 || desc !== exp_q[0]) begin
          failures++;
          if (failures < 5) $display("descriptor %0d differs: %h", n, desc);
        end
        if (exp_q.size() != 0) void'(exp_q.pop_front());
        n++;
      end
      @(negedge clk);
    end
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d descriptors missing", exp_q.size());
    end
  endtask

  initial begin
    ready = 0;
    @(negedge clk); rst_n = 1;
    run(2, 5, 7, 5, 1, 1);
    run(3, 13, 12, 9, 2, 2);
    run(1, 2, 3, 2, 1, 0);
    run(2, 6, 6, 4, 4, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
