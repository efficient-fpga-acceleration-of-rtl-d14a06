// tb_compute_controller: feeds seven passes of K = 3 back to back (two
// output tiles, the second a single output line revisited for a second
// input map) and checks, cycle by cycle: the reuse-network command
// sequence (west, west, north, east, east, north, west, west, ...), the
// weight address i*K + j' of the serpentine order, the first-cycle flags,
// the partial-sum load at the start cycle and the store one cycle after the
// last MAC cycle, the bypass for the revisited line, weight-bank releases
// and output-bank hand-overs. With windows always ready the layer must take
// exactly 7*K*K MAC cycles with no gap.
module tb_compute_controller;
  import ican_pkg::*;
  localparam int K_MAX = 5, DEPTH = 8, K = 3;
  logic clk = 0, rst_n = 0;
  layer_cfg_t cfg;
  logic sa_valid = 0, sa_take;
  win_desc_t sa_desc;
  shift_e irn_shift;
  logic mac_en, mac_first, mac_bypass, psum_zero;
  logic [1:0] wb_full = 2'b11;
  logic wb_release, wb_rel_bank, wb_rbank;
  logic [$clog2(K_MAX*K_MAX)-1:0] wb_raddr;
  logic ob_rd_en, ob_rbank, ob_we, ob_wbank;
  logic [$clog2(DEPTH)-1:0] ob_rline, ob_wline;
  logic [1:0] ob_full = 2'b00;
  logic ob_mark, ob_mark_bank;
  win_desc_t ob_mark_desc;
  logic layer_done;
  int checks = 0, failures = 0;
  int releases = 0, marks = 0, bypasses = 0;
  win_desc_t plist [7];
  always #5 clk = !clk;

  compute_controller #(.K_MAX(K_MAX), .DEPTH(DEPTH)) dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bank bookkeeping standing in for the fetch and drain engines
  always @(posedge clk) if (rst_n) begin
    if (wb_release) begin
      releases++;
      chk(wb_rel_bank == 1'(releases - 1), $sformatf("weight bank %0d released as release %0d", wb_rel_bank, releases));
    end
    if (ob_mark) begin
      marks++;
      ob_full[ob_mark_bank] <= 1'b1;
      fork begin
        automatic logic b = ob_mark_bank;
        repeat (3) @(posedge clk);
        ob_full[b] <= 1'b0;
      end join_none
    end
  end

  function automatic win_desc_t mk(logic tf, logic zf, logic wl, logic tl, logic l, int line);
    win_desc_t d = '0;
    d.tile_first = tf; d.z_first = zf; d.wtile_last = wl; d.tile_last = tl; d.last = l;
    d.line = dim_t'(line);
    return d;
  endfunction

  // producer: a window is always ready
  initial begin
    plist[0] = mk(1, 1, 0, 0, 0, 0);
    plist[1] = mk(0, 1, 1, 0, 0, 1);
    plist[2] = mk(0, 0, 0, 0, 0, 0);
    plist[3] = mk(0, 0, 1, 1, 0, 1);
    plist[4] = mk(1, 1, 1, 0, 0, 0);
    plist[5] = mk(0, 0, 1, 0, 0, 0);   // same line again: bypass
    plist[6] = mk(0, 0, 1, 1, 1, 0);   // and once more
    cfg = '0; cfg.k = 4'(K);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < 7; p++) begin
      sa_valid = 1; sa_desc = plist[p];
      #4;
      while (!sa_take) begin @(negedge clk); #4; end
      @(negedge clk);
    end
    sa_valid = 0;
  end

  // checker: samples 1 time unit before each rising edge
  initial begin
    int t0, tdone;
    @(posedge rst_n);
    @(negedge clk); #4;
    while (!sa_take) begin @(negedge clk); #4; end
    t0 = 0;
    for (int p = 0; p < 7; p++) begin
      // start cycle: partial-sum read of the pass's line
      chk(ob_rd_en && ob_rline == plist[p].line, "partial sums not read at pass start");
      @(negedge clk); #4;
      for (int i = 0; i < K; i++)
        for (int j = 0; j < K; j++) begin
          int jj;
          shift_e e;
          jj = (i % 2 == 0) ? j : K-1-j;
          if (j < K-1) e = (i % 2 == 0) ? SH_WEST : SH_EAST; else e = SH_NORTH;
          chk(mac_en, "MAC idle inside a pass");
          chk(mac_first == (i == 0 && j == 0), "first flag");
          chk(int'(wb_raddr) == i*K + jj, "weight address");
          chk(irn_shift == e, "reuse network shift");
          if (i == 0 && j == 0) begin
            chk(psum_zero == plist[p].z_first, "zero partial sum flag");
            chk(mac_bypass == (p == 5 || p == 6), "bypass flag");
            if (mac_bypass) bypasses++;
            if (p > 0) chk(ob_we && ob_wline == plist[p-1].line, "store of the previous pass");
          end
          if (i == K-1 && j == K-1 && p < 6) chk(sa_take, "next pass does not start in the last MAC cycle");
          t0++;
          if (!(i == K-1 && j == K-1)) begin @(negedge clk); #4; end
        end
      if (p == 6) begin @(negedge clk); #4; end
    end
    // store of the last pass
    chk(ob_we && ob_wline == plist[6].line && layer_done, "last store / layer done");
    chk(!mac_en, "MAC active after the last pass");
    chk(t0 == 7*K*K, "MAC cycle count");
    repeat (5) @(negedge clk);
    chk(releases == 5, "weight bank releases");
    chk(marks == 2, "output bank hand-overs");
    chk(bypasses == 2, "bypasses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
