// tb_input_reuse_network: loads a random array and walks the serpentine
// schedule (west K-1, north, east K-1, north, ...) for several kernel sizes
// and strides. In cycle (i, j') of the walk, tap (r, c) must show the loaded
// value at row r*S + i, column c*S + j', with j' = j on even rows and K-1-j
// on odd rows. Also checks that an idle cycle holds the array.
module tb_input_reuse_network;
  import ican_pkg::*;
  localparam int TR = 3, TC = 4, K_MAX = 5, S_MAX = 3;
  localparam int H = (TR-1)*S_MAX + K_MAX, W = (TC-1)*S_MAX + K_MAX;
  logic clk = 0, load = 0;
  word_t ld_data [H][W];
  word_t orig [H][W];
  shift_e shift = SH_NONE;
  logic [2:0] stride;
  word_t tap [TR*TC];
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  input_reuse_network #(.TR(TR), .TC(TC), .K_MAX(K_MAX), .S_MAX(S_MAX)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic walk(int k, int s);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) ld_data[y][x] = word_t'($urandom);
    orig = ld_data;
    stride = 3'(s);
    load = 1;
    @(negedge clk);
    load = 0;
    shift = SH_NONE;
    @(negedge clk);   // idle cycle: nothing moves
    for (int i = 0; i < k; i++)
      for (int j = 0; j < k; j++) begin
        int jj = (i % 2 == 0) ? j : k-1-j;
        for (int r = 0; r < TR; r++)
          for (int c = 0; c < TC; c++) begin
            checks++;
            if (tap[r*TC + c] !== orig[r*s + i][c*s + jj]) begin
              failures++;
              if (failures < 10)
                $display("K=%0d S=%0d step (%0d,%0d) tap (%0d,%0d): %h expected %h",
                         k, s, i, jj, r, c, tap[r*TC + c], orig[r*s + i][c*s + jj]);
            end
          end
        if (j < k-1) shift = (i % 2 == 0) ? SH_WEST : SH_EAST;
        else         shift = SH_NORTH;
        @(negedge clk);
      end
    shift = SH_NONE;
  endtask

  initial begin
    @(negedge clk);
    walk(3, 1);
    walk(5, 1);
    walk(5, 3);
    walk(2, 2);
    walk(4, 3);
    walk(5, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
