// tb_shape_adapter: writes rows with random keep masks and checks that the
// array holds the written word where kept, zero where not, and that rows
// not written keep their contents.
module tb_shape_adapter;
  import ican_pkg::*;
  localparam int TR = 2, TC = 3, K_MAX = 3, S_MAX = 2;
  localparam int H = (TR-1)*S_MAX + K_MAX, W = (TC-1)*S_MAX + K_MAX;
  logic clk = 0, wr_en = 0;
  logic [$clog2(H)-1:0] wr_row;
  word_t wr_data [W];
  logic [W-1:0] wr_keep;
  word_t data [H][W];
  word_t model [H][W];
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  shape_adapter #(.TR(TR), .TC(TC), .K_MAX(K_MAX), .S_MAX(S_MAX)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    // fill every row first so the model is known
    for (int y = 0; y < H; y++) begin
      wr_en = 1; wr_row = $clog2(H)'(y); wr_keep = '1;
      for (int x = 0; x < W; x++) begin wr_data[x] = word_t'($urandom); model[y][x] = wr_data[x]; end
      @(negedge clk);
    end
    for (int n = 0; n < 200; n++) begin
      wr_en = ($urandom_range(0, 3) != 0);
      wr_row = $clog2(H)'($urandom_range(0, H-1));
      wr_keep = W'($urandom);
      for (int x = 0; x < W; x++) wr_data[x] = word_t'($urandom);
      if (wr_en)
        for (int x = 0; x < W; x++) model[wr_row][x] = wr_keep[x] ? wr_data[x] : '0;
      @(negedge clk);
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          checks++;
          if (data[y][x] !== model[y][x]) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
