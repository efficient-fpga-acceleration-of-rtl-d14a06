// tb_compute_tile: a 3 x 2 x 2 tile accumulates K*K products per pass;
// each unit must see its own position's input and its own map's weight.
// Results are checked against sums computed here after every pass.
module tb_compute_tile;
  import ican_pkg::*;
  localparam int TM = 3, TR = 2, TC = 2, N = TR*TC;
  logic clk = 0, rst_n = 0, en = 0, first = 0, bypass = 0;
  word_t x [N];
  word_t w [TM];
  word_t psum [TM][N];
  word_t acc [TM][N];
  word_t model [TM][N];
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  compute_tile #(.TM(TM), .TR(TR), .TC(TC)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    for (int pass = 0; pass < 20; pass++) begin
      for (int m = 0; m < TM; m++)
        for (int n = 0; n < N; n++) begin
          psum[m][n]  = word_t'($urandom);
          model[m][n] = psum[m][n];
        end
      for (int t = 0; t < 9; t++) begin
        en = 1; first = (t == 0);
        for (int n = 0; n < N; n++) x[n] = word_t'($signed($urandom_range(0, 1 << 20)) - (1 << 19));
        for (int m = 0; m < TM; m++) w[m] = word_t'($signed($urandom_range(0, 1 << 20)) - (1 << 19));
        for (int m = 0; m < TM; m++)
          for (int n = 0; n < N; n++)
            model[m][n] += word_t'((64'(x[n]) * 64'(w[m])) >>> 16);
        @(negedge clk);
      end
      en = 0;
      for (int m = 0; m < TM; m++)
        for (int n = 0; n < N; n++) begin
          checks++;
          if (acc[m][n] !== model[m][n]) begin
            failures++;
            $display("pass %0d unit (%0d,%0d): %h expected %h", pass, m, n, acc[m][n], model[m][n]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
