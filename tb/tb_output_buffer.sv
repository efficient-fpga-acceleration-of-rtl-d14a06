// tb_output_buffer: stores whole lines into both banks, then in the same
// cycles loads a line (compute read), stores another line and reads one
// TC-word row segment of one lane of the other bank (drain read); each read is checked one cycle
// later against the lines written.
module tb_output_buffer;
  import ican_pkg::*;
  localparam int TM = 2, N = 4, DEPTH = 6, TC = 2;
  localparam int LAW = $clog2(DEPTH), MW = $clog2(TM), RWW = $clog2(N/TC+1);
  logic clk = 0, rd_en = 0, rbank = 0, we = 0, wbank = 0, d_en = 0, dbank = 0;
  logic [LAW-1:0] rline, wline, dline;
  logic [MW-1:0] dlane;
  logic [RWW-1:0] drow;
  word_t rdata [TM][N];
  word_t wdata [TM][N];
  word_t ddata [TC];
  word_t model [2][DEPTH][TM][N];
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  output_buffer #(.TM(TM), .N(N), .DEPTH(DEPTH), .TC(TC)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rand_line();
    for (int m = 0; m < TM; m++)
      for (int n = 0; n < N; n++) wdata[m][n] = word_t'($urandom);
  endtask

  initial begin
    @(negedge clk);
    for (int b = 0; b < 2; b++)
      for (int l = 0; l < DEPTH; l++) begin
        we = 1; wbank = b[0]; wline = LAW'(l); rand_line();
        model[b][l] = wdata;
        @(negedge clk);
      end
    for (int n = 0; n < 300; n++) begin
      word_t exp_line [TM][N];
      word_t exp_word [TC];
      logic  b;
      b = 1'($urandom);
      rd_en = 1; rbank = b; rline = LAW'($urandom_range(0, DEPTH-1));
      we = 1; wbank = b; wline = LAW'($urandom_range(0, DEPTH-1)); rand_line();
      d_en = 1; dbank = !b; dline = LAW'($urandom_range(0, DEPTH-1));
      dlane = MW'($urandom_range(0, TM-1)); drow = RWW'($urandom_range(0, N/TC-1));
      exp_line = model[b][rline];
      for (int c = 0; c < TC; c++) exp_word[c] = model[!b][dline][dlane][int'(drow)*TC + c];
      @(negedge clk);
      model[b][wline] = wdata;
      for (int m = 0; m < TM; m++)
        for (int k = 0; k < N; k++) begin
          checks++;
          if (rdata[m][k] !== exp_line[m][k]) failures++;
        end
      for (int c = 0; c < TC; c++) begin
        checks++;
        if (ddata[c] !== exp_word[c]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
