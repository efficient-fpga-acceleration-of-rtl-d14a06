// tb_weight_buffer: writes every lane of both banks in multi-word beats and
// reads all lanes of a random bank and address in parallel, checking the
// combinational read against the words written. Later beats use random
// word masks and may run past the end of a lane; those words are dropped.
module tb_weight_buffer;
  import ican_pkg::*;
  localparam int TM = 3, K_MAX = 3, KK = K_MAX*K_MAX, WR = 4;
  logic [WR-1:0] we = '0;
  logic clk = 0, wbank = 0, rbank = 0;
  logic [$clog2(TM)-1:0] wlane;
  logic [$clog2(KK)-1:0] waddr, raddr;
  word_t wdata [WR];
  word_t rdata [TM];
  word_t model [2][TM][KK];
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  weight_buffer #(.TM(TM), .K_MAX(K_MAX), .WR(WR)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int b = 0; b < 2; b++)
      for (int m = 0; m < TM; m++)
        for (int a = 0; a < KK; a += WR) begin
          wbank = b[0]; wlane = $clog2(TM)'(m); waddr = $clog2(KK)'(a);
          for (int k = 0; k < WR; k++) begin
            we[k] = 1'b1; wdata[k] = word_t'($urandom);
            if (a + k < KK) model[b][m][a+k] = wdata[k];
          end
          @(negedge clk);
        end
    we = '0;
    for (int n = 0; n < 200; n++) begin
      rbank = 1'($urandom); raddr = $clog2(KK)'($urandom_range(0, KK-1));
      #1;
      for (int m = 0; m < TM; m++) begin
        checks++;
        if (rdata[m] !== model[rbank][m][raddr]) failures++;
      end
      // rewrite a word of the bank not being read
      wbank = !rbank; wlane = $clog2(TM)'($urandom_range(0, TM-1));
      waddr = $clog2(KK)'($urandom_range(0, KK-1));
      for (int k = 0; k < WR; k++) begin
        we[k] = 1'($urandom); wdata[k] = word_t'($urandom);
      end
      @(negedge clk);
      for (int k = 0; k < WR; k++)
        if (we[k] && int'(waddr) + k < KK) model[wbank][wlane][int'(waddr)+k] = wdata[k];
      we = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
