// tb_input_buffer: fills both banks with random multi-word beats, then
// reads N words from random (unaligned) start addresses of either bank and
// checks them, one cycle after the read, against the words written. Beats
// with random word masks continue to be written to one bank while the other
// is read; masked-off words must not change.
module tb_input_buffer;
  import ican_pkg::*;
  localparam int N = 5, DEPTH = 7, WR = 3, AW = $clog2(N*DEPTH);
  logic [WR-1:0] we = '0;
  logic clk = 0, wbank = 0, rd_en = 0, rbank = 0;
  logic [AW-1:0] waddr, raddr;
  word_t wdata [WR];
  word_t rdata [N];
  word_t model [2][N*DEPTH];
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  input_buffer #(.N(N), .DEPTH(DEPTH), .WR(WR)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < N*DEPTH; a += WR) begin
        wbank = b[0]; waddr = AW'(a);
        for (int k = 0; k < WR; k++) begin
          we[k] = (a + k < N*DEPTH);
          wdata[k] = word_t'($urandom);
          if (we[k]) model[b][a+k] = wdata[k];
        end
        @(negedge clk);
      end
    we = '0;
    for (int n = 0; n < 300; n++) begin
      int a, b;
      b = $urandom_range(0, 1);
      a = $urandom_range(0, N*DEPTH - N);
      rd_en = 1; rbank = b[0]; raddr = AW'(a);
      // keep writing the other bank
      wbank = !rbank; waddr = AW'($urandom_range(0, N*DEPTH-WR));
      for (int k = 0; k < WR; k++) begin
        we[k] = 1'($urandom);
        wdata[k] = word_t'($urandom);
      end
      @(negedge clk);
      for (int k = 0; k < WR; k++) if (we[k]) model[wbank][int'(waddr)+k] = wdata[k];
      rd_en = 0; we = '0;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (rdata[k] !== model[b][a + k]) begin
          failures++;
          if (failures < 10) $display("bank %0d addr %0d word %0d: %h expected %h", b, a, k, rdata[k], model[b][a+k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
