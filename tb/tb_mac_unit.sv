// tb_mac_unit: checks the multiply-accumulate unit against a reference
// accumulator: passes of random length starting from a partial sum, from
// its own value (bypass), with idle cycles in between, in Q16.16.
module tb_mac_unit;
  import ican_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, first = 0, bypass = 0;
  word_t x, w, psum, acc, model;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  mac_unit dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; w = '0; psum = '0;
    @(negedge clk); rst_n = 1;
    model = '0;
    for (int pass = 0; pass < 200; pass++) begin
      int len = $urandom_range(1, 9);
      for (int t = 0; t < len; t++) begin
        en = 1;
        first = (t == 0);
        bypass = first && ($urandom_range(0, 3) == 0);
        x = word_t'($urandom);  w = word_t'($urandom);
        if (pass % 2 == 0) begin x = x >>> 12; w = w >>> 12; end
        psum = word_t'($urandom);
        if (first && !bypass) model = psum;
        model = model + word_t'((64'(signed'(x)) * 64'(signed'(w))) >>> 16);
        @(negedge clk);
        checks++;
        if (acc !== model) begin
          failures++;
          $display("pass %0d t %0d: acc %h expected %h", pass, t, acc, model);
        end
      end
      en = 0; first = 0; bypass = 0;
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        checks++;
        if (acc !== model) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
