// mac_unit: one neuron of the compute tile, a fixed-point multiply-accumulate.
//
// Each enabled cycle the unit adds x*w (Q16.16, truncated) to its
// accumulator. On the first cycle of a pass the accumulator is instead
// started from the partial sum read from the output buffer (psum), or, when
// the same output line is revisited back to back, from its own previous
// result (bypass), because that result is written to the output buffer in
// the same cycle in which it would be read back. The result stays in acc
// until the next pass starts, which is when it is stored.
// Timing: one MAC per cycle, result registered.
// The multiply-accumulate role follows the source; the number format, the
// start/bypass controls and the single-cycle form (instead of a pipelined
// DSP chain) are this design's choices.
module mac_unit
  import ican_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,      // accumulate this cycle
  input  logic  first,   // first cycle of a pass: start from psum
  input  logic  bypass,  // with first: start from own acc instead of psum
  input  word_t x,       // input neuron value
  input  word_t w,       // weight
  input  word_t psum,    // partial sum loaded from the output buffer
  output word_t acc
);

  word_t base;

  always_comb begin
    if (!first)      base = acc;
    else if (bypass) base = acc;
    else             base = psum;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= base + fx_mul(x, w);
  end

endmodule
