// compute_tile: the 3D array of T_M x T_R x T_C MAC units.
//
// Unit (m, r, c) computes output neuron (m, r, c) of the current compute
// tile. There is no connection between units: every unit of the RC plane m
// shares weight w[m], and every unit at position (r, c) shares the input
// value x[r*T_C + c] supplied by one register of the input reuse network,
// so the T_M units of one (r, c) work in SIMD fashion. Partial sums enter
// and results leave as one T_R*T_C-word line per m, matching the output
// buffer's line width. All units share en/first/bypass.
// Timing: as mac_unit, one MAC per unit per cycle.
// The array shape and sharing follow the source; the flat port layout is
// this design's choice.
module compute_tile
  import ican_pkg::*;
#(
  parameter int TM = 11,
  parameter int TR = 7,
  parameter int TC = 7
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  first,
  input  logic  bypass,
  input  word_t x    [TR*TC],
  input  word_t w    [TM],
  input  word_t psum [TM][TR*TC],
  output word_t acc  [TM][TR*TC]
);

  for (genvar m = 0; m < TM; m++) begin : g_m
    for (genvar n = 0; n < TR*TC; n++) begin : g_n
      mac_unit u_mac (
        .clk    (clk),
        .rst_n  (rst_n),
        .en     (en),
        .first  (first),
        .bypass (bypass),
        .x      (x[n]),
        .w      (w[m]),
        .psum   (psum[m][n]),
        .acc    (acc[m][n])
      );
    end
  end

endmodule
