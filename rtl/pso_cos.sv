// pso_cos: cosine of an angle given as a fraction of a full turn.
//
//   c = cos(2*pi * phase / 2^PH_W), in the pso_pkg fixed-point format.
//
// A read-only table of 2^PH_W entries (1024 for the default format), each
// the cosine rounded to nearest at FRAC fraction bits. The table is computed
// during elaboration from $cos, so there is no data file. Combinational.
// The benchmark units use it for every cosine term: for cos(k*pi*x) the
// phase is just the low bits of k*x/2 in fixed point, which is exact.
//
// The processor names no method for its trigonometric terms; the table and
// its size are this design's own choice.
module pso_cos
  import pso_pkg::*;
(
  input  logic [PH_W-1:0] phase,
  output fix_t            c
);
  localparam int unsigned N = 1 << PH_W;
  typedef fix_t tab_t [N];

  function automatic tab_t make_table();
    tab_t t;
    for (int i = 0; i < int'(N); i++)
      t[i] = fix_t'(to_fix($cos(2.0 * 3.14159265358979323846 * real'(i) / real'(N))));
    return t;
  endfunction

  localparam tab_t TAB = make_table();

  assign c = TAB[phase];
endmodule
