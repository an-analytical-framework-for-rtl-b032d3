// pso_exp_neg: e = exp(-u) for u >= 0, in the pso_pkg fixed-point format.
//
// exp(-u) = 2^(-v) with v = u*log2(e). v is formed with a 16-bit-fraction
// constant and truncated to FRAC fraction bits; its integer part k becomes a
// right shift and its fraction part f indexes a 2^FRAC-entry table of
// 2^(-f), rounded to nearest at FRAC fraction bits and computed during
// elaboration. Results below one LSB (k >= FRAC+1) are zero. Negative u is
// treated as zero. Combinational. Used by the Hartmann benchmark.
//
// The processor names no method for exponentials; the base-2 table and
// shift are this design's own choice.
module pso_exp_neg
  import pso_pkg::*;
(
  input  fit_t u,
  output fix_t e
);
  localparam int unsigned N = 1 << FRAC;
  localparam fit_t LOG2E_Q16 = fit_t'(94548);      // log2(e) * 2^16, rounded
  typedef logic [FRAC:0] tab_t [N];                 // 2^-f in (0.5, 1]

  function automatic tab_t make_table();
    tab_t t;
    for (int i = 0; i < int'(N); i++)
      t[i] = (FRAC+1)'(to_fix($pow(2.0, -real'(i) / real'(N))));
    return t;
  endfunction

  localparam tab_t TAB = make_table();

  fit_t            v;
  fit_t            k;
  logic [FRAC-1:0] f;

  always_comb begin
    v = (u < 0) ? '0 : (u * LOG2E_Q16) >>> 16;
    k = v >>> FRAC;
    f = v[FRAC-1:0];
    if (k > fit_t'(FRAC)) e = '0;
    else                  e = fix_t'(X_W'(TAB[f]) >> k[3:0]);
  end
endmodule
