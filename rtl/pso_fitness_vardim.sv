// pso_fitness_vardim: variably-dimensioned benchmark (F8).
//
//   z_i = x_i - 1,   s1 = sum_i z_i^2,   s2 = sum_i (i+1)*z_i   (i = 0 .. D-1)
//   f   = s1 + s2^2 + s2^4
//
// Combinational. Multiplying by the integer (i+1) is exact; the squares are
// truncated to pso_pkg::FRAC fraction bits.
//
// The variably-dimensioned benchmark (four variables) is the processor's;
// the standard formula and its arrangement are this design's own.
module pso_fitness_vardim
  import pso_pkg::*;
#(
  parameter int unsigned D = 4
) (
  input  fix_t x [D],
  output fit_t fit
);
  localparam fit_t ONE = fit_t'(1) <<< FRAC;

  fit_t zi, s1, s2, s2sq;

  always_comb begin
    s1 = '0;
    s2 = '0;
    for (int i = 0; i < D; i++) begin
      zi  = fit_t'(x[i]) - ONE;
      s1 += fmul(zi, zi);
      s2 += (fit_t'(i) + fit_t'(1)) * zi;
    end
    s2sq = fmul(s2, s2);
    fit  = s1 + s2sq + fmul(s2sq, s2sq);
  end
endmodule
