// pso_fitness_zakharov: Zakharov benchmark (F5).
//
//   s1 = sum_i x_i^2,   s2 = sum_i 0.5*(i+1)*x_i   (i = 0 .. D-1)
//   f  = s1 + s2^2 + s2^4
//
// Combinational: one squarer per dimension, one scaled-add per dimension,
// then two squarers on s2. 0.5*(i+1)*x_i is formed exactly as
// ((i+1)*x_i) >>> 1 (truncating the one extra bit); products are truncated to
// pso_pkg::FRAC fraction bits.
//
// The Zakharov benchmark (two variables) is the processor's; the standard
// formula and its arrangement are this design's own.
module pso_fitness_zakharov
  import pso_pkg::*;
#(
  parameter int unsigned D = 2
) (
  input  fix_t x [D],
  output fit_t fit
);
  fit_t xi, s1, s2, s2sq;

  always_comb begin
    s1 = '0;
    s2 = '0;
    for (int i = 0; i < D; i++) begin
      xi  = fit_t'(x[i]);
      s1 += fmul(xi, xi);
      s2 += ((fit_t'(i) + fit_t'(1)) * xi) >>> 1;
    end
    s2sq = fmul(s2, s2);
    fit  = s1 + s2sq + fmul(s2sq, s2sq);
  end
endmodule
