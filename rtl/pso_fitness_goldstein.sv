// pso_fitness_goldstein: Goldstein-Price benchmark (F3), two variables.
//
//   a = x1 + x2 + 1
//   b = 19 - 14*x1 + 3*x1^2 - 14*x2 + 6*x1*x2 + 3*x2^2
//   c = 2*x1 - 3*x2
//   d = 18 - 32*x1 + 12*x1^2 + 48*x2 - 36*x1*x2 + 27*x2^2
//   f = (1 + a^2*b) * (30 + c^2*d)
//
// Three products of the inputs (x1^2, x2^2, x1*x2) are shared by b and d;
// integer coefficients are exact, products are truncated to FRAC fraction
// bits. Combinational.
//
// The benchmark and its optimum (3 at (0,-1)) are the processor's; the
// standard formula and its fixed-point arrangement are this design's own.
module pso_fitness_goldstein
  import pso_pkg::*;
(
  input  fix_t x [2],
  output fit_t fit
);
  localparam fit_t ONE = fit_t'(1) <<< FRAC;

  fit_t x1, x2, x11, x22, x12, a, b, c, d, left, right;

  always_comb begin
    x1    = fit_t'(x[0]);
    x2    = fit_t'(x[1]);
    x11   = fmul(x1, x1);
    x22   = fmul(x2, x2);
    x12   = fmul(x1, x2);
    a     = x1 + x2 + ONE;
    b     = 19 * ONE - 14 * x1 + 3 * x11 - 14 * x2 + 6 * x12 + 3 * x22;
    c     = 2 * x1 - 3 * x2;
    d     = 18 * ONE - 32 * x1 + 12 * x11 + 48 * x2 - 36 * x12 + 27 * x22;
    left  = ONE + fmul(fmul(a, a), b);
    right = 30 * ONE + fmul(fmul(c, c), d);
    fit   = fmul(left, right);
  end
endmodule
