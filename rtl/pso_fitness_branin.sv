// pso_fitness_branin: Branin benchmark (F2), two variables.
//
//   f = (x2 - b*x1^2 + c*x1 - 6)^2 + s*cos(x1) + 10,
//   b = 5.1/(4*pi^2), c = 5/pi, s = 10*(1 - 1/(8*pi))
//
// The constants are rounded to FRAC fraction bits. cos(x1) uses the cosine
// table: the angle in turns, x1/(2*pi), is formed at PH_W fraction bits by a
// multiplication with round(2^16/pi) and truncation, so the angle is
// quantised to 1/1024 of a turn (this design's choice). Combinational.
module pso_fitness_branin
  import pso_pkg::*;
(
  input  fix_t x [2],
  output fit_t fit
);
  localparam fit_t B     = to_fix(5.1 / (4.0 * 3.14159265358979323846 * 3.14159265358979323846));
  localparam fit_t C     = to_fix(5.0 / 3.14159265358979323846);
  localparam fit_t S     = to_fix(10.0 * (1.0 - 1.0 / (8.0 * 3.14159265358979323846)));
  localparam fit_t INVPI = fit_t'(20861);          // 2^16 / pi, rounded

  fit_t x1, x2, t, ph;
  fix_t cs;

  always_comb begin
    x1 = fit_t'(x[0]);
    x2 = fit_t'(x[1]);
    t  = x2 - fmul(B, fmul(x1, x1)) + fmul(C, x1) - (fit_t'(6) <<< FRAC);
    ph = (x1 * INVPI) >>> 16;   // x1/(2*pi) turns at PH_W fraction bits
  end

  pso_cos u_c (.phase(ph[PH_W-1:0]), .c(cs));

  assign fit = fmul(t, t) + fmul(S, fit_t'(cs)) + (fit_t'(10) <<< FRAC);
endmodule
