// pso_fitness_b2: Bohachevsky B2 benchmark (F1), two variables.
//
//   f = x1^2 + 2*x2^2 - 0.3*cos(3*pi*x1) - 0.4*cos(4*pi*x2) + 0.7
//
// Two squarers, two cosine tables and an adder. cos(3*pi*x1) takes the phase
// 3*x1/2 turns and cos(4*pi*x2) the phase 2*x2 turns; with x in fixed point
// both phases are exact low-bit slices of 3*x1 and 4*x2. The constants 0.3
// and 0.4 are rounded to FRAC fraction bits and 0.7 is taken as their sum,
// so that f(0, 0) = 0 exactly (this design's choice). Combinational.
module pso_fitness_b2
  import pso_pkg::*;
(
  input  fix_t x [2],
  output fit_t fit
);
  localparam fit_t C03 = to_fix(0.3);
  localparam fit_t C04 = to_fix(0.4);

  fit_t x1, x2, p1, p2;
  fix_t cs1, cs2;

  always_comb begin
    x1 = fit_t'(x[0]);
    x2 = fit_t'(x[1]);
    p1 = x1 * 3;      // 3*x1 at FRAC bits = 1.5*x1 turns at PH_W bits
    p2 = x2 * 4;      // 4*x2 at FRAC bits = 2*x2 turns at PH_W bits
  end

  pso_cos u_c1 (.phase(p1[PH_W-1:0]), .c(cs1));
  pso_cos u_c2 (.phase(p2[PH_W-1:0]), .c(cs2));

  assign fit = fmul(x1, x1) + 2 * fmul(x2, x2) - fmul(C03, fit_t'(cs1))
             - fmul(C04, fit_t'(cs2)) + C03 + C04;
endmodule
