// pso_fitness_rosenbrock: Rosenbrock benchmark (F4; F10 when shifted).
//
//   z_i = x_i - shift_i
//   f   = sum_{i=0}^{D-2} 100*(z_{i+1} - z_i^2)^2 + (z_i - 1)^2
//
// Every term has its own squarer, subtractor and multipliers, and the terms
// meet in one adder, so a whole particle is evaluated combinationally in one
// pass, as in the processor's fitness unit. The shift input is this design's
// addition: tie it to zero for the plain function (F4); for the shifted
// variant (F10, z = x - o + 1) drive shift = o - 1. Fixed-point: every
// product is truncated to pso_pkg::FRAC fraction bits (pso_pkg::fmul).
module pso_fitness_rosenbrock
  import pso_pkg::*;
#(
  parameter int unsigned D = 2
) (
  input  fix_t x     [D],
  input  fix_t shift [D],
  output fit_t fit
);
  localparam fit_t ONE     = fit_t'(1) <<< FRAC;
  localparam fit_t HUNDRED = fit_t'(100) <<< FRAC;

  fit_t z [D];
  fit_t term [D];

  always_comb begin
    for (int i = 0; i < D; i++) z[i] = zsub(x[i], shift[i]);
    for (int i = 0; i < D; i++) begin
      if (i < D - 1) begin
        term[i] = fmul(HUNDRED, fmul(z[i+1] - fmul(z[i], z[i]), z[i+1] - fmul(z[i], z[i])))
                + fmul(z[i] - ONE, z[i] - ONE);
      end else begin
        term[i] = '0;
      end
    end
    fit = '0;
    for (int i = 0; i < D; i++) fit += term[i];
  end
endmodule
