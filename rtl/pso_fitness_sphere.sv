// pso_fitness_sphere: sphere benchmark (F6; F9 when shifted).
//
//   z_i = x_i - shift_i,   f = sum_i z_i^2
//
// One squarer per dimension feeding a single adder; combinational. Tie
// shift to zero for the plain sphere (F6) and to the shift vector o for the
// shifted sphere (F9). Products are truncated to pso_pkg::FRAC fraction bits.
//
// The sphere benchmarks are the processor's; the standard formula and the
// parallel squarers are this design's own arrangement.
module pso_fitness_sphere
  import pso_pkg::*;
#(
  parameter int unsigned D = 3
) (
  input  fix_t x     [D],
  input  fix_t shift [D],
  output fit_t fit
);
  fit_t z [D];

  always_comb begin
    fit = '0;
    for (int i = 0; i < D; i++) begin
      z[i] = zsub(x[i], shift[i]);
      fit += fmul(z[i], z[i]);
    end
  end
endmodule
