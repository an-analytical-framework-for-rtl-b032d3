// pso_fitness_hartmann3: three-variable Hartmann benchmark (F7).
//
//   f = - sum_{i=1..4} alpha_i * exp( - sum_{j=1..3} A_ij * (x_j - P_ij)^2 )
//
// with the standard constants alpha = (1, 1.2, 3, 3.2),
// A = (3 10 30; 0.1 10 35; 3 10 30; 0.1 10 35) and
// P = 1e-4 * (3689 1170 2673; 4699 4387 7470; 1091 8732 5547; 381 5743 8828),
// all rounded to FRAC fraction bits (these constants are the benchmark's
// usual definition, not part of the processor description). Four exponential
// units (pso_exp_neg) run in parallel. Combinational. The minimum is about
// -3.86 near (0.115, 0.556, 0.853).
module pso_fitness_hartmann3
  import pso_pkg::*;
(
  input  fix_t x [3],
  output fit_t fit
);
  localparam fit_t A [4][3] = '{
    '{to_fix(3.0), to_fix(10.0), to_fix(30.0)},
    '{to_fix(0.1), to_fix(10.0), to_fix(35.0)},
    '{to_fix(3.0), to_fix(10.0), to_fix(30.0)},
    '{to_fix(0.1), to_fix(10.0), to_fix(35.0)}};
  localparam fit_t P [4][3] = '{
    '{to_fix(0.3689), to_fix(0.1170), to_fix(0.2673)},
    '{to_fix(0.4699), to_fix(0.4387), to_fix(0.7470)},
    '{to_fix(0.1091), to_fix(0.8732), to_fix(0.5547)},
    '{to_fix(0.0381), to_fix(0.5743), to_fix(0.8828)}};
  localparam fit_t ALPHA [4] = '{to_fix(1.0), to_fix(1.2), to_fix(3.0), to_fix(3.2)};

  fit_t inner [4];
  fix_t ex    [4];
  fit_t d;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      inner[i] = '0;
      for (int j = 0; j < 3; j++) begin
        d = fit_t'(x[j]) - P[i][j];
        inner[i] += fmul(A[i][j], fmul(d, d));
      end
    end
  end

  for (genvar i = 0; i < 4; i++) begin : g_exp
    pso_exp_neg u_exp (.u(inner[i]), .e(ex[i]));
  end

  always_comb begin
    fit = '0;
    for (int i = 0; i < 4; i++) fit -= fmul(ALPHA[i], fit_t'(ex[i]));
  end
endmodule
