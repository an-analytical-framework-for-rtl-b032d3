// pso_fitness_rastrigin: Rastrigin benchmark (F12 when shifted).
//
//   z_i = x_i - shift_i,   f = sum_i ( z_i^2 - 10*cos(2*pi*z_i) + 10 )
//
// One squarer and one cosine table per dimension. The phase of cos(2*pi*z)
// is the fraction part of z, which in fixed point is simply its low bits, so
// the angle is exact. Combinational.
//
// The shifted Rastrigin benchmark is the processor's; the standard formula
// and the table-based cosine are this design's own arrangement.
module pso_fitness_rastrigin
  import pso_pkg::*;
#(
  parameter int unsigned D = 32
) (
  input  fix_t x     [D],
  input  fix_t shift [D],
  output fit_t fit
);
  localparam fit_t TEN = fit_t'(10) <<< FRAC;

  fit_t z  [D];
  fix_t cs [D];

  for (genvar i = 0; i < D; i++) begin : g_dim
    logic [PH_W-1:0] ph;
    assign z[i] = zsub(x[i], shift[i]);
    assign ph   = {z[i][FRAC-1:0], 1'b0};   // frac(z) turns at PH_W bits
    pso_cos u_c (.phase(ph), .c(cs[i]));
  end

  always_comb begin
    fit = '0;
    for (int i = 0; i < D; i++) fit += fmul(z[i], z[i]) - 10 * fit_t'(cs[i]) + TEN;
  end
endmodule
