// pso_fitness_elliptic: high-conditioned elliptic benchmark (F13 without its
// rotation).
//
//   z_i = x_i - shift_i,   f = sum_{i=0}^{D-1} (10^6)^(i/(D-1)) * z_i^2
//
// The weights are constants rounded to FRAC fraction bits and computed during
// elaboration. The rotated form of the benchmark multiplies z by a D x D
// rotation matrix first; that matrix is published data that is not
// reproduced here, so this unit evaluates the unrotated function.
// Combinational.
module pso_fitness_elliptic
  import pso_pkg::*;
#(
  parameter int unsigned D = 32
) (
  input  fix_t x     [D],
  input  fix_t shift [D],
  output fit_t fit
);
  typedef fit_t wvec_t [D];

  function automatic wvec_t make_w();
    wvec_t v;
    for (int i = 0; i < int'(D); i++)
      v[i] = to_fix($pow(1.0e6, (D > 1) ? real'(i) / real'(D - 1) : 0.0));
    return v;
  endfunction

  localparam wvec_t WT = make_w();

  fit_t z;

  always_comb begin
    fit = '0;
    for (int i = 0; i < D; i++) begin
      z = zsub(x[i], shift[i]);
      fit += fmul(WT[i], fmul(z, z));
    end
  end
endmodule
