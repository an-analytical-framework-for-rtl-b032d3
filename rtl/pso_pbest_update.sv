// pso_pbest_update: personal-best update of one particle.
//
// Compares the fitness of the particle's current position with the fitness
// of its recorded best. When f(x) <= f(pbest) (ties replace the record, as in
// the algorithm) `improved` is high and the new record is the current
// position and fitness; otherwise the old record passes unchanged. The caller
// writes the returned record back to the personal-best memory. A single
// comparison and a selection, purely combinational.
//
// The unit and its <= rule follow the processor; its combinational form is
// this design's own choice.
module pso_pbest_update
  import pso_pkg::*;
#(
  parameter int unsigned D = 2
) (
  input  fit_t fit,              // f(x) of the current position
  input  fix_t x        [D],     // current position
  input  fit_t pbest_fit_old,
  input  fix_t pbest_x_old [D],
  output logic improved,
  output fit_t pbest_fit_new,
  output fix_t pbest_x_new [D]
);
  always_comb begin
    improved      = (fit <= pbest_fit_old);
    pbest_fit_new = improved ? fit : pbest_fit_old;
    for (int j = 0; j < D; j++) pbest_x_new[j] = improved ? x[j] : pbest_x_old[j];
  end
endmodule
