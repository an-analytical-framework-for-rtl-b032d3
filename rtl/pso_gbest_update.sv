// pso_gbest_update: the swarm's global-best record and its update rule.
//
// Holds gbest_x and gbest_fit in registers. `clear` (synchronous) empties the
// record by setting the fitness to the largest value, so the first particle
// evaluated always takes it. While `upd` is high the record is replaced by
// (x, fit) when fit <= gbest_fit; `updated` reports that in the same cycle and
// the new record is visible from the next cycle. In the algorithm this check
// only runs for a particle whose personal best has just improved; the caller
// drives `upd` accordingly. The register fed back to the comparator is the
// loop drawn around this unit in the datapath.
//
// The unit and its <= rule follow the processor; the clear input and the
// registered record are this design's own choice.
module pso_gbest_update
  import pso_pkg::*;
#(
  parameter int unsigned D = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic upd,
  input  fit_t fit,
  input  fix_t x [D],
  output logic updated,
  output fit_t gbest_fit,
  output fix_t gbest_x [D]
);
  assign updated = upd && (fit <= gbest_fit);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gbest_fit <= FIT_MAX;
      for (int j = 0; j < D; j++) gbest_x[j] <= '0;
    end else if (clear) begin
      gbest_fit <= FIT_MAX;
    end else if (updated) begin
      gbest_fit <= fit;
      for (int j = 0; j < D; j++) gbest_x[j] <= x[j];
    end
  end
endmodule
