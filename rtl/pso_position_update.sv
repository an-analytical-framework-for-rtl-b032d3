// pso_position_update: position update of one dimension of one particle.
//
//   x' = x + v, clamped to [xmin, xmax]. When the new position had to be
//   clamped, the particle's velocity in this dimension is set to zero
//   (v_out = 0, clamped = 1); otherwise v_out = v.
//
// This is the position step and the boundary handling of the PSO algorithm.
// The sum is formed one bit wider than a position so it cannot wrap before
// the comparison. Purely combinational.
//
// The clamp-and-zero rule follows the processor's algorithm; one unit per
// dimension working in parallel is this design's own choice.
module pso_position_update
  import pso_pkg::*;
(
  input  fix_t x,
  input  fix_t v,
  input  fix_t xmin,
  input  fix_t xmax,
  output fix_t x_next,
  output fix_t v_out,
  output logic clamped
);
  logic signed [X_W:0] s;

  always_comb begin
    s = (X_W+1)'(x) + (X_W+1)'(v);
    clamped = 1'b0;
    x_next  = fix_t'(s);
    if (s > (X_W+1)'(xmax)) begin
      x_next  = xmax;
      clamped = 1'b1;
    end else if (s < (X_W+1)'(xmin)) begin
      x_next  = xmin;
      clamped = 1'b1;
    end
    v_out = clamped ? '0 : v;
  end
endmodule
