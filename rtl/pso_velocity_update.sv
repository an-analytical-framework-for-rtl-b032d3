// pso_velocity_update: velocity update of one dimension of one particle.
//
//   v' = w*v + (c1*r1)*(pbest - x) + (c2*r2)*(gbest - x),  then clamped to
//   [vmin, vmax].
//
// The structure follows the velocity unit of the processor: two subtractors
// and five multipliers (w*v, c1*r1, c2*r2 and the two products with the
// differences) work in parallel and feed a two-level adder tree. The clamp
// to [vmin, vmax] is the velocity limit of the algorithm; placing it inside
// this unit is this design's choice.
//
// Arithmetic (this design's choice): positions, velocities and w, c1, c2 are
// fixed-point with pso_pkg::FRAC fraction bits, r1/r2 are R_W-bit fractions.
// c*r keeps FRAC fraction bits (r's extra bits are truncated), and every
// product is truncated back to FRAC bits by an arithmetic right shift, i.e.
// rounded toward minus infinity. Intermediate sums are kept wide, so nothing
// overflows before the clamp. Purely combinational.
module pso_velocity_update
  import pso_pkg::*;
(
  input  fix_t  x,       // current position
  input  fix_t  v,       // current velocity
  input  fix_t  pbest,   // particle's best position
  input  fix_t  gbest,   // swarm's best position
  input  rnd_t  r1,
  input  rnd_t  r2,
  input  coef_t w,
  input  coef_t c1,
  input  coef_t c2,
  input  fix_t  vmin,
  input  fix_t  vmax,
  output fix_t  v_next
);
  localparam int unsigned SW = X_W + COEF_W + 4;   // wide enough for any sum
  typedef logic signed [SW-1:0] wide_t;

  logic [COEF_W+R_W-1:0] c1r1_full, c2r2_full;
  coef_t                 c1r1, c2r2;
  wide_t                 d1, d2, t0, t1, t2, s01, sum;

  always_comb begin
    c1r1_full = COEF_W'(c1) * (COEF_W+R_W)'(r1);
    c2r2_full = COEF_W'(c2) * (COEF_W+R_W)'(r2);
    c1r1      = coef_t'(c1r1_full >> R_W);
    c2r2      = coef_t'(c2r2_full >> R_W);
    d1        = wide_t'(pbest) - wide_t'(x);
    d2        = wide_t'(gbest) - wide_t'(x);
    t0        = (wide_t'($signed({1'b0, w}))    * wide_t'(v))  >>> FRAC;
    t1        = (wide_t'($signed({1'b0, c1r1})) * d1) >>> FRAC;
    t2        = (wide_t'($signed({1'b0, c2r2})) * d2) >>> FRAC;
    s01       = t0 + t1;
    sum       = s01 + t2;
    if (sum > wide_t'(vmax))      v_next = vmax;
    else if (sum < wide_t'(vmin)) v_next = vmin;
    else                          v_next = fix_t'(sum);
  end
endmodule
