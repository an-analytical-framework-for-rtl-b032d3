// pso_fitness_schwefel12: Schwefel problem 1.2 (F11 when shifted).
//
//   z_i = x_i - shift_i,   f = sum_{i} ( sum_{j<=i} z_j )^2
//
// A chain of D adders forms the prefix sums; each prefix sum has its own
// squarer and the squares meet in one adder. Combinational. Drive shift with
// the shift vector o for F11, or zero for the unshifted problem. Squares are
// truncated to pso_pkg::FRAC fraction bits.
//
// The shifted Schwefel 1.2 benchmark is the processor's; the standard
// formula and the adder chain are this design's own arrangement.
module pso_fitness_schwefel12
  import pso_pkg::*;
#(
  parameter int unsigned D = 32
) (
  input  fix_t x     [D],
  input  fix_t shift [D],
  output fit_t fit
);
  fit_t pre;

  always_comb begin
    pre = '0;
    fit = '0;
    for (int i = 0; i < D; i++) begin
      pre += zsub(x[i], shift[i]);
      fit += fmul(pre, pre);
    end
  end
endmodule
