// pso_fitness: the processor's fitness unit, one benchmark function chosen
// at build time.
//
// FUNC selects which benchmark evaluation circuit is generated; only that
// one is built, as each benchmark is a separate build of the processor.
// The unit is combinational: fit = f(x - shift) for the shifted functions,
// f(x) for the others (they ignore shift). B2, Branin and Goldstein-Price
// need D = 2 and Hartmann D = 3; other values stop elaboration.
//
// The processor has one fitness unit fed by the position memory, as here;
// making the benchmark a build parameter is this design's own choice, in
// line with the processor being synthesised per benchmark.
module pso_fitness
  import pso_pkg::*;
#(
  parameter func_e       FUNC = FN_ROSENBROCK,
  parameter int unsigned D    = 2
) (
  input  fix_t x     [D],
  input  fix_t shift [D],
  output fit_t fit
);
  generate
    case (FUNC)
      FN_SPHERE: begin : g_sphere
        pso_fitness_sphere     #(.D(D)) u_f (.x(x), .shift(shift), .fit(fit));
      end
      FN_ZAKHAROV: begin : g_zakharov
        pso_fitness_zakharov   #(.D(D)) u_f (.x(x), .fit(fit));
      end
      FN_VARDIM: begin : g_vardim
        pso_fitness_vardim     #(.D(D)) u_f (.x(x), .fit(fit));
      end
      FN_SCHWEFEL12: begin : g_schwefel12
        pso_fitness_schwefel12 #(.D(D)) u_f (.x(x), .shift(shift), .fit(fit));
      end
      FN_B2: begin : g_b2
        if (D != 2) begin : g_bad_d
          $error("B2 has two variables");
        end
        pso_fitness_b2 u_f (.x(x), .fit(fit));
      end
      FN_BRANIN: begin : g_branin
        if (D != 2) begin : g_bad_d
          $error("Branin has two variables");
        end
        pso_fitness_branin u_f (.x(x), .fit(fit));
      end
      FN_GOLDSTEIN: begin : g_goldstein
        if (D != 2) begin : g_bad_d
          $error("Goldstein-Price has two variables");
        end
        pso_fitness_goldstein u_f (.x(x), .fit(fit));
      end
      FN_HARTMANN3: begin : g_hartmann3
        if (D != 3) begin : g_bad_d
          $error("Hartmann-3 has three variables");
        end
        pso_fitness_hartmann3 u_f (.x(x), .fit(fit));
      end
      FN_RASTRIGIN: begin : g_rastrigin
        pso_fitness_rastrigin  #(.D(D)) u_f (.x(x), .shift(shift), .fit(fit));
      end
      FN_ELLIPTIC: begin : g_elliptic
        pso_fitness_elliptic   #(.D(D)) u_f (.x(x), .shift(shift), .fit(fit));
      end
      default: begin : g_rosenbrock
        pso_fitness_rosenbrock #(.D(D)) u_f (.x(x), .shift(shift), .fit(fit));
      end
    endcase
  endgenerate
endmodule
