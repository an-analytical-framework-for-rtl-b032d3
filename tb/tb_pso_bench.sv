// tb_pso_bench: runs one benchmark build of the PSO processor over the swarm
// sizes 8, 16 and 32, RUNS independent runs each (a different RNG seed per
// run), and reports success rate, mean evaluations and mean cycles per swarm
// size. Every run is checked: the reported global best must have exactly the
// reported fitness (recomputed by the reference model), lie inside the search
// domain, and the run must end within the evaluation budget, on the target
// or on the budget, at one evaluation per clock. Used by tb_pso_workloads.
//
// It generates its own clock and reset. Outputs: finished, checks, failures
// and the number of converged runs. One run at a time; the next starts when
// `done` rises.
module tb_pso_bench
  import pso_pkg::*;
  import tb_pso_ref_pkg::*;
#(
  parameter string       NAME   = "F4",
  parameter func_e       FUNC   = FN_ROSENBROCK,
  parameter int unsigned D      = 2,
  parameter int          RUNS   = 10,
  parameter int          BUDGET = 10000,
  parameter real         LO     = -9.0,       // search domain
  parameter real         HI     = 11.0,
  parameter real         FOPT   = 0.0,        // optimum of the benchmark
  parameter bit          SHIFTED = 1'b0,
  parameter int unsigned SEED   = 1
) (
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_conv
);
  localparam int unsigned AW = 5;

  logic        clk = 0, rst_n = 0, start = 0;
  logic [63:0] seed;
  logic [AW:0] np;
  logic [31:0] max_evals = BUDGET;
  fit_t        f_opt, err_thresh;
  fix_t        xmin, xmax, vmin, vmax;
  coef_t       w = W_DEF, c1 = C1_DEF, c2 = C2_DEF;
  fix_t        shift [D];
  logic        done, converged;
  state_e      state;
  fix_t        gbest_x [D];
  fit_t        gbest_fit;
  logic [31:0] eval_count, iter_count;

  pso_top #(.NP_MAX(32), .D(D), .FUNC(FUNC)) dut (
    .clk, .rst_n, .start, .seed, .np, .max_evals, .f_opt, .err_thresh, .xmin, .xmax,
    .vmin, .vmax, .w, .c1, .c2, .shift, .done, .converged, .state, .gbest_x, .gbest_fit,
    .eval_count, .iter_count);

  always #5 clk = ~clk;

  initial begin
    automatic int sizes [3] = '{8, 16, 32};
    automatic longint z[] = new[D];
    automatic longint cyc0, cyc;
    automatic real sum_evals, sum_cycles;
    automatic int conv;
    finished = 0; checks = 0; failures = 0; n_conv = 0;
    void'($urandom(SEED));
    xmin = fix_t'(fx(LO)); xmax = fix_t'(fx(HI));
    vmax = fix_t'(fx((HI - LO) / 2.0)); vmin = -vmax;
    f_opt = fit_t'(fx(FOPT));
    err_thresh = fit_t'(1);                 // one LSB, the finest error step
    // shift vector (own choice): uniform in the inner 60 % of the domain
    foreach (shift[j])
      shift[j] = SHIFTED ? fix_t'(fx(LO + (HI - LO) * (0.2 + 0.6 * real'($urandom_range(0, 1000)) / 1000.0)))
                         : '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (sizes[s]) begin
      sum_evals = 0; sum_cycles = 0; conv = 0;
      for (int r = 0; r < RUNS; r++) begin
        np   = (AW+1)'(sizes[s]);
        seed = {$urandom, $urandom};
        @(negedge clk);
        start = 1;
        cyc0 = $time / 10;
        @(negedge clk);
        start = 0;
        while (!done) @(negedge clk);
        cyc = $time / 10 - cyc0;
        for (int j = 0; j < D; j++) begin
          z[j] = longint'(gbest_x[j]) - longint'(shift[j]);
          checks++;
          if (gbest_x[j] < xmin || gbest_x[j] > xmax) failures++;
        end
        checks++;
        if (longint'(gbest_fit) != ref_fit(FUNC, z)) begin
          failures++;
          $display("FAIL %s: gbest_fit %0d, reference %0d", NAME, gbest_fit, ref_fit(FUNC, z));
        end
        checks++;
        if (eval_count > max_evals || (!converged && eval_count != max_evals)) failures++;
        checks++;                                 // np + 2 set-up cycles, one per evaluation
        if (cyc != longint'(eval_count) + sizes[s] + 2) begin
          failures++;
          $display("FAIL %s: %0d cycles for %0d evaluations", NAME, cyc, eval_count);
        end
        if (converged) conv++;
        sum_evals += real'(eval_count);
        sum_cycles += real'(cyc);
      end
      n_conv += conv;
      $display("%-4s np=%2d runs=%0d SR=%5.1f%% mean evaluations=%9.1f mean cycles=%9.1f",
               NAME, sizes[s], RUNS, 100.0 * conv / RUNS, sum_evals / RUNS, sum_cycles / RUNS);
    end
    finished = 1;
  end
endmodule
