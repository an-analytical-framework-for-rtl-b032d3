// tb_pso_top: end-to-end test of the PSO processor at its default size
// (32-particle memories, 2 dimensions, Rosenbrock fitness unit).
//
// A software model of the sequential PSO algorithm runs beside the
// processor. It takes the random numbers the processor draws (observed at
// the RNG outputs in the cycles where they are used) and otherwise computes
// everything itself: the initial swarm, every fitness value, the personal and
// global bests, every velocity and every new position. Each fitness
// evaluation, each new velocity and the final global best are compared with
// the model. The test also checks the rate (one evaluation per clock in the
// main state) and the cycle count of a whole run, and that each mechanism
// happened at least once: personal-best and global-best replacement,
// velocity clamping, position clamping with velocity zeroing, index wrap
// (complete iterations), stop on reaching the target, stop on the
// evaluation budget, and a restart after STOP.
module tb_pso_top;
  import pso_pkg::*;
  import tb_pso_ref_pkg::*;

  localparam int unsigned NP_MAX = 32, D = 2, AW = 5;
  localparam longint      LSB = 1;

  logic        clk = 0, rst_n = 0, start = 0;
  logic [63:0] seed = 64'h1234_5678_9ABC_DEF1;
  logic [AW:0] np = 8;
  logic [31:0] max_evals = 10000;
  fit_t        f_opt = '0, err_thresh = fit_t'(LSB);
  fix_t        xmin = -fix_t'(9 * 512), xmax = fix_t'(11 * 512);
  fix_t        vmin = -fix_t'(10 * 512), vmax = fix_t'(10 * 512);
  coef_t       w = W_DEF, c1 = C1_DEF, c2 = C2_DEF;
  fix_t        shift [D];
  logic        done, converged;
  state_e      state;
  fix_t        gbest_x [D];
  fit_t        gbest_fit;
  logic [31:0] eval_count, iter_count;

  pso_top dut (.clk, .rst_n, .start, .seed, .np, .max_evals, .f_opt, .err_thresh,
               .xmin, .xmax, .vmin, .vmax, .w, .c1, .c2, .shift, .done, .converged,
               .state, .gbest_x, .gbest_fit, .eval_count, .iter_count);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;

  // ------------------------------------------------------------- the model
  longint mx  [NP_MAX][D];
  longint mv  [NP_MAX][D];
  longint mpx [NP_MAX][D];
  longint mpf [NP_MAX];
  longint mgx [D];
  longint mgf;
  bit     modelling = 0;

  // mechanism counters
  int n_pbest = 0, n_gbest = 0, n_vclamp = 0, n_xclamp = 0, n_iter = 0;
  int n_stop_conv = 0, n_stop_budget = 0, n_restart = 0, n_runs = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n) begin
    // initialisation: one particle per cycle in S1
    if (dut.init_we) begin
      automatic int i = int'(dut.init_idx);
      for (int j = 0; j < D; j++) begin
        mx[i][j]  = ref_init(xmin, xmax, dut.r1[j]);
        mv[i][j]  = ref_init(vmin, vmax, dut.r2[j]);
        mpx[i][j] = mx[i][j];
      end
      mpf[i] = FIT_MAX;
    end
    if (dut.clear) mgf = FIT_MAX;
    // stage 3 (velocity of the particle two behind) uses the global best as it
    // was before this cycle's stage-2 update, so model it first
    if (dut.s3_act) begin
      automatic int i = int'(dut.s2_idx);
      for (int j = 0; j < D; j++) begin
        automatic longint vfree, vnew, xs;
        vfree = ref_vel(mx[i][j], mv[i][j], mpx[i][j], mgx[j], dut.r1[j], dut.r2[j],
                        w, c1, c2, -(longint'(1) << 40), longint'(1) << 40);
        vnew  = ref_vel(mx[i][j], mv[i][j], mpx[i][j], mgx[j], dut.r1[j], dut.r2[j],
                        w, c1, c2, vmin, vmax);
        if (vfree != vnew) n_vclamp++;
        checks++;
        if (longint'(dut.v_new[j]) != vnew)
          fail($sformatf("velocity p%0d d%0d: %0d vs model %0d", i, j, dut.v_new[j], vnew));
        xs = mx[i][j] + vnew;
        if (xs > xmax) begin mx[i][j] = xmax; mv[i][j] = 0; n_xclamp++; end
        else if (xs < xmin) begin mx[i][j] = xmin; mv[i][j] = 0; n_xclamp++; end
        else begin mx[i][j] = xs; mv[i][j] = vnew; end
      end
    end
    // stage 2: fitness of the particle one behind, pbest and gbest
    if (dut.s2_act) begin
      automatic int i = int'(dut.s1_idx);
      automatic longint z[] = new[D];
      automatic longint f;
      for (int j = 0; j < D; j++) begin
        z[j] = mx[i][j] - longint'(shift[j]);
        checks++;
        if (longint'(dut.dr1[j]) != mx[i][j])
          fail($sformatf("position p%0d d%0d: %0d vs model %0d", i, j, dut.dr1[j], mx[i][j]));
      end
      f = ref_fit(FN_ROSENBROCK, z);
      checks++;
      if (longint'(dut.s1_fit) != f) fail($sformatf("fitness p%0d: %0d vs model %0d", i, dut.s1_fit, f));
      if (f <= mpf[i]) begin
        n_pbest++;
        mpf[i] = f;
        for (int j = 0; j < D; j++) mpx[i][j] = mx[i][j];
        if (f <= mgf) begin
          n_gbest++;
          mgf = f;
          for (int j = 0; j < D; j++) mgx[j] = mx[i][j];
        end
      end
    end
  end

  // -------------------------------------------------------------- one run
  task automatic run(int n, int budget, fit_t thresh, string label);
    longint c_start, c_s3, c_done, c_s7_first;
    np = (AW+1)'(n);
    max_evals = budget;
    err_thresh = thresh;
    @(negedge clk);
    if (state == STOP) n_restart++;
    start = 1;
    c_start = cyc;
    @(negedge clk);
    start = 0;
    while (state != S3) @(negedge clk);
    c_s3 = cyc;
    while (state != S7) @(negedge clk);
    c_s7_first = cyc;
    checks++;
    if (c_s7_first - c_s3 != 4) fail("fill S3..S6 is not four cycles");
    // rate: one evaluation per clock in S7
    repeat (3) @(negedge clk);
    if (state == S7) begin
      automatic logic [31:0] e0 = eval_count;
      @(negedge clk);
      checks++;
      if (state == S7 && eval_count != e0 + 1) fail("not one evaluation per clock");
    end
    while (!done) @(negedge clk);
    c_done = cyc;
    n_runs++;
    n_iter += int'(iter_count);
    // results against the model
    checks++;
    if (longint'(gbest_fit) != mgf) fail($sformatf("%s gbest_fit %0d vs model %0d", label, gbest_fit, mgf));
    for (int j = 0; j < D; j++) begin
      checks++;
      if (longint'(gbest_x[j]) != mgx[j]) fail($sformatf("%s gbest_x[%0d]", label, j));
    end
    // stop reason
    checks++;
    if (converged) begin
      n_stop_conv++;
      if (!(gbest_fit < f_opt + thresh)) fail("converged flag wrong");
    end else begin
      n_stop_budget++;
      if (eval_count != budget) fail($sformatf("%s stopped at %0d of %0d evaluations", label, eval_count, budget));
    end
    // cycle count: np init cycles, S3..done is one clock per evaluation plus one
    checks++;
    if (c_done - c_s3 != longint'(eval_count) + 1) fail($sformatf("%s S3-to-done %0d cycles for %0d evals", label, c_done - c_s3, eval_count));
    checks++;
    if (c_s3 - c_start != longint'(n) + 1) fail($sformatf("%s init took %0d cycles", label, c_s3 - c_start));
    checks++;
    if (iter_count != eval_count / n) fail($sformatf("%s iterations %0d for %0d evals", label, iter_count, eval_count));
    $display("%s: np=%0d evals=%0d iterations=%0d cycles=%0d gbest_fit=%0.6f x=(%0.4f, %0.4f) %s",
             label, n, eval_count, iter_count, c_done - c_start, real'(gbest_fit) / 512.0,
             real'(gbest_x[0]) / 512.0, real'(gbest_x[1]) / 512.0,
             converged ? "converged" : "budget used");
  endtask

  initial begin
    foreach (shift[j]) shift[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // F4 Rosenbrock, search domain [-9, 11], budget 10,000 evaluations
    run(8,  10000, fit_t'(LSB), "F4 np=8");
    run(16, 10000, fit_t'(LSB), "F4 np=16");
    run(32, 10000, fit_t'(LSB), "F4 np=32");
    // a small budget forces a budget stop; a loose target an early convergence
    run(8,  100,   fit_t'(LSB), "budget");
    run(4,  10000, fit_t'(512), "target 1.0");
    // shifted variant (F10-style shift of the optimum)
    foreach (shift[j]) shift[j] = fix_t'(-2 * 512 + 100 * j);
    run(32, 10000, fit_t'(LSB), "shifted np=32");
    checks += 7;
    if (n_pbest == 0)       fail("no pbest replacement");
    if (n_gbest == 0)       fail("no gbest replacement");
    if (n_vclamp == 0)      fail("no velocity clamp");
    if (n_xclamp == 0)      fail("no position clamp");
    if (n_iter == 0)        fail("no complete iteration");
    if (n_stop_conv == 0)   fail("never stopped on the target");
    if (n_stop_budget == 0) fail("never stopped on the budget");
    checks++;
    if (n_restart == 0) fail("never restarted");
    $display("mechanisms: pbest=%0d gbest=%0d vclamp=%0d xclamp=%0d iterations=%0d stop_target=%0d stop_budget=%0d restarts=%0d",
             n_pbest, n_gbest, n_vclamp, n_xclamp, n_iter, n_stop_conv, n_stop_budget, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
