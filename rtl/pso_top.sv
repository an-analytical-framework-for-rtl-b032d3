// pso_top: sequential particle swarm optimisation processor.
//
// The whole algorithm runs in hardware: random initialisation of the swarm,
// fitness evaluation, personal- and global-best updates, velocity and
// position updates, and the stopping test. Particles are processed one after
// another through a four-stage pipeline; the three delay registers carry a
// particle's position alongside it:
//
//   stage 1  read x_i from the position memory; fitness unit f(x_i)
//            -> delay register 1 (x_i), f(x_i)
//   stage 2  pbest update unit (reads the personal-best fitness memory,
//            writes both personal-best memories), gbest update unit
//            -> delay register 2 (x_i)
//   stage 3  velocity update unit, one per dimension (reads the velocity and
//            personal-best position memories, the gbest register and the RNG)
//            -> delay register 3 (x_i), new velocity
//   stage 4  position update unit, one per dimension; writes the position
//            memory and the velocity memory
//
// One particle enters per clock in the main state S7, so one fitness
// evaluation completes per clock. Within an iteration particle i sees the
// global best as updated by particles 0..i, as in the sequential algorithm.
//
// Interface: pulse `start` (with the run-time settings stable) to run one
// optimisation. `done` rises when gbest_fit < f_opt + err_thresh
// (`converged`) or when eval_count reaches max_evals. Results stay until the
// next `start`. All numbers use the fixed-point formats of pso_pkg.
//
// Follows the processor's datapath: fitness unit, pbest and gbest update
// units, velocity and position update units, a random number generator,
// three delay registers and position/pbest/velocity memories. This design's
// own choices: the pipeline timing above, the split of the personal-best
// memory into a fitness part (read in stage 2) and a position part (read in
// stage 3), writing the velocity memory in stage 4 so that a velocity zeroed
// at a bound is stored in the same write, run-time bounds/coefficients as
// ports, and the shift input for the shifted benchmarks.
//
// The signals g_updated (the global best moved) and clamped (a position hit
// a bound) drive no logic; they are kept as named observation points so that
// a testbench can count these events, and synthesis removes them.
module pso_top
  import pso_pkg::*;
#(
  parameter int unsigned NP_MAX = 32,            // largest swarm
  parameter int unsigned D      = 2,             // dimensions
  parameter func_e       FUNC   = FN_ROSENBROCK, // benchmark in the fitness unit
  localparam int unsigned AW    = $clog2(NP_MAX),
  localparam int unsigned RNG_W = 2 * D * R_W
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [63:0] seed,
  input  logic [AW:0] np,            // swarm size for this run, 4 .. NP_MAX
  input  logic [31:0] max_evals,     // evaluation budget
  input  fit_t        f_opt,         // known optimum of the benchmark
  input  fit_t        err_thresh,    // stop when gbest_fit - f_opt < err_thresh
  input  fix_t        xmin,
  input  fix_t        xmax,
  input  fix_t        vmin,
  input  fix_t        vmax,
  input  coef_t       w,
  input  coef_t       c1,
  input  coef_t       c2,
  input  fix_t        shift [D],     // shift vector of the shifted benchmarks
  output logic        done,
  output logic        converged,
  output state_e      state,
  output fix_t        gbest_x [D],
  output fit_t        gbest_fit,
  output logic [31:0] eval_count,
  output logic [31:0] iter_count
);
  localparam int unsigned VW = D * X_W;   // one particle vector, packed

  // ---------------------------------------------------------------- control
  logic          seed_load, init_we, clear, issue, run, stop_cond;
  logic [AW-1:0] init_idx, rd_idx;

  pso_controller #(.NP_MAX(NP_MAX)) u_ctrl (
    .clk, .rst_n, .start, .np, .stop_cond, .state, .seed_load, .init_we,
    .init_idx, .clear, .issue, .rd_idx, .run, .done
  );

  // -------------------------------------------------------------------- RNG
  logic [RNG_W-1:0] rnd;
  rnd_t             r1 [D];
  rnd_t             r2 [D];

  pso_rng_ca #(.W(RNG_W)) u_rng (
    .clk, .rst_n, .en(1'b1), .load(seed_load),
    .seed({((RNG_W + 63) / 64){seed}}[RNG_W-1:0]), .rnd
  );

  always_comb begin
    for (int j = 0; j < D; j++) begin
      r1[j] = rnd[j*R_W +: R_W];
      r2[j] = rnd[(D+j)*R_W +: R_W];
    end
  end

  // ------------------------------------------------------ random swarm init
  fix_t init_x [D];
  fix_t init_v [D];

  always_comb begin
    for (int j = 0; j < D; j++) begin
      init_x[j] = fix_t'(fit_t'(xmin) + (((fit_t'(xmax) - fit_t'(xmin)) * fit_t'({1'b0, r1[j]})) >>> R_W));
      init_v[j] = fix_t'(fit_t'(vmin) + (((fit_t'(vmax) - fit_t'(vmin)) * fit_t'({1'b0, r2[j]})) >>> R_W));
    end
  end

  // ------------------------------------------------------------- memories
  logic          pos_we, vel_we, pb_we;
  logic [AW-1:0] pos_wa, vel_wa, pb_wa;
  logic [VW-1:0] pos_wd, vel_wd, pbx_wd, pos_rd, vel_rd, pbx_rd;
  fit_t          pbf_wd, pbf_rd;
  logic [AW-1:0] s1_idx, s2_idx, s3_idx;

  pso_particle_mem #(.DEPTH(NP_MAX), .WIDTH(VW)) u_pos_mem (
    .clk, .we(pos_we), .wr_addr(pos_wa), .wr_data(pos_wd), .rd_addr(rd_idx), .rd_data(pos_rd));
  pso_particle_mem #(.DEPTH(NP_MAX), .WIDTH(VW)) u_vel_mem (
    .clk, .we(vel_we), .wr_addr(vel_wa), .wr_data(vel_wd), .rd_addr(s2_idx), .rd_data(vel_rd));
  pso_particle_mem #(.DEPTH(NP_MAX), .WIDTH(VW)) u_pbx_mem (
    .clk, .we(pb_we), .wr_addr(pb_wa), .wr_data(pbx_wd), .rd_addr(s2_idx), .rd_data(pbx_rd));
  pso_particle_mem #(.DEPTH(NP_MAX), .WIDTH(FIT_W)) u_pbf_mem (
    .clk, .we(pb_we), .wr_addr(pb_wa), .wr_data(pbf_wd), .rd_addr(s1_idx), .rd_data(pbf_rd));

  // --------------------------------------------- stage 1: fitness evaluation
  fix_t x_rd [D];
  fit_t fit_c;
  fix_t dr1 [D];           // delay register 1
  fit_t s1_fit;
  logic s1_v;

  always_comb for (int j = 0; j < D; j++) x_rd[j] = pos_rd[j*X_W +: X_W];

  pso_fitness #(.FUNC(FUNC), .D(D)) u_fit (.x(x_rd), .shift(shift), .fit(fit_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_v <= 1'b0;
    else        s1_v <= issue;
  end
  always_ff @(posedge clk) begin
    dr1    <= x_rd;
    s1_fit <= fit_c;
    s1_idx <= rd_idx;
  end

  // ---------------------------------------- stage 2: pbest and gbest update
  fix_t pb_x_old [D];
  fix_t pb_x_new [D];
  fit_t pb_fit_new;
  logic improved, g_updated, s2_act;
  fix_t dr2 [D];           // delay register 2
  logic s2_v;

  assign s2_act = s1_v && run;

  always_comb for (int j = 0; j < D; j++) pb_x_old[j] = dr1[j];  // only used if improved

  pso_pbest_update #(.D(D)) u_pbest (
    .fit(s1_fit), .x(dr1), .pbest_fit_old(pbf_rd), .pbest_x_old(pb_x_old),
    .improved, .pbest_fit_new(pb_fit_new), .pbest_x_new(pb_x_new));

  pso_gbest_update #(.D(D)) u_gbest (
    .clk, .rst_n, .clear, .upd(s2_act && improved), .fit(s1_fit), .x(dr1),
    .updated(g_updated), .gbest_fit, .gbest_x);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2_v <= 1'b0;
    else        s2_v <= s2_act;
  end
  always_ff @(posedge clk) begin
    dr2    <= dr1;
    s2_idx <= s1_idx;
  end

  // ---------------------------------------------- stage 3: velocity update
  fix_t v_old [D];
  fix_t pb_x  [D];
  fix_t v_new [D];
  fix_t dr3   [D];         // delay register 3
  fix_t s3_vel [D];
  logic s3_v, s3_act;

  assign s3_act = s2_v && run;

  for (genvar j = 0; j < D; j++) begin : g_vel
    assign v_old[j] = vel_rd[j*X_W +: X_W];
    assign pb_x[j]  = pbx_rd[j*X_W +: X_W];
    pso_velocity_update u_vu (
      .x(dr2[j]), .v(v_old[j]), .pbest(pb_x[j]), .gbest(gbest_x[j]),
      .r1(r1[j]), .r2(r2[j]), .w, .c1, .c2, .vmin, .vmax, .v_next(v_new[j]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s3_v <= 1'b0;
    else        s3_v <= s3_act;
  end
  always_ff @(posedge clk) begin
    dr3    <= dr2;
    s3_vel <= v_new;
    s3_idx <= s2_idx;
  end

  // ---------------------------------------------- stage 4: position update
  fix_t x_new [D];
  fix_t v_fin [D];
  logic [D-1:0] clamped;
  logic s4_act;

  assign s4_act = s3_v && run;

  for (genvar j = 0; j < D; j++) begin : g_pos
    pso_position_update u_pu (
      .x(dr3[j]), .v(s3_vel[j]), .xmin, .xmax,
      .x_next(x_new[j]), .v_out(v_fin[j]), .clamped(clamped[j]));
  end

  // ------------------------------------------------- memory write selection
  always_comb begin
    pos_we = init_we || s4_act;
    vel_we = pos_we;
    pos_wa = init_we ? init_idx : s3_idx;
    vel_wa = pos_wa;
    pb_we  = init_we || (s2_act && improved);
    pb_wa  = init_we ? init_idx : s1_idx;
    pbf_wd = init_we ? FIT_MAX : pb_fit_new;
    for (int j = 0; j < D; j++) begin
      pos_wd[j*X_W +: X_W] = init_we ? init_x[j] : x_new[j];
      vel_wd[j*X_W +: X_W] = init_we ? init_v[j] : v_fin[j];
      pbx_wd[j*X_W +: X_W] = init_we ? init_x[j] : pb_x_new[j];
    end
  end

  // ------------------------------------------------ counters and stop test
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eval_count <= '0;
      iter_count <= '0;
    end else if (clear) begin
      eval_count <= '0;
      iter_count <= '0;
    end else if (s2_act) begin
      eval_count <= eval_count + 1'b1;
      if ({1'b0, s1_idx} == np - 1'b1) iter_count <= iter_count + 1'b1;
    end
  end

  assign converged = (gbest_fit < f_opt + err_thresh);
  // The budget test counts the evaluation finishing in this cycle, so a run
  // stops after exactly max_evals evaluations (max_evals >= 4).
  assign stop_cond = converged || (s2_act && (eval_count + 1'b1 >= max_evals));
endmodule
