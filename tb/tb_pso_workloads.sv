// tb_pso_workloads: the benchmark workloads F1..F13 on the PSO processor,
// each in its own build (fitness unit and dimension count per benchmark),
// with swarms of 8, 16 and 32 particles, w = 0.25, c1 = c2 = 2, an error
// target of one LSB and budgets of 10,000 evaluations (F1..F8) and 200,000
// (F9..F13). The two- to four-variable benchmarks run 100 times per swarm
// size; the 32-variable ones, whose runs are long, 4 times. F13 is run
// without its rotation matrix. Shift vectors are drawn at random.
//
// Each benchmark runs in its own tb_pso_bench instance, each with its own
// clock, all concurrently; the test ends when all have finished, with the summed
// TB_RESULT line, or at a watchdog that counts a failure.
module tb_pso_workloads;
  import pso_pkg::*;

  localparam int N = 13;
  logic fin [N];
  int   ck [N];
  int   fl [N];
  int   cv [N];
  int   checks = 0, failures = 0;

  tb_pso_bench #(.NAME("F1"),  .FUNC(FN_B2),         .D(2),  .RUNS(100), .BUDGET(10000),  .LO(-100.0), .HI(100.0), .FOPT(0.0))       b1  (fin[0],  ck[0],  fl[0],  cv[0]);
  tb_pso_bench #(.NAME("F2"),  .FUNC(FN_BRANIN),     .D(2),  .RUNS(100), .BUDGET(10000),  .LO(-4.0),   .HI(4.0),   .FOPT(0.397887))  b2  (fin[1],  ck[1],  fl[1],  cv[1]);
  tb_pso_bench #(.NAME("F3"),  .FUNC(FN_GOLDSTEIN),  .D(2),  .RUNS(100), .BUDGET(10000),  .LO(-2.0),   .HI(2.0),   .FOPT(3.0))       b3  (fin[2],  ck[2],  fl[2],  cv[2]);
  tb_pso_bench #(.NAME("F4"),  .FUNC(FN_ROSENBROCK), .D(2),  .RUNS(100), .BUDGET(10000),  .LO(-9.0),   .HI(11.0),  .FOPT(0.0))       b4  (fin[3],  ck[3],  fl[3],  cv[3]);
  tb_pso_bench #(.NAME("F5"),  .FUNC(FN_ZAKHAROV),   .D(2),  .RUNS(100), .BUDGET(10000),  .LO(-10.0),  .HI(10.0),  .FOPT(0.0))       b5  (fin[4],  ck[4],  fl[4],  cv[4]);
  tb_pso_bench #(.NAME("F6"),  .FUNC(FN_SPHERE),     .D(3),  .RUNS(100), .BUDGET(10000),  .LO(-5.12),  .HI(5.12),  .FOPT(0.0))       b6  (fin[5],  ck[5],  fl[5],  cv[5]);
  tb_pso_bench #(.NAME("F7"),  .FUNC(FN_HARTMANN3),  .D(3),  .RUNS(100), .BUDGET(10000),  .LO(0.0),    .HI(1.0),   .FOPT(-3.863433)) b7  (fin[6],  ck[6],  fl[6],  cv[6]);
  tb_pso_bench #(.NAME("F8"),  .FUNC(FN_VARDIM),     .D(4),  .RUNS(100), .BUDGET(10000),  .LO(-9.0),   .HI(11.0),  .FOPT(0.0))       b8  (fin[7],  ck[7],  fl[7],  cv[7]);
  tb_pso_bench #(.NAME("F9"),  .FUNC(FN_SPHERE),     .D(32), .RUNS(4),   .BUDGET(200000), .LO(-100.0), .HI(100.0), .FOPT(0.0), .SHIFTED(1'b1), .SEED(9))  b9  (fin[8],  ck[8],  fl[8],  cv[8]);
  tb_pso_bench #(.NAME("F10"), .FUNC(FN_ROSENBROCK), .D(32), .RUNS(4),   .BUDGET(200000), .LO(-100.0), .HI(100.0), .FOPT(0.0), .SHIFTED(1'b1), .SEED(10)) b10 (fin[9],  ck[9],  fl[9],  cv[9]);
  tb_pso_bench #(.NAME("F11"), .FUNC(FN_SCHWEFEL12), .D(32), .RUNS(4),   .BUDGET(200000), .LO(-100.0), .HI(100.0), .FOPT(0.0), .SHIFTED(1'b1), .SEED(11)) b11 (fin[10], ck[10], fl[10], cv[10]);
  tb_pso_bench #(.NAME("F12"), .FUNC(FN_RASTRIGIN),  .D(32), .RUNS(4),   .BUDGET(200000), .LO(-100.0), .HI(100.0), .FOPT(0.0), .SHIFTED(1'b1), .SEED(12)) b12 (fin[11], ck[11], fl[11], cv[11]);
  tb_pso_bench #(.NAME("F13"), .FUNC(FN_ELLIPTIC),   .D(32), .RUNS(4),   .BUDGET(200000), .LO(-100.0), .HI(100.0), .FOPT(0.0), .SHIFTED(1'b1), .SEED(13)) b13 (fin[12], ck[12], fl[12], cv[12]);

  initial begin
    automatic bit all_done = 0;
    while (!all_done) begin
      #1000;
      all_done = 1;
      for (int i = 0; i < N; i++) if (fin[i] !== 1'b1) all_done = 0;
    end
    for (int i = 0; i < N; i++) begin
      checks += ck[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
