// tb_pso_fitness: checks every benchmark circuit against the reference
// arithmetic: Rosenbrock with 2 and 10 dimensions (plain and shifted),
// sphere (3), Zakharov (2), variably-dimensioned (4), Schwefel 1.2 (32),
// B2, Branin, Goldstein-Price (2), Hartmann (3), Rastrigin and elliptic (32),
// and the fitness-unit wrapper. Also checks known optima exactly (value 0 at
// the minimiser) and random points inside each benchmark's search domain.
//
// All units are combinational: inputs are applied and outputs compared one
// time step later with tb_pso_ref_pkg. A watchdog guards the run; the test
// ends with the TB_RESULT line.
module tb_pso_fitness;
  import pso_pkg::*;
  import tb_pso_ref_pkg::*;

  fix_t x2 [2];   fix_t s2 [2];   fit_t f_ros2, f_wrap, f_zak;
  fix_t x10 [10]; fix_t s10 [10]; fit_t f_ros10;
  fix_t x3 [3];   fix_t s3 [3];   fit_t f_sph;
  fix_t x4 [4];   fit_t f_vd;
  fix_t x32 [32]; fix_t s32 [32]; fit_t f_sch;
  fix_t x3h [3]; fit_t f_b2, f_bra, f_gp, f_h3, f_ras, f_ell;
  int checks = 0, failures = 0;

  pso_fitness_rosenbrock #(.D(2))  u_ros2  (.x(x2),  .shift(s2),  .fit(f_ros2));
  pso_fitness_rosenbrock #(.D(10)) u_ros10 (.x(x10), .shift(s10), .fit(f_ros10));
  pso_fitness_sphere     #(.D(3))  u_sph   (.x(x3),  .shift(s3),  .fit(f_sph));
  pso_fitness_zakharov   #(.D(2))  u_zak   (.x(x2),               .fit(f_zak));
  pso_fitness_vardim     #(.D(4))  u_vd    (.x(x4),               .fit(f_vd));
  pso_fitness_schwefel12 #(.D(32)) u_sch   (.x(x32), .shift(s32), .fit(f_sch));
  pso_fitness_b2                   u_b2    (.x(x2), .fit(f_b2));
  pso_fitness_branin               u_bra   (.x(x2), .fit(f_bra));
  pso_fitness_goldstein            u_gp    (.x(x2), .fit(f_gp));
  pso_fitness_hartmann3            u_h3    (.x(x3h), .fit(f_h3));
  pso_fitness_rastrigin  #(.D(32)) u_ras   (.x(x32), .shift(s32), .fit(f_ras));
  pso_fitness_elliptic   #(.D(32)) u_ell   (.x(x32), .shift(s32), .fit(f_ell));
  pso_fitness #(.FUNC(FN_ROSENBROCK), .D(2)) u_wrap (.x(x2), .shift(s2), .fit(f_wrap));

  function automatic fix_t rnd_in(int lo, int hi);   // uniform in [lo, hi] (integers)
    return fix_t'($urandom_range(0, (hi - lo) * 512)) + fix_t'(lo * 512);
  endfunction

  task automatic cmp(string name, fit_t got, longint exp);
    checks++;
    if (longint'(got) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", name, got, exp);
    end
  endtask

  task automatic check_all();
    longint z2[], z10[], z3[], z4[], z32[], zz2[], zh[];
    z2 = new[2]; zz2 = new[2]; z10 = new[10]; z3 = new[3]; z4 = new[4]; z32 = new[32]; zh = new[3];
    #1;
    for (int i = 0; i < 2; i++)  begin z2[i] = longint'(x2[i]) - s2[i]; zz2[i] = x2[i]; end
    for (int i = 0; i < 10; i++) z10[i] = longint'(x10[i]) - s10[i];
    for (int i = 0; i < 3; i++)  z3[i] = longint'(x3[i]) - s3[i];
    for (int i = 0; i < 4; i++)  z4[i] = x4[i];
    for (int i = 0; i < 3; i++)  zh[i] = x3h[i];
    for (int i = 0; i < 32; i++) z32[i] = longint'(x32[i]) - s32[i];
    cmp("rosenbrock2",  f_ros2,  ref_fit(FN_ROSENBROCK, z2));
    cmp("wrapper",      f_wrap,  ref_fit(FN_ROSENBROCK, z2));
    cmp("rosenbrock10", f_ros10, ref_fit(FN_ROSENBROCK, z10));
    cmp("sphere",       f_sph,   ref_fit(FN_SPHERE, z3));
    cmp("zakharov",     f_zak,   ref_fit(FN_ZAKHAROV, zz2));
    cmp("vardim",       f_vd,    ref_fit(FN_VARDIM, z4));
    cmp("schwefel12",   f_sch,   ref_fit(FN_SCHWEFEL12, z32));
    cmp("b2",           f_b2,    ref_fit(FN_B2, zz2));
    cmp("branin",       f_bra,   ref_fit(FN_BRANIN, zz2));
    cmp("goldstein",    f_gp,    ref_fit(FN_GOLDSTEIN, zz2));
    cmp("hartmann3",    f_h3,    ref_fit(FN_HARTMANN3, zh));
    cmp("rastrigin",    f_ras,   ref_fit(FN_RASTRIGIN, z32));
    cmp("elliptic",     f_ell,   ref_fit(FN_ELLIPTIC, z32));
  endtask

  initial begin
    // Optima: Rosenbrock at (1,..,1), sphere/Schwefel at the shift, Zakharov
    // at 0, variably-dimensioned at (1,..,1).
    foreach (x2[i])  begin x2[i] = fix_t'(512); s2[i] = '0; end
    foreach (x10[i]) begin x10[i] = fix_t'(512); s10[i] = '0; end
    foreach (x3[i])  begin x3[i] = fix_t'(700 + i); s3[i] = fix_t'(700 + i); end
    foreach (x4[i])  x4[i] = fix_t'(512);
    foreach (x32[i]) begin x32[i] = fix_t'(-300 * i); s32[i] = fix_t'(-300 * i); end
    x3h[0] = fix_t'(59); x3h[1] = fix_t'(284); x3h[2] = fix_t'(437);  // Hartmann minimiser
    #1;
    checks += 8;
    if (f_ras != 0) begin failures++; $display("FAIL ras at its optimum: %0d", f_ras); end
    if (f_ell != 0) begin failures++; $display("FAIL ell at its optimum: %0d", f_ell); end
    // known optimum -3.86278; with nine fraction bits the squared distances
    // near the minimiser truncate toward zero, which lowers the value to
    // about -4.02 here, so only a 0.2 band is checked
    if (f_h3 > fit_t'(-1875) || f_h3 < fit_t'(-2080)) begin
      failures++; $display("FAIL hartmann optimum %0d", f_h3);
    end
    if (f_ros2 != 0)  failures++;
    if (f_ros10 != 0) begin failures++; $display("FAIL ros10 at its optimum: %0d", f_ros10); end
    if (f_sph != 0)   failures++;
    if (f_vd != 0)    failures++;
    if (f_sch != 0)   failures++;
    foreach (x2[i]) x2[i] = '0;
    #1;
    checks += 3;
    if (f_zak != 0) begin failures++; $display("FAIL zak at its optimum: %0d", f_zak); end
    if (f_b2 != 0)  failures++;
    if (f_gp != fit_t'(600 * 512)) begin failures++; $display("FAIL gp(0,0) %0d", f_gp); end      // f(0,0) = (1 + 19) * 30
    // Goldstein-Price optimum f(0,-1) = 3; Branin optimum 0.397887 at (pi, 2.275)
    x2[0] = '0; x2[1] = -fix_t'(512);
    #1;
    checks++; if (f_gp != fit_t'(3 * 512)) begin failures++; $display("FAIL gp optimum %0d", f_gp); end
    x2[0] = fix_t'(1608); x2[1] = fix_t'(1165);
    #1;
    checks++;
    if (f_bra < fit_t'(194) || f_bra > fit_t'(214)) begin failures++; $display("FAIL branin optimum %0d", f_bra); end
    // Hand-worked Rosenbrock value: f(0, 0) = 100*0 + (0-1)^2 = 1.0
    foreach (x2[i]) x2[i] = '0;
    #1;
    checks++; if (f_ros2 != fit_t'(512)) failures++;
    // f(2, 1) = 100*(1-4)^2 + 1 = 901
    x2[0] = fix_t'(1024); x2[1] = fix_t'(512);
    #1;
    checks++; if (f_ros2 != fit_t'(901 * 512)) failures++;
    check_all();
    for (int k = 0; k < 3000; k++) begin
      foreach (x2[i])  begin x2[i]  = rnd_in(-9, 11);    s2[i]  = (k % 2) ? rnd_in(-5, 5) : '0; end
      foreach (x10[i]) begin x10[i] = rnd_in(-9, 11);    s10[i] = (k % 2) ? rnd_in(-5, 5) : '0; end
      foreach (x3[i])  begin x3[i]  = rnd_in(-5, 5);     s3[i]  = rnd_in(-5, 5); end
      foreach (x4[i])  x4[i] = rnd_in(-9, 11);
      foreach (x32[i]) begin x32[i] = rnd_in(-100, 100); s32[i] = rnd_in(-20, 20); end
      foreach (x3h[i]) x3h[i] = rnd_in(0, 1);
      if (k % 3 == 0) foreach (x2[i]) x2[i] = rnd_in(-2, 2);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
