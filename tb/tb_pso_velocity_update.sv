// tb_pso_velocity_update: checks the velocity update unit against the
// reference arithmetic on directed cases (both clamps, zero coefficients)
// and on random operands across the whole position range.
//
// The unit is combinational: each operand set is applied and compared after
// one time step with tb_pso_ref_pkg's model of equation v' = w v + c1 r1
// (pbest - x) + c2 r2 (gbest - x). A watchdog guards the run; the test ends
// with the TB_RESULT line.
module tb_pso_velocity_update;
  import pso_pkg::*;
  import tb_pso_ref_pkg::*;

  fix_t  x, v, p, g, vmin, vmax, vn;
  rnd_t  r1, r2;
  coef_t w, c1, c2;
  int    checks = 0, failures = 0, n_hi = 0, n_lo = 0;

  pso_velocity_update dut (.x, .v, .pbest(p), .gbest(g), .r1, .r2, .w, .c1, .c2,
                           .vmin, .vmax, .v_next(vn));

  task automatic check();
    longint e;
    #1;
    e = ref_vel(x, v, p, g, r1, r2, w, c1, c2, vmin, vmax);
    checks++;
    if (longint'(vn) == vmax && e == vmax) n_hi++;
    if (longint'(vn) == vmin && e == vmin) n_lo++;
    if (longint'(vn) != e) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d v=%0d p=%0d g=%0d r=%0d/%0d got %0d exp %0d",
                                  x, v, p, g, r1, r2, vn, e);
    end
  endtask

  function automatic fix_t rfix();
    return fix_t'($urandom);
  endfunction

  initial begin
    w = W_DEF; c1 = C1_DEF; c2 = C2_DEF;
    vmin = -fix_t'(20 * 512); vmax = fix_t'(20 * 512);
    // Directed: w*v only (r = 0): 0.25 * 8.0 = 2.0
    x = 0; p = 0; g = 0; r1 = 0; r2 = 0; v = fix_t'(8 * 512);
    check();
    if (vn != fix_t'(2 * 512)) begin failures++; $display("FAIL w*v"); end
    checks++;
    // Directed: c1*r1*(p-x) with r1 = 0.5, c1 = 2 -> 1.0 * 3.0
    v = 0; p = fix_t'(3 * 512); r1 = rnd_t'(256);
    check();
    if (vn != fix_t'(3 * 512)) begin failures++; $display("FAIL c1r1"); end
    checks++;
    // Directed clamps
    x = -fix_t'(100 * 512); p = fix_t'(100 * 512); g = p; r1 = '1; r2 = '1;
    check();
    x = fix_t'(100 * 512); p = -fix_t'(100 * 512); g = p;
    check();
    // Random
    for (int k = 0; k < 20000; k++) begin
      x = rfix(); v = rfix(); p = rfix(); g = rfix();
      r1 = rnd_t'($urandom); r2 = rnd_t'($urandom);
      w  = (k % 3 == 0) ? coef_t'($urandom) : W_DEF;
      c1 = (k % 3 == 1) ? coef_t'($urandom) : C1_DEF;
      c2 = (k % 3 == 2) ? coef_t'($urandom) : C2_DEF;
      vmax = fix_t'($urandom_range(1, 60000));
      vmin = -vmax;
      check();
    end
    checks++;
    if (n_hi == 0 || n_lo == 0) begin failures++; $display("FAIL clamps never hit"); end
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
