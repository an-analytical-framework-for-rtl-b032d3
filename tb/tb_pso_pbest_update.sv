// tb_pso_pbest_update: checks the personal-best selection, including the
// tie case (equal fitness replaces the record).
//
// The unit is combinational: each operand set is applied, allowed to settle
// for one time step and compared with an independent selection model, for
// 5000 random operand sets of widely varying magnitude; every seventh has
// equal fitness (a tie) and the first meets an empty record. A watchdog
// guards the run; the test ends with the TB_RESULT line.
module tb_pso_pbest_update;
  import pso_pkg::*;

  localparam int unsigned D = 3;
  fit_t fit, pf_old, pf_new;
  fix_t x [D];
  fix_t px_old [D];
  fix_t px_new [D];
  logic imp;
  int   checks = 0, failures = 0, n_imp = 0, n_keep = 0;

  pso_pbest_update #(.D(D)) dut (.fit, .x, .pbest_fit_old(pf_old), .pbest_x_old(px_old),
                                 .improved(imp), .pbest_fit_new(pf_new), .pbest_x_new(px_new));

  task automatic check();
    bit e;
    #1;
    e = !(fit > pf_old);
    if (e) n_imp++; else n_keep++;
    checks++;
    if (imp != e || pf_new != (e ? fit : pf_old)) failures++;
    for (int j = 0; j < D; j++) begin
      checks++;
      if (px_new[j] != (e ? x[j] : px_old[j])) failures++;
    end
  endtask

  initial begin
    for (int k = 0; k < 5000; k++) begin
      fit    = fit_t'({$urandom, $urandom}) >>> $urandom_range(0, 40);
      pf_old = (k % 7 == 0) ? fit : fit_t'({$urandom, $urandom}) >>> $urandom_range(0, 40);
      if (k == 0) pf_old = FIT_MAX;
      for (int j = 0; j < D; j++) begin
        x[j] = fix_t'($urandom);
        px_old[j] = fix_t'($urandom);
      end
      check();
    end
    checks++;
    if (n_imp == 0 || n_keep == 0) failures++;
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
