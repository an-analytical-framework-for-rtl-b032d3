// tb_pso_position_update: checks x' = clamp(x + v) and the velocity zeroing
// at a bound, on directed and random operands.
//
// The unit is combinational: each operand set is applied and compared after
// one time step with an independent model computed in wider integers. A
// watchdog guards the run; the test ends with the TB_RESULT line.
module tb_pso_position_update;
  import pso_pkg::*;

  fix_t x, v, xmin, xmax, xn, vo;
  logic cl;
  int   checks = 0, failures = 0, n_clamp = 0, n_free = 0;

  pso_position_update dut (.x, .v, .xmin, .xmax, .x_next(xn), .v_out(vo), .clamped(cl));

  task automatic check();
    int s, ex, ev, ec;
    #1;
    s = int'(x) + int'(v);
    ec = 0; ex = s; ev = int'(v);
    if (s > int'(xmax)) begin ex = xmax; ec = 1; ev = 0; end
    if (s < int'(xmin)) begin ex = xmin; ec = 1; ev = 0; end
    if (ec == 1) n_clamp++; else n_free++;
    checks++;
    if (int'(xn) != ex || int'(vo) != ev || int'(cl) != ec) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d v=%0d -> %0d/%0d/%0d exp %0d/%0d/%0d",
                                  x, v, xn, vo, cl, ex, ev, ec);
    end
  endtask

  initial begin
    // directed: Rosenbrock domain [-9, 11]
    xmin = -fix_t'(9 * 512); xmax = fix_t'(11 * 512);
    x = fix_t'(10 * 512); v = fix_t'(2 * 512); check();      // above
    x = -fix_t'(8 * 512); v = -fix_t'(3 * 512); check();     // below
    x = 0; v = fix_t'(512); check();                          // inside
    x = fix_t'(11 * 512); v = 0; check();                     // on the bound
    // extremes of the format: sum must not wrap
    xmin = -fix_t'(100 * 512); xmax = fix_t'(100 * 512);
    x = fix_t'(65535); v = fix_t'(65535); check();
    x = fix_t'(-65536); v = fix_t'(-65536); check();
    for (int k = 0; k < 20000; k++) begin
      x = fix_t'($urandom); v = fix_t'($urandom);
      xmax = fix_t'($urandom_range(0, 65535));
      xmin = -fix_t'($urandom_range(0, 65535));
      check();
    end
    checks++;
    if (n_clamp == 0 || n_free == 0) failures++;
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
