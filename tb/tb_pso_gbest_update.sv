// tb_pso_gbest_update: drives random (fitness, position) offers into the
// global-best register and compares it every cycle with a running-minimum
// model (ties replace, clear empties the record).
// Inputs change on the falling edge; `updated` is checked one time step
// later and the record at the next rising edge. Every ninth offer repeats
// the current best fitness so that ties occur. A watchdog guards the run; the test ends
// with the TB_RESULT line.
module tb_pso_gbest_update;
  import pso_pkg::*;

  localparam int unsigned D = 2;
  logic clk = 0, rst_n = 0, clear = 0, upd = 0, updated;
  fit_t fit, gfit, m_fit;
  fix_t x [D];
  fix_t gx [D];
  fix_t m_x [D];
  int   checks = 0, failures = 0, n_upd = 0, cyc = 0;
  bit   m_upd;

  pso_gbest_update #(.D(D)) dut (.clk, .rst_n, .clear, .upd, .fit, .x, .updated,
                                 .gbest_fit(gfit), .gbest_x(gx));

  always #5 clk = ~clk;

  initial begin
    fit = '0; x[0] = '0; x[1] = '0;
    m_fit = FIT_MAX;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      checks++;
      if (gfit != m_fit) failures++;
      if (m_fit != FIT_MAX) for (int j = 0; j < D; j++) begin
        checks++;
        if (gx[j] != m_x[j]) failures++;
      end
      clear = (k % 500 == 499);
      upd   = ($urandom_range(0, 3) != 0);
      fit   = (k % 9 == 0) ? m_fit : fit_t'($urandom_range(0, 1 << 20));
      for (int j = 0; j < D; j++) x[j] = fix_t'($urandom);
      #1;
      m_upd = upd && (fit <= m_fit);
      checks++;
      if (updated != m_upd) failures++;
      if (clear) m_fit = FIT_MAX;
      else if (m_upd) begin
        n_upd++;
        m_fit = fit;
        m_x = x;
      end
    end
    checks++;
    if (n_upd < 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (cyc > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
