// tb_pso_controller: walks the FSM through two complete runs with different
// swarm sizes. Checks the state order S0 -> S1 (np cycles) -> S3 -> S4 ->
// S5 -> S6 -> S7 -> STOP, the initialisation and read indices (wrapping at
// np-1), the control strobes of each state, and the restart from STOP.
// Inputs change on the falling clock edge and the outputs are checked
// there, or one time step later for strobes that follow a new input. A watchdog ends the test with a failure
// if it hangs. Prints TB_RESULT checks=<n> failures=<n>.
module tb_pso_controller;
  import pso_pkg::*;

  localparam int unsigned NP_MAX = 32, AW = 5;
  logic          clk = 0, rst_n = 0, start = 0, stop_cond = 0;
  logic [AW:0]   np;
  state_e        state;
  logic          seed_load, init_we, clear, issue, run, done;
  logic [AW-1:0] init_idx, rd_idx;
  int            checks = 0, failures = 0, cyc = 0;

  pso_controller #(.NP_MAX(NP_MAX)) dut (.clk, .rst_n, .start, .np, .stop_cond, .state,
                                         .seed_load, .init_we, .init_idx, .clear, .issue,
                                         .rd_idx, .run, .done);

  always #5 clk = ~clk;

  task automatic expect_state(state_e s, string what);
    checks++;
    if (state != s) begin
      failures++;
      $display("FAIL %s: state %s expected %s", what, state.name(), s.name());
    end
  endtask

  task automatic one_run(int n, int main_cycles);
    np = (AW+1)'(n);
    @(negedge clk);
    checks++; if (seed_load) failures++;
    start = 1;
    #1;
    checks++; if (!seed_load) failures++;
    @(negedge clk); start = 0;
    for (int i = 0; i < n; i++) begin
      expect_state(S1, "init");
      checks++; if (!init_we || init_idx != AW'(i) || run || issue) failures++;
      @(negedge clk);
    end
    expect_state(S3, "S3");
    checks++; if (!clear || !issue || rd_idx != 0 || !run) failures++;
    @(negedge clk);
    expect_state(S4, "S4"); checks++; if (rd_idx != 1 || !issue) failures++;
    @(negedge clk);
    expect_state(S5, "S5"); checks++; if (rd_idx != 2 || !issue) failures++;
    @(negedge clk);
    expect_state(S6, "S6"); checks++; if (rd_idx != 3 || !issue) failures++;
    for (int k = 4; k < 4 + main_cycles; k++) begin
      @(negedge clk);
      expect_state(S7, "S7");
      checks++; if (rd_idx != AW'(k % n) || !issue || clear) failures++;
    end
    stop_cond = 1;
    #1;
    checks++; if (issue) failures++;
    @(negedge clk);
    stop_cond = 0;
    expect_state(STOP, "STOP");
    checks++; if (!done || run || issue) failures++;
    repeat (3) @(negedge clk);
    expect_state(STOP, "STOP hold");
  endtask

  initial begin
    np = 8;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_state(S0, "idle");
    repeat (3) @(negedge clk);
    expect_state(S0, "idle hold");
    one_run(8, 40);
    one_run(5, 23);
    one_run(32, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (cyc > 10000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
