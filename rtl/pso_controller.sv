// pso_controller: control FSM of the PSO processor.
//
// States (names as in the processor's state diagram, which has no S2):
//   S0   idle. On `start` the RNG seed is loaded and the FSM enters S1.
//   S1   initialisation; stays in S1 for np cycles, one particle per cycle
//        (init_we, init_idx), then S3.
//   S3   clears the global best and the counters (clear) and issues
//        particle 0 into the pipeline.
//   S4, S5, S6  pipeline fill: one more particle is issued in each while the
//        first moves through delay registers 1, 2 and 3.
//   S7   main loop: a particle is issued every cycle (indices wrap at np-1)
//        and all four stages work; leaves for STOP when `stop_cond` is high.
//   STOP results held, `done` high. A new `start` runs again from S1.
// The S0..S7 sequence and the S1 and S7 self-loops follow the state diagram;
// what each state does in detail, the restart from STOP and the one-particle-
// per-cycle issue are this design's choices.
//
// `run` is high in S3..S7; the datapath only advances and writes while it is
// high, so leaving S7 freezes the pipeline. np must be at least 4 (checked
// by an assertion): a particle's new position is written three cycles after
// it is read and must be in memory before the particle is read again.
module pso_controller
  import pso_pkg::*;
#(
  parameter int unsigned NP_MAX = 32,
  localparam int unsigned AW    = $clog2(NP_MAX)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW:0]   np,          // particles in the swarm, 4 .. NP_MAX
  input  logic          stop_cond,   // target reached or evaluations used up
  output state_e        state,
  output logic          seed_load,
  output logic          init_we,
  output logic [AW-1:0] init_idx,
  output logic          clear,
  output logic          issue,       // a particle is read into stage 1
  output logic [AW-1:0] rd_idx,
  output logic          run,
  output logic          done
);
  state_e        nstate;
  logic [AW-1:0] cnt;          // init index in S1, read index in S3..S7
  logic          last;

  assign last = ({1'b0, cnt} == np - 1'b1);

  always_comb begin
    nstate = state;
    unique case (state)
      S0:      if (start) nstate = S1;
      S1:      if (last) nstate = S3;
      S3:      nstate = S4;
      S4:      nstate = S5;
      S5:      nstate = S6;
      S6:      nstate = S7;
      S7:      if (stop_cond) nstate = STOP;
      STOP:    if (start) nstate = S1;
      default: nstate = S0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S0;
      cnt   <= '0;
    end else begin
      state <= nstate;
      if (nstate != state && (nstate == S1 || nstate == S3)) cnt <= '0;
      else if (init_we || issue) cnt <= last ? '0 : cnt + 1'b1;
    end
  end

  always_comb begin
    seed_load = start && (state == S0 || state == STOP);
    init_we   = (state == S1);
    init_idx  = cnt;
    clear     = (state == S3);
    run       = (state inside {S3, S4, S5, S6, S7});
    issue     = run && !(state == S7 && stop_cond);
    rd_idx    = cnt;
    done      = (state == STOP);
  end

  a_np_range: assert property (@(posedge clk) disable iff (!rst_n)
                               (state != S0) |-> (np >= (AW+1)'(4) && np <= (AW+1)'(NP_MAX)))
    else $error("np must be within 4 .. NP_MAX");
endmodule
