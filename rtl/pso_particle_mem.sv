// pso_particle_mem: one word per particle, used for the position, personal
// best and velocity memories of the processor.
//
// DEPTH words of WIDTH bits held in registers. Reading is asynchronous (the
// word at rd_addr appears in the same cycle); writing is synchronous on the
// rising clock edge when we is high. A word written in cycle t is read back
// from cycle t+1. The memory is not reset: the controller writes every word
// it uses during initialisation before any of them is read.
//
// The processor has position, personal-best and velocity memories; their
// organisation as register arrays with asynchronous read is this design's
// own choice.
module pso_particle_mem #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 34,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
  end

  assign rd_data = mem[rd_addr];
endmodule
