// pso_rng_ca: random number generator built from a one-dimensional cellular
// automaton in which every cell's next state depends on four cells.
//
// The processor takes its random numbers from a neighbourhood-of-four
// cellular automaton. The rule used here is this design's own choice:
//   next[i] = c[i-1] ^ (c[i] | c[i+1]) ^ c[i+2]     (indices wrap around)
// i.e. the rule-30 automaton with a fourth, XOR-ed neighbour. All W cells
// step once per clock while `en` is high and the whole state is the output,
// so each clock delivers W fresh bits that the datapath slices into R_W-bit
// fractions. `load` writes `seed` into the cells (an all-zero seed is
// replaced by 1, since zero is a fixed point of the rule). Reset loads the
// RESET_SEED parameter. Output is valid in the cycle after reset or load.
module pso_rng_ca #(
  parameter int unsigned W          = 36,
  parameter logic [63:0] RESET_SEED = 64'h9E37_79B9_7F4A_7C15
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  input  logic [W-1:0] seed,
  output logic [W-1:0] rnd
);
  logic [W-1:0] cells, nxt;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      nxt[i] = cells[(i + W - 1) % W] ^ (cells[i] | cells[(i + 1) % W])
               ^ cells[(i + 2) % W];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cells <= W'(RESET_SEED) | W'(1);
    end else if (load) begin
      cells <= (seed == '0) ? W'(1) : seed;
    end else if (en) begin
      cells <= nxt;
    end
  end

  assign rnd = cells;
endmodule
