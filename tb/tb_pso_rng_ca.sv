// tb_pso_rng_ca: checks the cellular-automaton generator step by step
// against a software model of its rule, the seed load (including the
// all-zero seed), the hold when disabled, and basic randomness: every cell
// is 1 between 40% and 60% of the time and no state repeats within the run.
// Inputs change on the falling edge; the state is compared with the model
// at every rising edge. A
// watchdog guards the run; the test ends with the TB_RESULT line.
module tb_pso_rng_ca;
  localparam int unsigned W = 36;
  logic         clk = 0, rst_n = 0, en = 0, load = 0;
  logic [W-1:0] seed, rnd, model, prev;
  int           checks = 0, failures = 0, cyc = 0;
  int           ones [W];
  logic [W-1:0] seen [$];

  pso_rng_ca #(.W(W)) dut (.clk, .rst_n, .en, .load, .seed, .rnd);

  always #5 clk = ~clk;

  function automatic logic [W-1:0] step(logic [W-1:0] c);
    logic [W-1:0] n;
    for (int i = 0; i < W; i++) begin
      automatic int l = (i == 0) ? W - 1 : i - 1;
      automatic int r = (i == W - 1) ? 0 : i + 1;
      automatic int r2 = (i + 2) % W;
      n[i] = c[l] ^ (c[i] | c[r]) ^ c[r2];
    end
    return n;
  endfunction

  initial begin
    seed = '0;
    foreach (ones[i]) ones[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // all-zero seed becomes 1
    @(negedge clk); load = 1; seed = '0;
    @(negedge clk); load = 0;
    checks++; if (rnd != W'(1)) failures++;
    // real seed
    seed = 36'h5_A5A5_1234; load = 1;
    @(negedge clk); load = 0;
    checks++; if (rnd != seed) failures++;
    model = seed;
    // disabled: holds
    @(negedge clk);
    checks++; if (rnd != model) failures++;
    en = 1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      model = step(model);
      checks++;
      if (rnd != model) failures++;
      for (int i = 0; i < W; i++) ones[i] += int'(rnd[i]);
      if (k < 1000) begin
        foreach (seen[s]) if (seen[s] == rnd) begin failures++; break; end
        seen.push_back(rnd);
      end
    end
    for (int i = 0; i < W; i++) begin
      checks++;
      if (ones[i] < 1600 || ones[i] > 2400) failures++;
    end
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
