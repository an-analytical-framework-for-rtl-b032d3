// tb_pso_particle_mem: random writes and reads against an array model;
// checks that a write is visible the next cycle and that other words keep
// their contents.
// Runs the default size (32 words of 34 bits). Inputs change on the falling
// edge; a read is checked one time step after its address is set. A watchdog
// guards the run; the test ends with the TB_RESULT line.
module tb_pso_particle_mem;
  localparam int unsigned DEPTH = 32, WIDTH = 34, AW = 5;
  logic             clk = 0, we = 0;
  logic [AW-1:0]    wa = '0, ra = '0;
  logic [WIDTH-1:0] wd = '0, rd;
  logic [WIDTH-1:0] model [DEPTH];
  int               checks = 0, failures = 0, cyc = 0;

  pso_particle_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .we, .wr_addr(wa), .wr_data(wd),
                                                         .rd_addr(ra), .rd_data(rd));

  always #5 clk = ~clk;

  initial begin
    // fill every word
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; wa = AW'(i); wd = {$urandom, $urandom}; model[i] = wd;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 5000; k++) begin
      ra = AW'($urandom);
      #1;
      checks++;
      if (rd != model[ra]) failures++;
      we = $urandom_range(0, 1);
      wa = AW'($urandom);
      wd = {$urandom, $urandom};
      @(negedge clk);
      if (we) model[wa] = wd;
      // written word is readable in the following cycle
      ra = wa;
      #1;
      checks++;
      if (rd != model[wa]) failures++;
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
