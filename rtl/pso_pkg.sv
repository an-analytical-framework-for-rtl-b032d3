// pso_pkg: number formats and constants shared by the PSO processor.
//
// Positions, velocities and bounds are signed fixed-point numbers with
// VAR_INT integer bits (sign included) and FRAC fraction bits. Eight integer
// bits hold the widest search domain used, [-100, 100]; nine fraction bits are
// the finest precision the processor uses. Fitness values use the same FRAC
// fraction bits in a 64-bit signed word, the widest word in the design.
// Random numbers are unsigned fractions in [0, 1) of R_W bits.
// The coefficient defaults are w = 0.25 and c1 = c2 = 2.0, so that c*r spans
// 0..2 as in the execution parameters of the processor.
//
// The 64-bit word, the nine fraction bits, the 8-bit variables and w = 0.25
// follow the processor; reading the 8 bits as the integer part (sign
// included) and c = 2 are this design's own choices.
package pso_pkg;

  localparam int unsigned VAR_INT = 8;
  localparam int unsigned FRAC    = 9;
  localparam int unsigned X_W     = VAR_INT + FRAC;   // 17-bit position / velocity
  localparam int unsigned FIT_W   = 64;               // fitness word
  localparam int unsigned R_W     = FRAC;             // random fraction width
  localparam int unsigned COEF_W  = 2 + FRAC;         // unsigned coefficient, 0 .. <4
  localparam int unsigned PH_W    = FRAC + 1;         // cosine phase: 1/1024 turn

  typedef logic signed [X_W-1:0]   fix_t;    // position / velocity / bound
  typedef logic signed [FIT_W-1:0] fit_t;    // fitness value
  typedef logic        [R_W-1:0]   rnd_t;    // random fraction in [0, 1)
  typedef logic        [COEF_W-1:0] coef_t;  // w, c1, c2

  localparam fit_t  FIT_MAX  = {1'b0, {(FIT_W-1){1'b1}}};
  localparam coef_t W_DEF    = coef_t'(1 << (FRAC - 2));  // 0.25
  localparam coef_t C1_DEF   = coef_t'(2 << FRAC);        // 2.0
  localparam coef_t C2_DEF   = coef_t'(2 << FRAC);        // 2.0

  // Fixed-point product of two fitness-format numbers, truncated back to FRAC
  // fraction bits (rounds toward minus infinity). Operands are small enough
  // in every use that the 64-bit product does not wrap.
  function automatic fit_t fmul(fit_t a, fit_t b);
    fit_t p;
    p = a * b;
    return p >>> FRAC;
  endfunction

  // A position lifted to the fitness format, minus a shift value.
  function automatic fit_t zsub(fix_t x, fix_t shift);
    return fit_t'(x) - fit_t'(shift);
  endfunction

  // Benchmark evaluation function built into the fitness unit.
  typedef enum logic [3:0] {
    FN_ROSENBROCK = 4'd0,   // F4, and F10 with a shift vector
    FN_SPHERE     = 4'd1,   // F6, and F9 with a shift vector
    FN_ZAKHAROV   = 4'd2,   // F5
    FN_VARDIM     = 4'd3,   // F8
    FN_SCHWEFEL12 = 4'd4,   // F11 with a shift vector
    FN_B2         = 4'd5,   // F1
    FN_BRANIN     = 4'd6,   // F2
    FN_GOLDSTEIN  = 4'd7,   // F3
    FN_HARTMANN3  = 4'd8,   // F7
    FN_RASTRIGIN  = 4'd9,   // F12 with a shift vector
    FN_ELLIPTIC   = 4'd10   // F13 without its rotation, with a shift vector
  } func_e;

  // Real number to the FRAC-fraction-bit format, rounded to nearest.
  function automatic fit_t to_fix(real r);
    return fit_t'($rtoi($floor(r * real'(1 << FRAC) + 0.5)));
  endfunction

  // Control FSM states. The numbering follows the state diagram of the
  // processor, which has no state S2.
  typedef enum logic [3:0] {
    S0   = 4'd0,   // idle; load the RNG seed on start
    S1   = 4'd1,   // initialise one particle per cycle (loops NP times)
    S3   = 4'd3,   // clear gbest and counters; issue particle 0
    S4   = 4'd4,   // fill: particle 0 in delay register 1
    S5   = 4'd5,   // fill: particle 0 in delay register 2
    S6   = 4'd6,   // fill: particle 0 in delay register 3
    S7   = 4'd7,   // main loop: all four stages busy
    STOP = 4'd8    // finished; results held
  } state_e;

endpackage
