// fe_pkg: shared constants and elaboration-time helpers of the k-stage
// polynomial function evaluator.
//
// Number format: every signal of the datapath is signed fixed-point fraction
// in two's complement, range [-1, 1). The input x and the output f(x) have
// P bits (P-1 fraction bits); coefficients and the feedback register have
// P+G bits (G guard bits). Products and partial sums have 2P+G bits with
// 2P+G-2 fraction bits.
//
// The coefficient tables are carried through the hierarchy as one flat
// parameter vector of MAX_TERMS slots of MAX_W bits, slot j holding a_j
// sign-extended; a module takes the low P+G bits of each slot.
//
// The two coefficient sets are this design's own: minimax (Remez exchange)
// polynomials computed for it, degree 6 for sin(x)/2 on x in [-1, 1) and
// degree 4 for 2^(x-1) on x in [0, 1). Both functions are pre-scaled by
// alpha = 2 so that every coefficient and every result stays inside [-1, 1);
// the true value is the result shifted left by one bit.
package fe_pkg;

  // Largest number of polynomial terms (n+1) and coefficient width held in a
  // flat coefficient table.
  localparam int MAX_TERMS = 16;
  localparam int MAX_W     = 32;

  typedef logic [MAX_TERMS*MAX_W-1:0] coef_table_t;

  // Functions with a built-in coefficient set.
  typedef enum logic [0:0] {
    FN_SINE = 1'b0,
    FN_POW2 = 1'b1
  } fn_e;

  // Cycles per evaluation: ceil((n+1)/k), Eq. (6) gives m = this - 1.
  function automatic int cycles_per_eval(int n, int k);
    return (n + 1 + k - 1) / k;
  endfunction

  // Width of a counter that counts 0 .. cycles-1 (at least one bit).
  function automatic int cnt_width(int cycles);
    return (cycles <= 2) ? 1 : $clog2(cycles);
  endfunction

  // Minimax coefficients of sin(x)/2, x in [-1, 1), degree 6.
  function automatic real sine_coef(int j);
    case (j)
      0:       return -6.569620508711793e-08;
      1:       return  4.999890753880983e-01;
      2:       return  6.297210324025672e-07;
      3:       return -8.324716738850452e-02;
      4:       return -1.127432636616636e-06;
      5:       return  3.995028682421565e-03;
      6:       return  5.634078093087022e-07;
      default: return 0.0;
    endcase
  endfunction

  // Minimax coefficients of 2^(x-1), x in [0, 1), degree 4.
  function automatic real pow2_coef(int j);
    case (j)
      0:       return 5.000018522329391e-01;
      1:       return 3.464830613298767e-01;
      2:       return 1.208192228668239e-01;
      3:       return 2.584517909624681e-02;
      4:       return 6.848832241174422e-03;
      default: return 0.0;
    endcase
  endfunction

  // Polynomial degree of each built-in set.
  function automatic int fn_degree(fn_e fn);
    return (fn == FN_SINE) ? 6 : 4;
  endfunction

  // Round a real in [-1, 1) to a w-bit two's complement fraction,
  // saturating at the largest positive code; returned sign-extended to
  // MAX_W bits.
  function automatic logic signed [MAX_W-1:0] quantize(real v, int w);
    real    scaled;
    longint q;
    longint qmax;
    scaled = v * (2.0 ** (w - 1));
    if (scaled >= 0.0) q = longint'($rtoi(scaled + 0.5));
    else               q = -longint'($rtoi(-scaled + 0.5));
    qmax = (longint'(1) <<< (w - 1)) - 1;
    if (q > qmax) q = qmax;
    if (q < -qmax - 1) q = -qmax - 1;
    return MAX_W'(q);
  endfunction

  // Flat table of the built-in coefficient set quantised to w bits.
  function automatic coef_table_t coef_table(fn_e fn, int w);
    coef_table_t t;
    t = '0;
    for (int j = 0; j <= fn_degree(fn); j++)
      t[j*MAX_W +: MAX_W] = quantize((fn == FN_SINE) ? sine_coef(j) : pow2_coef(j), w);
    return t;
  endfunction

  // Index of the coefficient that ROM number rom (1..k) delivers on cycle
  // c (0 = first cycle of an evaluation, cpe-1 = last): Table 1 reads
  // a_{(cpe-1-c)*k + rom-1}. Returns -1 for the zero padding above a_n.
  function automatic int coef_index(int n, int k, int rom, int c);
    int idx;
    idx = (cycles_per_eval(n, k) - 1 - c) * k + rom - 1;
    return (idx > n) ? -1 : idx;
  endfunction

  // Address rotation of ROM number rom: ROM#1 and ROM#2 feed the first
  // pipeline stage, ROM#i (i >= 3) feeds stage i-1 and is therefore read
  // i-2 cycles after the counter value of its evaluation cycle.
  function automatic int rom_rotation(int rom);
    return (rom >= 3) ? rom - 2 : 0;
  endfunction

endpackage
