// coef_rom: one coefficient ROM (ROM#ROM_IDX) of the k-stage evaluator.
//
// The polynomial a_0 + a_1 x + ... + a_N x^N is evaluated K terms per cycle
// over CPE = ceil((N+1)/K) cycles. ROM#i supplies a_{j*K + i-1}: on the
// first cycle of an evaluation the highest group (j = CPE-1), on the last
// cycle a_{i-1}. Terms above a_N are stored as zero, so a degree that is not
// a multiple of K keeps the regular structure.
//
// ROM#3 and higher feed feed-forward stages that run behind the counter by
// ROM_IDX-2 cycles. Instead of delaying their outputs with registers, their
// contents are rotated by ROM_IDX-2 address positions: the word at address
// c is the one needed for evaluation cycle (c - (ROM_IDX-2)) mod CPE. All
// ROMs share one free-running address counter.
//
// The contents are computed at elaboration from the flat coefficient table
// COEF (see fe_pkg). The read is combinational (a LUT ROM), so data follows
// the address in the same cycle.
//
// The content order, the zero padding and the rotation of ROM#3 by one
// position follow the architecture description; the general i-2 rotation and
// the combinational read are this design's reading of it.
module coef_rom
  import fe_pkg::*;
#(
  parameter int          P       = 16,
  parameter int          G       = 4,
  parameter int          N       = 6,
  parameter int          K       = 4,
  parameter int          ROM_IDX = 1,
  parameter coef_table_t COEF    = coef_table(FN_SINE, P + G),
  localparam int         CPE     = cycles_per_eval(N, K),
  localparam int         AW      = cnt_width(CPE),
  localparam int         W       = P + G
) (
  input  logic [AW-1:0]       addr,
  output logic signed [W-1:0] data
);

  typedef logic signed [W-1:0] word_t;

  function automatic word_t rom_word(int a);
    int c;
    int idx;
    c   = (a - rom_rotation(ROM_IDX)) % CPE;
    if (c < 0) c += CPE;
    idx = coef_index(N, K, ROM_IDX, c);
    return (idx < 0) ? word_t'(0) : word_t'(COEF[idx*MAX_W +: W]);
  endfunction

  word_t rom [CPE];

  initial begin
    assert (ROM_IDX >= 1 && ROM_IDX <= K) else $error("ROM_IDX out of range");
    assert (N + 1 <= MAX_TERMS && W <= MAX_W) else $error("table too small");
  end

  always_comb begin
    for (int a = 0; a < CPE; a++) rom[a] = rom_word(a);
  end

  assign data = (int'(addr) < CPE) ? rom[addr] : word_t'(0);

endmodule
