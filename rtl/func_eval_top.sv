// func_eval_top: sine and power-of-2 evaluators side by side.
//
// Two independent instances of the k-stage polynomial evaluator, each with
// its own coefficient ROMs and its own handshake:
//   sine : y = sin(x)/2 for x in [-1, 1) radians, degree 6, SIN_K stages
//   pow2 : y = 2^(x-1)  for x in [0, 1),          degree 4, POW2_K stages
// Both functions are stored scaled by alpha = 2 so that coefficients and
// results stay within [-1, 1). Multiplying back by alpha is a one-bit left
// shift (sin(x) = 2*sin_y, 2^x = 2*pow2_y) left to the user of the result,
// since the doubled value no longer fits the P-bit [-1, 1) format.
//
// Default sizes: 16-bit input and output, 4 guard bits, a 4-stage sine
// (one result every 2 cycles, latency 6) and a 3-stage power of 2 (one
// result every 2 cycles, latency 5). The stage counts follow the rule that
// ceil((n+1)/2) stages give the highest throughput.
module func_eval_top
  import fe_pkg::*;
#(
  parameter int P      = 16,
  parameter int G      = 4,
  parameter int SIN_K  = 4,
  parameter int POW2_K = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  // sine
  input  logic                sin_in_valid,
  output logic                sin_in_ready,
  input  logic signed [P-1:0] sin_x,
  output logic                sin_out_valid,
  output logic signed [P-1:0] sin_y,
  // power of 2
  input  logic                pow2_in_valid,
  output logic                pow2_in_ready,
  input  logic signed [P-1:0] pow2_x,
  output logic                pow2_out_valid,
  output logic signed [P-1:0] pow2_y
);

  poly_eval #(
    .P(P), .G(G), .N(fn_degree(FN_SINE)), .K(SIN_K),
    .COEF(coef_table(FN_SINE, P + G))
  ) u_sine (
    .clk, .rst_n,
    .in_valid (sin_in_valid),
    .in_ready (sin_in_ready),
    .x        (sin_x),
    .out_valid(sin_out_valid),
    .y        (sin_y)
  );

  poly_eval #(
    .P(P), .G(G), .N(fn_degree(FN_POW2)), .K(POW2_K),
    .COEF(coef_table(FN_POW2, P + G))
  ) u_pow2 (
    .clk, .rst_n,
    .in_valid (pow2_in_valid),
    .in_ready (pow2_in_ready),
    .x        (pow2_x),
    .out_valid(pow2_out_valid),
    .y        (pow2_y)
  );

endmodule
