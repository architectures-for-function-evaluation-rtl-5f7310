// mac_stage: one stage of the pipelined feed-forward network.
//
// Computes psum_out <= psum_in + coef * xpow, where coef is a (P+G)-bit ROM
// word, xpow a P-bit power of x, and the partial sums are 2P+G bits wide
// (2P+G-2 fraction bits), as in the evaluator's datapath. The register at
// the output is the pipeline cut drawn after each adder of the network.
// Overflow wraps; the coefficient scaling keeps sums inside [-2, 2).
//
// The widths and the register position follow the architecture; wrapping on
// overflow is this design's choice.
//
// Timing: one cycle from inputs to psum_out. No reset: the value is only
// used while valid tags travel alongside it (see fe_ctrl).
module mac_stage #(
  parameter int P = 16,
  parameter int G = 4,
  localparam int W  = P + G,
  localparam int SW = 2*P + G
) (
  input  logic                 clk,
  input  logic signed [SW-1:0] psum_in,
  input  logic signed [W-1:0]  coef,
  input  logic signed [P-1:0]  xpow,
  output logic signed [SW-1:0] psum_out
);

  logic signed [SW-1:0] prod;

  assign prod = coef * xpow;

  always_ff @(posedge clk) psum_out <= psum_in + prod;

endmodule
