// feedback_mac: the multiply-accumulate loop that closes the evaluator.
//
// Each cycle of an evaluation it forms
//   S   = psum + x^K * acc            (2P+G bits, 2P+G-2 fraction bits)
//   acc <= S truncated to P+G bits    (P+G-1 fraction bits)
// i.e. f = (lower K terms) + x^K * (rest of the polynomial), applied once
// per group of K coefficients from the highest group down. On the first
// cycle of an evaluation (clear) the fed-back value is replaced by zero, so
// consecutive evaluations follow each other without a gap. done is raised
// together with acc after the last cycle of an evaluation.
//
// This loop, a P x (P+G) multiplier followed by a (2P+G)-bit adder, is the
// critical path of the whole evaluator. Truncation drops the P-1 lowest
// bits and the top integer bit (the result is assumed inside [-1, 1)).
//
// Truncation before the feedback register follows the architecture; the
// zero-forcing clear and the reset are this design's own.
//
// Interface: en qualifies a cycle of an active evaluation; clear marks its
// first cycle and last its final one. Reset clears acc and done.
module feedback_mac #(
  parameter int P = 16,
  parameter int G = 4,
  localparam int W  = P + G,
  localparam int SW = 2*P + G
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 clear,
  input  logic                 last,
  input  logic signed [SW-1:0] psum,
  input  logic signed [P-1:0]  xk,
  output logic signed [W-1:0]  acc,
  output logic                 done
);

  logic signed [W-1:0]  fb;
  logic signed [SW-1:0] prod;
  logic signed [SW-1:0] sum;

  assign fb   = clear ? '0 : acc;
  assign prod = fb * xk;
  assign sum  = psum + prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      done <= 1'b0;
    end else begin
      done <= en && last;
      if (en) acc <= sum[SW-2 -: W];
    end
  end

endmodule
