// power_pipe: pipelined powers of x for the feed-forward network.
//
// Feed-forward stage s (1..K-1) multiplies by x^s and the feedback loop by
// x^K; stage s works on an evaluation s-1 cycles after stage 1. This block
// therefore delivers x^s delayed by s-1 cycles relative to the input x:
//   xd[1] = x,           xd[s+1] <= xd[s]           (delay line of x)
//   xpow[1] = x,         xpow[s+1] <= trunc(xpow[s] * xd[s])
// Every multiplier is followed by a register, so no multiplier of the power
// chain lengthens the critical path, which stays in the feedback loop.
// Each power is truncated to P bits (P-1 fraction bits); the only product
// that leaves [-1, 1), (-1)*(-1), saturates to the largest positive code.
//
// xpow[1] is the input itself, passed straight through.
//
// A register after every power multiplier is what the architecture asks
// for; the truncation and the saturation are this design's choices.
//
// Timing: xpow[s] shows the power of the x that was on the input s-1 clock
// edges earlier. The registers have no reset; their contents are used only
// once they hold a sampled x.
module power_pipe #(
  parameter int P = 16,
  parameter int K = 4
) (
  input  logic                  clk,
  input  logic signed [P-1:0]   x,
  output logic [K:1][P-1:0]     xpow
);

  logic [K:1][P-1:0] xd;

  assign xd[1]   = x;
  assign xpow[1] = x;

  for (genvar s = 1; s < K; s++) begin : g_pow
    logic signed [2*P-1:0] prod;
    logic signed [P-1:0]   trunc;
    assign prod  = $signed(xpow[s]) * $signed(xd[s]);
    // Keep P-1 fraction bits; saturate when the two integer bits differ.
    assign trunc = (prod[2*P-1] != prod[2*P-2]) ? {1'b0, {(P-1){1'b1}}}
                                                : prod[2*P-2 -: P];
    always_ff @(posedge clk) begin
      xd[s+1]   <= xd[s];
      xpow[s+1] <= trunc;
    end
  end

endmodule
