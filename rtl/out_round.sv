// out_round: rounding stage and P-bit output register of the evaluator.
//
// Rounds the (P+G)-bit accumulator to P bits, to nearest with ties away
// from minus infinity (add half an output ulp, drop the G guard bits), and
// saturates at the largest positive code if rounding carries out of range.
// When in_valid is high the rounded value is registered and out_valid is
// raised for one cycle. Needs G >= 1.
//
// A rounding stage and a P-bit output register are part of the architecture;
// the rounding mode and the saturation are this design's choices.
//
// Timing: one cycle from in_valid to out_valid. Reset clears both outputs.
module out_round #(
  parameter int P = 16,
  parameter int G = 4,
  localparam int W = P + G
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] acc,
  output logic                out_valid,
  output logic signed [P-1:0] y
);

  logic signed [W:0]   sum;
  logic signed [P:0]   r;
  logic signed [P-1:0] rsat;

  initial assert (G >= 1) else $error("out_round needs at least one guard bit");

  assign sum  = {acc[W-1], acc} + (W+1)'(1 <<< (G - 1));
  assign r    = sum[W:G];
  assign rsat = (r[P] != r[P-1]) ? {1'b0, {(P-1){1'b1}}} : r[P-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= rsat;
    end
  end

endmodule
