// tb_mac_stage: random partial sums, coefficients and powers; checks the
// registered result psum + coef * xpow one cycle later.
module tb_mac_stage;
  localparam int P = 16, G = 4, W = P + G, SW = 2*P + G;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [SW-1:0] psum_in, psum_out;
  logic signed [W-1:0]  coef;
  logic signed [P-1:0]  xpow;
  longint exp_v;

  mac_stage #(.P(P), .G(G)) dut (.clk, .psum_in, .coef, .xpow, .psum_out);

  initial begin
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      psum_in = SW'({$urandom, $urandom}) >>> 3;
      coef    = W'($urandom);
      xpow    = P'($urandom);
      exp_v   = longint'(psum_in) + longint'(coef) * longint'(xpow);
      @(negedge clk);
      checks++;
      if (longint'(psum_out) != exp_v) begin
        failures++;
        $display("FAIL got %0d expected %0d", psum_out, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
