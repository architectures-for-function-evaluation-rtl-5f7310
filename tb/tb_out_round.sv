// tb_out_round: random accumulator values plus the rounding corner cases
// (exact halves, the saturating top code); checks the rounded P-bit result
// and the one-cycle valid delay.
module tb_out_round;
  localparam int P = 16, G = 4, W = P + G;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                in_valid, out_valid;
  logic signed [W-1:0] acc;
  logic signed [P-1:0] y;
  longint e;

  out_round #(.P(P), .G(G)) dut (.clk, .rst_n, .in_valid, .acc, .out_valid, .y);

  initial begin
    in_valid = 0; acc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      case (t)
        0: acc = W'(8);                     // exactly half an ulp: rounds up
        1: acc = W'(7);                     // just below half: rounds down
        2: acc = -W'(8);                    // -0.5 ulp rounds to 0
        3: acc = {1'b0, {(W-1){1'b1}}};     // top code saturates
        4: acc = {1'b1, {(W-1){1'b0}}};     // most negative
        default: acc = W'($urandom);
      endcase
      in_valid = 1'b1;
      e = (longint'(acc) + (1 <<< (G - 1))) >>> G;
      if (e > 32767) e = 32767;
      @(negedge clk);
      in_valid = 1'b0;
      checks += 2;
      if (!out_valid) begin failures++; $display("FAIL valid missing"); end
      if (longint'(y) != e) begin failures++; $display("FAIL acc=%0d y=%0d expected %0d", acc, y, e); end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL valid stuck"); end
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
