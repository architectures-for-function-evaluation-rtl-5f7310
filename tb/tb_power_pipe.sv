// tb_power_pipe: feeds a new random x every cycle (including -1 and the
// largest code) and checks that xpow[s] equals the truncated s-th power of
// the x applied s-1 cycles earlier, for s = 1..4.
module tb_power_pipe;
  localparam int P = 16, K = 4;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [P-1:0] x;
  logic [K:1][P-1:0]   xpow;
  longint hist [$];

  power_pipe #(.P(P), .K(K)) dut (.clk, .x, .xpow);

  initial begin
    x = '0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      case (t % 50)
        0:       x = 16'sh8000;
        1:       x = 16'sh7fff;
        default: x = P'($urandom);
      endcase
      hist.push_front(longint'(x));
      #1;
      for (int s = 1; s <= K; s++) begin
        if (t >= s - 1) begin
          longint e;
          e = tb_ref_pkg::xpow(hist[s-1], s, P);
          checks++;
          if (longint'($signed(xpow[s])) != e) begin
            failures++;
            $display("FAIL t=%0d s=%0d got %0d expected %0d", t, s, $signed(xpow[s]), e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
