// tb_feedback_mac: runs evaluations of random length through the loop with
// random partial sums and powers, and checks acc after every cycle against
// acc = trunc(psum + xk * (clear ? 0 : acc)), plus done after the last cycle.
module tb_feedback_mac;
  import tb_ref_pkg::*;
  localparam int P = 16, G = 4, W = P + G, SW = 2*P + G;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 en, clear, last, done;
  logic signed [SW-1:0] psum;
  logic signed [P-1:0]  xk;
  logic signed [W-1:0]  acc;
  longint model, e;
  int     len;

  feedback_mac #(.P(P), .G(G)) dut (.clk, .rst_n, .en, .clear, .last, .psum, .xk, .acc, .done);

  initial begin
    en = 0; clear = 0; last = 0; psum = '0; xk = '0; model = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 100; ev++) begin
      len = 1 + int'($urandom % 6);
      for (int c = 0; c < len; c++) begin
        en    = 1'b1;
        clear = (c == 0);
        last  = (c == len - 1);
        psum  = SW'(longint'($signed(W'($urandom))) <<< (P - 2));
        xk    = P'($urandom);
        e     = longint'(psum) + longint'(xk) * (clear ? 0 : model);
        model = wrap(e >>> (P - 1), W);
        @(negedge clk);
        checks += 2;
        if (longint'(acc) != model) begin
          failures++;
          $display("FAIL ev=%0d c=%0d acc=%0d expected %0d", ev, c, acc, model);
        end
        if (done != last) begin failures++; $display("FAIL done=%0b", done); end
      end
      // idle cycle: acc must hold, done must drop
      en = 1'b0; clear = 1'b0; last = 1'b0;
      if (ev % 3 == 0) begin
        @(negedge clk);
        checks += 2;
        if (longint'(acc) != model) begin failures++; $display("FAIL acc changed while idle"); end
        if (done) begin failures++; $display("FAIL done while idle"); end
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
