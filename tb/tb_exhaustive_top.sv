// tb_exhaustive_top: the top at its default sizes evaluates every 16-bit
// input: all 65536 codes of x in [-1, 1) for the sine and all 32768 codes of
// x in [0, 1) for the power of 2, offered back to back. Each result must be
// within one ulp of the real function and equal the reference model; the
// maximum error seen is printed. The full run takes 2 x 65536 cycles.
module tb_exhaustive_top;
  import tb_ref_pkg::*;
  localparam int P = 16, G = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                in_valid [2];
  logic                in_ready [2];
  logic signed [P-1:0] x [2];
  logic                out_valid [2];
  logic signed [P-1:0] y [2];
  int  n_done [2];
  int  c_u [2], f_u [2];
  real max_err [2];

  func_eval_top dut (
    .clk, .rst_n,
    .sin_in_valid (in_valid[0]), .sin_in_ready (in_ready[0]), .sin_x (x[0]),
    .sin_out_valid(out_valid[0]), .sin_y(y[0]),
    .pow2_in_valid(in_valid[1]), .pow2_in_ready(in_ready[1]), .pow2_x(x[1]),
    .pow2_out_valid(out_valid[1]), .pow2_y(y[1])
  );

  localparam int TOTAL [2] = '{65536, 32768};

  for (genvar u = 0; u < 2; u++) begin : g_unit
    localparam bit IS_SINE = (u == 0);
    localparam int K = IS_SINE ? 4 : 3;
    longint xq [$];
    int next = 0;

    initial begin
      in_valid[u] = 0; x[u] = '0; n_done[u] = 0; c_u[u] = 0; f_u[u] = 0; max_err[u] = 0.0;
    end

    always @(posedge clk) begin
      if (rst_n) begin
        if (in_valid[u] && in_ready[u]) xq.push_back(longint'(x[u]));
        if (!(in_valid[u] && !in_ready[u])) begin
          if (next < TOTAL[u]) begin
            in_valid[u] <= 1'b1;
            x[u]        <= IS_SINE ? P'(next - 32768) : P'(next);
            next++;
          end else begin
            in_valid[u] <= 1'b0;
          end
        end
      end
    end

    always @(posedge clk) begin
      if (rst_n && out_valid[u]) begin
        longint xi;
        real err;
        c_u[u] += 2;
        if (xq.size() == 0) begin
          f_u[u]++;
        end else begin
          xi = xq.pop_front();
          if (longint'(y[u]) != ref_eval(IS_SINE, P, G, K, xi)) begin
            f_u[u]++;
            $display("FAIL unit %0d x=%0d y=%0d", u, xi, y[u]);
          end
          err = real'(y[u]) / 32768.0 - fref(IS_SINE, real'(xi) / 32768.0);
          if (err < 0) err = -err;
          if (err > max_err[u]) max_err[u] = err;
          if (err >= 1.0 / 32768.0) begin
            f_u[u]++;
            $display("FAIL unit %0d x=%0d error %f ulp", u, xi, err * 32768.0);
          end
        end
        n_done[u]++;
      end
    end
  end

  task automatic finish_report(bit timeout);
    checks = c_u[0] + c_u[1] + 2;
    failures = f_u[0] + f_u[1];
    $display("sine: %0d results, max error %f ulp", n_done[0], max_err[0] * 32768.0);
    $display("pow2: %0d results, max error %f ulp", n_done[1], max_err[1] * 32768.0);
    if (n_done[0] != TOTAL[0]) failures++;
    if (n_done[1] != TOTAL[1]) failures++;
    if (timeout) begin failures++; $display("FAIL watchdog"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (n_done[0] == TOTAL[0] && n_done[1] == TOTAL[1]);
    repeat (5) @(posedge clk);
    finish_report(1'b0);
  end

  initial begin
    repeat (140000) @(posedge clk);
    finish_report(1'b1);
  end
endmodule
