// tb_func_eval_top: end-to-end test of the top at its default sizes (16-bit
// sine with 4 stages, 16-bit power of 2 with 3 stages), both evaluators
// running at the same time. Each unit gets a stream of inputs: first back to
// back, then with random gaps. Every result is checked bit-exact against the
// reference model, to within one ulp of the real function, and for its
// latency ceil((n+1)/k) + k; back-to-back accepts are checked to come every
// ceil((n+1)/k) cycles.
// Mechanisms counted (each must occur): back-to-back evaluations (the loop
// is cleared while the previous result is still in it), inputs waiting for
// in_ready, pipeline drained between inputs, the saturating power x = -1,
// and the zero-padded top coefficient group.
module tb_func_eval_top;
  import tb_ref_pkg::*;
  localparam int P = 16, G = 4;
  localparam int NUM = 1500;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                in_valid [2];
  logic                in_ready [2];
  logic signed [P-1:0] x [2];
  logic                out_valid [2];
  logic signed [P-1:0] y [2];

  func_eval_top dut (
    .clk, .rst_n,
    .sin_in_valid (in_valid[0]), .sin_in_ready (in_ready[0]), .sin_x (x[0]),
    .sin_out_valid(out_valid[0]), .sin_y(y[0]),
    .pow2_in_valid(in_valid[1]), .pow2_in_ready(in_ready[1]), .pow2_x(x[1]),
    .pow2_out_valid(out_valid[1]), .pow2_y(y[1])
  );

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int n_b2b [2], n_wait [2], n_drain [2], n_sat [2], n_pad [2], n_done [2];
  int c_u [2], f_u [2];

  for (genvar u = 0; u < 2; u++) begin : g_unit
    localparam bit IS_SINE = (u == 0);
    localparam int K   = IS_SINE ? 4 : 3;
    localparam int N   = degree(IS_SINE);
    localparam int CPE = (N + K) / K;
    localparam int LAT = CPE + K;
    longint xq [$];
    longint tq [$];
    longint last_acc = -100, last_out = -100;
    int issued = 0;

    initial begin
      in_valid[u] = 0; x[u] = '0;
      n_b2b[u] = 0; n_wait[u] = 0; n_drain[u] = 0; n_sat[u] = 0; n_pad[u] = 0; n_done[u] = 0;
      c_u[u] = 0; f_u[u] = 0;
    end

    always @(posedge clk) begin
      if (rst_n) begin
        if (in_valid[u] && !in_ready[u]) n_wait[u]++;
        if (in_valid[u] && in_ready[u]) begin
          xq.push_back(longint'(x[u]));
          tq.push_back(cyc);
          if (IS_SINE && x[u] == 16'sh8000) n_sat[u]++;
          if ((N + 1) % K != 0) n_pad[u]++;
          if (cyc - last_acc == CPE) n_b2b[u]++;
          if (cyc - last_acc > LAT) n_drain[u]++;
          if (issued <= NUM / 3 && last_acc >= 0) begin
            c_u[u]++;
            if (cyc - last_acc != CPE) begin
              f_u[u]++;
              $display("FAIL unit %0d accept spacing %0d", u, cyc - last_acc);
            end
          end
          last_acc = cyc;
        end
        if (!(in_valid[u] && !in_ready[u])) begin
          if (issued < NUM && (issued < NUM / 3 || ($urandom % 4) == 0)) begin
            longint v;
            if (issued % 97 == 5)  v = IS_SINE ? -32768 : 0;
            else if (issued % 97 == 6) v = 32767;
            else v = IS_SINE ? longint'($signed(16'($urandom))) : longint'($urandom % 32768);
            in_valid[u] <= 1'b1;
            x[u]        <= P'(v);
            issued++;
          end else begin
            in_valid[u] <= 1'b0;
          end
        end
      end
    end

    always @(posedge clk) begin
      if (rst_n && out_valid[u]) begin
        longint xi, t0, e;
        real err;
        c_u[u] += 3;
        if (xq.size() == 0) begin
          f_u[u]++;
          $display("FAIL unit %0d result without input", u);
        end else begin
          xi = xq.pop_front();
          t0 = tq.pop_front();
          e  = ref_eval(IS_SINE, P, G, K, xi);
          if (longint'(y[u]) != e) begin
            f_u[u]++;
            $display("FAIL unit %0d x=%0d y=%0d expected %0d", u, xi, y[u], e);
          end
          err = real'(y[u]) / 32768.0 - fref(IS_SINE, real'(xi) / 32768.0);
          if (err < 0) err = -err;
          if (err >= 1.0 / 32768.0) begin
            f_u[u]++;
            $display("FAIL unit %0d x=%0d error %f ulp", u, xi, err * 32768.0);
          end
          if (cyc - t0 - 1 != LAT) begin
            f_u[u]++;
            $display("FAIL unit %0d latency %0d expected %0d", u, cyc - t0 - 1, LAT);
          end
          n_done[u]++;
        end
      end
    end
  end

  task automatic finish_report(bit timeout);
    string nm [2] = '{"sine", "pow2"};
    checks = 0; failures = 0;
    for (int u = 0; u < 2; u++) begin
      checks += c_u[u] + 6; failures += f_u[u];
      $display("%s: results=%0d back_to_back=%0d waited_for_ready=%0d drained=%0d x_minus_one=%0d padded=%0d",
               nm[u], n_done[u], n_b2b[u], n_wait[u], n_drain[u], n_sat[u], n_pad[u]);
      if (n_done[u] != NUM) begin failures++; $display("FAIL %s: %0d of %0d results", nm[u], n_done[u], NUM); end
      if (n_b2b[u] == 0)   begin failures++; $display("FAIL %s: no back-to-back evaluation", nm[u]); end
      if (n_wait[u] == 0)  begin failures++; $display("FAIL %s: never waited for in_ready", nm[u]); end
      if (n_drain[u] == 0) begin failures++; $display("FAIL %s: pipeline never drained", nm[u]); end
      if (n_pad[u] == 0)   begin failures++; $display("FAIL %s: padding never used", nm[u]); end
      if (u == 0 && n_sat[u] == 0) begin failures++; $display("FAIL sine: x = -1 never applied"); end
    end
    if (timeout) begin failures++; $display("FAIL watchdog"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (n_done[0] == NUM && n_done[1] == NUM);
    repeat (10) @(posedge clk);
    finish_report(1'b0);
  end

  initial begin
    repeat (50000) @(posedge clk);
    finish_report(1'b1);
  end
endmodule
