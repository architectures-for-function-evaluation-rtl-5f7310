// pe_checker: drives one poly_eval instance with NUM random inputs and
// checks every result against the reference model (bit-exact) and against
// the real function (within one output ulp). It also checks the latency of
// every evaluation (ceil((n+1)/k) + k cycles) and, while inputs are offered
// back to back, that a new input is accepted every ceil((n+1)/k) cycles.
// The first half of the inputs is offered back to back, the second half
// with random gaps. The extreme input codes are always included.
module pe_checker #(
  parameter bit IS_SINE = 1'b1,
  parameter int P       = 16,
  parameter int G       = 4,
  parameter int K       = 4,
  parameter int NUM     = 200
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  import tb_ref_pkg::*;

  localparam int N   = degree(IS_SINE);
  localparam int CPE = (N + K) / K;
  localparam int LAT = CPE + K;

  logic                in_valid, in_ready, out_valid;
  logic signed [P-1:0] x, y;

  poly_eval #(
    .P(P), .G(G), .N(N), .K(K),
    .COEF(fe_pkg::coef_table(IS_SINE ? fe_pkg::FN_SINE : fe_pkg::FN_POW2, P + G))
  ) dut (.clk, .rst_n, .in_valid, .in_ready, .x, .out_valid, .y);

  longint xq[$];
  longint tq[$];
  longint cyc;
  longint last_acc;
  int     issued, received;

  function automatic longint pick(int i);
    longint lo, hi;
    lo = IS_SINE ? -(longint'(1) <<< (P - 1)) : 0;
    hi = (longint'(1) <<< (P - 1)) - 1;
    if (i == 0) return lo;
    if (i == 1) return hi;
    if (i == 2) return 0;
    return lo + longint'($urandom % (hi - lo + 1));
  endfunction

  initial begin
    in_valid = 0; x = '0; cyc = 0; issued = 0; received = 0;
    checks = 0; failures = 0; finished = 0; last_acc = -1;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (in_valid && in_ready) begin
        xq.push_back(longint'(x));
        tq.push_back(cyc);
        if (issued <= NUM / 2 && last_acc >= 0) begin
          checks++;
          if (cyc - last_acc != CPE) begin
            failures++;
            $display("FAIL K=%0d accept spacing %0d, expected %0d", K, cyc - last_acc, CPE);
          end
        end
        last_acc = cyc;
      end
      if (!(in_valid && !in_ready)) begin
        if (issued < NUM && (issued < NUM / 2 || ($urandom % 3) != 0)) begin
          in_valid <= 1'b1;
          x        <= P'(pick(issued));
          issued++;
        end else begin
          in_valid <= 1'b0;
          if (issued >= NUM / 2) last_acc = -1;
        end
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      longint xi, t0, exp_y;
      real    err;
      if (xq.size() == 0) begin
        failures++;
        checks++;
        $display("FAIL K=%0d result without input", K);
      end else begin
        xi = xq.pop_front();
        t0 = tq.pop_front();
        exp_y = ref_eval(IS_SINE, P, G, K, xi);
        checks += 3;
        if (longint'(y) != exp_y) begin
          failures++;
          $display("FAIL %s K=%0d x=%0d y=%0d expected %0d", IS_SINE ? "sin" : "pow2", K, xi, y, exp_y);
        end
        err = real'(y) / (2.0 ** (P - 1)) - fref(IS_SINE, real'(xi) / (2.0 ** (P - 1)));
        if (err < 0) err = -err;
        if (err >= 1.0 / (2.0 ** (P - 1))) begin
          failures++;
          $display("FAIL %s K=%0d x=%0d error %f ulp", IS_SINE ? "sin" : "pow2", K, xi, err * (2.0 ** (P - 1)));
        end
        if (cyc - t0 - 1 != LAT) begin
          failures++;
          $display("FAIL K=%0d latency %0d, expected %0d", K, cyc - t0 - 1, LAT);
        end
        received++;
        if (received == NUM) finished <= 1'b1;
      end
    end
  end
endmodule
