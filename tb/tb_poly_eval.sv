// tb_poly_eval: self-checking test of the k-stage evaluator for every stage
// count the two built-in functions allow (sine: 1..7 stages, power of 2:
// 1..6 stages, the last one with an all-zero ROM) at 16-bit precision. Each instance checks bit-exact results,
// one-ulp accuracy, latency ceil((n+1)/k)+k and throughput of one input per
// ceil((n+1)/k) cycles (see pe_checker).
module tb_poly_eval;
  logic clk = 0;
  logic rst_n = 0;
  int   checks = 0, failures = 0;
  localparam int NS = 7, NP = 6;
  logic [NS+NP-1:0] fin;
  int c [NS+NP];
  int f [NS+NP];

  always #5 clk = ~clk;

  for (genvar k = 1; k <= NS; k++) begin : g_sin
    pe_checker #(.IS_SINE(1'b1), .K(k), .NUM(300)) u (
      .clk, .rst_n, .finished(fin[k-1]), .checks(c[k-1]), .failures(f[k-1]));
  end
  for (genvar k = 1; k <= NP; k++) begin : g_pow
    pe_checker #(.IS_SINE(1'b0), .K(k), .NUM(300)) u (
      .clk, .rst_n, .finished(fin[NS+k-1]), .checks(c[NS+k-1]), .failures(f[NS+k-1]));
  end

  task automatic report();
    checks = 0; failures = 0;
    for (int i = 0; i < NS + NP; i++) begin checks += c[i]; failures += f[i]; end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (&fin);
    repeat (2) @(posedge clk);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    report();
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
