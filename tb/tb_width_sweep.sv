// tb_width_sweep: the evaluator at other precisions of the 8..22-bit range:
// 8, 12 and 18-bit inputs and outputs with the same polynomials, for several
// stage counts of both functions. Each instance checks bit-exact results,
// one-ulp accuracy, latency and throughput (see pe_checker). The built-in
// degree-6 sine and degree-4 power of 2 stay within one ulp up to 18 bits;
// 20 and 22 bits need higher-degree polynomials.
module tb_width_sweep;
  logic clk = 0;
  logic rst_n = 0;
  int   checks = 0, failures = 0;
  localparam int NI = 9;
  localparam int PS [NI] = '{8, 8, 8, 12, 12, 12, 18, 18, 18};
  localparam int KS [NI] = '{1, 7, 5, 2, 3, 3, 4, 6, 2};
  localparam bit SS [NI] = '{1, 1, 0, 1, 0, 1, 1, 1, 0};
  logic [NI-1:0] fin;
  int c [NI];
  int f [NI];

  always #5 clk = ~clk;

  for (genvar i = 0; i < NI; i++) begin : g
    pe_checker #(.IS_SINE(SS[i]), .P(PS[i]), .G(4), .K(KS[i]), .NUM(400)) u (
      .clk, .rst_n, .finished(fin[i]), .checks(c[i]), .failures(f[i]));
  end

  task automatic report();
    checks = 0; failures = 0;
    for (int i = 0; i < NI; i++) begin checks += c[i]; failures += f[i]; end
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
    repeat (30000) @(posedge clk);
    report();
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
