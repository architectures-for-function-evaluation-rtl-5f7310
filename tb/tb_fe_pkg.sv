// tb_fe_pkg: checks the elaboration-time helpers of fe_pkg: the cycles per
// evaluation ceil((n+1)/k), the coefficient order of Table-1 style ROMs,
// the address rotation, and the quantisation of coefficients.
module tb_fe_pkg;
  import fe_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int exp_idx;
    // ceil((n+1)/k) for the sine (n=6) and power-of-2 (n=4) polynomials
    for (int k = 1; k <= 8; k++) begin
      chk(cycles_per_eval(6, k) == (7 + k - 1) / k, $sformatf("cpe n=6 k=%0d", k));
      chk(cycles_per_eval(4, k) * k >= 5 && (cycles_per_eval(4, k) - 1) * k < 5,
          $sformatf("cpe n=4 k=%0d", k));
    end
    chk(cycles_per_eval(6, 4) == 2, "cpe 6/4");
    chk(cycles_per_eval(6, 1) == 7, "cpe 6/1");
    chk(cycles_per_eval(4, 3) == 2, "cpe 4/3");
    // First cycle holds a_{mk+i-1}, last cycle a_{i-1}; above a_n is padding
    chk(coef_index(6, 4, 1, 0) == 4, "ROM1 first");
    chk(coef_index(6, 4, 1, 1) == 0, "ROM1 last");
    chk(coef_index(6, 4, 3, 0) == 6, "ROM3 first");
    chk(coef_index(6, 4, 4, 0) == -1, "ROM4 first is padding");
    chk(coef_index(6, 4, 4, 1) == 3, "ROM4 last");
    chk(coef_index(6, 1, 1, 0) == 6, "1-stage first a_n");
    chk(coef_index(6, 1, 1, 6) == 0, "1-stage last a_0");
    for (int k = 1; k <= 7; k++)
      for (int r = 1; r <= k; r++)
        for (int c = 0; c < cycles_per_eval(6, k); c++) begin
          exp_idx = (cycles_per_eval(6, k) - 1 - c) * k + (r - 1);
          chk(coef_index(6, k, r, c) == ((exp_idx > 6) ? -1 : exp_idx),
              $sformatf("index k=%0d rom=%0d c=%0d", k, r, c));
        end
    chk(rom_rotation(1) == 0 && rom_rotation(2) == 0, "no rotation ROM1/2");
    chk(rom_rotation(3) == 1 && rom_rotation(5) == 3, "rotation ROM3/5");
    // Quantisation: round to nearest, saturate at the largest code
    chk(quantize(0.5, 8) == 64, "q 0.5");
    chk(quantize(-0.5, 8) == -64, "q -0.5");
    chk(quantize(1.0, 8) == 127, "q sat");
    chk(quantize(-1.0, 8) == -128, "q -1");
    chk(quantize(0.3, 16) == 9830, "q 0.3");
    chk(quantize(-0.3, 16) == -9830, "q -0.3");
    chk(coef_table(FN_SINE, 20)[1*MAX_W +: 20] == 20'(262138), "sine a1");
    chk(coef_table(FN_POW2, 20)[0*MAX_W +: 20] == 20'(262145), "pow2 a0");
    chk(coef_table(FN_SINE, 20)[7*MAX_W +: MAX_W] == '0, "sine a7 zero");
    chk(fn_degree(FN_SINE) == 6 && fn_degree(FN_POW2) == 4, "degrees");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
