// tb_coef_rom: reads every address of every ROM of a 4-stage and a 3-stage
// sine evaluator and a 1-stage one, and compares with the expected word:
// ROM#i at address c holds a_{(m-c')k + i-1}, c' = (c - rot) mod (m+1),
// rot = i-2 for i >= 3 and 0 otherwise, zero above a_n.
module tb_coef_rom;
  import tb_ref_pkg::*;
  localparam int P = 16, G = 4, W = P + G, N = 6;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [2:0] addr;
  logic signed [W-1:0] d4 [1:4];
  logic signed [W-1:0] d3 [1:3];
  logic signed [W-1:0] d1;

  for (genvar i = 1; i <= 4; i++) begin : g4
    coef_rom #(.P(P), .G(G), .N(N), .K(4), .ROM_IDX(i)) u (.addr(addr[0:0]), .data(d4[i]));
  end
  for (genvar i = 1; i <= 3; i++) begin : g3
    coef_rom #(.P(P), .G(G), .N(N), .K(3), .ROM_IDX(i)) u (.addr(addr[1:0]), .data(d3[i]));
  end
  coef_rom #(.P(P), .G(G), .N(N), .K(1), .ROM_IDX(1)) u1 (.addr(addr), .data(d1));

  function automatic longint expect_word(int k, int i, int a);
    int cpe, rot, c, idx;
    cpe = (N + k) / k;
    rot = (i >= 3) ? i - 2 : 0;
    c   = ((a - rot) % cpe + cpe) % cpe;
    idx = (cpe - 1 - c) * k + i - 1;
    return (idx > N) ? 0 : qcoef(coef_real(1'b1, idx), W);
  endfunction

  task automatic chk(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    for (int a = 0; a < 7; a++) begin
      addr = 3'(a);
      #1;
      if (a < 2) for (int i = 1; i <= 4; i++) chk(longint'(d4[i]), expect_word(4, i, a), $sformatf("k4 rom%0d a%0d", i, a));
      if (a < 3) for (int i = 1; i <= 3; i++) chk(longint'(d3[i]), expect_word(3, i, a), $sformatf("k3 rom%0d a%0d", i, a));
      chk(longint'(d1), expect_word(1, 1, a), $sformatf("k1 a%0d", a));
    end
    // spot checks straight from the table: 3-stage ROM#3 is rotated by one
    // address position, so a5 (second cycle) sits at address 2
    addr = 3'd2; #1;
    chk(longint'(d3[3]), qcoef(coef_real(1'b1, 5), W), "k3 rom3 addr2 = a5");
    addr = 3'd1; #1;
    chk(longint'(d3[3]), 0, "k3 rom3 addr1 = padding");
    addr = 3'd0; #1;
    chk(longint'(d3[3]), qcoef(coef_real(1'b1, 2), W), "k3 rom3 addr0 = a2");
    chk(longint'(d4[4]), 0, "k4 rom4 padding");
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
