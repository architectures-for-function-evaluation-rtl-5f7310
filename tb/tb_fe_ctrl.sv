// tb_fe_ctrl: three controllers (7, 2 and 1 cycles per evaluation) under a
// random input-valid pattern. For every accepted input the test expects the
// ROM address to start at 0 on the next cycle and count up, in_ready to come
// back exactly one evaluation later, and the feedback tags (en for CPE
// cycles, first, last) to arrive K-1 cycles after stage 1.
module tb_fe_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int t = 0;
  always @(posedge clk) t <= t + 1;

  localparam int NI = 3;
  localparam int NS [NI] = '{6, 6, 4};
  localparam int KS [NI] = '{1, 4, 5};
  int c [NI];
  int f [NI];
  int acc_n [NI];

  for (genvar i = 0; i < NI; i++) begin : g
    localparam int N = NS[i], K = KS[i];
    localparam int CPE = (N + K) / K;
    localparam int AW = (CPE <= 2) ? 1 : $clog2(CPE);
    logic in_valid, in_ready, load, fb_en, fb_first, fb_last;
    logic [AW-1:0] addr;
    int  last_acc;
    int  accq [$];
    fe_ctrl #(.N(N), .K(K)) dut (.clk, .rst_n, .in_valid, .in_ready, .load, .addr,
                                 .fb_en, .fb_first, .fb_last);
    initial begin
      in_valid = 0; c[i] = 0; f[i] = 0; acc_n[i] = 0; last_acc = -1000;
    end
    always @(negedge clk) begin
      if (rst_n) begin
        int  s;
        bit  e_en, e_first, e_last;
        // stage-1 offset of this cycle relative to the last accept
        s = t - last_acc;
        e_en = 0; e_first = 0; e_last = 0;
        foreach (accq[j]) begin
          int d;
          d = t - accq[j] - (K - 1);
          if (d >= 1 && d <= CPE) e_en = 1;
          if (d == 1) e_first = 1;
          if (d == CPE) e_last = 1;
        end
        c[i] += 4;
        if (fb_en != e_en || fb_first != e_first || fb_last != e_last) begin
          f[i]++;
          $display("FAIL k=%0d t=%0d tags %b%b%b expected %b%b%b", K, t, fb_en, fb_first, fb_last,
                   e_en, e_first, e_last);
        end
        if (load != (in_valid && in_ready)) begin f[i]++; $display("FAIL load"); end
        if (s >= 1 && s <= CPE) begin
          if (int'(addr) != s - 1) begin f[i]++; $display("FAIL k=%0d addr %0d expected %0d", K, addr, s - 1); end
          if (in_ready != (s == CPE)) begin f[i]++; $display("FAIL k=%0d in_ready at s=%0d", K, s); end
        end
        in_valid = ($urandom % 4) != 0;
        if (in_valid && in_ready) begin
          acc_n[i]++;
          last_acc = t;
          accq.push_back(t);
          if (accq.size() > 16) void'(accq.pop_front());
        end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (600) @(posedge clk);
    checks = 0; failures = 0;
    for (int i = 0; i < NI; i++) begin
      checks += c[i] + 1; failures += f[i];
      if (acc_n[i] < 20) begin failures++; $display("FAIL too few accepts %0d", acc_n[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
