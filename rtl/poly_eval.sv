// poly_eval: k-stage multi-cycle evaluator of an n-degree polynomial.
//
// The polynomial f(x) = a_0 + a_1 x + ... + a_N x^N is rewritten as
//   f(x) = a_0 + a_1 x + ... + a_{K-1} x^{K-1} + x^K * f'(x)
// and applied recursively, so each cycle adds one group of K terms:
//   acc <= (b_0 + b_1 x + ... + b_{K-1} x^{K-1}) + x^K * acc
// with the groups b taken from the highest coefficients down. An evaluation
// needs CPE = ceil((N+1)/K) cycles; missing top terms are zero.
//
// Structure (K ROMs, a pipelined feed-forward network and one loop):
//   psum_0 = ROM#1 (aligned to 2P+G bits)
//   psum_s = psum_{s-1} + ROM#(s+1) * x^s,  registered   (mac_stage, s=1..K-1)
//   acc    = trunc(psum_{K-1} + x^K * acc)                (feedback_mac)
//   y      = round(acc) to P bits, registered             (out_round)
// Powers of x come from a register-per-multiplier pipeline (power_pipe);
// ROM#3.. are address-rotated to line up with the pipeline (coef_rom); one
// free-running counter and a tag pipeline sequence everything (fe_ctrl).
//
// Interface: in_valid/in_ready handshake for the P-bit signed fraction x;
// in_ready is high once every CPE cycles. out_valid pulses for one cycle
// with the P-bit result y. There is no output back-pressure.
// Timing: throughput one result per CPE cycles, latency CPE + K cycles from
// the accepting clock edge to the edge that raises out_valid.
//
// Defaults are the 16-bit, degree-6 sine with a 4-stage network. The number
// of guard bits (4) and the coefficients are this design's own choices,
// found by exhaustive bit-accurate simulation to keep every 16-bit result
// within one ulp for 1..7 stages.
module poly_eval
  import fe_pkg::*;
#(
  parameter int          P    = 16,
  parameter int          G    = 4,
  parameter int          N    = 6,
  parameter int          K    = 4,
  parameter coef_table_t COEF = coef_table(FN_SINE, P + G),
  localparam int         W    = P + G,
  localparam int         SW   = 2*P + G,
  localparam int         CPE  = cycles_per_eval(N, K),
  localparam int         AW   = cnt_width(CPE)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [P-1:0] x,
  output logic                out_valid,
  output logic signed [P-1:0] y
);

  logic                load;
  logic [AW-1:0]       addr;
  logic                fb_en, fb_first, fb_last;
  logic signed [P-1:0] x_reg;
  logic [K:1][P-1:0]   xpow;
  logic signed [W-1:0] rom_data [1:K];
  logic signed [SW-1:0] psum [0:K-1];
  logic signed [W-1:0] acc;
  logic                done;

  initial begin
    assert (K >= 1 && N >= 0) else $error("poly_eval: K >= 1 and N >= 0 required");
  end

  fe_ctrl #(.N(N), .K(K)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .load, .addr,
    .fb_en, .fb_first, .fb_last
  );

  always_ff @(posedge clk) begin
    if (load) x_reg <= x;
  end

  power_pipe #(.P(P), .K(K)) u_pow (.clk, .x(x_reg), .xpow);

  for (genvar i = 1; i <= K; i++) begin : g_rom
    coef_rom #(.P(P), .G(G), .N(N), .K(K), .ROM_IDX(i), .COEF(COEF)) u_rom (
      .addr, .data(rom_data[i])
    );
  end

  // ROM#1 enters the first adder directly, aligned to the product format.
  assign psum[0] = SW'(rom_data[1]) <<< (P - 1);

  for (genvar s = 1; s < K; s++) begin : g_ff
    mac_stage #(.P(P), .G(G)) u_mac (
      .clk,
      .psum_in (psum[s-1]),
      .coef    (rom_data[s+1]),
      .xpow    ($signed(xpow[s])),
      .psum_out(psum[s])
    );
  end

  feedback_mac #(.P(P), .G(G)) u_fb (
    .clk, .rst_n,
    .en   (fb_en),
    .clear(fb_first),
    .last (fb_last),
    .psum (psum[K-1]),
    .xk   ($signed(xpow[K])),
    .acc,
    .done
  );

  out_round #(.P(P), .G(G)) u_round (
    .clk, .rst_n, .in_valid(done), .acc, .out_valid, .y
  );

  // Handshake rule: an offered x stays put until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      in_valid && !in_ready |=> in_valid && $stable(x);
  endproperty
  a_hold: assert property (p_hold) else $error("poly_eval: x dropped or changed before acceptance");

endmodule
