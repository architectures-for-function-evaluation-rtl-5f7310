// fe_ctrl: counter, input acceptance and tag pipeline of the evaluator.
//
// An evaluation takes CPE = ceil((N+1)/K) cycles in each stage. A single
// free-running counter counts 0 .. CPE-1 and addresses all coefficient ROMs;
// it never stops, because the rotated contents of ROM#3.. assume that the
// counter keeps advancing while later stages finish an evaluation. A new x
// is accepted only on the clock edge at which the counter wraps to 0
// (in_ready is high while the counter is at CPE-1), so evaluations start
// aligned with the ROM address sequence and can follow each other with no
// gap: one result every CPE cycles.
//
// For each cycle of an active evaluation stage 1 creates a tag {en, first,
// last}; the tag is delayed K-1 cycles to reach the feedback loop in step
// with the partial sum it belongs to. first clears the loop, last makes it
// hand the accumulated value to the output rounding.
//
// Interface: valid/ready handshake on the input; load is the enable of the
// x input register (load = in_valid & in_ready). Reset clears the counter
// and all tags.
module fe_ctrl
  import fe_pkg::*;
#(
  parameter int  N   = 6,
  parameter int  K   = 4,
  localparam int CPE = cycles_per_eval(N, K),
  localparam int AW  = cnt_width(CPE)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  output logic          load,
  output logic [AW-1:0] addr,
  output logic          fb_en,
  output logic          fb_first,
  output logic          fb_last
);

  typedef struct packed {
    logic en;
    logic first;
    logic last;
  } tag_t;

  logic [AW-1:0] cnt;
  logic          active;
  logic          wrap;
  tag_t          tag1;
  tag_t          tags [K];

  assign wrap     = (int'(cnt) == CPE - 1);
  assign in_ready = wrap;
  assign load     = in_valid && in_ready;
  assign addr     = cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= AW'(CPE - 1);
      active <= 1'b0;
    end else begin
      cnt <= wrap ? '0 : cnt + 1'b1;
      if (wrap) active <= load;
    end
  end

  assign tag1 = '{en: active, first: active && (cnt == '0), last: active && wrap};

  // tags[d] is the stage-1 tag delayed by d cycles.
  assign tags[0] = tag1;
  for (genvar d = 1; d < K; d++) begin : g_tag
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) tags[d] <= '0;
      else        tags[d] <= tags[d-1];
    end
  end

  assign fb_en    = tags[K-1].en;
  assign fb_first = tags[K-1].first;
  assign fb_last  = tags[K-1].last;

endmodule
