// chain_score_unit: chaining score of the current anchor against one earlier
// anchor (the compute_score step of the accelerator's inner loop).
//
// For current anchor ai and earlier anchor aj with best score fj:
//   dr = ai.x - aj.x (64-bit), dq = ai.y[31:0] - aj.y[31:0] (32-bit)
//   the pair is rejected (SCORE_INVALID) when aj is not a loaded anchor,
//   dr == 0, dq <= 0, dq > max_dist_y, dq > max_dist_x or |dr - dq| > bw;
//   otherwise, with dd = |dr - dq|,
//   score = min(min(dq, dr), q_span) - floor(dd * avg_qspan_scaled)
//           - (floor(log2 dd) >> 1) + fj.
// This is minimap2's single-segment chaining score with a linear gap term
// scaled by 0.01 x the average seed length, which is the form the
// accelerator's inputs (q_span, avg_qspan_scaled, max_dist_x/y, bw) point
// to. The published description names the function but does not print it; the formula
// above, the fixed-point gap term (avg_qspan_scaled is UQ16.16, product
// truncated) and the `valid` qualifier are this design's choices.
//
// Purely combinational; the kernel registers its output, so one score unit
// has a full clock cycle for the subtract/compare/multiply path.
module chain_score_unit
  import chain_pkg::*;
(
  input  anchor_t    ai,        // current anchor, A[0]
  input  anchor_t    aj,        // earlier anchor from the history FIFO
  input  logic       aj_valid,  // aj holds a loaded anchor
  input  score_t     fj,        // best chaining score of aj
  input  chain_cfg_t cfg,
  output score_t     score
);

  logic signed [63:0] dr;
  logic signed [31:0] dq;
  logic signed [63:0] diff;
  logic        [63:0] dd;
  logic signed [63:0] min_d;
  logic signed [31:0] sc;
  logic        [4:0]  log_dd;
  logic        [63:0] lin_prod;
  logic        [31:0] gap;
  logic               reject;

  // floor(log2(v)) for v > 0, 0 for v == 0.
  function automatic logic [4:0] ilog2(input logic [31:0] v);
    logic [4:0] r;
    r = '0;
    for (int b = 0; b < 32; b++) begin
      if (v[b]) r = 5'(b);
    end
    return r;
  endfunction

  always_comb begin
    dr       = signed'(ai.x - aj.x);
    dq       = signed'(ai.y[31:0]) - signed'(aj.y[31:0]);
    diff     = dr - 64'(dq);
    dd       = diff[63] ? 64'(-diff) : 64'(diff);
    reject   = !aj_valid || (dr == 0) || (dq <= 0) ||
               (dq > cfg.max_dist_y) || (dq > cfg.max_dist_x) ||
               (dd > 64'(unsigned'(cfg.bw)) || cfg.bw < 0);
    min_d    = (64'(dq) < dr) ? 64'(dq) : dr;
    sc       = (min_d > 64'(cfg.q_span)) ? cfg.q_span : min_d[31:0];
    log_dd   = ilog2(dd[31:0]);
    lin_prod = 64'(dd[31:0]) * 64'(cfg.avg_qspan_scaled);
    gap      = 32'(lin_prod >> AVG_FRAC) + 32'(log_dd >> 1);
    score    = reject ? SCORE_INVALID : sc - signed'(gap) + fj;
  end

endmodule
