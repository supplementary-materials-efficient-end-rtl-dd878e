// chain_pkg: types and constants shared by the anchor-chaining accelerator.
//
// An anchor follows minimap2's 128-bit layout: x = {strand, reference id,
// reference position} and y = {flags, seed length (bits 39:32), query
// position (bits 31:0)}. Scores and predecessor indices are 32-bit signed
// integers, as in the host software. The chaining parameters (q_span,
// max_dist_x, max_dist_y, bw and the scaled average seed length) are held in
// one struct because every kernel and every score unit needs all of them.
// The scaled average seed length is unsigned fixed point with AVG_FRAC
// fraction bits; that format is this design's choice.
package chain_pkg;

  typedef logic signed [31:0] score_t;
  typedef logic signed [31:0] index_t;

  typedef struct packed {
    logic [63:0] x;
    logic [63:0] y;
  } anchor_t;

  // One history entry of the anchor FIFO: an anchor plus a flag telling a
  // loaded anchor from the zero fill written at the start of a task.
  typedef struct packed {
    logic    valid;
    anchor_t a;
  } hist_anchor_t;

  localparam int unsigned AVG_FRAC = 16;

  typedef struct packed {
    score_t      q_span;            // seed length of the anchors
    logic [31:0] avg_qspan_scaled;  // 0.01 * average seed length, UQ16.16
    score_t      max_dist_x;        // largest reference gap
    score_t      max_dist_y;        // largest query gap
    score_t      bw;                // band width
  } chain_cfg_t;

  // Score returned for a pair that may not be chained.
  localparam score_t SCORE_INVALID = 32'sh8000_0000;

  // Result written back for anchor `idx`: f[idx] = f, p[idx] = p.
  typedef struct packed {
    index_t idx;
    score_t f;
    index_t p;
  } chain_result_t;

endpackage
