// history_shift_reg: the accelerator's local FIFO of recent anchors (A[]) or
// recent chaining scores (F[]), built as a shift register of DEPTH+1 entries.
//
// Entry 0 is the anchor being processed (A[0]) or its running best score
// (F[0]); entries 1..DEPTH are the DEPTH = M*P anchors/scores before it,
// entry k belonging to anchor i-k. All entries are visible at once on `q` so
// the sub-part selector can reach any of them, as in the accelerator's
// block diagram.
//
// Per clock, in priority order:
//   clear      : every entry is set to zero (start of a chaining task);
//   shift      : entry 1 takes d1 and entry k takes entry k-1 for
//                k = 2..DEPTH; entry 0 takes d0 if wr0 is also high,
//                otherwise keeps its value;
//   wr0        : entry 0 takes d0 (load a new anchor / update F[0]).
// d1 lets the caller push the final value of entry 0 in the same cycle as it
// changes it (F[0] is updated, shifted into F[1] and cleared in one step).
// Depth and the shift-on-finish behaviour follow the published description; the combined
// shift+write of entry 0, d1 and the synchronous clear are this design's own.
module history_shift_reg #(
  parameter type         T     = logic [31:0],  // entry type
  parameter int unsigned DEPTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             shift,
  input  logic             wr0,
  input  T                 d0,
  input  T                 d1,
  output T                 q [DEPTH+1]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k <= int'(DEPTH); k++) q[k] <= '0;
    end else if (clear) begin
      for (int k = 0; k <= int'(DEPTH); k++) q[k] <= '0;
    end else begin
      if (shift) begin
        q[1] <= d1;
        for (int k = 2; k <= int'(DEPTH); k++) q[k] <= q[k-1];
      end
      if (wr0) q[0] <= d0;
    end
  end

endmodule
