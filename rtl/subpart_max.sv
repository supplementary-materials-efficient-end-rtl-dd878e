// subpart_max: reduces the P scores of one sub-part to the best score and
// its predecessor index.
//
// Lane j-1 holds the score against anchor i - buf_offset - j (j = 1..P).
// Starting from max_f = q_span and max_j = -1, the lanes are visited from
// j = P down to j = 1 and a score is taken when it is >= the running max_f
// and differs from q_span; the taken index is i - j - buf_offset. The
// result is therefore the largest acceptable score, and among equal scores
// the anchor nearest to i. This is the accelerator's unrolled reduction as
// the published description gives it; the chain of P compare/select stages is left to
// synthesis to balance. Combinational.
module subpart_max
  import chain_pkg::*;
#(
  parameter int unsigned P = 16
) (
  input  score_t score [P],
  input  score_t q_span,
  input  index_t anchor_idx,   // i
  input  index_t buf_offset,   // sub-part number * P
  output score_t max_f,
  output index_t max_j
);

  always_comb begin
    max_f = q_span;
    max_j = -32'sd1;
    for (int j = int'(P); j > 0; j--) begin
      if (score[j-1] >= max_f && score[j-1] != q_span) begin
        max_f = score[j-1];
        max_j = anchor_idx - index_t'(j) - buf_offset;
      end
    end
  end

endmodule
