// tb_subpart_max: random lane scores drawn from a narrow range (so ties,
// scores equal to q_span and rejected lanes are frequent) checked against
// "largest score above q_span, nearest anchor on ties" found by a forward
// scan.
module tb_subpart_max;
  import chain_pkg::*;
  localparam int P = 8;
  score_t score [P];
  score_t q_span, max_f;
  index_t anchor_idx, buf_offset, max_j;
  int checks = 0, failures = 0, ties = 0, none = 0;

  subpart_max #(.P(P)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4000; r++) begin
      int best, bj, nbest;
      q_span = 15;
      anchor_idx = $urandom_range(100, 100000);
      buf_offset = P * $urandom_range(0, 7);
      foreach (score[j]) begin
        case ($urandom_range(0, 5))
          0: score[j] = SCORE_INVALID;
          1: score[j] = q_span;
          default: score[j] = $urandom_range(0, 24);
        endcase
      end
      #1;
      best = 15; bj = -1; nbest = 0;
      for (int j = 1; j <= P; j++)
        if (score[j-1] > best) begin best = score[j-1]; bj = anchor_idx - j - buf_offset; end
      for (int j = 1; j <= P; j++) if (bj != -1 && score[j-1] == best) nbest++;
      if (nbest > 1) ties++;
      if (bj == -1) none++;
      checks++;
      if (max_f !== best || max_j !== bj) begin
        failures++;
        $display("FAIL got %0d/%0d exp %0d/%0d", max_f, max_j, best, bj);
      end
    end
    if (ties == 0 || none == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
