// tb_subpart_mux: fills the history with distinct random words and checks
// every lane of every sub-part (and an out-of-range sub-part, which gives
// zeros) against the index formula s*P + j.
module tb_subpart_mux;
  localparam int M = 5, P = 3;
  logic [31:0] hist [M*P+1];
  logic [2:0]  subpart;
  logic [31:0] lane [P];
  int checks = 0, failures = 0;

  subpart_mux #(.T(logic [31:0]), .M(M), .P(P)) dut (.hist(hist), .subpart(subpart), .lane(lane));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 50; r++) begin
      foreach (hist[k]) hist[k] = $urandom;
      for (int s = 0; s < 8; s++) begin
        subpart = 3'(s);
        #1;
        for (int j = 1; j <= P; j++) begin
          logic [31:0] exp;
          exp = (s < M) ? hist[s*P + j] : 32'd0;
          checks++;
          if (lane[j-1] !== exp) begin
            failures++;
            $display("FAIL s=%0d j=%0d got %h exp %h", s, j, lane[j-1], exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
