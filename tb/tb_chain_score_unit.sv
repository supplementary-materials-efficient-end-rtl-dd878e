// tb_chain_score_unit: checks the pair score against the integer reference
// model on directed pairs (each rejection rule, zero gap, seed-length cap)
// and on random pairs drawn close enough that most are accepted.
module tb_chain_score_unit;
  import chain_pkg::*;
  import chain_ref_pkg::*;

  anchor_t    ai, aj;
  logic       vj;
  score_t     fj, score;
  chain_cfg_t cfg;
  int checks = 0, failures = 0, accepted = 0, rejected = 0;

  chain_score_unit dut (.ai(ai), .aj(aj), .aj_valid(vj), .fj(fj), .cfg(cfg), .score(score));

  task automatic check_pair(input longint unsigned xi, yi, xj, yj, input bit v, input int f);
    int exp;
    ai = '{x: xi, y: yi}; aj = '{x: xj, y: yj}; vj = v; fj = f;
    #1;
    exp = ref_score(ai, aj, v, f, cfg);
    checks++;
    if (exp == INT_MIN) rejected++; else accepted++;
    if (score !== exp) begin
      failures++;
      $display("FAIL ai=%h/%h aj=%h/%h v=%0d f=%0d got %0d exp %0d", xi, yi, xj, yj, v, f, score, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '{q_span: 15, avg_qspan_scaled: 32'(int'(0.15 * 65536)),
            max_dist_x: 5000, max_dist_y: 5000, bw: 500};
    // Directed: q_span cap, exact diagonal, each rejection.
    check_pair(64'd2000, {32'd15, 32'd1100}, 64'd1000, {32'd15, 32'd100}, 1, 40);   // dd=0, sc=15+40
    check_pair(64'd1010, {32'd15, 32'd110}, 64'd1000, {32'd15, 32'd100}, 1, 15);    // min_d=10
    check_pair(64'd1010, {32'd15, 32'd150}, 64'd1000, {32'd15, 32'd100}, 1, 15);    // dd=40
    check_pair(64'd1000, {32'd15, 32'd150}, 64'd1000, {32'd15, 32'd100}, 1, 15);    // dr=0
    check_pair(64'd1010, {32'd15, 32'd100}, 64'd1000, {32'd15, 32'd100}, 1, 15);    // dq=0
    check_pair(64'd1010, {32'd15, 32'd90},  64'd1000, {32'd15, 32'd100}, 1, 15);    // dq<0
    check_pair(64'd9000, {32'd15, 32'd8000}, 64'd1000, {32'd15, 32'd100}, 1, 15);   // dq>max
    check_pair(64'd1900, {32'd15, 32'd200}, 64'd1000, {32'd15, 32'd100}, 1, 15);    // dd>bw
    check_pair(64'd1010, {32'd15, 32'd110}, 64'd1000, {32'd15, 32'd100}, 0, 15);    // not loaded
    check_pair(64'h1_0000_0010, {32'd15, 32'd110}, 64'd1000, {32'd15, 32'd100}, 1, 15); // other ref
    for (int n = 0; n < 3000; n++) begin
      longint unsigned xj = 64'($urandom_range(0, 1000000));
      int yj = $urandom_range(0, 100000);
      longint unsigned xi = xj + 64'($urandom_range(0, 700));
      int yi = yj + $urandom_range(0, 900) - 100;
      if (n % 3 == 0) cfg.bw = $urandom_range(1, 600);
      if (n % 5 == 0) cfg.max_dist_y = $urandom_range(100, 5000);
      if (n % 7 == 0) cfg.avg_qspan_scaled = $urandom_range(0, 65536);
      check_pair(xi, {32'd15, 32'(yi)}, xj, {32'd15, 32'(yj)}, 1, $urandom_range(0, 5000));
    end
    if (accepted < 100 || rejected < 100) begin
      failures++;
      $display("FAIL coverage accepted=%0d rejected=%0d", accepted, rejected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
