// tb_chain_accel_top: end-to-end run of the accelerator at its default size
// (N = 4 kernels, M = P = 16). Every kernel gets its own chaining task,
// generated as seed hits of long reads with the usual long-read chaining
// limits (max gap 5000, band 500), and all four run at the same time. The
// result stream of each kernel is compared write by write with the
// reference model, and each kernel's busy time must be 3 cycles per
// sub-part plus its stall cycles. A second round reruns every kernel with a
// new task to show that start clears the history.
//
// Mechanisms counted (each must occur): anchor-stream stall, result-stream
// stall, anchors needing several sub-parts, anchors needing all M
// sub-parts, history filled beyond M*P anchors, a better predecessor found
// in a sub-part after the first, rejected pairs, all kernels busy at once.
module tb_chain_accel_top;
  import chain_pkg::*;
  import chain_ref_pkg::*;

  localparam int N = 4, M = 16, P = 16;

  logic          clk = 0, rst_n = 0;
  logic          start          [N];
  logic [31:0]   total_subparts [N];
  chain_cfg_t    cfg            [N];
  logic          busy           [N];
  logic          done           [N];
  logic          in_valid       [N];
  logic          in_ready       [N];
  anchor_t       in_anchor      [N];
  logic [31:0]   in_nsub        [N];
  logic          out_valid      [N];
  logic          out_ready      [N];
  chain_result_t out_result     [N];

  int checks = 0, failures = 0;
  int n_in_stall = 0, n_out_stall = 0, n_multi = 0, n_full_m = 0, n_wrap = 0;
  int n_late = 0, n_reject = 0, n_all_busy = 0;

  chain_accel_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    bit all;
    all = 1;
    for (int k = 0; k < N; k++) begin
      if (!busy[k]) all = 0;
      if (in_ready[k] && !in_valid[k]) n_in_stall++;
      if (out_valid[k] && !out_ready[k]) n_out_stall++;
      if (in_valid[k] && in_ready[k] && in_nsub[k] > 1) n_multi++;
      if (in_valid[k] && in_ready[k] && in_nsub[k] == M) n_full_m++;
    end
    if (all) n_all_busy++;
  end

  task automatic run_kernel(input int k, input int n, input int in_gap, input int out_gap,
                           input int max_step, input int burst_pct, input int switch_pct);
    anchor_t    a[];
    int         nsub[];
    ref_write_t exp[$];
    int         rej = 0, late = 0, total = 0, busy_cyc = 0, stall_cyc = 0, got = 0;
    bit         fin = 0;
    gen_anchors(n, 15, a, max_step, burst_pct, switch_pct);
    host_nsub(a, cfg[k], M, P, nsub);
    foreach (nsub[i]) total += nsub[i];
    ref_kernel(a, nsub, cfg[k], M, P, exp, rej, late);
    n_reject += rej;
    n_late += late;
    if (n > M * P) n_wrap++;
    @(negedge clk);
    total_subparts[k] = 32'(total);
    start[k] = 1;
    @(negedge clk);
    start[k] = 0;
    fork
      begin
        for (int i = 0; i < n; i++) begin
          while ($urandom_range(0, 99) < in_gap) @(negedge clk);
          in_valid[k] = 1; in_anchor[k] = a[i]; in_nsub[k] = 32'(nsub[i]);
          do @(posedge clk); while (!in_ready[k]);
          @(negedge clk);
          in_valid[k] = 0;
        end
      end
      begin
        while (!fin) begin
          out_ready[k] = ($urandom_range(0, 99) >= out_gap);
          @(posedge clk);
          if (out_valid[k] && out_ready[k]) begin
            checks++;
            if (got >= exp.size() || out_result[k].idx != exp[got].idx ||
                out_result[k].f != exp[got].f || out_result[k].p != exp[got].p) begin
              failures++;
              if (failures < 10) $display("FAIL kernel %0d write %0d got i=%0d f=%0d p=%0d",
                k, got, out_result[k].idx, out_result[k].f, out_result[k].p);
            end
            got++;
          end
          if (busy[k]) busy_cyc++;
          if ((in_ready[k] && !in_valid[k]) || (out_valid[k] && !out_ready[k])) stall_cyc++;
          @(negedge clk);
        end
      end
      begin
        do @(posedge clk); while (!done[k]);
        @(negedge clk);
        fin = 1;
      end
    join
    checks++;
    if (got != exp.size()) begin
      failures++; $display("FAIL kernel %0d: %0d writes, expected %0d", k, got, exp.size());
    end
    checks++;
    if (busy_cyc != 3 * total + stall_cyc) begin
      failures++;
      $display("FAIL kernel %0d busy %0d, expected 3*%0d + %0d", k, busy_cyc, total, stall_cyc);
    end
    $display("kernel %0d: anchors=%0d subparts=%0d writes=%0d busy=%0d stalls=%0d",
             k, n, total, got, busy_cyc, stall_cyc);
  endtask

  task automatic report(input string what, input int count);
    checks++;
    $display("mechanism %-28s %0d", what, count);
    if (count == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
  endtask

  initial begin
    for (int k = 0; k < N; k++) begin
      start[k] = 0; total_subparts[k] = 0; in_valid[k] = 0; in_anchor[k] = '0;
      in_nsub[k] = 0; out_ready[k] = 0;
      cfg[k] = '{q_span: 15, avg_qspan_scaled: 32'(int'(0.15 * 65536)),
                 max_dist_x: 5000, max_dist_y: 5000, bw: 500};
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      fork
        run_kernel(0, 600, 0, 0, 16, 0, 0);
        run_kernel(1, 300, 20, 0, 40, 2, 3);
        run_kernel(2, 300, 0, 40, 30, 3, 1);
        run_kernel(3, 150 + 100 * round, 15, 15, 40, 1, 3);
      join
    end
    report("anchor stream stall", n_in_stall);
    report("result stream stall", n_out_stall);
    report("anchor with >1 sub-part", n_multi);
    report("anchor with M sub-parts", n_full_m);
    report("history wrap (n > M*P)", n_wrap);
    report("improvement in later part", n_late);
    report("rejected pair", n_reject);
    report("all kernels busy", n_all_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
