// tb_chain_kernel: runs whole chaining tasks through one kernel (reduced to
// M = 4, P = 4) and compares the stream of f/p writes with the literal
// reference model. The first task feeds anchors and accepts results every
// cycle and must take exactly 3 cycles per sub-part; later tasks add random
// gaps on the anchor stream and back-pressure on the result stream, and the
// busy time must then equal 3 cycles per sub-part plus the stall cycles.
module tb_chain_kernel;
  import chain_pkg::*;
  import chain_ref_pkg::*;

  localparam int M = 4, P = 4;

  logic          clk = 0, rst_n = 0, start = 0;
  logic [31:0]   total_subparts = 0;
  chain_cfg_t    cfg;
  logic          busy, done;
  logic          in_valid = 0, in_ready;
  anchor_t       in_anchor = '0;
  logic [31:0]   in_nsub = 0;
  logic          out_valid, out_ready = 0;
  chain_result_t out_result;

  int checks = 0, failures = 0;

  chain_kernel #(.M(M), .P(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_task(input int n, input int in_gap, input int out_gap);
    anchor_t    a[];
    int         nsub[];
    ref_write_t exp[$];
    int         nrej = 0, nlate = 0, total = 0, busy_cyc = 0, stall_cyc = 0, got = 0;
    bit         fin = 0;
    gen_anchors(n, 15, a, 40, 2);
    host_nsub(a, cfg, M, P, nsub);
    foreach (nsub[i]) total += nsub[i];
    ref_kernel(a, nsub, cfg, M, P, exp, nrej, nlate);
    @(negedge clk);
    total_subparts = 32'(total);
    start = 1;
    @(negedge clk);
    start = 0;
    fork
      begin : feeder
        for (int i = 0; i < n; i++) begin
          while ($urandom_range(0, 99) < in_gap) @(negedge clk);
          in_valid = 1; in_anchor = a[i]; in_nsub = 32'(nsub[i]);
          do @(posedge clk); while (!in_ready);
          @(negedge clk);
          in_valid = 0;
        end
      end
      begin : sink
        while (!fin) begin
          out_ready = ($urandom_range(0, 99) >= out_gap);
          @(posedge clk);
          if (out_valid && out_ready) begin
            checks++;
            if (got >= exp.size() || out_result.idx != exp[got].idx ||
                out_result.f != exp[got].f || out_result.p != exp[got].p) begin
              failures++;
              if (failures < 10) $display("FAIL write %0d got i=%0d f=%0d p=%0d", got,
                out_result.idx, out_result.f, out_result.p);
            end
            got++;
          end
          if (busy) busy_cyc++;
          if ((in_ready && !in_valid) || (out_valid && !out_ready)) stall_cyc++;
          @(negedge clk);
        end
      end
      begin : waiter
        do @(posedge clk); while (!done);
        @(negedge clk);
        fin = 1;
      end
    join
    checks++;
    if (got != exp.size()) begin
      failures++; $display("FAIL %0d writes, expected %0d", got, exp.size());
    end
    checks++;
    if (busy_cyc != 3 * total + stall_cyc) begin
      failures++;
      $display("FAIL busy %0d cycles, expected 3*%0d + %0d stalls", busy_cyc, total, stall_cyc);
    end
    if (in_gap == 0 && out_gap == 0) begin
      checks++;
      if (stall_cyc != 0) begin failures++; $display("FAIL stalls without gaps"); end
    end
    $display("task n=%0d subparts=%0d writes=%0d rejected=%0d late=%0d busy=%0d stalls=%0d",
             n, total, got, nrej, nlate, busy_cyc, stall_cyc);
  endtask

  initial begin
    cfg = '{q_span: 15, avg_qspan_scaled: 32'(int'(0.15 * 65536)),
            max_dist_x: 400, max_dist_y: 400, bw: 100};
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_task(60, 0, 0);
    run_task(120, 30, 30);
    cfg.max_dist_x = 150; cfg.max_dist_y = 150; cfg.bw = 40;
    run_task(200, 10, 50);
    run_task(1, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
