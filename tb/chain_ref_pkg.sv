// chain_ref_pkg: reference model used by the chaining testbenches.
//
// Holds an integer (C-like) model of the pair score, a literal model of the
// kernel's sub-part loop (history arrays A[]/F[] of H+1 entries, sub-part
// reduction, F[0] update and shift), the host's computation of the number
// of sub-parts per anchor, and a generator of anchor sets that look like
// seed hits of a few reads (colinear runs with noise, strand/reference
// switches and query back-steps so that every rejection rule is hit).
package chain_ref_pkg;
  import chain_pkg::*;

  typedef struct {
    int idx;
    int f;
    int p;
  } ref_write_t;

  localparam int INT_MIN = -2147483648;

  function automatic int ref_score(anchor_t ai, anchor_t aj, bit vj, int fj,
                                   chain_cfg_t c);
    longint dr, dd, md, lin;
    int     dq, sc, lg;
    longint unsigned avg;
    if (!vj) return INT_MIN;
    dr = longint'(ai.x - aj.x);
    dq = int'(ai.y[31:0]) - int'(aj.y[31:0]);
    if (dr == 0 || dq <= 0 || dq > int'(c.max_dist_y) || dq > int'(c.max_dist_x))
      return INT_MIN;
    dd = dr - longint'(dq);
    if (dd < 0) dd = -dd;
    if (dd > longint'(c.bw)) return INT_MIN;
    md = (longint'(dq) < dr) ? longint'(dq) : dr;
    sc = (md > longint'(c.q_span)) ? int'(c.q_span) : int'(md);
    lg = 0;
    for (longint t = dd; t > 1; t = t / 2) lg++;
    avg = longint'(c.avg_qspan_scaled);
    lin = longint'((longint'(dd) * avg) / 65536);
    return sc - int'(lin) - (lg / 2) + fj;
  endfunction

  // Host side: sub-parts needed per anchor, from the start index of the
  // software inner loop (first j with a[i].x <= a[j].x + max_dist_x).
  function automatic void host_nsub(const ref anchor_t a[], input chain_cfg_t c,
                                    input int m, input int p, ref int nsub[]);
    int st, trip, h;
    h = m * p;
    nsub = new[a.size()];
    st = 0;
    foreach (a[i]) begin
      while (st < i && a[i].x > a[st].x + 64'(c.max_dist_x)) st++;
      trip = i - st;
      if (trip > h) trip = h;
      nsub[i] = (trip + p - 1) / p;
      if (nsub[i] < 1) nsub[i] = 1;
    end
  endfunction

  // Literal model of the kernel loop. Returns the ordered list of result
  // writes and counts rejected pairs and improvements found in a sub-part
  // other than the first.
  function automatic void ref_kernel(const ref anchor_t a[], const ref int nsub[],
                                     input chain_cfg_t c, input int m, input int p,
                                     ref ref_write_t wr[$], ref int n_reject,
                                     ref int n_late_improve);
    anchor_t ah[];
    bit      av[];
    int      fh[];
    int      h, sp, max_f, max_j, sc, off;
    h = m * p;
    ah = new[h+1];
    av = new[h+1];
    fh = new[h+1];
    foreach (ah[k]) begin ah[k] = '0; av[k] = 0; fh[k] = 0; end
    wr.delete();
    for (int i = 0; i < a.size(); i++) begin
      ah[0] = a[i];
      av[0] = 1;
      for (sp = 0; sp < nsub[i]; sp++) begin
        off = sp * p;
        max_f = int'(c.q_span);
        max_j = -1;
        for (int j = p; j > 0; j--) begin
          sc = ref_score(ah[0], ah[off+j], av[off+j], fh[off+j], c);
          if (sc == INT_MIN) n_reject++;
          if (sc >= max_f && sc != int'(c.q_span)) begin
            max_f = sc;
            max_j = i - j - off;
          end
        end
        if (max_f > fh[0]) begin
          fh[0] = max_f;
          wr.push_back('{idx: i, f: max_f, p: max_j});
          if (sp > 0) n_late_improve++;
        end
      end
      for (int k = h; k > 0; k--) begin
        ah[k] = ah[k-1];
        av[k] = av[k-1];
        fh[k] = fh[k-1];
      end
      fh[0] = 0;
    end
  endfunction

  // Anchor set of n seeds: colinear runs on one strand/reference with small
  // jitter, a switch of reference id (x jumps far) with probability
  // switch_pct percent per anchor, and occasional
  // query back-steps. With burst_pct > 0 it also inserts bursts of 20-40
  // anchors from a repeat copy (same reference stretch, query 2000 bases
  // away, so off the band), which pushes the best predecessor of the next
  // anchor more than P places back. Sorted by x as the host sorts them.
  function automatic void gen_anchors(input int n, input int qspan, ref anchor_t a[],
                                      input int max_step = 40, input int burst_pct = 0,
                                      input int switch_pct = 3);
    longint unsigned rid, rpos;
    int qpos, step, burst;
    burst = 0;
    a = new[n];
    rid = 0;
    rpos = 64'd1000 + 64'($urandom_range(0, 5000));
    qpos = 100;
    for (int i = 0; i < n; i++) begin
      if (burst > 0) begin
        burst--;
        rpos = rpos + 64'($urandom_range(0, 2));
        a[i].x = (rid << 32) | rpos;
        a[i].y = (64'(qspan) << 32) | 64'(unsigned'(qpos + 2000 + $urandom_range(0, 3)));
        continue;
      end
      if ($urandom_range(0, 99) < burst_pct) burst = $urandom_range(20, 40);
      if ($urandom_range(0, 99) < switch_pct) begin
        rid  = rid + 1;
        rpos = 64'($urandom_range(0, 100000));
        qpos = $urandom_range(0, 2000);
      end
      step = $urandom_range(0, max_step);
      rpos = rpos + 64'(step);
      case ($urandom_range(0, 9))
        0:       qpos = qpos - $urandom_range(0, 30);          // back-step
        1:       qpos = qpos + step + $urandom_range(0, 120);  // large indel
        default: qpos = qpos + step + $urandom_range(0, 6) - 3;
      endcase
      a[i].x = (rid << 32) | rpos;
      a[i].y = (64'(qspan) << 32) | 64'(unsigned'(qpos));
    end
  endfunction

endpackage
