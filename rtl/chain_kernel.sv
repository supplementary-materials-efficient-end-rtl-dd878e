// chain_kernel: one anchor-chaining kernel of the accelerator.
//
// For every anchor i the host supplies the anchor and num_subparts[i], the
// number of P-wide sub-parts (1..M) of earlier anchors it must be scored
// against. The kernel keeps the M*P most recent anchors and their best
// scores in two shift-register FIFOs (A[], F[]). Each sub-part takes three
// cycles (initiation interval 3):
//   SEL  : on the first sub-part of an anchor, take the anchor from the
//          input stream into A[0]; latch the P anchors and P scores of the
//          sub-part selected by the sub-part counter;
//   CALC : P score units work in parallel; their results are registered;
//   UPD  : reduce to (max_f, max_j); if max_f > F[0], F[0] takes max_f and
//          the result {i, max_f, max_j} is written out (f[i], p[i]); when
//          the anchor's last sub-part is done, both FIFOs shift by one,
//          F[0] restarts at 0 and i advances.
// A task is `total_subparts` sub-parts long; `start` clears both FIFOs and
// the counters, `done` rises when the last sub-part is finished and stays
// high until the next start.
//
// Interfaces: in_* is a valid/ready stream of {anchor, num_subparts}; out_*
// is a valid/ready stream of results. The kernel waits in SEL while no
// anchor is offered and in UPD while a result is not accepted; without such
// stalls a task takes exactly 3 * total_subparts busy cycles.
//
// The loop structure, FIFO sizes, acceptance rules and II = 3 follow the
// published description. The streaming ports stand in for its prefetching
// DRAM loads and DRAM writes; they, the 3-stage split, the anchor valid flags
// and the start/done handshake are this design's own. M and P are not given
// there (only H = M*P > 64); M = P = 16 is an assumption.
//
// Lint reports rst_n as used both asynchronously and synchronously; the
// synchronous use is only the `disable iff` of the protocol assertions at
// the end, not logic.
module chain_kernel
  import chain_pkg::*;
#(
  parameter int unsigned M  = 16,
  parameter int unsigned P  = 16,
  parameter int unsigned SW = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // task control
  input  logic          start,
  input  logic [31:0]   total_subparts,
  input  chain_cfg_t    cfg,
  output logic          busy,
  output logic          done,
  // anchor stream (a[i], num_subparts[i])
  input  logic          in_valid,
  output logic          in_ready,
  input  anchor_t       in_anchor,
  input  logic [31:0]   in_nsub,
  // result stream (f[i], p[i])
  output logic          out_valid,
  input  logic          out_ready,
  output chain_result_t out_result
);

  localparam int unsigned H = M * P;

  typedef enum logic [1:0] {S_IDLE, S_SEL, S_CALC, S_UPD} state_t;

  state_t        state;
  logic [31:0]   g;            // sub-parts done in this task
  index_t        i_idx;        // current anchor
  logic [31:0]   sp_done;      // sub-parts done for the current anchor
  logic [31:0]   sp_total;     // num_subparts of the current anchor

  // History FIFOs
  hist_anchor_t  a_hist [H+1];
  score_t        f_hist [H+1];
  logic          a_wr0, a_shift, f_wr0, f_shift, hist_clear;
  hist_anchor_t  a_d0;
  score_t        f_d0, f_d1;

  // Sub-part selection
  hist_anchor_t  a_lane [P];
  score_t        f_lane [P];
  hist_anchor_t  a_lane_q [P];
  score_t        f_lane_q [P];

  // Scores
  score_t        sc_comb [P];
  score_t        sc_q [P];
  score_t        max_f;
  index_t        max_j;
  index_t        buf_offset;

  logic          last_sub, improve, upd_fire, sel_fire, load_needed;

  history_shift_reg #(.T(hist_anchor_t), .DEPTH(H)) u_a_fifo (
    .clk, .rst_n, .clear(hist_clear), .shift(a_shift), .wr0(a_wr0),
    .d0(a_d0), .d1(a_hist[0]), .q(a_hist)
  );

  history_shift_reg #(.T(score_t), .DEPTH(H)) u_f_fifo (
    .clk, .rst_n, .clear(hist_clear), .shift(f_shift), .wr0(f_wr0),
    .d0(f_d0), .d1(f_d1), .q(f_hist)
  );

  subpart_mux #(.T(hist_anchor_t), .M(M), .P(P), .SW(SW)) u_a_mux (
    .hist(a_hist), .subpart(sp_done[SW-1:0]), .lane(a_lane)
  );

  subpart_mux #(.T(score_t), .M(M), .P(P), .SW(SW)) u_f_mux (
    .hist(f_hist), .subpart(sp_done[SW-1:0]), .lane(f_lane)
  );

  for (genvar j = 0; j < int'(P); j++) begin : g_score
    chain_score_unit u_score (
      .ai(a_hist[0].a), .aj(a_lane_q[j].a), .aj_valid(a_lane_q[j].valid),
      .fj(f_lane_q[j]), .cfg(cfg), .score(sc_comb[j])
    );
  end

  assign buf_offset = index_t'(sp_done) * index_t'(P);

  subpart_max #(.P(P)) u_max (
    .score(sc_q), .q_span(cfg.q_span), .anchor_idx(i_idx),
    .buf_offset(buf_offset), .max_f(max_f), .max_j(max_j)
  );

  // Handshakes and FIFO controls
  always_comb begin
    load_needed = (sp_done == 0);
    in_ready    = (state == S_SEL) && load_needed;
    sel_fire    = (state == S_SEL) && (!load_needed || in_valid);
    improve     = (max_f > f_hist[0]);
    out_valid   = (state == S_UPD) && improve;
    out_result  = '{idx: i_idx, f: max_f, p: max_j};
    upd_fire    = (state == S_UPD) && (!improve || out_ready);
    last_sub    = (sp_done + 32'd1 == sp_total);

    hist_clear  = start && (state == S_IDLE);
    a_wr0       = (state == S_SEL) && load_needed && in_valid;
    a_d0        = '{valid: 1'b1, a: in_anchor};
    a_shift     = upd_fire && last_sub;
    f_shift     = upd_fire && last_sub;
    f_d1        = improve ? max_f : f_hist[0];
    // F[0] takes max_f on improvement; after the last sub-part it restarts at 0.
    f_wr0       = upd_fire && (improve || last_sub);
    f_d0        = last_sub ? score_t'(0) : max_f;
    busy        = (state != S_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      g        <= '0;
      i_idx    <= '0;
      sp_done  <= '0;
      sp_total <= '0;
      done     <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (start) begin
            g       <= '0;
            i_idx   <= '0;
            sp_done <= '0;
            done    <= (total_subparts == 0);
            state   <= (total_subparts == 0) ? S_IDLE : S_SEL;
          end
        end
        S_SEL: begin
          if (sel_fire) begin
            if (load_needed) sp_total <= in_nsub;
            state <= S_CALC;
          end
        end
        S_CALC: state <= S_UPD;
        S_UPD: begin
          if (upd_fire) begin
            g <= g + 32'd1;
            if (last_sub) begin
              sp_done <= '0;
              i_idx   <= i_idx + 32'sd1;
            end else begin
              sp_done <= sp_done + 32'd1;
            end
            if (g + 32'd1 == total_subparts) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              state <= S_SEL;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Pipeline registers (no reset needed: always written before use)
  always_ff @(posedge clk) begin
    if (sel_fire) begin
      a_lane_q <= a_lane;
      f_lane_q <= f_lane;
    end
    if (state == S_CALC) sc_q <= sc_comb;
  end

  // Protocol rules
  a_nsub_range: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_ready) |-> (in_nsub >= 1 && in_nsub <= 32'(M)))
    else $error("num_subparts out of range 1..M");
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && !out_ready) |=> (out_valid && $stable(out_result)));

endmodule
