// ltlws: warp pool and Lazy Two-Level Warp Scheduler of one SM.
//
// Every resident warp is in one of three queues:
//   schedulable - its next bundle's registers are in the register file or the
//                 operand cache; the inner level may issue from it,
//   prefetching - its next bundle uses scratchpad registers that the register
//                 prefetcher still has to bring into the operand cache,
//   pending     - ready but beyond the active-warp limit, or stalled on a
//                 long-latency operation.
// The prefetching queue is ordered: a newly launched warp joins at the back,
// a warp that completes a bundle whose successor needs scratchpad registers
// rejoins at the front, and the prefetcher pops the front. Schedulable and
// pending are sets, kept as a per-warp state.
//
// Inner level: one warp per clock is issued among schedulable, unstalled
// warps, either greedy-then-oldest (gto = 1: keep issuing the last warp while
// it is eligible, else the oldest, taken here as the lowest warp ID) or loose
// round robin (gto = 0: the next eligible warp after the last one issued).
//
// Lazy limit: at kernel start the active-warp limit is not set. The scheduler
// counts instructions issued per warp (32-bit counters). When the first warp
// finishes, it adds up the counts of all W_Max launched warps over W_Max
// clocks and sets W_Opt = floor(sum Inst_i / Inst_Max) (Eq. 14), with Inst_Max
// the count of the finished warp, kept within 1..63. From then on at most
// W_Opt warps are schedulable: one excess warp per clock is moved to pending
// (the highest ID first) and one pending warp per clock is promoted (lowest ID
// first) while there is room. With lazy = 0 the limit stays unset.
// Age ordering, the per-clock demotion/promotion rate and the handling of the
// limit on the way down are this design's choices.
module ltlws
  import expars_pkg::*;
#(
  parameter int unsigned NWARP = MAX_WARPS
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     gto,
  input  logic     lazy,
  // warp launch (resource allocation done for its CTA)
  input  logic     launch_valid,
  input  warp_id_t launch_warp,
  input  logic     launch_needs_spm,
  // register prefetcher
  output logic     pq_head_valid,
  output warp_id_t pq_head_warp,
  input  logic     pq_pop,
  input  logic     pref_done_valid,
  input  warp_id_t pref_done_warp,
  // pipeline feedback
  input  logic     bundle_done_valid,
  input  warp_id_t bundle_done_warp,
  input  logic     bundle_next_spm,
  input  logic     stall_valid,
  input  warp_id_t stall_warp,
  input  logic     unstall_valid,
  input  warp_id_t unstall_warp,
  input  logic     finish_valid,
  input  warp_id_t finish_warp,
  // issue
  output logic     issue_valid,
  output warp_id_t issue_warp,
  // status
  output logic     wopt_valid,
  output logic [5:0] wopt,
  output logic [6:0] active_cnt,
  output logic [6:0] pq_count,
  output logic [31:0] cnt_demote,
  output logic [31:0] cnt_promote
);

  typedef enum logic [2:0] {W_FREE, W_PREF, W_FETCH, W_SCHED, W_PEND, W_DONE} wstate_e;

  localparam int unsigned QW = $clog2(NWARP);

  wstate_e     st      [NWARP];
  logic        stalled [NWARP];
  logic [31:0] inst    [NWARP];

  // ------------------------------------------------- prefetching queue (deque)
  warp_id_t     pq [NWARP];
  logic [QW-1:0] ph, pt;
  logic [6:0]   pc;

  function automatic logic [QW-1:0] inc(logic [QW-1:0] v);
    return (v == QW'(NWARP - 1)) ? '0 : v + 1'b1;
  endfunction
  function automatic logic [QW-1:0] dec(logic [QW-1:0] v);
    return (v == '0) ? QW'(NWARP - 1) : v - 1'b1;
  endfunction

  assign pq_head_valid = (pc != 0);
  assign pq_head_warp  = pq[ph];
  assign pq_count      = pc;

  logic push_back, push_front;
  logic [QW-1:0] h_new;   // head after this clock's pop and push_front
  always_comb begin
    h_new = pq_pop ? inc(ph) : ph;
    if (push_front) h_new = dec(h_new);
  end
  assign push_back  = launch_valid && launch_needs_spm;
  assign push_front = bundle_done_valid && bundle_next_spm;

  // ------------------------------------------------------------ active limit
  logic [6:0] limit;
  logic       limited;
  assign limited = wopt_valid;
  assign limit   = 7'(wopt);

  always_comb begin
    active_cnt = '0;
    for (int w = 0; w < int'(NWARP); w++)
      if (st[w] == W_SCHED) active_cnt = active_cnt + 1'b1;
  end

  // A warp becoming ready goes to schedulable if there is room.
  logic room;
  assign room = !limited || (active_cnt < limit);

  // ---------------------------------------------------------- inner level
  logic     last_valid;
  warp_id_t last_warp;
  logic     elig [NWARP];

  always_comb begin
    for (int w = 0; w < int'(NWARP); w++)
      elig[w] = (st[w] == W_SCHED) && !stalled[w];
    issue_valid = 1'b0;
    issue_warp  = '0;
    if (gto) begin
      if (last_valid && elig[last_warp]) begin
        issue_valid = 1'b1;
        issue_warp  = last_warp;
      end else begin
        for (int w = int'(NWARP) - 1; w >= 0; w--)
          if (elig[w]) begin
            issue_valid = 1'b1;
            issue_warp  = WARP_W'(w);
          end
      end
    end else begin
      for (int k = int'(NWARP); k >= 1; k--)
        if (elig[(int'(last_warp) + k) % int'(NWARP)]) begin
          issue_valid = 1'b1;
          issue_warp  = WARP_W'((int'(last_warp) + k) % int'(NWARP));
        end
    end
  end

  // demotion / promotion candidates
  logic     dem_v, pro_v;
  warp_id_t dem_w, pro_w;
  always_comb begin
    dem_v = 1'b0; dem_w = '0;
    pro_v = 1'b0; pro_w = '0;
    for (int w = 0; w < int'(NWARP); w++)
      if (st[w] == W_SCHED) begin dem_v = 1'b1; dem_w = WARP_W'(w); end
    for (int w = int'(NWARP) - 1; w >= 0; w--)
      if (st[w] == W_PEND && !stalled[w]) begin pro_v = 1'b1; pro_w = WARP_W'(w); end
    dem_v = dem_v && limited && (active_cnt > limit);
    pro_v = pro_v && room;
  end

  // --------------------------------------------------------- W_Opt computation
  typedef enum logic [1:0] {L_RUN, L_SUM, L_DIV, L_SET} lstate_e;
  lstate_e     ls;
  logic [QW-1:0] sidx;
  logic [37:0] isum;
  logic [31:0] imax;
  logic [37:0] q_c;
  assign q_c = (imax == 0) ? 38'd1 : isum / 38'(imax);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < int'(NWARP); w++) begin
        st[w]      <= W_FREE;
        stalled[w] <= 1'b0;
        inst[w]    <= '0;
        pq[w]      <= '0;
      end
      ph <= '0; pt <= '0; pc <= '0;
      last_valid <= 1'b0; last_warp <= '0;
      ls <= L_RUN; sidx <= '0; isum <= '0; imax <= '0;
      wopt_valid <= 1'b0; wopt <= '0;
      cnt_demote <= '0; cnt_promote <= '0;
    end else begin
      // ---- prefetching queue
      begin
        if (push_front) pq[h_new] <= bundle_done_warp;
        if (push_back) begin
          pq[pt] <= launch_warp;
          pt <= inc(pt);
        end
        ph <= h_new;
        pc <= pc + 7'(push_front) + 7'(push_back) - 7'(pq_pop);
      end
      if (pq_pop) st[pq_head_warp] <= W_FETCH;

      // ---- issue bookkeeping
      if (issue_valid) begin
        last_valid <= 1'b1;
        last_warp  <= issue_warp;
        inst[issue_warp] <= inst[issue_warp] + 1;
      end

      // ---- promotion / demotion (lowest priority: overwritten below)
      if (dem_v) begin
        st[dem_w]  <= W_PEND;
        cnt_demote <= cnt_demote + 1;
      end else if (pro_v) begin
        st[pro_w]   <= W_SCHED;
        cnt_promote <= cnt_promote + 1;
      end

      // ---- events
      if (launch_valid) begin
        inst[launch_warp]    <= '0;
        stalled[launch_warp] <= 1'b0;
        st[launch_warp] <= launch_needs_spm ? W_PREF : (room ? W_SCHED : W_PEND);
      end
      if (pref_done_valid)
        st[pref_done_warp] <= (room && !(pro_v && !dem_v)) ? W_SCHED : W_PEND;
      if (bundle_done_valid && bundle_next_spm)
        st[bundle_done_warp] <= W_PREF;
      if (stall_valid) begin
        stalled[stall_warp] <= 1'b1;
        if (st[stall_warp] == W_SCHED) st[stall_warp] <= W_PEND;
      end
      if (unstall_valid) stalled[unstall_warp] <= 1'b0;
      if (finish_valid) st[finish_warp] <= W_DONE;

      // ---- lazy limit
      unique case (ls)
        L_RUN: if (finish_valid && lazy && !wopt_valid) begin
          imax <= inst[finish_warp];
          isum <= '0;
          sidx <= '0;
          ls   <= L_SUM;
        end
        L_SUM: begin
          if (st[sidx] != W_FREE) isum <= isum + 38'(inst[sidx]);
          sidx <= inc(sidx);
          if (sidx == QW'(NWARP - 1)) ls <= L_DIV;
        end
        L_DIV: ls <= L_SET;
        L_SET: begin
          wopt_valid <= 1'b1;
          wopt       <= (q_c == 0) ? 6'd1 : (q_c > 63) ? 6'd63 : 6'(q_c);
          ls         <= L_RUN;
        end
        default: ls <= L_RUN;
      endcase
    end
  end

  // A warp never sits in the prefetching queue twice.
  a_pq_bound: assert property (@(posedge clk) disable iff (!rst_n) pc <= 7'(NWARP));

endmodule
