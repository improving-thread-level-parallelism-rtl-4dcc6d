// tb_ltlws: directed run of the warp pool and lazy two-level scheduler with
// eight warps. Checked:
//   A  launch: warps 0-3 become schedulable, warps 4-7 (scratchpad registers)
//      join the prefetching queue in order; loose round robin rotates 0..3;
//   B  a pop and a completed prefetch make warp 4 schedulable;
//   C  a completed bundle whose successor needs scratchpad registers goes to
//      the front of the prefetching queue and stops issuing;
//   D  a stalled warp is not issued and returns after unstall;
//   E  greedy-then-oldest keeps issuing one warp, then falls to the oldest;
//   F  when the first warp finishes, W_Opt = floor(sum Inst_i / Inst_Max)
//      (Eq. 14) is computed from the per-warp issue counts, and the number of
//      schedulable warps then follows W_Opt: by promotion after a stall (F),
//      by demotion of excess schedulable warps (G, after a reset).
module tb_ltlws;
  import expars_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic gto = 0, lazy = 1;
  logic launch_valid = 0; warp_id_t launch_warp = '0; logic launch_needs_spm = 0;
  logic pq_head_valid; warp_id_t pq_head_warp; logic pq_pop = 0;
  logic pref_done_valid = 0; warp_id_t pref_done_warp = '0;
  logic bundle_done_valid = 0; warp_id_t bundle_done_warp = '0; logic bundle_next_spm = 0;
  logic stall_valid = 0; warp_id_t stall_warp = '0;
  logic unstall_valid = 0; warp_id_t unstall_warp = '0;
  logic finish_valid = 0; warp_id_t finish_warp = '0;
  logic issue_valid; warp_id_t issue_warp;
  logic wopt_valid; logic [5:0] wopt; logic [6:0] active_cnt, pq_count;
  logic [31:0] cnt_demote, cnt_promote;

  ltlws dut (.clk, .rst_n, .gto, .lazy, .launch_valid, .launch_warp, .launch_needs_spm,
    .pq_head_valid, .pq_head_warp, .pq_pop, .pref_done_valid, .pref_done_warp,
    .bundle_done_valid, .bundle_done_warp, .bundle_next_spm, .stall_valid, .stall_warp,
    .unstall_valid, .unstall_warp, .finish_valid, .finish_warp, .issue_valid, .issue_warp,
    .wopt_valid, .wopt, .active_cnt, .pq_count, .cnt_demote, .cnt_promote);

  int checks = 0, failures = 0;
  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int icount [48];
  always @(posedge clk) if (rst_n && issue_valid) icount[issue_warp]++;

  // issue trace of the next n cycles
  int trace [$];
  task automatic record(int n);
    trace.delete();
    repeat (n) begin
      @(negedge clk);
      trace.push_back(issue_valid ? int'(issue_warp) : -1);
    end
  endtask
  function automatic int seen(int w);
    foreach (trace[i]) if (trace[i] == w) return 1;
    return 0;
  endfunction

  task automatic pulse_stall(int w, bit un);
    @(negedge clk);
    if (un) begin unstall_valid = 1; unstall_warp = 6'(w); end
    else    begin stall_valid = 1; stall_warp = 6'(w); end
    @(negedge clk);
    stall_valid = 0; unstall_valid = 0;
  endtask

  initial begin
    int sum, exp_wopt, g;
    foreach (icount[i]) icount[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- A
    for (int w = 0; w < 8; w++) begin
      @(negedge clk);
      launch_valid = 1; launch_warp = 6'(w); launch_needs_spm = (w >= 4);
    end
    @(negedge clk);
    launch_valid = 0;
    check("A pq_count", int'(pq_count), int'(4));
    check("A pq head", int'(pq_head_warp), int'(4));
    record(12);
    for (int i = 0; i < 12; i++) check("A issue in 0..3", int'(trace[i] >= 0 && trace[i] < 4), 1);
    for (int i = 1; i < 12; i++) check("A round robin", trace[i], (trace[i-1] + 1) % 4);
    // ---- B
    @(negedge clk); pq_pop = 1;
    @(negedge clk); pq_pop = 0;
    check("B next head", int'(pq_head_warp), int'(5));
    check("B pq_count", int'(pq_count), int'(3));
    pref_done_valid = 1; pref_done_warp = 6'd4;
    @(negedge clk); pref_done_valid = 0;
    record(10);
    check("B warp 4 issued", seen(4), 1);
    check("B warp 5 not issued", seen(5), 0);
    // ---- C
    @(negedge clk);
    bundle_done_valid = 1; bundle_done_warp = 6'd0; bundle_next_spm = 1;
    @(negedge clk);
    bundle_done_valid = 0;
    check("C head is warp 0", int'(pq_head_warp), int'(0));
    check("C pq_count", int'(pq_count), int'(4));
    record(10);
    check("C warp 0 not issued", seen(0), 0);
    // ---- D
    pulse_stall(1, 0);
    record(10);
    check("D stalled warp 1 not issued", seen(1), 0);
    pulse_stall(1, 1);
    record(10);
    check("D warp 1 back", seen(1), 1);
    // ---- E
    gto = 1;
    record(12);
    g = trace[0];
    for (int i = 0; i < 12; i++) check("E greedy", trace[i], g);
    pulse_stall(g, 0);
    record(4);
    // oldest eligible: lowest id among 1,2,3,4 without g
    check("E oldest", trace[3], (g == 1) ? 2 : 1);
    pulse_stall(g, 1);
    // ---- F: freeze issue, finish the greedy warp, check Eq. (14)
    record(30);
    g = trace[29];
    for (int w = 0; w < 8; w++) pulse_stall(w, 0);
    @(negedge clk);
    sum = 0;
    for (int w = 0; w < 8; w++) sum += icount[w];
    exp_wopt = sum / icount[g];
    $display("F: finishing warp %0d with %0d of %0d issued instructions", g, icount[g], sum);
    finish_valid = 1; finish_warp = 6'(g);
    @(negedge clk);
    finish_valid = 0;
    repeat (60) @(negedge clk);
    check("F wopt valid", int'(wopt_valid), int'(1));
    check("F wopt", int'(wopt), int'(exp_wopt));
    for (int w = 0; w < 8; w++) if (w != g) pulse_stall(w, 1);
    repeat (20) @(negedge clk);
    check("F active limited", int'(active_cnt), int'(wopt));
    check("F promotions", int'(cnt_promote > 0), 1);
    $display("F: wopt=%0d active=%0d promotions=%0d", wopt, active_cnt, cnt_promote);
    // ---- G: fresh start, eight schedulable warps keep issuing while the limit
    // is computed, so the sum lies between its values at finish and at the end
    @(negedge clk); rst_n = 0; gto = 1;
    foreach (icount[i]) icount[i] = 0;
    @(negedge clk); rst_n = 1;
    for (int w = 0; w < 8; w++) begin
      @(negedge clk);
      launch_valid = 1; launch_warp = 6'(w); launch_needs_spm = 0;
    end
    @(negedge clk); launch_valid = 0;
    repeat (40) @(negedge clk);
    pulse_stall(0, 0);          // greedy warp 0 waits, warp 1 takes over
    repeat (20) @(negedge clk);
    pulse_stall(0, 1);
    repeat (5) @(negedge clk);
    check("G all schedulable", int'(active_cnt), 8);
    sum = 0;
    for (int w = 0; w < 8; w++) sum += icount[w];
    g = 1;
    exp_wopt = sum / icount[g];
    finish_valid = 1; finish_warp = 6'(g);
    @(negedge clk); finish_valid = 0;
    while (!wopt_valid) @(negedge clk);
    sum = 0;
    for (int w = 0; w < 8; w++) sum += icount[w];
    check("G wopt >= floor(sum at finish / Inst_Max)", int'(wopt >= 6'(exp_wopt)), 1);
    check("G wopt <= floor(sum at end / Inst_Max)", int'(int'(wopt) <= sum / icount[g]), 1);
    repeat (12) @(negedge clk);
    check("G active limited", int'(active_cnt), int'(wopt));
    check("G demotions", int'(cnt_demote), 7 - int'(wopt));
    $display("G: wopt=%0d active=%0d demotions=%0d", wopt, active_cnt, cnt_demote);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
