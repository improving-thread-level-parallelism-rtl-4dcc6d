// tb_expars_sm: end-to-end run of the EXPARS SM at its default (Fermi) size.
//
// The kernel is shaped like MQ: 8 warps per CTA, 28 registers per thread, no
// scratchpad of its own. The SM must decide 6 CTAs (4 in the register file,
// 2 mix CTAs keeping registers 0..7 in the RF and 8..27 in scratchpad) and
// load the RAT: Start_CTA 4, Start_Reg 8, Max_Reg 27, SBRs 28672 and 8192.
// All 48 warps are then launched and run a small program; the testbench plays
// the rest of the pipeline:
//   * before a launch and before each bundle_done it hands over the PREF
//     vector of the warp's next bundle. RF-CTA warps use registers {1,2}; a
//     mix warp w uses {1, 8+k, 16+k} with k = w mod 8, so two mix warps share
//     each pair of operand-cache lines;
//   * every issued instruction is counted; the last one of a bundle stalls the
//     warp, and a serial executor then reads the bundle's operands through the
//     read ports, checks them against a register model, writes results back
//     (register 2, or registers 1 and 16+k), sends the next PREF, bundle_done,
//     and unstalls the warp (or finishes it after its last bundle);
//   * warp 0 runs one bundle of 40 instructions and finishes first, so the
//     lazy limit W_Opt = floor(sum Inst_i / Inst_Max) comes out small and
//     schedulable warps are demoted; the others run 3 bundles of 4;
//   * ordinary 32-bit scratchpad traffic runs throughout in the unused bottom
//     8KB and is checked against a word model.
// Checked throughout: a mix warp is only issued with all its scratchpad
// registers valid and pinned in the operand cache; operands come from the OC
// exactly when the register is in scratchpad; returned data match the model
// wherever the register was written before (so a value written into the OC,
// written back to scratchpad on eviction and fetched again must survive);
// write-backs of scratchpad registers hit the OC. At the end each register
// line no longer held by the OC is read through the word port at the address
// of Eq. (13), computed here independently, and compared. Each mechanism
// (fill, hit, dirty write-back, wait for pinned lines, OC and RF operand reads,
// OC and RF write-backs, word accesses held off by line traffic, demotion,
// promotion, W_Opt) is counted and must have happened at least once.
module tb_expars_sm;
  import expars_pkg::*;

  localparam int NW = 48;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cfg_start = 0;
  logic [6:0]  regs_per_thread = 7'd28;
  logic [5:0]  warps_per_cta = 6'd8;
  logic [16:0] spm_per_cta = '0;
  logic        sched_gto = 1, sched_lazy = 1;
  logic        cfg_busy, cfg_done;
  logic [3:0]  cta_lower, cta_total, cta_rf, cta_mix;
  rat_cfg_t    rat_cfg;
  spm_addr_t   spm_base [MAX_CTAS];
  logic        alloc_overlap;
  logic        pref_valid = 0; warp_id_t pref_warp = '0; logic [NUM_ARCH_REGS-1:0] pref_vec = '0;
  logic        launch_valid = 0; warp_id_t launch_warp = '0;
  logic        bundle_done_valid = 0; warp_id_t bundle_done_warp = '0;
  logic        stall_valid = 0; warp_id_t stall_warp = '0;
  logic        unstall_valid = 0; warp_id_t unstall_warp = '0;
  logic        finish_valid = 0; warp_id_t finish_warp = '0;
  logic        issue_valid; warp_id_t issue_warp;
  logic        rd_valid [4];
  reg_req_t    rd_req   [4];
  logic [3:0]  rd_tag   [4];
  logic        rd_ready [4];
  logic        rd_resp_valid [4], rd_resp_from_oc [4];
  logic [3:0]  rd_resp_tag [4];
  line_t       rd_resp_data [4];
  logic        wb_valid = 0; warp_id_t wb_warp = '0; reg_idx_t wb_reg = '0; line_t wb_data = '0;
  logic        wb_to_oc, wb_oc_miss;
  logic        spm_valid = 0, spm_we = 0; spm_addr_t spm_addr = '0; logic [31:0] spm_wdata = '0;
  logic        spm_ready, spm_rvalid; logic [31:0] spm_rdata;
  logic        wopt_valid; logic [5:0] wopt; logic [6:0] active_cnt, pq_count;
  logic [31:0] cnt_fill, cnt_hit, cnt_writeback, cnt_wait, cnt_demote, cnt_promote;
  logic        pref_conflict;

  expars_sm dut (.*);

  int checks = 0, failures = 0;
  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------ program
  function automatic bit is_mix(int w);
    return w >= 32;
  endfunction
  function automatic bit in_spm_m(int w, int r);
    return is_mix(w) && r >= 8;
  endfunction
  function automatic logic [NUM_ARCH_REGS-1:0] bundle_vec(int w);
    logic [NUM_ARCH_REGS-1:0] v;
    v = '0;
    v[1] = 1'b1;
    if (is_mix(w)) begin
      v[8 + w % 8]  = 1'b1;
      v[16 + w % 8] = 1'b1;
    end else begin
      v[2] = 1'b1;
    end
    return v;
  endfunction
  function automatic int blen(int w);
    return (w == 0) ? 40 : 4;
  endfunction
  function automatic int nbundles(int w);
    return (w == 0) ? 1 : 3;
  endfunction
  // Eq. (11) and (13), MQ numbers: S = 48KB, Max_Reg-Start_Reg+1 = 20.
  function automatic int spm_addr_of(int w, int r);
    int cta, sbr;
    cta = w / 8;
    sbr = 49152 - (cta - 4 + 1) * 20 * 8 * 128;
    return sbr + 20 * (w % 8) * 128 + (r - 8) * 128;
  endfunction

  // register model: value known once written
  line_t model [NW][64];
  bit    known [NW][64];

  // ------------------------------------------------------------ counters
  int n_issue [NW];
  int n_in_bundle [NW];
  int n_bundle [NW];
  bit finished [NW];
  int n_oc_reads = 0, n_rf_reads = 0, n_data_checked = 0, n_oc_wb = 0, n_rf_wb = 0;
  int n_spm_blocked = 0, n_spm_checked = 0, n_pinned_checks = 0, n_finished = 0;
  int sum_at_finish = -1, sum_at_wopt = -1, imax = 0;

  // executor
  int   xq [$];
  typedef enum {X_IDLE, X_RD, X_WAIT, X_WB, X_PREF, X_BD, X_END} xs_e;
  xs_e  xs = X_IDLE;
  int   xw;
  logic [NUM_ARCH_REGS-1:0] xv;
  int   xregs [$];   // reads still to be sent
  int   xdst [$];    // results still to be written
  int   outstanding = 0;
  int   tag_w [16], tag_r [16];
  int   next_tag = 0;

  // background word traffic in bytes 0..8191 (not used by register regions)
  logic [31:0] wmodel [2048];
  bit          wknown [2048];
  bit          wbusy = 0, wpend_rd = 0;
  int          wexp_idx = 0;
  bit          wpend_rd_next = 0;
  int          wexp_idx_q = 0, wexp_idx_q_next = 0;

  bit run = 0;

  always @(negedge clk) begin
    if (run) begin
      pref_valid = 0; launch_valid = 0; bundle_done_valid = 0;
      stall_valid = 0; unstall_valid = 0; finish_valid = 0; wb_valid = 0;
      for (int p = 0; p < 4; p++) rd_valid[p] = 0;

      // ---- operand responses
      for (int b = 0; b < 4; b++)
        if (rd_resp_valid[b]) begin
          int t, w, r;
          t = int'(rd_resp_tag[b]);
          w = tag_w[t];
          r = tag_r[t];
          check("operand source", int'(rd_resp_from_oc[b]), int'(in_spm_m(w, r)));
          if (rd_resp_from_oc[b]) n_oc_reads++; else n_rf_reads++;
          if (known[w][r]) begin
            checks++;
            n_data_checked++;
            if (rd_resp_data[b] !== model[w][r]) begin
              failures++;
              if (failures < 20) $display("FAIL data warp %0d reg %0d", w, r);
            end
          end
          outstanding--;
        end

      // ---- issue
      if (issue_valid) begin
        int w;
        logic [NUM_ARCH_REGS-1:0] v;
        w = int'(issue_warp);
        v = bundle_vec(w);
        n_issue[w]++;
        n_in_bundle[w]++;
        check("issued warp alive", int'(!finished[w]), 1);
        for (int r = 8; r < 28; r++)
          if (v[r] && in_spm_m(w, r)) begin
            int b, s;
            b = r % 4; s = (r / 4) % 4;
            n_pinned_checks++;
            check("issued with operand in OC",
                  int'(dut.oc_tv[b][s] && dut.oc_tw[b][s] == 6'(w)
                       && dut.oc_tp[b][s] == 2'(r / 16) && dut.oc_tpin[b][s]), 1);
          end
        if (n_in_bundle[w] == blen(w)) begin
          stall_valid = 1;
          stall_warp = 6'(w);
          n_in_bundle[w] = 0;
          xq.push_back(w);
        end
        check("no issue past bundle", int'(n_in_bundle[w] <= blen(w)), 1);
      end

      // ---- serial executor
      unique case (xs)
        X_IDLE: if (xq.size() > 0) begin
          xw = xq.pop_front();
          xregs.delete();
          xdst.delete();
          xv = bundle_vec(xw);
          for (int r = 0; r < 63; r++) if (xv[r]) xregs.push_back(r);
          if (is_mix(xw)) begin xdst.push_back(1); xdst.push_back(16 + xw % 8); end
          else xdst.push_back(2);
          xs = X_RD;
        end
        X_RD: begin
          // one register per port, held until accepted
          for (int p = 0; p < 4 && p < xregs.size(); p++) begin
            rd_valid[p] = 1;
            rd_req[p]   = '{warp: 6'(xw), rnum: 6'(xregs[p])};
            rd_tag[p]   = 4'((next_tag + p) % 16);
          end
        end
        X_WB: begin
          int r;
          r = xdst.pop_front();
          wb_valid = 1;
          wb_warp  = 6'(xw);
          wb_reg   = 6'(r);
          for (int i = 0; i < 32; i++) wb_data[i*32 +: 32] = $urandom;
          model[xw][r] = wb_data;
          known[xw][r] = 1;
        end
        X_PREF: begin
          n_bundle[xw]++;
          pref_valid = 1;
          pref_warp  = 6'(xw);
          pref_vec   = (n_bundle[xw] == nbundles(xw)) ? '0 : bundle_vec(xw);
          xs = X_BD;
        end
        X_BD: begin
          bundle_done_valid = 1;
          bundle_done_warp  = 6'(xw);
          xs = X_END;
        end
        X_END: begin
          if (n_bundle[xw] == nbundles(xw)) begin
            finish_valid = 1;
            finish_warp  = 6'(xw);
            finished[xw] = 1;
            n_finished++;
            if (n_finished == 1) begin
              sum_at_finish = 0;
              foreach (n_issue[i]) sum_at_finish += n_issue[i];
              imax = n_issue[xw];
            end
          end else begin
            unstall_valid = 1;
            unstall_warp  = 6'(xw);
          end
          xs = X_IDLE;
        end
        default: ;
      endcase

      // ---- word traffic
      if (!wbusy && ($urandom % 2 == 0)) begin
        wbusy    = 1;
        wexp_idx = int'($urandom % 2048);
        spm_we   = ($urandom % 2 == 0) || !wknown[wexp_idx];
        spm_addr = SBR_W'(wexp_idx * 4);
        spm_wdata = $urandom;
      end
      spm_valid = wbusy;

      #1;
      // ---- handshakes that happen at the coming edge
      if (xs == X_RD && rd_valid[0]) begin
        int left [$];
        left.delete();
        for (int p = 0; p < 4 && p < xregs.size(); p++)
          if (rd_valid[p] && rd_ready[p]) begin
            tag_w[int'(rd_tag[p])] = xw;
            tag_r[int'(rd_tag[p])] = int'(rd_req[p].rnum);
            outstanding++;
          end else begin
            left.push_back(xregs[p]);
          end
        for (int i = 4; i < xregs.size(); i++) left.push_back(xregs[i]);
        xregs = left;
        next_tag = (next_tag + 4) % 16;
        if (xregs.size() == 0) xs = X_WAIT;
      end else if (xs == X_WAIT) begin
        if (outstanding == 0) xs = X_WB;
      end else if (xs == X_WB) begin
        check("write-back destination", int'(wb_to_oc), int'(in_spm_m(xw, int'(wb_reg))));
        check("write-back hits OC", int'(wb_oc_miss), 0);
        if (wb_to_oc) n_oc_wb++; else n_rf_wb++;
        if (xdst.size() == 0) xs = X_PREF;
      end
      if (wpend_rd) begin
        check("word read valid", int'(spm_rvalid), 1);
        checks++;
        n_spm_checked++;
        if (spm_rdata !== wmodel[wexp_idx_q]) begin
          failures++;
          $display("FAIL word read at %0d", wexp_idx_q * 4);
        end
        wpend_rd = 0;
      end
      if (spm_valid) begin
        if (!spm_ready) n_spm_blocked++;
        else begin
          if (spm_we) begin
            wmodel[wexp_idx] = spm_wdata;
            wknown[wexp_idx] = 1;
          end else begin
            wpend_rd_next = 1;
            wexp_idx_q_next = wexp_idx;
          end
          wbusy = 0;
        end
      end
    end
  end

  // a read accepted at this edge returns at the next one
  always @(posedge clk) begin
    wpend_rd        <= wpend_rd_next;
    wexp_idx_q      <= wexp_idx_q_next;
    wpend_rd_next   <= 0;
  end

  always @(posedge clk)
    if (run && wopt_valid && sum_at_wopt < 0) begin
      sum_at_wopt = 0;
      foreach (n_issue[i]) sum_at_wopt += n_issue[i];
    end

  initial begin
    int w;
    foreach (known[i, j]) known[i][j] = 0;
    foreach (wknown[i]) wknown[i] = 0;
    foreach (n_issue[i]) begin
      n_issue[i] = 0; n_in_bundle[i] = 0; n_bundle[i] = 0; finished[i] = 0;
    end
    for (int p = 0; p < 4; p++) begin
      rd_valid[p] = 0; rd_req[p] = '0; rd_tag[p] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- allocation
    @(negedge clk); cfg_start = 1;
    @(negedge clk); cfg_start = 0;
    while (!cfg_done) @(negedge clk);
    check("baseline CTAs", int'(cta_lower), int'(4));
    check("CTAs", int'(cta_total), int'(6));
    check("CTA_RF", int'(cta_rf), int'(4));
    check("CTA_Mix", int'(cta_mix), int'(2));
    check("overlap", int'(alloc_overlap), int'(0));
    @(negedge clk);
    check("Start_CTA", int'(rat_cfg.start_cta), int'(4));
    check("Start_Reg", int'(rat_cfg.start_reg), int'(8));
    check("Max_Reg", int'(rat_cfg.max_reg), int'(27));
    check("Warps_Per_CTA", int'(rat_cfg.warps_per_cta), int'(8));
    check("SBR 4", int'(dut.u_rat.sbr_tab[0]), int'(28672));
    check("SBR 5", int'(dut.u_rat.sbr_tab[1]), int'(8192));

    // ---- PREF of every warp's first bundle, then launch of 6 CTAs
    for (w = 0; w < NW; w++) begin
      pref_valid = 1; pref_warp = 6'(w); pref_vec = bundle_vec(w);
      @(negedge clk);
    end
    pref_valid = 0;
    for (w = 0; w < NW; w++) begin
      launch_valid = 1; launch_warp = 6'(w);
      @(negedge clk);
      if (w == 31) check("no prefetch for RF CTAs", int'(pq_count), int'(0));
    end
    launch_valid = 0;
    run = 1;

    while (n_finished < NW) @(negedge clk);
    run = 0;
    @(negedge clk);
    pref_valid = 0; bundle_done_valid = 0; finish_valid = 0; stall_valid = 0;
    unstall_valid = 0; wb_valid = 0; spm_valid = 0;
    for (int p = 0; p < 4; p++) rd_valid[p] = 0;
    repeat (3) @(negedge clk);

    // ---- program and scheduler results
    for (w = 0; w < NW; w++) check("instructions per warp", n_issue[w], blen(w) * nbundles(w));
    check("W_Opt computed", int'(wopt_valid), int'(1));
    checks++;
    if (!(int'(wopt) >= sum_at_finish / imax && int'(wopt) <= sum_at_wopt / imax)) begin
      failures++;
      $display("FAIL W_Opt %0d outside [%0d, %0d]", wopt, sum_at_finish / imax,
               sum_at_wopt / imax);
    end
    check("no conflict", int'(pref_conflict), int'(0));
    check("prefetching queue empty", int'(pq_count), int'(0));

    // ---- register lines in scratchpad at the Eq. (13) address
    for (w = 32; w < NW; w++) begin
      int r, b, s, a;
      r = 16 + w % 8;
      b = r % 4; s = (r / 4) % 4;
      if (dut.oc_tv[b][s] && dut.oc_tw[b][s] == 6'(w) && dut.oc_tp[b][s] == 2'(r / 16))
        continue;
      a = spm_addr_of(w, r);
      for (int k = 0; k < 32; k += 31) begin
        @(negedge clk);
        spm_valid = 1; spm_we = 0; spm_addr = SBR_W'(a + 4 * k);
        @(negedge clk);
        spm_valid = 0;
        @(negedge clk);
        checks++;
        n_spm_checked++;
        if (spm_rdata !== model[w][r][k*32 +: 32]) begin
          failures++;
          $display("FAIL scratchpad line of warp %0d reg %0d word %0d", w, r, k);
        end
      end
    end

    // ---- every mechanism happened
    check("fills", int'(cnt_fill > 0), 1);
    check("hits", int'(cnt_hit > 0), 1);
    check("dirty write-backs", int'(cnt_writeback > 0), 1);
    check("waits for pinned lines", int'(cnt_wait > 0), 1);
    check("demotions", int'(cnt_demote > 0), 1);
    check("promotions", int'(cnt_promote > 0), 1);
    check("OC operand reads", int'(n_oc_reads > 0), 1);
    check("RF operand reads", int'(n_rf_reads > 0), 1);
    check("operands compared", int'(n_data_checked > 0), 1);
    check("OC write-backs", int'(n_oc_wb > 0), 1);
    check("RF write-backs", int'(n_rf_wb > 0), 1);
    check("word accesses held off", int'(n_spm_blocked > 0), 1);
    check("word reads compared", int'(n_spm_checked > 0), 1);
    check("issue-time OC checks", int'(n_pinned_checks > 0), 1);
    $display("CTAs %0d (RF %0d, mix %0d, baseline %0d); W_Opt %0d", cta_total, cta_rf,
             cta_mix, cta_lower, wopt);
    $display("fills %0d hits %0d write-backs %0d waits %0d demotions %0d promotions %0d",
             cnt_fill, cnt_hit, cnt_writeback, cnt_wait, cnt_demote, cnt_promote);
    $display("operand reads OC %0d RF %0d (%0d compared); write-backs OC %0d RF %0d",
             n_oc_reads, n_rf_reads, n_data_checked, n_oc_wb, n_rf_wb);
    $display("word accesses held off %0d cycles; word/line reads compared %0d",
             n_spm_blocked, n_spm_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d warps finished", n_finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
