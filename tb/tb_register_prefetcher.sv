// tb_register_prefetcher: the prefetcher with the allocation table, operand
// cache and scratchpad it works with; the testbench plays the warp pool
// (prefetching queue) and the pipeline (result writes, bundle completion).
// Allocation: four register-file CTAs and two mix CTAs of 8 warps, registers
// 8..27 of mix-CTA warps (warps 32..47) in scratchpad. The scratchpad is
// first filled with a known pattern. Checked:
//   * needs_spm: only mix-CTA warps whose PREF vector names a register >= 8,
//   * fetch of a bundle's scratchpad registers into the right OC lines with
//     the right data, tags and pins, and the cycles it takes,
//   * waiting while a needed line is pinned by another warp's live bundle,
//     then evicting it once that bundle completes,
//   * write-back of a dirty victim to its own scratchpad address,
//   * a hit on a line still present from an earlier bundle (no refetch),
//   * a bundle whose registers collide in one line raises conflict.
module tb_register_prefetcher;
  import expars_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  rat_cfg_t cfg;
  logic     cfg_we = 0, sbr_we = 0;
  rat_cfg_t cfg_in;
  cta_id_t  sbr_idx;
  spm_addr_t sbr_in;

  logic pref_valid = 0; warp_id_t pref_warp; logic [62:0] pref_vec;
  logic needs_spm [48];
  logic pq_head_valid = 0; warp_id_t pq_head_warp = '0; logic pq_pop;
  logic done_valid; warp_id_t done_warp;
  warp_id_t tw [4][4]; logic [1:0] tp [4][4]; logic tv [4][4], td [4][4], tpin [4][4];
  line_t lo [4][4];
  logic fill_en, pin_en; logic [1:0] fill_bank, fill_set, fill_pre, pin_bank, pin_set;
  warp_id_t fill_warp; line_t fill_data;
  warp_id_t lk_warp [2]; reg_idx_t lk_reg [2]; spm_addr_t lk_addr [2];
  logic ln_valid, ln_we, ln_ready, ln_rvalid; spm_addr_t ln_addr; line_t ln_wdata, ln_rdata;
  logic [31:0] c_fill, c_hit, c_wb, c_wait; logic conflict;

  logic wd_valid = 0, wd_we = 0, wd_ready, wd_rvalid; spm_addr_t wd_addr = '0;
  logic [31:0] wd_wdata = '0, wd_rdata;
  logic wr_en = 0; warp_id_t wr_warp = '0; reg_idx_t wr_reg = '0; line_t wr_data = '0; logic wr_hit;
  logic unpin_en = 0; warp_id_t unpin_warp = '0;
  logic rd_en [4]; logic [1:0] rd_set [4]; line_t rd_data [4];

  // unused lookup outputs of the table
  logic [5:0] lk_cta [2]; logic lk_in [2]; logic [9:0] lk_line [2];

  rat #(.NLOOK(2)) u_rat (.clk, .rst_n, .cfg_we, .cfg_in, .sbr_we, .sbr_idx, .sbr_in, .cfg,
    .lk_warp, .lk_reg, .lk_cta, .lk_in_spm(lk_in), .lk_spm_addr(lk_addr), .lk_rf_line(lk_line));

  operand_cache u_oc (.clk, .rst_n, .rd_en, .rd_set, .rd_data, .fill_en, .fill_bank, .fill_set,
    .fill_warp, .fill_pre, .fill_data, .pin_en, .pin_bank, .pin_set, .wr_en, .wr_warp, .wr_reg,
    .wr_data, .wr_hit, .unpin_en, .unpin_warp, .tag_warp(tw), .tag_pre(tp), .tag_valid(tv),
    .tag_dirty(td), .tag_pin(tpin), .line_o(lo));

  scratchpad u_spm (.clk, .rst_n, .ln_valid, .ln_we, .ln_addr, .ln_wdata, .ln_ready, .ln_rvalid,
    .ln_rdata, .wd_valid, .wd_we, .wd_addr, .wd_wdata, .wd_ready, .wd_rvalid, .wd_rdata);

  register_prefetcher dut (.clk, .rst_n, .cfg, .pref_valid, .pref_warp, .pref_vec, .needs_spm,
    .pq_head_valid, .pq_head_warp, .pq_pop, .done_valid, .done_warp,
    .oc_tag_warp(tw), .oc_tag_pre(tp), .oc_tag_valid(tv), .oc_tag_dirty(td), .oc_tag_pin(tpin),
    .oc_line(lo), .oc_fill_en(fill_en), .oc_fill_bank(fill_bank), .oc_fill_set(fill_set),
    .oc_fill_warp(fill_warp), .oc_fill_pre(fill_pre), .oc_fill_data(fill_data),
    .oc_pin_en(pin_en), .oc_pin_bank(pin_bank), .oc_pin_set(pin_set),
    .lk_warp, .lk_reg, .lk_addr, .ln_valid, .ln_we, .ln_addr, .ln_wdata, .ln_ready, .ln_rvalid,
    .ln_rdata, .cnt_fill(c_fill), .cnt_hit(c_hit), .cnt_writeback(c_wb), .cnt_wait(c_wait),
    .conflict);

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Eq. (13) reference for this allocation
  function automatic int addr_of(int w, int r);
    int sbr;
    sbr = (w / 8 == 4) ? 28672 : 8192;
    return sbr + 20 * (w % 8) * 128 + (r - 8) * 128;
  endfunction
  function automatic logic [31:0] pat(int byte_addr);
    return 32'(byte_addr) ^ 32'h5A00_0000;
  endfunction
  function automatic line_t line_pat(int a);
    line_t l;
    for (int k = 0; k < 32; k++) l[k*32 +: 32] = pat(a + 4 * k);
    return l;
  endfunction

  task automatic pref(int w, logic [62:0] v);
    @(negedge clk);
    pref_valid = 1; pref_warp = 6'(w); pref_vec = v;
    @(negedge clk);
    pref_valid = 0;
  endtask

  // offer warp w at the queue head until popped; returns cycles to done
  task automatic prefetch(int w, output int cyc);
    @(negedge clk);
    pq_head_valid = 1; pq_head_warp = 6'(w);
    cyc = 0;
    #1;
    while (!pq_pop) begin @(negedge clk); #1; cyc++; end
    @(negedge clk);
    pq_head_valid = 0;
    while (!done_valid) begin @(negedge clk); cyc++; end
  endtask

  task automatic expect_line(string n, int w, int r);
    int b, s;
    b = r % 4; s = (r / 4) % 4;
    check({n, " valid"}, longint'(tv[b][s]), longint'(1));
    check({n, " warp"}, longint'(tw[b][s]), longint'(w));
    check({n, " pre"}, longint'(tp[b][s]), longint'(r) / 16);
    check({n, " pinned"}, longint'(tpin[b][s]), longint'(1));
    check({n, " data"}, longint'(int'(lo[b][s] == line_pat(addr_of(w, r)))), longint'(1));
  endtask

  initial begin
    int cyc;
    for (int k = 0; k < 4; k++) begin rd_en[k] = 0; rd_set[k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    cfg_in = '{start_cta: 3'd4, start_reg: 6'd8, max_reg: 6'd27, warps_per_cta: 6'd8};
    cfg_we = 1;
    @(negedge clk);
    cfg_we = 0;
    sbr_we = 1; sbr_idx = 0; sbr_in = 16'd28672; @(negedge clk);
    sbr_idx = 1; sbr_in = 16'd8192; @(negedge clk);
    sbr_we = 0;
    // scratchpad register regions: 8192 .. 49151
    for (int a = 8192; a < 49152; a += 4) begin
      wd_valid = 1; wd_we = 1; wd_addr = 16'(a); wd_wdata = pat(a);
      @(negedge clk);
    end
    wd_valid = 0; wd_we = 0;

    // needs_spm
    pref(0, 63'b10_0011_0000_0011);      // regs 0,1,8,9,13 of an RF warp
    pref(32, 63'b10_0011_0000_0011);     // same bundle, mix warp
    pref(33, 63'b1_0000_0001);           // regs 0 and 8
    pref(36, 63'b11);                    // regs 0,1 only
    @(negedge clk);
    check("needs_spm rf warp", longint'(needs_spm[0]), longint'(0));
    check("needs_spm mix warp", longint'(needs_spm[32]), longint'(1));
    check("needs_spm mix warp low regs", longint'(needs_spm[36]), longint'(0));

    // 1. plain fetch of regs 8, 9, 13 for warp 32
    prefetch(32, cyc);
    check("done warp", longint'(done_warp), longint'(32));
    check("fills", longint'(c_fill), longint'(3));
    check("fetch cycles", longint'(cyc), longint'(3 * 3 + 2));
    expect_line("w32 r8", 32, 8);
    expect_line("w32 r9", 32, 9);
    expect_line("w32 r13", 32, 13);

    // 2. warp 33 needs reg 8 (bank 0, set 2), pinned by warp 32
    fork
      prefetch(33, cyc);
      begin
        repeat (20) @(negedge clk);
        check("waiting while pinned", longint'(pq_head_valid && !pq_pop), longint'(1));
        unpin_en = 1; unpin_warp = 6'd32; @(negedge clk); unpin_en = 0;
      end
    join
    check("wait cycles counted", longint'(int'(c_wait >= 20)), longint'(1));
    expect_line("w33 r8", 33, 8);
    check("w32 r9 still valid, unpinned", longint'(tv[1][2] && !tpin[1][2]), longint'(1));

    // 3. dirty victim: warp 33 writes r8, completes; warp 34 needs r24 (same line)
    @(negedge clk);
    wr_en = 1; wr_warp = 6'd33; wr_reg = 6'd8;
    for (int k = 0; k < 32; k++) wr_data[k*32 +: 32] = 32'hC0DE_0000 + 32'(k);
    @(negedge clk);
    wr_en = 0;
    check("dirty after write", longint'(td[0][2]), longint'(1));
    unpin_en = 1; unpin_warp = 6'd33; @(negedge clk); unpin_en = 0;
    pref(34, 63'h100_0000);               // reg 24
    prefetch(34, cyc);
    check("writebacks", longint'(c_wb), longint'(1));
    expect_line("w34 r24", 34, 24);
    check("writeback cycles", longint'(cyc), longint'(4 + 2));
    // the written value reached warp 33's r8 in scratchpad
    for (int k = 0; k < 32; k += 7) begin
      @(negedge clk);
      wd_valid = 1; wd_we = 0; wd_addr = 16'(addr_of(33, 8) + 4 * k);
      @(negedge clk);
      wd_valid = 0;
      check($sformatf("written back word %0d", k), longint'(wd_rdata), longint'(32'hC0DE_0000) + longint'(k));
    end

    // 4. hit: warp 32's r9 and r13 are still in the OC from its first bundle
    pref(32, 63'h2200);                   // regs 9, 13
    prefetch(32, cyc);
    check("hits", longint'(c_hit), longint'(2));
    check("no new fills", longint'(c_fill), longint'(5));
    check("hit cycles", longint'(cyc), longint'(2 + 2));

    // 5. conflict: regs 8 and 24 of one warp share bank 0 set 2
    pref(35, 63'h100_0100);
    @(negedge clk);
    pq_head_valid = 1; pq_head_warp = 6'd35;
    repeat (5) @(negedge clk);
    check("conflict flagged", longint'(conflict), longint'(1));
    check("conflicting warp not popped", longint'(pq_pop), longint'(0));
    pq_head_valid = 0;
    $display("fills %0d hits %0d writebacks %0d wait cycles %0d", c_fill, c_hit, c_wb, c_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
