// tb_resource_allocator: loads the allocation of three kernels (MQ, LBM and
// SGE of the evaluation set) and one impossible request, and checks the RAT
// writes: Start_CTA, Start_Reg by Eq. (10), Max_Reg, Warps_Per_CTA, each SBR by
// Eq. (11), the bottom-up scratchpad bases, the overlap flag and the number of
// cycles (one SBR write per clock).
module tb_resource_allocator;
  import expars_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0;
  logic [3:0]  nrf, nmix;
  logic [6:0]  rpt;
  logic [5:0]  wpc;
  logic [16:0] spc;
  logic        cfg_we, sbr_we, done, overlap;
  rat_cfg_t    cfg;
  cta_id_t     sidx;
  spm_addr_t   sbr;
  spm_addr_t   base [MAX_CTAS];

  resource_allocator dut (.clk, .rst_n, .start, .cta_rf(nrf), .cta_mix(nmix),
    .regs_per_thread(rpt), .warps_per_cta(wpc), .spm_per_cta(spc),
    .cfg_we, .cfg_out(cfg), .sbr_we, .sbr_idx(sidx), .sbr_out(sbr),
    .spm_base(base), .done, .overlap);

  int checks = 0, failures = 0;
  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  rat_cfg_t  got_cfg;
  int        got_sbr [8];
  int        nsbr, ncfg;
  always @(posedge clk) begin
    if (cfg_we) begin got_cfg <= cfg; ncfg <= ncfg + 1; end
    if (sbr_we) begin got_sbr[sidx] <= int'(sbr); nsbr <= nsbr + 1; end
  end

  task automatic run(int f, int m, int r, int w, int s, output int cyc);
    @(negedge clk);
    nrf = 4'(f); nmix = 4'(m); rpt = 7'(r); wpc = 6'(w); spc = 17'(s);
    nsbr = 0; ncfg = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  // independent reference of Eqs. (10) and (11)
  task automatic expect_alloc(string n, int f, int m, int r, int w, int s);
    int cyc, sreg, nsp;
    run(f, m, r, w, s, cyc);
    sreg = ((32768 - f * r * w * 32) / m) / (w * 32);
    nsp  = r - sreg;
    check({n, " start_cta"}, int'(got_cfg.start_cta), int'(f));
    check({n, " start_reg"}, int'(got_cfg.start_reg), int'(sreg));
    check({n, " max_reg"}, int'(got_cfg.max_reg), int'(r - 1));
    check({n, " wpc"}, int'(got_cfg.warps_per_cta), int'(w));
    check({n, " cfg writes"}, ncfg, 1);
    check({n, " sbr writes"}, nsbr, m);
    for (int i = 0; i < m; i++)
      check($sformatf("%s sbr%0d", n, i), got_sbr[i], 49152 - (i + 1) * nsp * w * 128);
    for (int c = 0; c < 8; c++)
      check($sformatf("%s base%0d", n, c), int'(base[c]), int'(c * s));
    check({n, " cycles"}, cyc, m + 2);
    check({n, " no overlap"}, int'(overlap), int'(0));
  endtask

  initial begin
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    expect_alloc("MQ", 4, 2, 28, 8, 0);
    check("MQ sbr0 value", got_sbr[0], 28672);
    check("MQ sbr1 value", got_sbr[1], 8192);
    expect_alloc("LBM", 6, 2, 36, 4, 0);
    check("LBM start_reg value", int'(got_cfg.start_reg), int'(20));
    expect_alloc("SGE", 5, 2, 44, 4, 512);
    // no mix CTA: everything in the register file
    run(3, 0, 30, 8, 1024, cyc);
    check("nomix start_reg", int'(got_cfg.start_reg), int'(30));
    check("nomix sbr writes", nsbr, 0);
    // a request the scratchpad cannot hold is flagged
    run(0, 8, 63, 6, 0, cyc);
    check("overlap flagged", int'(overlap), int'(1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
