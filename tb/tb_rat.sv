// tb_rat: loads the allocation table with the MQ kernel's allocation (four
// register-file CTAs, two mix CTAs, 8 warps per CTA, registers 8..27 of mix
// CTAs in scratchpad) and checks every (warp, register) pair of the 48 warps
// on both lookup ports against a reference of Eqs. (12) and (13): CTA index,
// register-file/scratchpad decision, scratchpad address and register-file line.
module tb_rat;
  import expars_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      cfg_we = 0, sbr_we = 0;
  rat_cfg_t  cfg_in, cfg;
  cta_id_t   sbr_idx;
  spm_addr_t sbr_in;
  warp_id_t  lk_warp [2];
  reg_idx_t  lk_reg  [2];
  logic [WARP_W-1:0] lk_cta [2];
  logic      lk_in_spm [2];
  spm_addr_t lk_addr [2];
  logic [9:0] lk_line [2];

  rat #(.NLOOK(2)) dut (.clk, .rst_n, .cfg_we, .cfg_in, .sbr_we, .sbr_idx, .sbr_in,
    .cfg, .lk_warp, .lk_reg, .lk_cta, .lk_in_spm, .lk_spm_addr(lk_addr),
    .lk_rf_line(lk_line));

  int checks = 0, failures = 0;
  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  localparam int SC = 4, SR = 8, MR = 27, WPC = 8;
  int sbr_ref [2] = '{28672, 8192};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    cfg_in = '{start_cta: 3'(SC), start_reg: 6'(SR), max_reg: 6'(MR), warps_per_cta: 6'(WPC)};
    cfg_we = 1;
    @(negedge clk);
    cfg_we = 0;
    for (int i = 0; i < 2; i++) begin
      sbr_we = 1; sbr_idx = 3'(i); sbr_in = 16'(sbr_ref[i]);
      @(negedge clk);
    end
    sbr_we = 0;
    check("cfg start_cta", int'(cfg.start_cta), int'(SC));
    check("cfg start_reg", int'(cfg.start_reg), int'(SR));
    for (int w = 0; w < 48; w++)
      for (int r = 0; r <= MR; r++) begin
        int cta, spm, addr, line, p;
        p = (w + r) % 2;
        lk_warp[p] = 6'(w); lk_reg[p] = 6'(r);
        lk_warp[1-p] = 6'((w + 7) % 48); lk_reg[1-p] = 6'(0);
        #1;
        cta = w / WPC;
        spm = (cta >= SC && r >= SR) ? 1 : 0;
        check($sformatf("cta w%0d", w), int'(lk_cta[p]), int'(cta));
        check($sformatf("in_spm w%0d r%0d", w, r), int'(lk_in_spm[p]), int'(spm));
        if (spm != 0) begin
          addr = sbr_ref[cta - SC] + (MR - SR + 1) * (w % WPC) * 128 + (r - SR) * 128;
          check($sformatf("addr w%0d r%0d", w, r), int'(lk_addr[p]), int'(addr));
        end else begin
          line = (cta < SC) ? w * (MR + 1) + r
                            : SC * WPC * (MR + 1) + (w - SC * WPC) * SR + r;
          check($sformatf("line w%0d r%0d", w, r), int'(lk_line[p]), int'(line));
        end
      end
    // the two mix CTAs' register regions are disjoint and inside the scratchpad
    lk_warp[0] = 6'(32); lk_reg[0] = 6'(SR);
    lk_warp[1] = 6'(47); lk_reg[1] = 6'(MR);
    #1;
    check("first spm address", int'(lk_addr[0]), int'(28672));
    check("last spm address", int'(lk_addr[1]), int'(8192 + 20480 - 128));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
