// rat: Register Allocation Table of one SM.
//
// Holds the four allocation variables Start_CTA (3 bits), Start_Reg, Max_Reg
// and Warps_Per_CTA (6 bits each) and the eight-entry table of 16-bit
// scratchpad base registers (SBR), one per mix CTA, indexed by
// CTA_ID - Start_CTA. All of this is written by the resource allocator when a
// kernel is launched.
//
// NLOOK independent combinational lookup ports translate (Warp_ID, Reg#) into
//   cta_id   = floor(Warp_ID / Warps_Per_CTA)                           Eq. (12)
//   in_spm   = CTA_ID >= Start_CTA and Reg# >= Start_Reg
//   spm_addr = SBR[CTA_ID-Start_CTA]
//              + (Max_Reg-Start_Reg+1) * (Warp_ID mod Warps_Per_CTA) * 128
//              + (Reg# - Start_Reg) * 128                               Eq. (13)
// spm_addr is the byte address of the first of the 32 words of the register;
// the other 31 follow at +4 each, i.e. one full 128-byte scratchpad line.
// rf_line is this design's own placement of the register-file part: warps of
// register-file CTAs use Max_Reg+1 consecutive lines each, and warps of mix
// CTAs use Start_Reg lines each after them. Lookups have no latency; writes
// take effect at the next clock edge.
module rat
  import expars_pkg::*;
#(
  parameter int unsigned NLOOK = 2,
  parameter int unsigned NSBR  = MAX_CTAS
) (
  input  logic       clk,
  input  logic       rst_n,
  // configuration write
  input  logic       cfg_we,
  input  rat_cfg_t   cfg_in,
  input  logic       sbr_we,
  input  cta_id_t    sbr_idx,
  input  spm_addr_t  sbr_in,
  output rat_cfg_t   cfg,
  // lookups
  input  warp_id_t   lk_warp   [NLOOK],
  input  reg_idx_t   lk_reg    [NLOOK],
  output logic [WARP_W-1:0] lk_cta [NLOOK],
  output logic       lk_in_spm [NLOOK],
  output spm_addr_t  lk_spm_addr [NLOOK],
  output logic [9:0] lk_rf_line  [NLOOK]
);

  spm_addr_t sbr_tab [NSBR];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg <= '{start_cta: '1, start_reg: '1, max_reg: '1, warps_per_cta: 6'd1};
      for (int i = 0; i < int'(NSBR); i++) sbr_tab[i] <= '0;
    end else begin
      if (cfg_we) cfg <= cfg_in;
      if (sbr_we) sbr_tab[sbr_idx] <= sbr_in;
    end
  end

  always_comb begin
    for (int p = 0; p < int'(NLOOK); p++) begin
      logic [WARP_W-1:0] cta, wrel, rel;
      logic [6:0]        nspill, nreg;
      logic [15:0]       off;
      logic [15:0]       mix_base;
      cta  = cta_of(lk_warp[p], cfg.warps_per_cta);
      wrel = (cfg.warps_per_cta == 0) ? '0 : lk_warp[p] % cfg.warps_per_cta;
      rel  = cta - WARP_W'(cfg.start_cta);
      nspill = 7'(cfg.max_reg) - 7'(cfg.start_reg) + 7'd1;
      nreg   = 7'(cfg.max_reg) + 7'd1;
      off  = 16'(nspill) * 16'(wrel) * 16'd128
           + (16'(lk_reg[p]) - 16'(cfg.start_reg)) * 16'd128;
      lk_cta[p]      = cta;
      lk_in_spm[p]   = in_spm(cfg, lk_warp[p], lk_reg[p]);
      lk_spm_addr[p] = sbr_tab[rel[CTA_W-1:0]] + off;
      mix_base = 16'(cfg.start_cta) * 16'(cfg.warps_per_cta) * 16'(nreg);
      if (cta < WARP_W'(cfg.start_cta))
        lk_rf_line[p] = 10'(16'(lk_warp[p]) * 16'(nreg) + 16'(lk_reg[p]));
      else
        lk_rf_line[p] = 10'(mix_base
                      + (16'(lk_warp[p]) - 16'(cfg.start_cta) * 16'(cfg.warps_per_cta))
                        * 16'(cfg.start_reg)
                      + 16'(lk_reg[p]));
    end
  end

endmodule
