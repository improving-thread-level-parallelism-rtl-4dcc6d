// resource_allocator: places each CTA's registers in the register file or the
// scratchpad and loads the Register Allocation Table (RAT).
//
// Started with the result of the CTA calculation (CTA_RF, CTA_Mix), it
//  1. writes Start_CTA = CTA_RF, Max_Reg = regs_per_thread-1, Warps_Per_CTA
//     and Start_Reg, Eq. (10) expressed in registers per thread:
//        Start_Reg = floor((R - CTA_RF*R_CTA) / CTA_Mix) / (Warps_Per_CTA*32)
//     (all registers from Start_Reg upwards of a mix CTA live in scratchpad);
//  2. writes one SBR per mix CTA, one per clock, following Eq. (11):
//        SBR = S - (CTA_ID-Start_CTA+1) * (Max_Reg-Start_Reg+1) * Warps_Per_CTA * 128
//     so register regions grow from the top of the scratchpad downwards while
//     ordinary scratchpad regions (base CTA_ID*S_CTA, output spm_base) grow from
//     the bottom upwards: the two-way allocation policy of Fig. 6.
// With CTA_Mix = 0 Start_Reg is set to Max_Reg+1 so no register is in
// scratchpad. done pulses one cycle after the last RAT write; overlap reports
// a configuration whose two regions would collide (never produced by cta_calc).
module resource_allocator
  import expars_pkg::*;
#(
  parameter int unsigned RF_REGS_P   = RF_REGS,
  parameter int unsigned SPM_BYTES_P = SPM_BYTES
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [3:0]  cta_rf,
  input  logic [3:0]  cta_mix,
  input  logic [6:0]  regs_per_thread,   // 1..63
  input  logic [5:0]  warps_per_cta,
  input  logic [16:0] spm_per_cta,
  // RAT write side
  output logic        cfg_we,
  output rat_cfg_t    cfg_out,
  output logic        sbr_we,
  output cta_id_t     sbr_idx,
  output spm_addr_t   sbr_out,
  output spm_addr_t   spm_base [MAX_CTAS],
  output logic        done,
  output logic        overlap
);

  typedef enum logic [1:0] {IDLE, SBR, FIN} state_e;
  state_e state;

  logic [31:0] thr, rcta, rf_left, per_cta, sreg_c;
  logic [3:0]  idx, nmix, ntot;
  logic [31:0] nspill_q, region_bytes, sbr_c;

  always_comb begin
    thr     = 32'(warps_per_cta) * WARP_SIZE;
    rcta    = 32'(regs_per_thread) * thr;
    rf_left = 32'(RF_REGS_P) - 32'(cta_rf) * rcta;
    per_cta = (cta_mix == 0) ? '0 : rf_left / 32'(cta_mix);              // Eq. (10)
    sreg_c  = (cta_mix == 0 || thr == 0) ? 32'(regs_per_thread) : per_cta / thr;
    if (sreg_c > 32'(regs_per_thread)) sreg_c = 32'(regs_per_thread);
    region_bytes = nspill_q * 32'(cfg_out.warps_per_cta) * LINE_BYTES;
    sbr_c   = 32'(SPM_BYTES_P) - (32'(idx) + 1) * region_bytes;            // Eq. (11)
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      cfg_we   <= 1'b0;
      cfg_out  <= '0;
      sbr_we   <= 1'b0;
      sbr_idx  <= '0;
      sbr_out  <= '0;
      idx      <= '0;
      nmix     <= '0;
      ntot     <= '0;
      nspill_q <= '0;
      done     <= 1'b0;
      overlap  <= 1'b0;
    end else begin
      cfg_we <= 1'b0;
      sbr_we <= 1'b0;
      done   <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          cfg_we   <= 1'b1;
          cfg_out  <= '{start_cta:     CTA_W'(cta_rf),
                        start_reg:     REG_W'(sreg_c),
                        max_reg:       REG_W'(regs_per_thread - 7'd1),
                        warps_per_cta: warps_per_cta};
          nspill_q <= 32'(regs_per_thread) - sreg_c;
          nmix     <= cta_mix;
          ntot     <= cta_rf + cta_mix;
          idx      <= '0;
          overlap  <= 1'b0;
          state    <= (cta_mix == 0) ? FIN : SBR;
        end
        SBR: begin
          sbr_we  <= 1'b1;
          sbr_idx <= CTA_W'(idx);
          sbr_out <= SBR_W'(sbr_c);
          // the lowest register region must stay above the scratchpad regions
          if (idx + 1 == nmix) begin
            if ((32'(idx) + 1) * region_bytes + 32'(ntot) * 32'(spm_per_cta)
                > 32'(SPM_BYTES_P)) overlap <= 1'b1;
            state <= FIN;
          end
          idx <= idx + 1;
        end
        FIN: begin
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // Scratchpad regions are allocated bottom-up, one S_CTA block per CTA.
  always_comb
    for (int c = 0; c < int'(MAX_CTAS); c++)
      spm_base[c] = SBR_W'(32'(c) * 32'(spm_per_cta));

endmodule
