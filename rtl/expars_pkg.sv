// expars_pkg: constants, types and small functions shared by the EXPARS
// register-path blocks.
//
// EXPARS lets a GPU streaming multiprocessor (SM) dispatch more CTAs than its
// register file alone would hold by storing the highest-numbered registers of
// some CTAs ("mix" CTAs) in otherwise idle scratchpad memory. The defaults are
// the Fermi configuration: 48 warps, 8 CTAs and 1,536 threads per SM, 63
// architectural registers per thread, 32K x 32-bit registers, 48KB of
// scratchpad in 32 banks, and a 2KB operand cache of 4 banks x 4 sets of
// 1,024-bit lines. Field widths follow the register allocation table: a 3-bit
// CTA index, 6-bit warp and register numbers and 16-bit scratchpad addresses.
package expars_pkg;

  localparam int unsigned WARP_SIZE     = 32;     // threads per warp
  localparam int unsigned MAX_WARPS     = 48;     // 1536 threads / 32
  localparam int unsigned MAX_CTAS      = 8;      // CTA slots per SM
  localparam int unsigned MAX_THREADS   = 1536;   // thread slots per SM
  localparam int unsigned RF_REGS       = 32768;  // 32-bit registers per SM (128KB)
  localparam int unsigned SPM_BYTES     = 49152;  // 48KB scratchpad per SM
  localparam int unsigned SPM_BANKS     = 32;     // 32 banks of 32-bit words
  localparam int unsigned LINE_BITS     = 1024;   // one architectural register of a warp
  localparam int unsigned LINE_BYTES    = 128;
  localparam int unsigned OC_BANKS      = 4;
  localparam int unsigned OC_SETS       = 4;
  localparam int unsigned NUM_ARCH_REGS = 63;     // PREF bit-vector length (Fermi)

  localparam int unsigned WARP_W = 6;   // Warp_ID width
  localparam int unsigned REG_W  = 6;   // Reg# width
  localparam int unsigned CTA_W  = 3;   // CTA index width
  localparam int unsigned SBR_W  = 16;  // scratchpad byte address width

  typedef logic [WARP_W-1:0]    warp_id_t;
  typedef logic [REG_W-1:0]     reg_idx_t;
  typedef logic [CTA_W-1:0]     cta_id_t;
  typedef logic [SBR_W-1:0]     spm_addr_t;
  typedef logic [LINE_BITS-1:0] line_t;

  // Register Allocation Table configuration registers (Fig. 7).
  typedef struct packed {
    cta_id_t  start_cta;      // first CTA with registers in scratchpad (= CTA_RF)
    reg_idx_t start_reg;      // first architectural register kept in scratchpad
    reg_idx_t max_reg;        // highest architectural register used by the kernel
    logic [5:0] warps_per_cta;
  } rat_cfg_t;

  // A register read request as seen by the bank arbitrator.
  typedef struct packed {
    warp_id_t warp;
    reg_idx_t rnum;
  } reg_req_t;

  // Eq. (12): CTA_ID = floor(Warp_ID / Warps_Per_CTA)
  function automatic logic [WARP_W-1:0] cta_of(warp_id_t warp, logic [5:0] wpc);
    return (wpc == 0) ? '0 : warp / wpc;
  endfunction

  // Judgement logic (Fig. 9): a register lives in scratchpad when its CTA is a
  // mix CTA (CTA_ID >= Start_CTA) and Reg# >= Start_Reg.
  function automatic logic in_spm(rat_cfg_t cfg, warp_id_t warp, reg_idx_t rnum);
    logic [WARP_W-1:0] cta;
    cta = cta_of(warp, cfg.warps_per_cta);
    return (cta >= WARP_W'(cfg.start_cta)) && (rnum >= cfg.start_reg);
  endfunction

endpackage
