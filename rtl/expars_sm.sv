// expars_sm: the EXPARS register path of one GPU streaming multiprocessor.
//
// EXPARS raises the number of CTAs an SM can hold when the register file is
// the limiting resource: the highest-numbered registers of some CTAs ("mix"
// CTAs) are placed in the scratchpad memory that the kernel leaves unused, and
// a small operand cache (OC) is filled with those registers before each
// instruction bundle runs, so that operands are then read as fast as from the
// register file.
//
// Blocks and flow:
//   cta_calc            at kernel launch, computes CTA_RF, CTA_Mix and the
//                       registers per thread a mix CTA keeps in the RF;
//   resource_allocator  then writes Start_CTA/Start_Reg/Max_Reg/
//                       Warps_Per_CTA and the SBR table into the rat;
//   rat                 translates (warp, reg) into location and address;
//   register_prefetcher keeps the PREF bit-vectors and fills the OC from the
//                       scratchpad for the warp at the head of the
//                       prefetching queue;
//   ltlws               warp pool (schedulable / prefetching / pending) and
//                       lazy two-level warp scheduler, one issue per clock;
//   bank_arbitrator     per-bank read queues with the RF/OC judgement;
//   register_file, operand_cache, scratchpad  the three storages.
// The rest of the SM pipeline (fetch, decode, operand collectors, execution
// units, caches) is outside: its events arrive on the ports below.
//
// Interface and timing:
//   * cfg_start with the kernel's regs_per_thread (1..63), warps_per_cta and
//     spm_per_cta (bytes); cfg_done pulses when the RAT is loaded, after at
//     most about 50 clocks. cta_total/cta_rf/cta_mix then hold the decision.
//   * pref_*: a decoded PREF (warp, 63-bit register vector). The PREF of a
//     warp's first bundle must precede its launch_*, and that of the next
//     bundle must precede bundle_done_* of the current one.
//   * launch_*: a warp of a dispatched CTA joins the warp pool.
//   * issue_valid/issue_warp: the warp issued this clock.
//   * rd_*: operand reads (warp, reg, tag); data return as rd_resp_* two
//     clocks after acceptance when the bank is free, from RF or OC.
//   * wb_*: a result register written back, to the RF or (tag lookup) the OC.
//   * spm_*: ordinary 32-bit scratchpad accesses; they yield to prefetch
//     traffic.
module expars_sm
  import expars_pkg::*;
#(
  parameter int unsigned TAU_TENTHS = 8,   // tau = 0.8
  parameter int unsigned NPORT      = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // kernel launch configuration
  input  logic        cfg_start,
  input  logic [6:0]  regs_per_thread,
  input  logic [5:0]  warps_per_cta,
  input  logic [16:0] spm_per_cta,
  input  logic        sched_gto,
  input  logic        sched_lazy,
  output logic        cfg_busy,
  output logic        cfg_done,
  output logic [3:0]  cta_lower,
  output logic [3:0]  cta_total,
  output logic [3:0]  cta_rf,
  output logic [3:0]  cta_mix,
  output rat_cfg_t    rat_cfg,
  output spm_addr_t   spm_base [MAX_CTAS],
  output logic        alloc_overlap,
  // decoder / warp events
  input  logic        pref_valid,
  input  warp_id_t    pref_warp,
  input  logic [NUM_ARCH_REGS-1:0] pref_vec,
  input  logic        launch_valid,
  input  warp_id_t    launch_warp,
  input  logic        bundle_done_valid,
  input  warp_id_t    bundle_done_warp,
  input  logic        stall_valid,
  input  warp_id_t    stall_warp,
  input  logic        unstall_valid,
  input  warp_id_t    unstall_warp,
  input  logic        finish_valid,
  input  warp_id_t    finish_warp,
  output logic        issue_valid,
  output warp_id_t    issue_warp,
  // operand reads
  input  logic        rd_valid [NPORT],
  input  reg_req_t    rd_req   [NPORT],
  input  logic [3:0]  rd_tag   [NPORT],
  output logic        rd_ready [NPORT],
  output logic        rd_resp_valid   [OC_BANKS],
  output logic        rd_resp_from_oc [OC_BANKS],
  output logic [3:0]  rd_resp_tag     [OC_BANKS],
  output line_t       rd_resp_data    [OC_BANKS],
  // result write-back
  input  logic        wb_valid,
  input  warp_id_t    wb_warp,
  input  reg_idx_t    wb_reg,
  input  line_t       wb_data,
  output logic        wb_to_oc,
  output logic        wb_oc_miss,
  // ordinary scratchpad accesses
  input  logic        spm_valid,
  input  logic        spm_we,
  input  spm_addr_t   spm_addr,
  input  logic [31:0] spm_wdata,
  output logic        spm_ready,
  output logic        spm_rvalid,
  output logic [31:0] spm_rdata,
  // status
  output logic        wopt_valid,
  output logic [5:0]  wopt,
  output logic [6:0]  active_cnt,
  output logic [6:0]  pq_count,
  output logic [31:0] cnt_fill,
  output logic [31:0] cnt_hit,
  output logic [31:0] cnt_writeback,
  output logic [31:0] cnt_wait,
  output logic [31:0] cnt_demote,
  output logic [31:0] cnt_promote,
  output logic        pref_conflict
);

  localparam int unsigned NLOOK = 7;  // 0,1 prefetcher; 2..5 RF reads; 6 write-back

  // ------------------------------------------------------------ allocation
  logic       calc_done;
  logic [6:0] calc_sreg;

  cta_calc u_calc (
    .clk, .rst_n,
    .start          (cfg_start),
    .regs_per_thread,
    .warps_per_cta,
    .spm_per_cta,
    .tau_tenths     (4'(TAU_TENTHS)),
    .busy           (cfg_busy),
    .done           (calc_done),
    .cta_total,
    .cta_rf,
    .cta_mix,
    .start_reg      (calc_sreg),
    .cta_lower
  );

  logic      ra_cfg_we, ra_sbr_we;
  rat_cfg_t  ra_cfg;
  cta_id_t   ra_sbr_idx;
  spm_addr_t ra_sbr;

  resource_allocator u_ra (
    .clk, .rst_n,
    .start          (calc_done),
    .cta_rf,
    .cta_mix,
    .regs_per_thread,
    .warps_per_cta,
    .spm_per_cta,
    .cfg_we         (ra_cfg_we),
    .cfg_out        (ra_cfg),
    .sbr_we         (ra_sbr_we),
    .sbr_idx        (ra_sbr_idx),
    .sbr_out        (ra_sbr),
    .spm_base,
    .done           (cfg_done),
    .overlap        (alloc_overlap)
  );

  // The allocator's Eq. (10) split must agree with the one the CTA
  // calculation accepted.
  a_split_agrees: assert property (@(posedge clk) disable iff (!rst_n)
    ra_cfg_we && cta_mix != 0 |-> 7'(ra_cfg.start_reg) == calc_sreg);

  warp_id_t   lk_warp [NLOOK];
  reg_idx_t   lk_reg  [NLOOK];
  logic       lk_in_spm [NLOOK];
  spm_addr_t  lk_addr [NLOOK];
  logic [9:0] lk_line [NLOOK];

  rat #(.NLOOK(NLOOK)) u_rat (
    .clk, .rst_n,
    .cfg_we      (ra_cfg_we),
    .cfg_in      (ra_cfg),
    .sbr_we      (ra_sbr_we),
    .sbr_idx     (ra_sbr_idx),
    .sbr_in      (ra_sbr),
    .cfg         (rat_cfg),
    .lk_warp, .lk_reg,
    .lk_cta      (),
    .lk_in_spm,
    .lk_spm_addr (lk_addr),
    .lk_rf_line  (lk_line)
  );

  // ------------------------------------------------------------ storages
  warp_id_t   oc_tw [OC_BANKS][OC_SETS];
  logic [1:0] oc_tp [OC_BANKS][OC_SETS];
  logic       oc_tv [OC_BANKS][OC_SETS];
  logic       oc_td [OC_BANKS][OC_SETS];
  logic       oc_tpin [OC_BANKS][OC_SETS];
  line_t      oc_lines [OC_BANKS][OC_SETS];
  logic       oc_fill_en, oc_pin_en;
  logic [1:0] oc_fill_bank, oc_fill_set, oc_fill_pre, oc_pin_bank, oc_pin_set;
  warp_id_t   oc_fill_warp;
  line_t      oc_fill_data;
  logic       oc_rd_en  [OC_BANKS];
  logic [1:0] oc_rd_set [OC_BANKS];
  line_t      oc_rd_data [OC_BANKS];
  logic       oc_wr_hit;

  assign wb_to_oc = lk_in_spm[6];

  operand_cache u_oc (
    .clk, .rst_n,
    .rd_en      (oc_rd_en),
    .rd_set     (oc_rd_set),
    .rd_data    (oc_rd_data),
    .fill_en    (oc_fill_en),
    .fill_bank  (oc_fill_bank),
    .fill_set   (oc_fill_set),
    .fill_warp  (oc_fill_warp),
    .fill_pre   (oc_fill_pre),
    .fill_data  (oc_fill_data),
    .pin_en     (oc_pin_en),
    .pin_bank   (oc_pin_bank),
    .pin_set    (oc_pin_set),
    .wr_en      (wb_valid && wb_to_oc),
    .wr_warp    (wb_warp),
    .wr_reg     (wb_reg),
    .wr_data    (wb_data),
    .wr_hit     (oc_wr_hit),
    .unpin_en   (bundle_done_valid),
    .unpin_warp (bundle_done_warp),
    .tag_warp   (oc_tw),
    .tag_pre    (oc_tp),
    .tag_valid  (oc_tv),
    .tag_dirty  (oc_td),
    .tag_pin    (oc_tpin),
    .line_o     (oc_lines)
  );

  assign wb_oc_miss = wb_valid && wb_to_oc && !oc_wr_hit;

  logic       rf_rd_en   [OC_BANKS];
  logic [9:0] rf_rd_line [OC_BANKS];
  line_t      rf_rd_data [OC_BANKS];

  register_file u_rf (
    .clk,
    .rd_en   (rf_rd_en),
    .rd_line (rf_rd_line),
    .rd_data (rf_rd_data),
    .wr_en   (wb_valid && !wb_to_oc),
    .wr_line (lk_line[6]),
    .wr_data (wb_data)
  );

  logic      ln_valid, ln_we, ln_ready, ln_rvalid;
  spm_addr_t ln_addr;
  line_t     ln_wdata, ln_rdata;

  scratchpad u_spm (
    .clk, .rst_n,
    .ln_valid, .ln_we, .ln_addr, .ln_wdata, .ln_ready, .ln_rvalid, .ln_rdata,
    .wd_valid  (spm_valid),
    .wd_we     (spm_we),
    .wd_addr   (spm_addr),
    .wd_wdata  (spm_wdata),
    .wd_ready  (spm_ready),
    .wd_rvalid (spm_rvalid),
    .wd_rdata  (spm_rdata)
  );

  // ------------------------------------------------------ prefetch & warps
  logic     needs_spm [MAX_WARPS];
  logic     pq_head_valid, pq_pop, pf_done;
  warp_id_t pq_head_warp, pf_done_warp;
  warp_id_t rp_lk_warp [2];
  reg_idx_t rp_lk_reg  [2];
  spm_addr_t rp_lk_addr [2];

  register_prefetcher u_rp (
    .clk, .rst_n,
    .cfg           (rat_cfg),
    .pref_valid, .pref_warp, .pref_vec,
    .needs_spm,
    .pq_head_valid, .pq_head_warp, .pq_pop,
    .done_valid    (pf_done),
    .done_warp     (pf_done_warp),
    .oc_tag_warp   (oc_tw),
    .oc_tag_pre    (oc_tp),
    .oc_tag_valid  (oc_tv),
    .oc_tag_dirty  (oc_td),
    .oc_tag_pin    (oc_tpin),
    .oc_line       (oc_lines),
    .oc_fill_en, .oc_fill_bank, .oc_fill_set, .oc_fill_warp, .oc_fill_pre, .oc_fill_data,
    .oc_pin_en, .oc_pin_bank, .oc_pin_set,
    .lk_warp       (rp_lk_warp),
    .lk_reg        (rp_lk_reg),
    .lk_addr       (rp_lk_addr),
    .ln_valid, .ln_we, .ln_addr, .ln_wdata, .ln_ready, .ln_rvalid, .ln_rdata,
    .cnt_fill, .cnt_hit, .cnt_writeback, .cnt_wait,
    .conflict      (pref_conflict)
  );

  ltlws u_sched (
    .clk, .rst_n,
    .gto               (sched_gto),
    .lazy              (sched_lazy),
    .launch_valid,
    .launch_warp,
    .launch_needs_spm  (needs_spm[launch_warp]),
    .pq_head_valid, .pq_head_warp, .pq_pop,
    .pref_done_valid   (pf_done),
    .pref_done_warp    (pf_done_warp),
    .bundle_done_valid,
    .bundle_done_warp,
    .bundle_next_spm   (needs_spm[bundle_done_warp]),
    .stall_valid, .stall_warp, .unstall_valid, .unstall_warp,
    .finish_valid, .finish_warp,
    .issue_valid, .issue_warp,
    .wopt_valid, .wopt, .active_cnt, .pq_count, .cnt_demote, .cnt_promote
  );

  // ------------------------------------------------------ operand reads
  logic       gnt_valid [OC_BANKS];
  logic       gnt_to_oc [OC_BANKS];
  reg_req_t   gnt_req   [OC_BANKS];
  logic [3:0] gnt_tag   [OC_BANKS];
  logic [1:0] gnt_set   [OC_BANKS];

  bank_arbitrator #(.NPORT(NPORT), .TAG_W(4)) u_ba (
    .clk, .rst_n,
    .cfg       (rat_cfg),
    .req_valid (rd_valid),
    .req       (rd_req),
    .req_tag   (rd_tag),
    .req_ready (rd_ready),
    .gnt_valid, .gnt_to_oc, .gnt_req, .gnt_tag, .gnt_set
  );

  always_comb begin
    lk_warp[0] = rp_lk_warp[0];
    lk_reg[0]  = rp_lk_reg[0];
    lk_warp[1] = rp_lk_warp[1];
    lk_reg[1]  = rp_lk_reg[1];
    rp_lk_addr[0] = lk_addr[0];
    rp_lk_addr[1] = lk_addr[1];
    for (int b = 0; b < int'(OC_BANKS); b++) begin
      lk_warp[2+b]  = gnt_req[b].warp;
      lk_reg[2+b]   = gnt_req[b].rnum;
      rf_rd_en[b]   = gnt_valid[b] && !gnt_to_oc[b];
      rf_rd_line[b] = lk_line[2+b];
      oc_rd_en[b]   = gnt_valid[b] && gnt_to_oc[b];
      oc_rd_set[b]  = gnt_set[b];
    end
    lk_warp[6] = wb_warp;
    lk_reg[6]  = wb_reg;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < int'(OC_BANKS); b++) begin
        rd_resp_valid[b]   <= 1'b0;
        rd_resp_from_oc[b] <= 1'b0;
        rd_resp_tag[b]     <= '0;
      end
    end else begin
      for (int b = 0; b < int'(OC_BANKS); b++) begin
        rd_resp_valid[b]   <= gnt_valid[b];
        rd_resp_from_oc[b] <= gnt_to_oc[b];
        rd_resp_tag[b]     <= gnt_tag[b];
      end
    end
  end

  always_comb
    for (int b = 0; b < int'(OC_BANKS); b++)
      rd_resp_data[b] = rd_resp_from_oc[b] ? oc_rd_data[b] : rf_rd_data[b];

endmodule
