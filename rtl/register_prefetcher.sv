// register_prefetcher: loads the scratchpad-resident registers of a warp's next
// bundle into the operand cache before the warp may be scheduled.
//
// Register bit-vector table: when the decoder meets a PREF instruction it
// hands over (warp, 63-bit vector); bit r set means architectural register r
// is used by that bundle. The table has one vector per warp (48 x 63 bits).
// needs_spm[w] tells the warp pool whether warp w's recorded bundle uses any
// register that lives in scratchpad (its CTA is a mix CTA and r >= Start_Reg).
//
// Every cycle in which the engine is idle the prefetcher examines the warp at
// the head of the prefetching queue (kept by the warp pool). The bundle fits
// when every operand-cache line that one of its scratchpad registers maps to
// (bank r[1:0], set r[3:2]) either already holds that register or is not
// pinned by another bundle; unpinned lines of completed bundles are evicted.
// If it fits, the head is popped and the engine handles the registers one at
// a time, lowest first:
//   hit                  -> pin the line (1 cycle)
//   miss, victim dirty   -> write the victim back to scratchpad (1 cycle),
//   miss                 -> read the line from scratchpad (1 cycle), fill the
//                           operand cache when the data return (1 cycle)
// Scratchpad addresses come from the register allocation table (Eq. 13).
// When all are in place done_valid pulses with the warp. If two scratchpad
// registers of one bundle map to the same line the bundle can never fit;
// conflict is raised and the warp stays at the head (the compiler is expected
// to form bundles that avoid this). The per-register sequencing and the
// fit test over line pins are this design's reading of the document's
// "enough free space in the operand cache".
module register_prefetcher
  import expars_pkg::*;
#(
  parameter int unsigned NWARP = MAX_WARPS,
  parameter int unsigned NREG  = NUM_ARCH_REGS
) (
  input  logic      clk,
  input  logic      rst_n,
  input  rat_cfg_t  cfg,
  // PREF from the decoder
  input  logic      pref_valid,
  input  warp_id_t  pref_warp,
  input  logic [NREG-1:0] pref_vec,
  output logic      needs_spm [NWARP],
  // prefetching queue head (warp pool)
  input  logic      pq_head_valid,
  input  warp_id_t  pq_head_warp,
  output logic      pq_pop,
  output logic      done_valid,
  output warp_id_t  done_warp,
  // operand cache
  input  warp_id_t  oc_tag_warp  [OC_BANKS][OC_SETS],
  input  logic [1:0] oc_tag_pre  [OC_BANKS][OC_SETS],
  input  logic      oc_tag_valid [OC_BANKS][OC_SETS],
  input  logic      oc_tag_dirty [OC_BANKS][OC_SETS],
  input  logic      oc_tag_pin   [OC_BANKS][OC_SETS],
  input  line_t     oc_line      [OC_BANKS][OC_SETS],
  output logic      oc_fill_en,
  output logic [1:0] oc_fill_bank,
  output logic [1:0] oc_fill_set,
  output warp_id_t  oc_fill_warp,
  output logic [1:0] oc_fill_pre,
  output line_t     oc_fill_data,
  output logic      oc_pin_en,
  output logic [1:0] oc_pin_bank,
  output logic [1:0] oc_pin_set,
  // register allocation table lookups: [0] needed register, [1] victim
  output warp_id_t  lk_warp [2],
  output reg_idx_t  lk_reg  [2],
  input  spm_addr_t lk_addr [2],
  // scratchpad register-line port
  output logic      ln_valid,
  output logic      ln_we,
  output spm_addr_t ln_addr,
  output line_t     ln_wdata,
  input  logic      ln_ready,
  input  logic      ln_rvalid,
  input  line_t     ln_rdata,
  // activity counters
  output logic [31:0] cnt_fill,
  output logic [31:0] cnt_hit,
  output logic [31:0] cnt_writeback,
  output logic [31:0] cnt_wait,
  output logic      conflict
);

  logic [NREG-1:0] bitvec [NWARP];

  // Registers of warp w that live in scratchpad.
  function automatic logic [NREG-1:0] spm_mask(rat_cfg_t c, warp_id_t w);
    logic [NREG-1:0] m;
    for (int r = 0; r < int'(NREG); r++) m[r] = in_spm(c, w, REG_W'(r));
    return m;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < int'(NWARP); w++) bitvec[w] <= '0;
    end else if (pref_valid) begin
      bitvec[pref_warp] <= pref_vec;
    end
  end

  always_comb
    for (int w = 0; w < int'(NWARP); w++)
      needs_spm[w] = |(bitvec[w] & spm_mask(cfg, WARP_W'(w)));

  // ---------------------------------------------------------------- fit test
  logic [NREG-1:0] head_mask;
  logic            fit, head_conflict;
  always_comb begin
    head_mask     = bitvec[pq_head_warp] & spm_mask(cfg, pq_head_warp);
    fit           = 1'b1;
    head_conflict = 1'b0;
    for (int b = 0; b < int'(OC_BANKS); b++)
      for (int s = 0; s < int'(OC_SETS); s++) begin
        int unsigned n;
        logic        ok;
        n  = 0;
        ok = 1'b1;
        for (int p = 0; p < 4; p++) begin
          int unsigned r;
          r = unsigned'(b + 4 * s + 16 * p);
          if (r < NREG && head_mask[r]) begin
            n++;
            if (oc_tag_pin[b][s] && !(oc_tag_valid[b][s]
                && oc_tag_warp[b][s] == pq_head_warp && oc_tag_pre[b][s] == 2'(p)))
              ok = 1'b0;
          end
        end
        if (n > 1) head_conflict = 1'b1;
        if (!ok) fit = 1'b0;
      end
  end

  // ------------------------------------------------------------------ engine
  typedef enum logic [2:0] {IDLE, NEXT, WB, RD, WAITD, DONE} state_e;
  state_e state;

  warp_id_t        cur_warp;
  logic [NREG-1:0] rem;
  reg_idx_t        cur_reg;
  logic [1:0]      cb, cs;
  logic            cur_hit;

  always_comb begin
    cur_reg = '0;
    for (int r = int'(NREG) - 1; r >= 0; r--)
      if (rem[r]) cur_reg = REG_W'(r);
  end
  assign cb = cur_reg[1:0];
  assign cs = cur_reg[3:2];
  assign cur_hit = oc_tag_valid[cb][cs] && oc_tag_warp[cb][cs] == cur_warp
                && oc_tag_pre[cb][cs] == cur_reg[5:4];

  assign lk_warp[0] = cur_warp;
  assign lk_reg[0]  = cur_reg;
  assign lk_warp[1] = oc_tag_warp[cb][cs];
  assign lk_reg[1]  = {oc_tag_pre[cb][cs], cs, cb};

  assign pq_pop = (state == IDLE) && pq_head_valid && fit && !head_conflict;

  always_comb begin
    ln_valid  = 1'b0;
    ln_we     = 1'b0;
    ln_addr   = lk_addr[0];
    ln_wdata  = oc_line[cb][cs];
    oc_pin_en = 1'b0;
    if (state == WB) begin
      ln_valid = 1'b1;
      ln_we    = 1'b1;
      ln_addr  = lk_addr[1];
    end else if (state == RD) begin
      ln_valid = 1'b1;
    end else if (state == NEXT && rem != 0 && cur_hit) begin
      oc_pin_en = 1'b1;
    end
  end
  assign oc_pin_bank  = cb;
  assign oc_pin_set   = cs;
  assign oc_fill_en   = (state == WAITD) && ln_rvalid;
  assign oc_fill_bank = cb;
  assign oc_fill_set  = cs;
  assign oc_fill_warp = cur_warp;
  assign oc_fill_pre  = cur_reg[5:4];
  assign oc_fill_data = ln_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= IDLE;
      cur_warp      <= '0;
      rem           <= '0;
      done_valid    <= 1'b0;
      done_warp     <= '0;
      cnt_fill      <= '0;
      cnt_hit       <= '0;
      cnt_writeback <= '0;
      cnt_wait      <= '0;
      conflict      <= 1'b0;
    end else begin
      done_valid <= 1'b0;
      unique case (state)
        IDLE: begin
          if (pq_head_valid) begin
            if (head_conflict) conflict <= 1'b1;
            if (fit && !head_conflict) begin
              cur_warp <= pq_head_warp;
              rem      <= head_mask;
              state    <= NEXT;
            end else begin
              cnt_wait <= cnt_wait + 1;
            end
          end
        end
        NEXT: begin
          if (rem == 0) begin
            state <= DONE;
          end else if (cur_hit) begin
            cnt_hit      <= cnt_hit + 1;
            rem[cur_reg] <= 1'b0;
          end else if (oc_tag_valid[cb][cs] && oc_tag_dirty[cb][cs]) begin
            state <= WB;
          end else begin
            state <= RD;
          end
        end
        WB: if (ln_ready) begin
          cnt_writeback <= cnt_writeback + 1;
          state         <= RD;
        end
        RD: if (ln_ready) state <= WAITD;
        WAITD: if (ln_rvalid) begin
          cnt_fill     <= cnt_fill + 1;
          rem[cur_reg] <= 1'b0;
          state        <= NEXT;
        end
        DONE: begin
          done_valid <= 1'b1;
          done_warp  <= cur_warp;
          state      <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
