// cta_calc: decides, once per kernel launch, how many CTAs an SM holds and how
// many of them keep part of their registers in scratchpad memory.
//
// A CTA needs R_CTA = regs_per_thread * warps_per_cta * 32 registers and
// spm_per_cta bytes of scratchpad. The baseline count is
// CTA_Lower = min(floor(R / R_CTA), CTA_Upper), and CTA_Upper is the smallest of
// the CTA-slot limit, the thread-slot limit, the scratchpad limit and the
// combined-capacity bound floor((R + S) / (R_CTA + S_CTA)) of Eq. (4).
// When CTA_Lower < CTA_Upper the circuit searches for the largest total
// N = CTA_RF + CTA_Mix, trying N = CTA_Upper down to CTA_Lower + 1 and, for each
// N, CTA_Mix = 1 .. N (so CTA_RF is as large as possible). A candidate is
// accepted when
//   * CTA_RF * R_CTA <= R                                        (Eq. 1)
//   * each mix CTA keeps k = floor((R - CTA_RF*R_CTA) / (CTA_Mix*T)) registers
//     per thread in the register file (Eq. 10 in whole registers, T = threads
//     per CTA), and spills regs_per_thread - k of them,
//   * the spilled share is at most tau: 10*spill <= tau_tenths*regs_per_thread,
//   * N*S_CTA + CTA_Mix*spill*T*4 <= S                           (Eq. 2).
// If no candidate exists the baseline result of Eq. (7) is returned. The
// document states the optimum in closed form (Eqs. 7-9); this design instead
// evaluates the same constraints one candidate per clock, with the register
// split rounded to whole registers as the allocation table requires. At most
// MAX_CTAS*(MAX_CTAS+1)/2 + 2 cycles pass from start to done.
//
// Interface: pulse start with the kernel's requirements held stable; done
// pulses for one cycle with cta_total, cta_rf, cta_mix and start_reg valid,
// and the outputs hold until the next start.
module cta_calc
  import expars_pkg::*;
#(
  parameter int unsigned RF_REGS_P   = RF_REGS,
  parameter int unsigned SPM_BYTES_P = SPM_BYTES,
  parameter int unsigned MAX_CTAS_P  = MAX_CTAS,
  parameter int unsigned MAX_THR_P   = MAX_THREADS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [6:0]  regs_per_thread,  // Max_Reg + 1, 1..64
  input  logic [5:0]  warps_per_cta,    // 1..48
  input  logic [16:0] spm_per_cta,      // bytes
  input  logic [3:0]  tau_tenths,       // tau in tenths (0.8 -> 8)
  output logic        busy,
  output logic        done,
  output logic [3:0]  cta_total,
  output logic [3:0]  cta_rf,
  output logic [3:0]  cta_mix,
  output logic [6:0]  start_reg,        // registers per thread kept in the RF by mix CTAs
  output logic [3:0]  cta_lower
);

  typedef enum logic [1:0] {IDLE, SEARCH, FINISH} state_e;
  state_e state;

  // Per-launch quantities, 32-bit to keep the products exact.
  logic [31:0] thr, rcta, upper, lower, n_cur, y_cur;
  logic [31:0] rf_lim, thr_lim, spm_lim, sum_lim, upper_c;

  always_comb begin
    thr     = 32'(warps_per_cta) * WARP_SIZE;
    rcta    = 32'(regs_per_thread) * thr;
    rf_lim  = (rcta == 0) ? 32'(MAX_CTAS_P) : 32'(RF_REGS_P) / rcta;
    thr_lim = (thr == 0) ? 32'(MAX_CTAS_P) : 32'(MAX_THR_P) / thr;
    spm_lim = (spm_per_cta == 0) ? 32'(MAX_CTAS_P) : 32'(SPM_BYTES_P) / 32'(spm_per_cta);
    sum_lim = (rcta == 0) ? 32'(MAX_CTAS_P)
            : (32'(RF_REGS_P) * 4 + 32'(SPM_BYTES_P)) / (rcta * 4 + 32'(spm_per_cta));
    upper_c = 32'(MAX_CTAS_P);
    if (thr_lim < upper_c) upper_c = thr_lim;
    if (spm_lim < upper_c) upper_c = spm_lim;
    if (sum_lim < upper_c) upper_c = sum_lim;
  end

  // Evaluation of the current candidate (n_cur CTAs, y_cur of them mix).
  logic [31:0] x_c, rf_used, rf_rem, k_c, spill_c, spm_need;
  logic        ok_c;
  always_comb begin
    x_c      = n_cur - y_cur;
    rf_used  = x_c * rcta;
    rf_rem   = (rf_used <= 32'(RF_REGS_P)) ? 32'(RF_REGS_P) - rf_used : '0;
    k_c      = (y_cur == 0 || thr == 0) ? '0 : rf_rem / (y_cur * thr);
    if (k_c > 32'(regs_per_thread)) k_c = 32'(regs_per_thread);
    spill_c  = 32'(regs_per_thread) - k_c;
    spm_need = n_cur * 32'(spm_per_cta) + y_cur * spill_c * thr * 4;
    ok_c     = (rf_used <= 32'(RF_REGS_P))
            && (spill_c * 10 <= 32'(tau_tenths) * 32'(regs_per_thread))
            && (spm_need <= 32'(SPM_BYTES_P));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      done      <= 1'b0;
      cta_total <= '0;
      cta_rf    <= '0;
      cta_mix   <= '0;
      start_reg <= '0;
      cta_lower <= '0;
      upper     <= '0;
      lower     <= '0;
      n_cur     <= '0;
      y_cur     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          upper <= upper_c;
          lower <= (rf_lim < upper_c) ? rf_lim : upper_c;
          n_cur <= upper_c;
          y_cur <= 32'd1;
          state <= SEARCH;
        end
        SEARCH: begin
          if (lower >= upper || n_cur <= lower) begin
            // Eq. (7): baseline dispatch, no mix CTAs.
            cta_total <= 4'(lower);
            cta_rf    <= 4'(lower);
            cta_mix   <= '0;
            start_reg <= regs_per_thread;
            state     <= FINISH;
          end else if (ok_c) begin
            cta_total <= 4'(n_cur);
            cta_rf    <= 4'(x_c);
            cta_mix   <= 4'(y_cur);
            start_reg <= 7'(k_c);
            state     <= FINISH;
          end else if (y_cur >= n_cur) begin
            n_cur <= n_cur - 1;
            y_cur <= 32'd1;
          end else begin
            y_cur <= y_cur + 1;
          end
        end
        FINISH: begin
          cta_lower <= 4'(lower);
          done      <= 1'b1;
          state     <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

endmodule
