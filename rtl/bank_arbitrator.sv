// bank_arbitrator: register-read arbitration with the EXPARS judgement logic.
//
// Operand collectors present up to NPORT read requests (Warp_ID, Reg#) per
// clock. The judgement logic of Fig. 9 decides for each request where the
// register lives: CTA_ID = Warp_ID / Warps_Per_CTA (Eq. 12); if
// Start_CTA > CTA_ID the whole CTA is in the register file; otherwise a
// register with Reg# >= Start_Reg is in the operand cache (OC), a lower one in
// the register file. The bank of either structure is Reg#[1:0], and the OC set
// is Reg#[3:2] (Fig. 8); no OC tag is looked up because the register
// prefetcher has already placed every scratchpad register of the running
// bundle in the OC.
//
// Each bank owns a FIFO of QDEPTH requests. A request is accepted
// (req_ready) when its bank FIFO has room and no lower-numbered port targets
// the same bank in that cycle. Every clock, every non-empty bank FIFO grants
// its oldest request, so the granted group never has two accesses to one
// bank: gnt_valid[b] with gnt_to_oc[b] steering it to the register file bank
// b or OC bank b, set gnt_set[b]. A request waits at least one cycle in its
// FIFO (accepted in cycle t, granted in cycle t+1 at the earliest). The
// document gives the judgement and the per-bank queues; the port count, the
// FIFO depth and the fixed port priority are choices of this design.
module bank_arbitrator
  import expars_pkg::*;
#(
  parameter int unsigned NPORT  = 4,
  parameter int unsigned NBANK  = OC_BANKS,
  parameter int unsigned QDEPTH = 4,
  parameter int unsigned TAG_W  = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  rat_cfg_t   cfg,
  input  logic       req_valid [NPORT],
  input  reg_req_t   req       [NPORT],
  input  logic [TAG_W-1:0] req_tag [NPORT],
  output logic       req_ready [NPORT],
  output logic       gnt_valid [NBANK],
  output logic       gnt_to_oc [NBANK],
  output reg_req_t   gnt_req   [NBANK],
  output logic [TAG_W-1:0] gnt_tag [NBANK],
  output logic [1:0] gnt_set   [NBANK]
);

  localparam int unsigned PW = (QDEPTH > 1) ? $clog2(QDEPTH) : 1;

  typedef struct packed {
    reg_req_t         r;
    logic             to_oc;
    logic [TAG_W-1:0] tag;
  } entry_t;

  entry_t          q     [NBANK][QDEPTH];
  logic [PW-1:0]   rd_p  [NBANK];
  logic [PW-1:0]   wr_p  [NBANK];
  logic [PW:0]     cnt   [NBANK];

  // Judgement logic and per-bank port selection.
  logic            push   [NBANK];
  entry_t          push_e [NBANK];

  always_comb begin
    for (int b = 0; b < int'(NBANK); b++) begin
      push[b]   = 1'b0;
      push_e[b] = '0;
    end
    for (int p = 0; p < int'(NPORT); p++) begin
      int unsigned bk;
      bk = int'(req[p].rnum) % NBANK;
      req_ready[p] = 1'b0;
      if (!push[bk] && (cnt[bk] < (PW+1)'(QDEPTH))) begin
        req_ready[p] = 1'b1;
        if (req_valid[p]) begin
          push[bk]         = 1'b1;
          push_e[bk].r     = req[p];
          push_e[bk].to_oc = in_spm(cfg, req[p].warp, req[p].rnum);
          push_e[bk].tag   = req_tag[p];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < int'(NBANK); b++) begin
        rd_p[b] <= '0;
        wr_p[b] <= '0;
        cnt[b]  <= '0;
        for (int i = 0; i < int'(QDEPTH); i++) q[b][i] <= '0;
      end
    end else begin
      for (int b = 0; b < int'(NBANK); b++) begin
        if (push[b]) begin
          q[b][wr_p[b]] <= push_e[b];
          wr_p[b] <= (wr_p[b] == PW'(QDEPTH-1)) ? '0 : wr_p[b] + 1'b1;
        end
        if (gnt_valid[b]) rd_p[b] <= (rd_p[b] == PW'(QDEPTH-1)) ? '0 : rd_p[b] + 1'b1;
        cnt[b] <= cnt[b] + (PW+1)'(push[b]) - (PW+1)'(gnt_valid[b]);
      end
    end
  end

  always_comb begin
    for (int b = 0; b < int'(NBANK); b++) begin
      gnt_valid[b] = (cnt[b] != 0);
      gnt_to_oc[b] = q[b][rd_p[b]].to_oc;
      gnt_req[b]   = q[b][rd_p[b]].r;
      gnt_tag[b]   = q[b][rd_p[b]].tag;
      gnt_set[b]   = q[b][rd_p[b]].r.rnum[3:2];
    end
  end

endmodule
