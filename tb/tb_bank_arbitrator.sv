// tb_bank_arbitrator: random read traffic from four ports against a reference
// model of the per-bank request queues. Each clock it checks which requests
// are accepted, that every bank grants its oldest request in order, the
// register-file / operand-cache decision of the judgement logic (a mix CTA's
// registers from Start_Reg upward go to the operand cache), the operand-cache
// set, and the minimum one-cycle wait. The allocation used is four
// register-file CTAs and two mix CTAs of 8 warps, Start_Reg = 8.
module tb_bank_arbitrator;
  import expars_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NP = 4, NB = 4, QD = 4;

  rat_cfg_t cfg;
  logic     req_valid [NP];
  reg_req_t req [NP];
  logic [3:0] req_tag [NP];
  logic     req_ready [NP];
  logic     gnt_valid [NB];
  logic     gnt_to_oc [NB];
  reg_req_t gnt_req [NB];
  logic [3:0] gnt_tag [NB];
  logic [1:0] gnt_set [NB];

  bank_arbitrator #(.NPORT(NP), .NBANK(NB), .QDEPTH(QD), .TAG_W(4)) dut (
    .clk, .rst_n, .cfg, .req_valid, .req, .req_tag, .req_ready,
    .gnt_valid, .gnt_to_oc, .gnt_req, .gnt_tag, .gnt_set);

  int checks = 0, failures = 0;
  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  typedef struct { int warp, rnum, tag; } mreq_t;
  mreq_t mq [NB][$];
  int n_oc = 0, n_rf = 0, n_conflict = 0;
  bit gnt_now [NB];

  function automatic int ref_oc(int w, int r);
    return ((w / 8) >= 4 && r >= 8) ? 1 : 0;
  endfunction

  initial begin
    for (int p = 0; p < NP; p++) begin req_valid[p] = 0; req[p] = '0; req_tag[p] = '0; end
    cfg = '{start_cta: 3'd4, start_reg: 6'd8, max_reg: 6'd27, warps_per_cta: 6'd8};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        req_valid[p] = (cyc < 2900) && ($urandom % 100 < 45);
        req[p].warp  = 6'($urandom % 48);
        req[p].rnum  = 6'($urandom % 28);
        req_tag[p]   = 4'($urandom);
      end
      #4;
      // grants: oldest of each bank
      for (int b = 0; b < NB; b++) gnt_now[b] = mq[b].size() != 0;
      for (int b = 0; b < NB; b++) begin
        check("gnt_valid", int'(gnt_valid[b]), int'(mq[b].size() != 0));
        if (mq[b].size() != 0 && gnt_valid[b]) begin
          check("gnt warp", int'(gnt_req[b].warp), int'(mq[b][0].warp));
          check("gnt reg", int'(gnt_req[b].rnum), int'(mq[b][0].rnum));
          check("gnt tag", int'(gnt_tag[b]), int'(mq[b][0].tag));
          check("gnt bank", int'(gnt_req[b].rnum) % 4, b);
          check("gnt to_oc", int'(gnt_to_oc[b]), int'(ref_oc(mq[b][0].warp, mq[b][0].rnum)));
          check("gnt set", int'(gnt_set[b]), int'((mq[b][0].rnum / 4) % 4));
          if (gnt_to_oc[b]) n_oc++; else n_rf++;
        end
      end
      // acceptance
      begin
        bit taken [NB];
        for (int b = 0; b < NB; b++) taken[b] = 0;
        for (int p = 0; p < NP; p++) begin
          int b;
          bit exp_rdy;
          b = int'(req[p].rnum) % 4;
          exp_rdy = !taken[b] && mq[b].size() < QD;
          check("req_ready", int'(req_ready[p]), int'(exp_rdy));
          if (req_valid[p] && !exp_rdy && taken[b]) n_conflict++;
          if (req_valid[p] && exp_rdy) begin
            taken[b] = 1;
            mq[b].push_back('{int'(req[p].warp), int'(req[p].rnum), int'(req_tag[p])});
          end
        end
      end
      // the heads granted this cycle leave; a request accepted this cycle
      // is granted one cycle later at the earliest
      for (int b = 0; b < NB; b++) if (gnt_now[b]) void'(mq[b].pop_front());
      @(posedge clk);
    end
    $display("grants to OC %0d, to RF %0d, same-bank conflicts %0d", n_oc, n_rf, n_conflict);
    check("some OC grants", int'(n_oc > 100), 1);
    check("some RF grants", int'(n_rf > 100), 1);
    check("conflicts seen", int'(n_conflict > 10), 1);
    for (int b = 0; b < NB; b++) check("drained", mq[b].size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
