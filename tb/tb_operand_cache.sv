// tb_operand_cache: random fills, pins, result writes, unpins and bank reads
// against a reference copy of the 4 x 4 line array. Checks the tag fields
// ({warp, Reg#[5:4], valid, dirty} plus pin), that a register always lands in
// bank Reg#[1:0] / set Reg#[3:2], the tag-compare of result writes (hit sets
// dirty, a different warp or high register bits miss), unpinning by warp, and
// the one-cycle read latency with four banks read in the same clock.
module tb_operand_cache;
  import expars_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rd_en [4]; logic [1:0] rd_set [4]; line_t rd_data [4];
  logic fill_en = 0; logic [1:0] fill_bank, fill_set, fill_pre; warp_id_t fill_warp; line_t fill_data;
  logic pin_en = 0; logic [1:0] pin_bank, pin_set;
  logic wr_en = 0; warp_id_t wr_warp; reg_idx_t wr_reg; line_t wr_data; logic wr_hit;
  logic unpin_en = 0; warp_id_t unpin_warp;
  warp_id_t tw [4][4]; logic [1:0] tp [4][4]; logic tv [4][4], td [4][4], tpin [4][4];
  line_t lo [4][4];

  operand_cache dut (.clk, .rst_n, .rd_en, .rd_set, .rd_data, .fill_en, .fill_bank, .fill_set,
    .fill_warp, .fill_pre, .fill_data, .pin_en, .pin_bank, .pin_set, .wr_en, .wr_warp, .wr_reg,
    .wr_data, .wr_hit, .unpin_en, .unpin_warp, .tag_warp(tw), .tag_pre(tp), .tag_valid(tv),
    .tag_dirty(td), .tag_pin(tpin), .line_o(lo));

  int checks = 0, failures = 0;
  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // reference
  int   m_w [4][4], m_p [4][4]; bit m_v [4][4], m_d [4][4], m_pin [4][4];
  line_t m_data [4][4];
  int n_hit = 0, n_miss = 0;

  function automatic line_t rnd_line();
    line_t l;
    for (int i = 0; i < 32; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  initial begin
    for (int b = 0; b < 4; b++) begin rd_en[b] = 0; rd_set[b] = 0;
      for (int s = 0; s < 4; s++) begin m_v[b][s] = 0; m_d[b][s] = 0; m_pin[b][s] = 0; m_w[b][s] = 0; m_p[b][s] = 0; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int op, r, w, b, s;
      line_t exp_rd [4];
      bit    exp_rd_v [4];
      @(negedge clk);
      fill_en = 0; pin_en = 0; wr_en = 0; unpin_en = 0;
      op = $urandom % 4;
      r = $urandom % 63; w = $urandom % 4; b = r % 4; s = (r / 4) % 4;
      case (op)
        0: begin fill_en = 1; fill_bank = 2'(b); fill_set = 2'(s); fill_pre = 2'(r / 16);
                 fill_warp = 6'(w); fill_data = rnd_line(); end
        1: begin wr_en = 1; wr_warp = 6'(w); wr_reg = 6'(r); wr_data = rnd_line(); end
        2: begin unpin_en = 1; unpin_warp = 6'(w); end
        default: begin pin_en = 1; pin_bank = 2'(b); pin_set = 2'(s); end
      endcase
      for (int k = 0; k < 4; k++) begin
        rd_en[k] = 1'($urandom % 2); rd_set[k] = 2'($urandom);
        exp_rd_v[k] = rd_en[k] && m_v[k][rd_set[k]];
        exp_rd[k] = m_data[k][rd_set[k]];
      end
      #1;
      if (op == 1) begin
        bit h;
        h = m_v[b][s] && m_w[b][s] == w && m_p[b][s] == r / 16;
        check("wr_hit", int'(wr_hit), int'(h));
        if (h) n_hit++; else n_miss++;
      end
      @(posedge clk);
      // update reference in the same order as the design
      if (op == 2) for (int bb = 0; bb < 4; bb++) for (int ss = 0; ss < 4; ss++)
        if (m_w[bb][ss] == w) m_pin[bb][ss] = 0;
      if (op == 3) m_pin[b][s] = 1;
      if (op == 0) begin m_w[b][s] = w; m_p[b][s] = r / 16; m_v[b][s] = 1; m_d[b][s] = 0;
                         m_pin[b][s] = 1; m_data[b][s] = fill_data; end
      if (op == 1 && m_v[b][s] && m_w[b][s] == w && m_p[b][s] == r / 16) begin
        m_d[b][s] = 1; m_data[b][s] = wr_data;
      end
      #1;
      for (int k = 0; k < 4; k++)
        if (exp_rd_v[k]) check("read data", int'(rd_data[k] == exp_rd[k]), 1);
      for (int bb = 0; bb < 4; bb++) for (int ss = 0; ss < 4; ss++) begin
        check("valid", int'(tv[bb][ss]), int'(m_v[bb][ss]));
        check("pin", int'(tpin[bb][ss]), int'(m_pin[bb][ss]));
        if (m_v[bb][ss]) begin
          check("tag warp", int'(tw[bb][ss]), int'(m_w[bb][ss]));
          check("tag pre", int'(tp[bb][ss]), int'(m_p[bb][ss]));
          check("dirty", int'(td[bb][ss]), int'(m_d[bb][ss]));
          check("line data", int'(lo[bb][ss] == m_data[bb][ss]), 1);
        end
      end
    end
    $display("write hits %0d misses %0d", n_hit, n_miss);
    check("hits seen", int'(n_hit > 20), 1);
    check("misses seen", int'(n_miss > 20), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
