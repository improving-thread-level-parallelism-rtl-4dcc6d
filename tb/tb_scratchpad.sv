// tb_scratchpad: writes whole register lines and single words at random
// addresses over the full 48KB, reads them back through both ports and
// compares with a reference byte-addressed copy. Checks that a line and the
// 32 words with the same 128-byte base are the same storage (word k of a line
// sits in bank k), the one-cycle read latency, and that the word port is held
// off (wd_ready low) while the line port is busy.
module tb_scratchpad;
  import expars_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ln_valid = 0, ln_we = 0, ln_ready, ln_rvalid;
  spm_addr_t ln_addr = '0;
  line_t ln_wdata = '0, ln_rdata;
  logic wd_valid = 0, wd_we = 0, wd_ready, wd_rvalid;
  spm_addr_t wd_addr = '0;
  logic [31:0] wd_wdata = '0, wd_rdata;

  scratchpad dut (.clk, .rst_n, .ln_valid, .ln_we, .ln_addr, .ln_wdata, .ln_ready, .ln_rvalid,
    .ln_rdata, .wd_valid, .wd_we, .wd_addr, .wd_wdata, .wd_ready, .wd_rvalid, .wd_rdata);

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  logic [31:0] ref_w [12288];
  bit          known [12288];
  int n_block = 0;

  initial begin
    for (int i = 0; i < 12288; i++) known[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int op, line, word;
      bit exp_lv, exp_wv;
      line_t exp_l;
      logic [31:0] exp_w;
      @(negedge clk);
      op = $urandom % 6;
      line = $urandom % 384;
      word = (cyc < 3000) ? ($urandom % 12288) : (line * 32 + $urandom % 32);
      ln_valid = (op == 0 || op == 1 || op == 5);
      ln_we = (op == 0);
      ln_addr = 16'(line * 128);
      for (int k = 0; k < 32; k++) ln_wdata[k*32 +: 32] = $urandom;
      wd_valid = (op == 2 || op == 3 || op == 5);
      wd_we = (op == 2);
      wd_addr = 16'(word * 4);
      wd_wdata = $urandom;
      #1;
      check("ln_ready", longint'(ln_ready), longint'(1));
      check("wd_ready", longint'(wd_ready), longint'(!ln_valid));
      if (wd_valid && ln_valid) n_block++;
      exp_lv = 0; exp_wv = 0;
      if (ln_valid && !ln_we) begin
        exp_lv = 1;
        for (int k = 0; k < 32; k++) begin
          exp_l[k*32 +: 32] = ref_w[line*32 + k];
          if (!known[line*32 + k]) exp_lv = 0;
        end
      end
      if (wd_valid && !ln_valid && !wd_we) begin
        exp_wv = known[word];
        exp_w = ref_w[word];
      end
      @(posedge clk);
      if (ln_valid && ln_we)
        for (int k = 0; k < 32; k++) begin ref_w[line*32 + k] = ln_wdata[k*32 +: 32]; known[line*32 + k] = 1; end
      if (wd_valid && !ln_valid && wd_we) begin ref_w[word] = wd_wdata; known[word] = 1; end
      #1;
      check("ln_rvalid", longint'(ln_rvalid), longint'(ln_valid && !ln_we));
      check("wd_rvalid", longint'(wd_rvalid), longint'(wd_valid && !ln_valid && !wd_we));
      if (exp_lv) check("line data", longint'(int'(ln_rdata == exp_l)), longint'(1));
      if (exp_wv) check("word data", longint'(wd_rdata), longint'(exp_w));
    end
    check("word port held off", longint'(int'(n_block > 100)), longint'(1));
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
