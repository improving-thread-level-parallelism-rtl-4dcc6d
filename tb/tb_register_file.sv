// tb_register_file: writes random lines and reads four lines per clock, one
// per read port, comparing with a reference array; checks the one-cycle read
// latency and that all 1,024 lines (32K registers) are distinct storage.
module tb_register_file;
  import expars_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rd_en [4]; logic [9:0] rd_line [4]; line_t rd_data [4];
  logic wr_en = 0; logic [9:0] wr_line = '0; line_t wr_data = '0;

  register_file dut (.clk, .rd_en, .rd_line, .rd_data, .wr_en, .wr_line, .wr_data);

  int checks = 0, failures = 0;
  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  line_t m [1024];

  function automatic line_t pattern(int l, int salt);
    line_t v;
    for (int i = 0; i < 32; i++) v[i*32 +: 32] = 32'(l * 65537 + i * 977 + salt);
    return v;
  endfunction

  initial begin
    for (int k = 0; k < 4; k++) begin rd_en[k] = 0; rd_line[k] = '0; end
    // fill every line
    for (int l = 0; l < 1024; l++) begin
      @(negedge clk);
      wr_en = 1; wr_line = 10'(l); wr_data = pattern(l, 0); m[l] = wr_data;
    end
    for (int cyc = 0; cyc < 3000; cyc++) begin
      line_t exp [4];
      bit    ev [4];
      @(negedge clk);
      wr_en = 1'($urandom % 2); wr_line = 10'($urandom); wr_data = pattern(int'(wr_line), cyc + 1);
      for (int k = 0; k < 4; k++) begin
        rd_en[k] = $urandom % 4 != 0; rd_line[k] = 10'($urandom);
        ev[k] = rd_en[k] && !(wr_en && wr_line == rd_line[k]);
        exp[k] = m[rd_line[k]];
      end
      @(posedge clk);
      if (wr_en) m[wr_line] = wr_data;
      #1;
      for (int k = 0; k < 4; k++) if (ev[k]) check("read", int'(rd_data[k] == exp[k]), 1);
    end
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
