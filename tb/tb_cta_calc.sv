// tb_cta_calc: runs the CTA calculation for the fourteen register-limited
// kernels used to evaluate the design (warps per CTA, scratchpad bytes per
// CTA and registers per thread = ceil(registers per CTA / threads per CTA)),
// on the Fermi SM (32K registers, 48KB scratchpad, 8 CTAs, 1,536 threads,
// tau = 0.8). Expected results were worked out by hand-checked enumeration of
// the same constraints. Also checks the baseline counts, the average of 5.5
// CTAs per SM over the set, the cycle bound, and two corner cases.
module tb_cta_calc;
  import expars_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0;
  logic [6:0]  rpt;
  logic [5:0]  wpc;
  logic [16:0] spc;
  logic [3:0]  tau = 4'd8;
  logic        busy, done;
  logic [3:0]  tot, nrf, nmix, low;
  logic [6:0]  sreg;

  cta_calc dut (.clk, .rst_n, .start, .regs_per_thread(rpt), .warps_per_cta(wpc),
                .spm_per_cta(spc), .tau_tenths(tau), .busy, .done,
                .cta_total(tot), .cta_rf(nrf), .cta_mix(nmix), .start_reg(sreg),
                .cta_lower(low));

  int checks = 0, failures = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // name, wpc, spm, rpt, baseline, total, rf, mix, k
  typedef struct { string n; int wpc, spm, rpt, base, tot, rf, mix, k; } wl_t;
  wl_t wl [14] = '{
    '{"LBM",   4,    0, 36, 7, 8, 6, 2, 20},
    '{"ST",   16,    0, 29, 2, 3, 2, 1,  6},
    '{"MQ",    8,    0, 28, 4, 6, 4, 2,  8},
    '{"SGE",   4,  512, 44, 5, 7, 5, 2, 18},
    '{"BT",   16,    0, 24, 2, 3, 2, 1, 16},
    '{"HS",    8, 3072, 36, 3, 4, 3, 1, 20},
    '{"LEUK",  6,    0, 24, 7, 8, 6, 2, 13},
    '{"MC",    8, 2048, 24, 5, 6, 5, 1,  8},
    '{"CONV",  6,    0, 24, 7, 8, 6, 2, 13},
    '{"EST",   8,    0, 24, 5, 6, 5, 1,  8},
    '{"MERG", 16, 8192, 24, 2, 3, 2, 1, 16},
    '{"QUA",  12,    0, 32, 2, 3, 2, 1, 21},
    '{"SING1", 8,    0, 24, 5, 6, 5, 1,  8},
    '{"SING2", 8,    0, 28, 4, 6, 4, 2,  8}
  };

  task automatic run(int w, int s, int r, output int cycles);
    @(negedge clk);
    wpc = 6'(w); spc = 17'(s); rpt = 7'(r);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    int cyc, sum;
    sum = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (wl[i]) begin
      run(wl[i].wpc, wl[i].spm, wl[i].rpt, cyc);
      check({wl[i].n, " lower"}, int'(low), int'(wl[i].base));
      check({wl[i].n, " total"}, int'(tot), int'(wl[i].tot));
      check({wl[i].n, " cta_rf"}, int'(nrf), int'(wl[i].rf));
      check({wl[i].n, " cta_mix"}, int'(nmix), int'(wl[i].mix));
      check({wl[i].n, " start_reg"}, int'(sreg), int'(wl[i].k));
      check({wl[i].n, " cycles<=40"}, int'(cyc <= 40), 1);
      // mix CTAs keep at least 20% of their registers in the RF
      check({wl[i].n, " tau"}, int'((wl[i].rpt - int'(sreg)) * 10 <= 8 * wl[i].rpt), 1);
      sum += int'(tot);
      $display("%-6s base=%0d total=%0d rf=%0d mix=%0d start_reg=%0d (%0d cycles)",
               wl[i].n, low, tot, nrf, nmix, sreg, cyc);
    end
    check("sum of CTAs (avg 5.5)", sum, 77);
    // 10 warps, 32 regs/thread, 4KB: the fourth CTA would keep 6 whole
    // registers per thread in the RF and spill 26 (above tau, and 49,664
    // scratchpad bytes), so the baseline three CTAs remain.
    run(10, 4096, 32, cyc);
    check("example total", int'(tot), int'(3));
    check("example mix", int'(nmix), int'(0));
    // Scratchpad-limited kernel: no expansion possible.
    run(8, 16384, 16, cyc);
    check("spm-limited total", int'(tot), int'(3));
    check("spm-limited mix", int'(nmix), int'(0));
    // 63 registers per thread: with tau = 1.0 one mix CTA may keep only 4
    // registers per thread in the RF; with tau = 0.8 two mix CTAs are needed.
    tau = 4'd10;
    run(4, 0, 63, cyc);
    check("tau=1 lower", int'(low), int'(4));
    check("tau=1 total", int'(tot), int'(5));
    check("tau=1 mix", int'(nmix), int'(1));
    check("tau=1 start_reg", int'(sreg), int'(4));
    tau = 4'd8;
    run(4, 0, 63, cyc);
    check("tau=.8 total", int'(tot), int'(5));
    check("tau=.8 rf", int'(nrf), int'(3));
    check("tau=.8 start_reg", int'(sreg), int'(33));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
