// datpg_tb: end-to-end test of the DATPG system for the A/S cell. After
// start it waits for done and checks
//   - the cycle count (edge taking start to edge raising done) against the
//     controller's formula with the reference round counts,
//   - the pattern memory, read through the read port, against the reference
//     minimization of the reference fault simulation (tb_ref_pkg),
//   - that the kept patterns detect every detectable fault of the cell,
//   - that no kept pattern is redundant,
//   - that no smaller pattern set covers all faults (exhaustive search over
//     all 2^16 subsets), reported and counted as a check,
//   - that a second run gives the same result.
module datpg_tb;
  import bist_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [4:0] n_pat;
  datpg_stats_t stats;
  logic [3:0] raddr;
  cell_pat_t rdata;
  int checks = 0, failures = 0;

  datpg dut (.clk, .rst_n, .start, .busy, .done, .n_pat, .stats,
             .pat_raddr(raddr), .pat_rdata(rdata));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input int t);
    det_t  d;
    min_t  r;
    fvec_t cov, oth;
    int    cyc, k, best;
    logic [3:0] got [$];
    d = det_ref();
    r = min_ref(d);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    check(busy, "busy after start");
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == 320 + (1 + (r.r0 + 1) * 17) + (1 + (r.r1 + 1) * 17) + 32,
          $sformatf("run %0d: %0d cycles", t, cyc));
    check(int'(n_pat) == popc16(r.fin), $sformatf("run %0d: n_pat %0d", t, n_pat));
    check(int'(stats.n_detectable) == 20, "all 20 cell faults detectable");
    got.delete();
    for (int i = 0; i < int'(n_pat); i++) begin
      raddr = 4'(i); #1;
      got.push_back(rdata);
    end
    k = 0;
    for (int p = 0; p < 16; p++)
      if (r.fin[p]) begin
        if (k < got.size()) check(got[k] == 4'(p), $sformatf("run %0d: word %0d = %0d exp %0d", t, k, got[k], p));
        k++;
      end
    cov = '0;
    foreach (got[i]) cov |= d[got[i]];
    check(cov == r.detectable, $sformatf("run %0d: coverage %05h", t, cov));
    foreach (got[i]) begin
      oth = '0;
      foreach (got[j]) if (j != i) oth |= d[got[j]];
      check((d[got[i]] & ~oth) != '0, $sformatf("run %0d: pattern %0d redundant", t, got[i]));
    end
    best = 17;
    for (int s = 1; s < (1 << 16); s++) begin
      fvec_t c = '0;
      for (int p = 0; p < 16; p++) if (s[p]) c |= d[p];
      if (c == r.detectable && popc16(16'(s)) < best) best = popc16(16'(s));
    end
    $display("run %0d: %0d patterns kept (s-a-0 step %0d, s-a-1 step %0d), smallest possible %0d, %0d cycles",
             t, got.size(), stats.n_sel_sa0, stats.n_sel_sa1, best, cyc);
    foreach (got[i]) $display("  pattern %0d: m=%b cin=%b b=%b a=%b", i, got[i][3], got[i][2], got[i][1], got[i][0]);
    check(got.size() == best, "kept set is a minimum cover");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    raddr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!busy && !done && n_pat == 0, "idle after reset");
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
