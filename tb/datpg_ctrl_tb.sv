// datpg_ctrl_tb: unit test of the DATPG controller. The testbench plays the
// fault-free/faulty cell pair and the comparator: it answers `detect` from a
// detection table it holds, looked up with the counter value and the fault
// the controller selects. Trial 0 uses the table of the A/S cell, the other
// trials random tables (some faults undetectable, some patterns useless).
// For every trial it checks
//   - that each (pattern, fault) pair is visited exactly once,
//   - the patterns written to the memory port against tb_ref_pkg::min_ref,
//   - the stats (detectable faults, sizes of the s-a-0, s-a-1, final sets),
//   - the number of clock edges from the one that takes start to the one
//     that raises done:
//       320 + (1 + (r0+1)*17) + (1 + (r1+1)*17) + 32.
module datpg_ctrl_tb;
  import bist_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic cnt_clr, cnt_en, cnt_last;
  logic [3:0] cnt_q;
  logic fault_en, fault_test, detect;
  site_e fault_site;
  logic pat_we;
  logic [3:0] pat_waddr;
  cell_pat_t pat_wdata;
  logic busy, done;
  datpg_stats_t stats;

  det_t tbl;
  int   visits [16][20];
  int checks = 0, failures = 0;

  pattern_counter #(.W(4)) u_cnt (.clk, .rst_n, .clr(cnt_clr), .en(cnt_en), .q(cnt_q), .last(cnt_last));

  datpg_ctrl dut (
    .clk, .rst_n, .start, .cnt_clr, .cnt_en, .cnt_q, .cnt_last,
    .fault_en, .fault_site, .fault_test, .detect,
    .pat_we, .pat_waddr, .pat_wdata, .busy, .done, .stats
  );

  always #5 clk = ~clk;

  int fidx_now;
  assign fidx_now = int'(fault_site) + (fault_test ? 10 : 0);
  assign detect   = fault_en && tbl[cnt_q][fidx_now];

  logic [3:0] written [$];
  always @(posedge clk) begin
    if (pat_we) begin
      if (pat_waddr != 4'(written.size())) begin
        failures++; $display("FAIL write address %0d, expected %0d", pat_waddr, written.size());
      end
      written.push_back(pat_wdata);
    end
    if (fault_en) visits[cnt_q][fidx_now]++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_trial(input int t);
    min_t r;
    int   cyc, exp_cyc, k;
    r = min_ref(tbl);
    written.delete();
    foreach (visits[p, f]) visits[p][f] = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    exp_cyc = 320 + (1 + (r.r0 + 1) * 17) + (1 + (r.r1 + 1) * 17) + 32;
    check(cyc == exp_cyc, $sformatf("trial %0d cycles %0d exp %0d", t, cyc, exp_cyc));
    foreach (visits[p, f])
      if (visits[p][f] != 1) begin
        failures++; $display("FAIL trial %0d pair p=%0d f=%0d visited %0d times", t, p, f, visits[p][f]);
      end
    checks++;
    check(written.size() == popc16(r.fin),
          $sformatf("trial %0d wrote %0d patterns exp %0d", t, written.size(), popc16(r.fin)));
    k = 0;
    for (int p = 0; p < 16; p++)
      if (r.fin[p]) begin
        if (k < written.size())
          check(written[k] == 4'(p), $sformatf("trial %0d pattern %0d = %0d exp %0d", t, k, written[k], p));
        k++;
      end
    check(int'(stats.n_detectable) == popc(r.detectable), $sformatf("trial %0d n_detectable %0d", t, stats.n_detectable));
    check(int'(stats.n_sel_sa0) == r.r0, $sformatf("trial %0d n_sel_sa0 %0d exp %0d", t, stats.n_sel_sa0, r.r0));
    check(int'(stats.n_sel_sa1) == r.r1, $sformatf("trial %0d n_sel_sa1 %0d exp %0d", t, stats.n_sel_sa1, r.r1));
    check(int'(stats.n_final) == popc16(r.fin), $sformatf("trial %0d n_final %0d", t, stats.n_final));
    $display("trial %0d: detectable %0d, s-a-0 set %0d, s-a-1 set %0d, final %0d, %0d cycles",
             t, popc(r.detectable), r.r0, r.r1, popc16(r.fin), cyc);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tbl = det_ref();
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!busy && !done, "idle after reset");
    run_trial(0);
    for (int t = 1; t <= 6; t++) begin
      for (int p = 0; p < 16; p++)
        for (int f = 0; f < 20; f++)
          tbl[p][f] = (f == 3 * t) ? 1'b0 : (($urandom % 100) < 15);
      run_trial(t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
