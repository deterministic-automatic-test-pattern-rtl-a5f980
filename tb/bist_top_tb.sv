// bist_top_tb: end-to-end test of the whole BIST system at its default
// size (4-bit A/S, 10-bit LFSR, 5-bit signature). It goes through
//   1. functional mode: random additions and subtractions through the A/S,
//   2. test pattern generation for the A/S cell; a BIST start while the
//      generator is busy must be ignored; the kept patterns, the stats and
//      the 439-cycle run time are compared with the reference model,
//   3. deterministic BIST with the right golden signature (must pass) and a
//      wrong one (must fail), while the functional inputs toggle randomly
//      (they must not reach the A/S in test mode),
//   4. pseudo-random BIST over the full 1023-vector LFSR sequence,
//   5. stuck-at faults forced into cells of the A/S: each must make the
//      deterministic BIST fail,
//   6. functional mode again after the tests.
// Golden signatures and the coverage of the kept patterns on all 80
// single stuck-at faults of the four cells are worked out with the models
// in tb_ref_pkg. Every mechanism is counted and one that never happened is
// a failure.
module bist_top_tb;
  import bist_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [3:0] func_a, func_b, func_s;
  logic func_m, func_cin, func_cout;
  logic atpg_start = 0, atpg_busy, atpg_done;
  logic [4:0] n_pat;
  datpg_stats_t atpg_stats;
  logic bist_start = 0, bist_src = 0, bist_busy, bist_done, bist_pass;
  logic [4:0] golden = '0, signature;
  logic [10:0] bist_n_applied;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_func_add = 0, n_func_sub = 0, n_atpg = 0, n_start_ignored = 0;
  int n_bist_det_pass = 0, n_bist_det_fail = 0, n_bist_lfsr_pass = 0;
  int n_fault_caught = 0, n_test_isolation = 0;

  bist_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic func_ops(input int n);
    for (int i = 0; i < n; i++) begin
      logic [4:0] exp;
      func_a = 4'($urandom); func_b = 4'($urandom);
      func_m = 1'($urandom); func_cin = func_m;
      #1;
      exp = func_m ? 5'(func_a) + 5'(4'(~func_b)) + 5'd1 : 5'(func_a) + 5'(func_b);
      check({func_cout, func_s} == exp,
            $sformatf("functional %0d %s %0d = %b", func_a, func_m ? "-" : "+", func_b, {func_cout, func_s}));
      if (func_m) n_func_sub++; else n_func_add++;
      @(negedge clk);
    end
  endtask

  // One BIST run; functional inputs toggle while it runs. Returns cycles.
  task automatic bist(input logic src, input logic [4:0] gold, output int cyc);
    bist_src = src; golden = gold;
    @(negedge clk); bist_start = 1;
    @(negedge clk); bist_start = 0;
    cyc = 0;
    while (!bist_done) begin
      {func_a, func_b, func_m, func_cin} = 10'($urandom);
      @(negedge clk); cyc++;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    det_t d;
    min_t r;
    logic [3:0] pats [$];
    logic [4:0] gold_det, gold_lfsr, st5;
    logic [9:0] st;
    int cyc, covered;

    d = det_ref();
    r = min_ref(d);
    for (int p = 0; p < 16; p++) if (r.fin[p]) pats.push_back(4'(p));

    // Reference golden signatures.
    gold_det = '0;
    foreach (pats[i]) begin
      cell_pat_t cp;
      cp = cell_pat_t'(pats[i]);
      gold_det = misr5_step(gold_det, as4_ref({4{cp.a}}, {4{cp.b}}, cp.m, cp.cin));
    end
    gold_lfsr = '0; st = 10'd1;
    for (int i = 0; i < 1023; i++) begin
      gold_lfsr = misr5_step(gold_lfsr, as4_ref(st[3:0], st[7:4], st[8], st[9]));
      st = lfsr10_step(st);
    end

    // Reference coverage of the kept patterns on the 4-bit A/S.
    covered = 0;
    for (int ci = 0; ci < 4; ci++)
      for (int f = 0; f < 20; f++) begin
        bit hit = 0;
        foreach (pats[i]) begin
          cell_pat_t cp;
          logic c_g, c_f;
          logic [1:0] og, of;
          logic [4:0] rg, rf;
          cp = cell_pat_t'(pats[i]);
          c_g = cp.cin; c_f = cp.cin;
          for (int k = 0; k < 4; k++) begin
            og = cell_ref({cp.m, c_g, cp.b, cp.a}, 1'b0, 0);
            of = cell_ref({cp.m, c_f, cp.b, cp.a}, k == ci, f);
            rg[k] = og[0]; rf[k] = of[0];
            c_g = og[1]; c_f = of[1];
          end
          rg[4] = c_g; rf[4] = c_f;
          if (rg != rf) hit = 1;
        end
        covered += int'(hit);
      end
    $display("kept patterns cover %0d of 80 stuck-at faults of the 4-bit A/S", covered);
    check(covered == 80, "kept patterns cover every fault of the 4-bit A/S");

    {func_a, func_b, func_m, func_cin} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // 1. functional mode
    func_ops(40);

    // 2. test pattern generation
    @(negedge clk); atpg_start = 1;
    @(negedge clk); atpg_start = 0;
    cyc = 0;
    while (!atpg_done) begin
      if (cyc == 5) begin
        bist_start = 1; bist_src = 1;
        @(negedge clk); cyc++;
        bist_start = 0;
        if (!bist_busy) n_start_ignored++;
        check(!bist_busy, "BIST start ignored while generating");
        continue;
      end
      @(negedge clk); cyc++;
    end
    n_atpg++;
    check(cyc == 439, $sformatf("generation took %0d cycles, exp 439", cyc));
    check(int'(n_pat) == pats.size(), $sformatf("n_pat %0d exp %0d", n_pat, pats.size()));
    check(int'(atpg_stats.n_detectable) == 20, "20 detectable cell faults");
    check(int'(atpg_stats.n_sel_sa0) == r.r0 && int'(atpg_stats.n_sel_sa1) == r.r1, "step sizes");
    $display("generation: %0d cycles, s-a-0 step %0d patterns, s-a-1 step %0d, final %0d",
             cyc, atpg_stats.n_sel_sa0, atpg_stats.n_sel_sa1, atpg_stats.n_final);

    // 3. deterministic BIST
    bist(1'b0, gold_det, cyc);
    check(cyc == pats.size(), $sformatf("deterministic BIST %0d cycles", cyc));
    check(bist_n_applied == 11'(pats.size()), "deterministic vector count");
    check(signature == gold_det && bist_pass, $sformatf("deterministic signature %b exp %b", signature, gold_det));
    if (bist_pass) begin n_bist_det_pass++; n_test_isolation++; end
    bist(1'b0, gold_det ^ 5'b10000, cyc);
    check(!bist_pass, "wrong golden signature reported as fail");
    if (!bist_pass) n_bist_det_fail++;

    // 4. LFSR BIST
    bist(1'b1, gold_lfsr, cyc);
    check(cyc == 1023, $sformatf("LFSR BIST %0d cycles", cyc));
    check(signature == gold_lfsr && bist_pass, $sformatf("LFSR signature %b exp %b", signature, gold_lfsr));
    if (bist_pass) n_bist_lfsr_pass++;
    $display("test length: %0d deterministic vectors against %0d LFSR vectors", pats.size(), cyc);

    // 5. faults forced into the A/S
    force dut.u_cut.g_cell[0].u_cell.sum = 1'b1;
    bist(1'b0, gold_det, cyc);
    check(!bist_pass, "cell 0 sum s-a-1 detected");
    if (!bist_pass) n_fault_caught++;
    release dut.u_cut.g_cell[0].u_cell.sum;
    force dut.u_cut.g_cell[2].u_cell.bx = 1'b0;
    bist(1'b0, gold_det, cyc);
    check(!bist_pass, "cell 2 bx s-a-0 detected");
    if (!bist_pass) n_fault_caught++;
    release dut.u_cut.g_cell[2].u_cell.bx;
    force dut.u_cut.g_cell[3].u_cell.cout = 1'b1;
    bist(1'b0, gold_det, cyc);
    check(!bist_pass, "cell 3 cout s-a-1 detected");
    if (!bist_pass) n_fault_caught++;
    release dut.u_cut.g_cell[3].u_cell.cout;
    force dut.u_cut.g_cell[1].u_cell.h = 1'b0;
    bist(1'b0, gold_det, cyc);
    check(!bist_pass, "cell 1 h s-a-0 detected");
    if (!bist_pass) n_fault_caught++;
    release dut.u_cut.g_cell[1].u_cell.h;
    bist(1'b0, gold_det, cyc);
    check(bist_pass, "fault-free again after release");

    // 6. functional mode again
    func_ops(40);

    $display("mechanisms: add %0d, subtract %0d, generation %0d, start ignored %0d, det pass %0d, det fail %0d, lfsr pass %0d, faults caught %0d, test isolation %0d",
             n_func_add, n_func_sub, n_atpg, n_start_ignored, n_bist_det_pass, n_bist_det_fail,
             n_bist_lfsr_pass, n_fault_caught, n_test_isolation);
    check(n_func_add > 0 && n_func_sub > 0, "functional add and subtract seen");
    check(n_atpg > 0, "generation seen");
    check(n_start_ignored > 0, "ignored start seen");
    check(n_bist_det_pass > 0 && n_bist_det_fail > 0, "deterministic pass and fail seen");
    check(n_bist_lfsr_pass > 0, "LFSR BIST seen");
    check(n_fault_caught == 4, "every forced fault caught");
    check(n_test_isolation > 0, "functional inputs isolated in test mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
