// bist_ctrl_tb: test of the BIST controller with the LFSR, the signature
// analyzer and the 4-bit parallel A/S around it, and a testbench-held
// pattern memory. It checks
//   - deterministic source: the vectors driven into the A/S, cycle by cycle,
//     are the stored cell patterns spread over all bits, test_mode lasts
//     exactly n_pat clocks, the signature equals the reference one and pass
//     follows the golden value (right golden -> pass, wrong -> fail),
//   - LFSR source: 1023 vectors in x^10+x^7+1 order, reference signature,
//   - n_pat = 0 finishes at once, and start is ignored while busy.
module bist_ctrl_tb;
  import bist_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, src = 0;
  logic [4:0] golden;
  logic [4:0] n_pat;
  logic [3:0] pat_raddr;
  cell_pat_t  pat_rdata;
  logic lfsr_load, lfsr_en, sa_clr, sa_en, test_mode, busy, done, pass;
  logic [9:0] lfsr_q;
  logic [4:0] sig;
  logic [3:0] t_a, t_b, s;
  logic t_m, t_cin, cout;
  logic [10:0] n_applied;
  logic [3:0] mem [16];
  int checks = 0, failures = 0;

  bist_ctrl dut (
    .clk, .rst_n, .start, .src, .golden, .n_pat, .pat_raddr, .pat_rdata,
    .lfsr_load, .lfsr_en, .lfsr_q, .sa_clr, .sa_en, .sig,
    .test_mode, .t_a, .t_b, .t_m, .t_cin, .busy, .done, .pass, .n_applied
  );
  lfsr #(.W(10)) u_lfsr (.clk, .rst_n, .load(lfsr_load), .en(lfsr_en), .q(lfsr_q));
  parallel_as #(.W(4)) u_as (.a(t_a), .b(t_b), .m(t_m), .cin(t_cin), .s, .cout);
  signature_analyzer #(.W(5)) u_sa (.clk, .rst_n, .clr(sa_clr), .en(sa_en), .d({cout, s}), .sig);

  assign pat_rdata = cell_pat_t'(mem[pat_raddr]);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Runs one BIST pass; expected vectors come from vec[], returns cycles.
  task automatic run(input logic s_src, input logic [4:0] gold,
                     input logic [9:0] vec [$], output int cyc);
    int k = 0;
    src = s_src; golden = gold;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 0;
    while (!done) begin
      if (test_mode) begin
        if (k < vec.size())
          check({t_cin, t_m, t_b, t_a} == vec[k],
                $sformatf("vector %0d: %b exp %b", k, {t_cin, t_m, t_b, t_a}, vec[k]));
        k++;
      end
      if (k == 3) begin start = 1; src = ~s_src; end  // must be ignored
      @(negedge clk); start = 0; src = s_src;
      cyc++;
    end
    check(k == vec.size(), $sformatf("%0d vectors applied, exp %0d", k, vec.size()));
    check(cyc == vec.size(), $sformatf("done after %0d clocks, exp %0d", cyc, vec.size()));
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] vec [$];
    logic [4:0] rs;
    logic [9:0] st;
    int cyc;
    golden = '0; n_pat = '0;
    foreach (mem[i]) mem[i] = 4'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!busy && !done && !test_mode, "idle after reset");

    // Deterministic source, 7 patterns.
    n_pat = 5'd7;
    vec.delete(); rs = '0;
    for (int i = 0; i < 7; i++) begin
      cell_pat_t p;
      logic [9:0] v;
      p = cell_pat_t'(mem[i]);
      v = {p.cin, p.m, {4{p.b}}, {4{p.a}}};
      vec.push_back(v);
      rs = misr5_step(rs, as4_ref(v[3:0], v[7:4], v[8], v[9]));
    end
    run(1'b0, rs, vec, cyc);
    check(sig == rs && pass, $sformatf("deterministic signature %b exp %b, pass %b", sig, rs, pass));
    check(n_applied == 11'd7, "n_applied 7");
    run(1'b0, rs ^ 5'b00100, vec, cyc);
    check(sig == rs && !pass, "wrong golden gives fail");

    // LFSR source, full sequence.
    vec.delete(); rs = '0; st = 10'd1;
    for (int i = 0; i < 1023; i++) begin
      vec.push_back(st);
      rs = misr5_step(rs, as4_ref(st[3:0], st[7:4], st[8], st[9]));
      st = lfsr10_step(st);
    end
    run(1'b1, rs, vec, cyc);
    check(sig == rs && pass, $sformatf("LFSR signature %b exp %b", sig, rs));
    check(n_applied == 11'd1023, "n_applied 1023");

    // Empty pattern set.
    n_pat = '0; vec.delete();
    run(1'b0, 5'd0, vec, cyc);
    check(pass && sig == '0, "empty run passes with zero signature");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
