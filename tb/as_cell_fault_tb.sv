// as_cell_fault_tb: test of the faulty-cell model. With fault injection off
// it must equal the arithmetic adder/subtractor for every pattern; with each
// of the 20 single stuck-at faults on it must match the gate-level reference
// in tb_ref_pkg for every pattern. A few hand-worked cases are checked as
// well (e.g. cout stuck-at-1 with all inputs 0 gives {cout,sum} = 10).
module as_cell_fault_tb;
  import bist_pkg::*;
  import tb_ref_pkg::*;

  logic  a, b, cin, m, fault_en, test, sum, cout;
  site_e fault_site;
  int checks = 0, failures = 0;

  as_cell_fault dut (.a, .b, .cin, .m, .fault_en, .fault_site, .test, .sum, .cout);

  task automatic expect2(input logic [1:0] exp, input string what);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL %s: got %b%b exp %b", what, cout, sum, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fault_en = 0; fault_site = SITE_A; test = 0;
    for (int p = 0; p < 16; p++) begin
      {m, cin, b, a} = 4'(p);
      #1;
      expect2(2'(a) + 2'(b ^ m) + 2'(cin), $sformatf("fault-free p=%0d", p));
    end
    fault_en = 1;
    for (int f = 0; f < 20; f++) begin
      fault_site = site_e'(f % 10);
      test       = (f >= 10);
      for (int p = 0; p < 16; p++) begin
        {m, cin, b, a} = 4'(p);
        #1;
        expect2(cell_ref(4'(p), 1'b1, f), $sformatf("fault %0d p=%0d", f, p));
      end
    end
    // Hand-worked cases.
    fault_site = SITE_COUT; test = 1; {m, cin, b, a} = 4'b0000; #1;
    expect2(2'b10, "cout s-a-1, inputs 0000");
    fault_site = SITE_M; test = 0; {m, cin, b, a} = 4'b1001; #1;   // a=1,b=0,m=1 -> add
    expect2(2'b01, "m s-a-0, a=1 b=0 m=1 cin=0");
    fault_site = SITE_CIN; test = 1; {m, cin, b, a} = 4'b0011; #1;
    expect2(2'b11, "cin s-a-1, a=1 b=1 cin=0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
