// as_cell_tb: exhaustive test of the A/S cell. All 16 combinations of
// {m, cin, b, a} are applied and {cout, sum} is compared with the arithmetic
// value a + (b xor m) + cin. Purely combinational; a watchdog ends the run.
module as_cell_tb;
  logic a, b, cin, m, sum, cout;
  int checks = 0, failures = 0;

  as_cell dut (.a, .b, .cin, .m, .sum, .cout);

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 16; p++) begin
      logic [1:0] exp;
      {m, cin, b, a} = 4'(p);
      #1;
      exp = 2'(a) + 2'(b ^ m) + 2'(cin);
      checks++;
      if ({cout, sum} !== exp) begin
        failures++;
        $display("FAIL pattern %b: got %b%b exp %b", 4'(p), cout, sum, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
