// lfsr_tb: checks that the 10-bit pattern LFSR (default) and a 4-bit and a
// 16-bit instance step through all 2^W-1 non-zero states before repeating
// (maximal length), that the 10-bit one follows x^10+x^7+1 step by step,
// that en = 0 holds the state and that load returns it to the seed.
module lfsr_tb;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [9:0]  q10;
  logic [3:0]  q4;
  logic [15:0] q16;
  bit seen10 [1024];
  bit seen4  [16];
  int checks = 0, failures = 0;

  lfsr dut (.clk, .rst_n, .load, .en, .q(q10));
  lfsr #(.W(4), .SEED(4'h9)) dut4 (.clk, .rst_n, .load, .en, .q(q4));
  lfsr #(.W(16), .SEED(16'hACE1)) dut16 (.clk, .rst_n, .load, .en, .q(q16));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] ref10;
    int n10 = 0, n4 = 0, n16 = 0, step_err = 0;
    bit done10 = 0, done4 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(q10 == 10'd1 && q4 == 4'h9 && q16 == 16'hACE1, "seed after reset");
    @(negedge clk);
    check(q10 == 10'd1, "hold without en");
    en = 1;
    ref10 = q10;
    for (int i = 1; i <= 65535; i++) begin
      if (!done10) begin seen10[q10] = 1; end
      if (!done4) begin seen4[q4] = 1; end
      @(negedge clk);
      if (!done10) begin
        ref10 = lfsr10_step(ref10);
        if (q10 != ref10) step_err++;
        if (q10 == 10'd1) begin n10 = i; done10 = 1; end
      end
      if (!done4 && q4 == 4'h9) begin n4 = i; done4 = 1; end
      if (q16 == 16'hACE1) begin n16 = i; break; end
      check(q10 != '0 && q16 != '0, "state never zero");
    end
    check(n10 == 1023, $sformatf("10-bit period %0d", n10));
    check(n4 == 15, $sformatf("4-bit period %0d", n4));
    check(n16 == 65535, $sformatf("16-bit period %0d", n16));
    check(step_err == 0, $sformatf("%0d steps off x^10+x^7+1", step_err));
    begin
      int c = 0;
      foreach (seen10[i]) c += seen10[i];
      check(c == 1023, $sformatf("10-bit distinct states %0d", c));
      c = 0;
      foreach (seen4[i]) c += seen4[i];
      check(c == 15, $sformatf("4-bit distinct states %0d", c));
    end
    repeat (3) @(negedge clk);
    load = 1;
    @(negedge clk);
    load = 0; en = 0;
    check(q10 == 10'd1 && q4 == 4'h9, "load returns to seed");
    $display("periods: W=10 %0d, W=4 %0d, W=16 %0d", n10, n4, n16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
