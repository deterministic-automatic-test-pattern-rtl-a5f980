// pattern_counter_tb: checks that the counter holds without en, counts
// 0..15 and wraps with en, raises last only at 15, and that clr wins over en.
module pattern_counter_tb;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, last;
  logic [3:0] q;
  int checks = 0, failures = 0;

  pattern_counter dut (.clk, .rst_n, .clr, .en, .q, .last);

  always #5 clk = ~clk;

  task automatic chk(input logic [3:0] eq, input string what);
    checks++;
    if (q !== eq || last !== (eq == 4'hF)) begin
      failures++;
      $display("FAIL %s: q=%0d last=%b exp q=%0d", what, q, last, eq);
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk); chk(0, "after reset");
    @(negedge clk); chk(0, "hold without en");
    en = 1;
    for (int i = 1; i <= 20; i++) begin
      @(negedge clk); chk(4'(i), "count");
    end
    clr = 1;
    @(negedge clk); chk(0, "clr over en");
    clr = 0; en = 0;
    @(negedge clk); chk(0, "hold after clr");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
