// signature_analyzer_tb: feeds 500 random 5-bit responses, with en dropped
// now and then, into the default 5-bit MISR and compares the signature after
// every clock with the reference x^5+x^3+1 register of tb_ref_pkg. Checks
// clr and that a single flipped response bit changes the final signature.
module signature_analyzer_tb;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [4:0] d, sig, ref_sig;
  int checks = 0, failures = 0;

  signature_analyzer dut (.clk, .rst_n, .clr, .en, .d, .sig);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] stream [200];
    logic [4:0] sig_a;
    d = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(sig == '0, "zero after reset");
    ref_sig = '0;
    for (int i = 0; i < 500; i++) begin
      d  = 5'($urandom);
      en = ($urandom % 8) != 0;
      @(negedge clk);
      if (en) ref_sig = misr5_step(ref_sig, d);
      check(sig == ref_sig, $sformatf("step %0d sig %b exp %b", i, sig, ref_sig));
    end
    clr = 1; en = 1;
    @(negedge clk);
    clr = 0;
    check(sig == '0, "clr");
    // Aliasing check: one flipped bit in a 200-word stream.
    foreach (stream[i]) stream[i] = 5'($urandom);
    foreach (stream[i]) begin d = stream[i]; @(negedge clk); end
    sig_a = sig;
    clr = 1; @(negedge clk); clr = 0;
    stream[77][2] = ~stream[77][2];
    foreach (stream[i]) begin d = stream[i]; @(negedge clk); end
    check(sig != sig_a, "single-bit error changes the signature");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
