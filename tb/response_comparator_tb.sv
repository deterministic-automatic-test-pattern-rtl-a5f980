// response_comparator_tb: exhaustive test of the comparator for 2-bit
// responses (all 16 good/faulty pairs) and random 7-bit responses; detect
// must be high exactly when the two responses differ.
module response_comparator_tb;
  logic [1:0] g, f;
  logic [6:0] g7, f7;
  logic det, det7;
  int checks = 0, failures = 0;

  response_comparator dut (.good(g), .faulty(f), .detect(det));
  response_comparator #(.W(7)) dut7 (.good(g7), .faulty(f7), .detect(det7));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {g, f} = 4'(v);
      #1;
      checks++;
      if (det !== (g != f)) begin
        failures++; $display("FAIL good=%b faulty=%b detect=%b", g, f, det);
      end
    end
    for (int i = 0; i < 100; i++) begin
      g7 = 7'($urandom);
      f7 = (i % 3 == 0) ? g7 : g7 ^ (7'd1 << (i % 7));
      #1;
      checks++;
      if (det7 !== (g7 != f7)) begin
        failures++; $display("FAIL W=7 good=%b faulty=%b", g7, f7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
