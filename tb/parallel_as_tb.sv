// parallel_as_tb: exhaustive test of the 4-bit parallel A/S. All 1024
// combinations of a, b, m and cin are applied and {cout, s} is compared with
// a + (m ? ~b : b) + cin; with cin = m this is a + b or a - b. A second
// instance at W = 6 is checked on random vectors.
module parallel_as_tb;
  logic [3:0] a, b, s;
  logic       m, cin, cout;
  logic [5:0] a6, b6, s6;
  logic       m6, cin6, cout6;
  int checks = 0, failures = 0;

  parallel_as dut (.a, .b, .m, .cin, .s, .cout);
  parallel_as #(.W(6)) dut6 (.a(a6), .b(b6), .m(m6), .cin(cin6), .s(s6), .cout(cout6));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++) begin
      logic [4:0] exp;
      logic [3:0] bm;
      {cin, m, b, a} = 10'(v);
      #1;
      bm  = m ? ~b : b;
      exp = 5'(a) + 5'(bm) + 5'(cin);
      checks++;
      if ({cout, s} !== exp) begin
        failures++;
        $display("FAIL a=%h b=%h m=%b cin=%b: got %b exp %b", a, b, m, cin, {cout, s}, exp);
      end
    end
    // subtraction result, signed view: 3 - 5 = -2
    a = 4'd3; b = 4'd5; m = 1; cin = 1; #1;
    checks++;
    if (s !== 4'b1110 || cout !== 1'b0) begin
      failures++; $display("FAIL 3-5: s=%b cout=%b", s, cout);
    end
    for (int i = 0; i < 200; i++) begin
      logic [6:0] exp6;
      logic [5:0] nb6;
      {a6, b6} = 12'($urandom);
      m6 = 1'($urandom); cin6 = m6;
      #1;
      nb6  = ~b6;
      exp6 = m6 ? 7'(a6) + 7'(nb6) + 7'd1 : 7'(a6) + 7'(b6);
      checks++;
      if ({cout6, s6} !== exp6) begin
        failures++; $display("FAIL W=6 a=%h b=%h m=%b", a6, b6, m6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
