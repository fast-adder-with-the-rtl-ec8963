// tb_fa_checker: exhaustive check of the full-adder fault detector over all
// 32 combinations of (S, Cout, A XNOR B, B, Cin). A valid full-adder output
// pair has S = Cout when A = B = Cin and S = not Cout otherwise; the checker
// must report 1 exactly for those pairs. It also confirms that every correct
// full-adder result passes.
module tb_fa_checker;
  timeunit 1ns; timeprecision 1ns;

  logic s, cout, xab, b, cin, err_n;
  int checks = 0, failures = 0;

  fa_checker dut (.s(s), .cout(cout), .xab(xab), .b(b), .cin(cin), .err_n(err_n));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic a, all_eq, exp;
      {s, cout, xab, b, cin} = 5'(v);
      #1;
      a      = xab ? b : ~b;
      all_eq = (a == b) && (b == cin);
      exp    = all_eq ? (s == cout) : (s != cout);
      checks++;
      if (err_n !== exp) begin
        failures++;
        $display("FAIL s=%0b cout=%0b a=%0b b=%0b cin=%0b -> err_n=%0b", s, cout, a, b, cin, err_n);
      end
      // a correct full adder result is never flagged
      if ({cout, s} == 2'(a) + 2'(b) + 2'(cin)) begin
        checks++;
        if (err_n !== 1'b1) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
