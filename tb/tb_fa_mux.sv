// tb_fa_mux: exhaustive check of the multiplexer full adder against integer
// addition (all 8 input combinations).
module tb_fa_mux;
  timeunit 1ns; timeprecision 1ns;

  logic a, b, cin, s, cout, x;
  int checks = 0, failures = 0;

  fa_mux dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout), .x(x));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] sum;
      {a, b, cin} = 3'(v);
      #1;
      sum = 2'(a) + 2'(b) + 2'(cin);
      checks++;
      if ({cout, s} !== sum || x !== (a == b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b -> s=%0b cout=%0b x=%0b", a, b, cin, s, cout, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
