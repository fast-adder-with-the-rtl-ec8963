// tb_carry4_first: exhaustive check of the fast fourth carry: for every A, B
// and Cin, the carry must equal bit 4 of A + B + Cin.
module tb_carry4_first;
  timeunit 1ns; timeprecision 1ns;

  logic [3:0] a, b;
  logic       cin, cout;
  int checks = 0, failures = 0;

  carry4_first dut (.a(a), .x(~(a ^ b)), .cin(cin), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic [4:0] sum;
      {cin, a, b} = 9'(v);
      #1;
      sum = 5'(a) + 5'(b) + 5'(cin);
      checks++;
      if (cout !== sum[4]) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%0b -> cout=%0b", a, b, cin, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
