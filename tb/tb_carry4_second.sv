// tb_carry4_second: exhaustive check of the carry-in-free group carry. When
// some bit of the group has A = B the carry out does not depend on the carry
// in and must equal bit 4 of A + B; when every bit propagates the circuit
// must return A of the lowest bit.
module tb_carry4_second;
  timeunit 1ns; timeprecision 1ns;

  logic [3:0] a, b;
  logic       cout;
  int checks = 0, failures = 0;

  carry4_second dut (.a(a), .x(~(a ^ b)), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic [4:0] sum;
      logic       exp;
      {a, b} = 8'(v);
      #1;
      sum = 5'(a) + 5'(b);
      exp = ((a ^ b) == 4'hf) ? a[0] : sum[4];
      checks++;
      if (cout !== exp) begin
        failures++;
        $display("FAIL a=%h b=%h -> cout=%0b exp=%0b", a, b, cout, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
