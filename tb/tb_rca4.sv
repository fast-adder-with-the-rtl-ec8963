// tb_rca4: exhaustive check of the 4-bit ripple adder (512 vectors) against
// integer addition, including the exported A XNOR B values.
module tb_rca4;
  timeunit 1ns; timeprecision 1ns;

  logic [3:0] a, b, s, x;
  logic       cin, c4;
  int checks = 0, failures = 0;

  rca4 dut (.a(a), .b(b), .cin(cin), .s(s), .x(x), .c4(c4));

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
      if ({c4, s} !== sum || x !== ~(a ^ b)) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%0b -> s=%h c4=%0b", a, b, cin, s, c4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
