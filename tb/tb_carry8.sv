// tb_carry8: exhaustive check (2^17 vectors) of the fourth and eighth carries
// of an 8-bit pair against integer addition.
module tb_carry8;
  timeunit 1ns; timeprecision 1ns;

  logic [7:0] a, b;
  logic       cin, c4, c8;
  int checks = 0, failures = 0;

  carry8 dut (.a(a), .x(~(a ^ b)), .cin(cin), .c4(c4), .c8(c8));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      logic [8:0] sum;
      logic [4:0] lo;
      {cin, a, b} = 17'(v);
      #1;
      sum = 9'(a) + 9'(b) + 9'(cin);
      lo  = 5'(a[3:0]) + 5'(b[3:0]) + 5'(cin);
      checks++;
      if (c8 !== sum[8] || c4 !== lo[4]) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h cin=%0b -> c4=%0b c8=%0b", a, b, cin, c4, c8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
