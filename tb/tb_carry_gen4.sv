// tb_carry_gen4: the carry generation circuit of a lower (UPPER = 0) and an
// upper (UPPER = 1) block, exhaustively: the output must be the carry out of
// A + B + Cin, inverted when the injection input is 1.
module tb_carry_gen4;
  timeunit 1ns; timeprecision 1ns;

  logic [3:0] a, b;
  logic       cin, inj, c_lo, c_hi;
  int checks = 0, failures = 0;

  carry_gen4               dut_lo (.a(a), .b(b), .cin(cin), .inj(inj), .cout(c_lo));
  carry_gen4 #(.UPPER(1)) dut_hi (.a(a), .b(b), .cin(cin), .inj(inj), .cout(c_hi));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++) begin
      logic [4:0] sum;
      {inj, cin, a, b} = 10'(v);
      #1;
      sum = 5'(a) + 5'(b) + 5'(cin);
      checks += 2;
      if (c_lo !== (sum[4] ^ inj)) begin
        failures++; $display("FAIL lo a=%h b=%h cin=%0b inj=%0b", a, b, cin, inj);
      end
      if (c_hi !== (sum[4] ^ inj)) begin
        failures++; $display("FAIL hi a=%h b=%h cin=%0b inj=%0b", a, b, cin, inj);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
