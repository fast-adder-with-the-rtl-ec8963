// tb_tmr_carry_gen4: the triplicated carry circuit with its voter, for both
// block positions, over all inputs and all 8 patterns of faulty copies. The
// output must be the majority of the three copies: the true carry with at
// most one faulty copy, its complement with two or three.
module tb_tmr_carry_gen4;
  timeunit 1ns; timeprecision 1ns;
  import tb_ft_model_pkg::*;

  logic [3:0] a, b;
  logic [2:0] inj;
  logic       cin, c_lo, c_hi;
  int checks = 0, failures = 0, outvoted = 0;

  tmr_carry_gen4               dut_lo (.a(a), .b(b), .cin(cin), .inj(inj), .cout(c_lo));
  tmr_carry_gen4 #(.UPPER(1)) dut_hi (.a(a), .b(b), .cin(cin), .inj(inj), .cout(c_hi));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      logic [4:0] sum;
      logic       exp;
      {inj, cin, a, b} = 12'(v);
      #1;
      sum = 5'(a) + 5'(b) + 5'(cin);
      exp = maj3(sum[4] ^ inj[0], sum[4] ^ inj[1], sum[4] ^ inj[2]);
      checks += 2;
      if (c_lo !== exp || c_hi !== exp) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%0b inj=%b -> %0b %0b exp %0b", a, b, cin, inj, c_lo, c_hi, exp);
      end
      if ($countones(inj) == 1) begin
        outvoted++;
        checks++;
        if (c_lo !== sum[4] || c_hi !== sum[4]) failures++;
      end
    end
    $display("single faulty copies outvoted: %0d", outvoted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
