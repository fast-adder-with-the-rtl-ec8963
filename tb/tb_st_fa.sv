// tb_st_fa: the self-testing full adder for all 8 inputs and all 16
// injection patterns. Without injection the sum and carry must be correct and
// Error must be 1. With injection the outputs must match the behavioural
// fault model, and any single flip of the sum-path XNOR, the sum or the carry
// must be detected (Error = 0).
module tb_st_fa;
  timeunit 1ns; timeprecision 1ns;
  import ft_adder_pkg::*;
  import tb_ft_model_pkg::*;

  logic    a, b, cin, s, cout, err_n;
  st_inj_t inj;
  int checks = 0, failures = 0, detected = 0;

  st_fa dut (.a(a), .b(b), .cin(cin), .inj(inj), .s(s), .cout(cout), .err_n(err_n));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 16; f++) begin
      for (int v = 0; v < 8; v++) begin
        st_out_t exp;
        {a, b, cin} = 3'(v);
        inj = st_inj_t'(f);
        #1;
        exp = st_fa_model(a, b, cin, inj);
        checks++;
        if ({s, cout, err_n} !== exp) begin
          failures++;
          $display("FAIL inj=%b a=%0b b=%0b cin=%0b -> s=%0b c=%0b e=%0b exp=%b",
                   inj, a, b, cin, s, cout, err_n, exp);
        end
        if (f == 0) begin
          checks++;
          if ({cout, s} !== 2'(a) + 2'(b) + 2'(cin) || err_n !== 1'b1) failures++;
        end
        if (inj == st_inj_t'(1 << INJ_XS) || inj == st_inj_t'(1 << INJ_S) ||
            inj == st_inj_t'(1 << INJ_COUT)) begin
          checks++;
          if (err_n !== 1'b0) failures++;
          else detected++;
        end
      end
    end
    $display("single output faults detected: %0d", detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
