// tb_sc_fa: the self-correcting full adder for all 8 inputs and all 4096
// injection patterns over its three copies. The outputs must match the
// behavioural selection model for every pattern; with detectable faults in
// any one or two copies the result must be the correct sum and carry.
module tb_sc_fa;
  timeunit 1ns; timeprecision 1ns;
  import ft_adder_pkg::*;
  import tb_ft_model_pkg::*;

  logic                    a, b, cin, s, cout;
  logic    [SC_COPIES-1:0] e;
  st_inj_t [SC_COPIES-1:0] inj;
  int checks = 0, failures = 0, corrected1 = 0, corrected2 = 0;

  sc_fa dut (.a(a), .b(b), .cin(cin), .inj(inj), .s(s), .cout(cout), .e(e));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // exact agreement with the model for every injection pattern
    for (int f = 0; f < 4096; f++) begin
      for (int v = 0; v < 8; v++) begin
        st_out_t exp;
        {a, b, cin} = 3'(v);
        inj = 12'(f);
        #1;
        exp = sc_fa_model(a, b, cin, inj);
        checks++;
        if (s !== exp.s || cout !== exp.cout) begin
          failures++;
          if (failures < 10) $display("FAIL inj=%h v=%0d -> s=%0b c=%0b", inj, v, s, cout);
        end
      end
    end
    // one or two copies with detectable faults: always corrected
    for (int k = 0; k < 3; k++) begin
      for (int m = 0; m < 3; m++) begin
        for (int p = 0; p < 9; p++) begin
          for (int v = 0; v < 8; v++) begin
            {a, b, cin} = 3'(v);
            inj = '0;
            inj[k] = detectable_fault(p);
            if (m != k) inj[m] = detectable_fault(p / 3);
            #1;
            checks++;
            if ({cout, s} !== 2'(a) + 2'(b) + 2'(cin)) begin
              failures++;
              $display("FAIL uncorrected inj=%h a=%0b b=%0b cin=%0b", inj, a, b, cin);
            end
            if (m != k && k != 2 && m != 2) corrected2++;
            else if (k == 0 || m == 0) corrected1++;
          end
        end
      end
    end
    $display("corrected by first redundant copy: %0d, by second: %0d", corrected1, corrected2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
