// tb_st_block4: the self-testing 4-bit block in both pair positions.
// Fault-free, exhaustively over A, B and Cin: sums and carry out must equal
// A + B + Cin and every Error must be 1. Then every single detectable fault
// (sum-path XNOR, sum or carry flip of each full adder, or a flipped Cnew) is
// injected for every input: the Error of the faulty adder, or E_Cnew for a
// flipped Cnew, must drop to 0.
module tb_st_block4;
  timeunit 1ns; timeprecision 1ns;
  import ft_adder_pkg::*;
  import tb_ft_model_pkg::*;

  logic    [3:0] a, b;
  logic          cin, inj_cg;
  st_inj_t [3:0] inj_fa;
  logic    [1:0][3:0] s, e_fa;
  logic    [1:0]      cout, e_cnew;
  int checks = 0, failures = 0, det_fa = 0, det_cg = 0;

  st_block4               dut_lo (.a(a), .b(b), .cin(cin), .inj_fa(inj_fa), .inj_cg(inj_cg),
                                  .s(s[0]), .e_fa(e_fa[0]), .cout(cout[0]), .e_cnew(e_cnew[0]));
  st_block4 #(.UPPER(1)) dut_hi (.a(a), .b(b), .cin(cin), .inj_fa(inj_fa), .inj_cg(inj_cg),
                                  .s(s[1]), .e_fa(e_fa[1]), .cout(cout[1]), .e_cnew(e_cnew[1]));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic [4:0] sum;
      {cin, a, b} = 9'(v);
      inj_fa = '0; inj_cg = 1'b0;
      #1;
      sum = 5'(a) + 5'(b) + 5'(cin);
      for (int u = 0; u < 2; u++) begin
        checks++;
        if ({cout[u], s[u]} !== sum || e_fa[u] !== 4'hf || e_cnew[u] !== 1'b1) begin
          failures++;
          $display("FAIL fault-free u=%0d a=%h b=%h cin=%0b -> s=%h c=%0b e=%b ec=%0b",
                   u, a, b, cin, s[u], cout[u], e_fa[u], e_cnew[u]);
        end
      end
      // one detectable fault in each full adder in turn
      for (int i = 0; i < 4; i++) begin
        for (int p = 0; p < 3; p++) begin
          inj_fa = '0;
          inj_fa[i] = detectable_fault(p);
          #1;
          for (int u = 0; u < 2; u++) begin
            checks++;
            if (e_fa[u][i] !== 1'b0) begin
              failures++;
              $display("FAIL undetected u=%0d fa=%0d p=%0d a=%h b=%h cin=%0b", u, i, p, a, b, cin);
            end else det_fa++;
          end
        end
      end
      inj_fa = '0; inj_cg = 1'b1;
      #1;
      for (int u = 0; u < 2; u++) begin
        checks++;
        if (e_cnew[u] !== 1'b0 || e_fa[u] !== 4'hf) begin
          failures++;
          $display("FAIL carry fault u=%0d a=%h b=%h cin=%0b", u, a, b, cin);
        end else det_cg++;
      end
    end
    $display("detected: full adder faults %0d, carry circuit faults %0d", det_fa, det_cg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
