// tb_sc_block4: the self-correcting 4-bit block in both pair positions,
// exhaustively over A, B and Cin. Each vector is applied fault-free and then
// with random multiple faults: in every full adder up to two of the three
// copies carry a detectable fault, and at most one carry circuit copy is
// flipped. The sums and carry out must stay equal to A + B + Cin.
module tb_sc_block4;
  timeunit 1ns; timeprecision 1ns;
  import ft_adder_pkg::*;
  import tb_ft_model_pkg::*;

  logic    [3:0] a, b;
  logic          cin;
  st_inj_t [3:0][SC_COPIES-1:0] inj_fa;
  logic    [TMR_COPIES-1:0]     inj_cg;
  logic    [1:0][3:0] s;
  logic    [1:0]      cout;
  int checks = 0, failures = 0, faults = 0;

  sc_block4               dut_lo (.a(a), .b(b), .cin(cin), .inj_fa(inj_fa), .inj_cg(inj_cg),
                                  .s(s[0]), .cout(cout[0]));
  sc_block4 #(.UPPER(1)) dut_hi (.a(a), .b(b), .cin(cin), .inj_fa(inj_fa), .inj_cg(inj_cg),
                                  .s(s[1]), .cout(cout[1]));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      for (int t = 0; t < 9; t++) begin
        logic [4:0] sum;
        {cin, a, b} = 9'(v);
        inj_fa = '0;
        inj_cg = '0;
        if (t > 0) begin
          for (int i = 0; i < 4; i++) begin
            int unsigned nf, k0, k1;
            nf = $urandom() % 3;           // 0, 1 or 2 faulty copies
            k0 = $urandom() % 3;
            k1 = (k0 + 1 + $urandom() % 2) % 3;
            if (nf >= 1) begin inj_fa[i][k0] = detectable_fault($urandom()); faults++; end
            if (nf == 2) begin inj_fa[i][k1] = detectable_fault($urandom()); faults++; end
          end
          if ($urandom() % 2 == 1) begin inj_cg[$urandom() % 3] = 1'b1; faults++; end
        end
        #1;
        sum = 5'(a) + 5'(b) + 5'(cin);
        for (int u = 0; u < 2; u++) begin
          checks++;
          if ({cout[u], s[u]} !== sum) begin
            failures++;
            $display("FAIL u=%0d a=%h b=%h cin=%0b inj_fa=%h inj_cg=%b -> s=%h c=%0b",
                     u, a, b, cin, inj_fa, inj_cg, s[u], cout[u]);
          end
        end
      end
    end
    $display("faults injected and corrected: %0d", faults);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
